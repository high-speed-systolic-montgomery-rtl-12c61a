// tb_mmm_mx_top -- end-to-end test of the top at its default sizes
// (Design 1 with K1 = 128, Design 2 with K2 = 1024), both running at once.
//
// Design 1 receives a stream of random 128-bit multiplications, mostly back
// to back with a few bubbles; Design 2 runs three 1024-bit
// multiplications, the second started in the last cycle of the first (back
// to back), the third after an idle gap. Every result is checked against an
// independent modular reference (tb_mont_pkg) and for its latency of 2K
// cycles. Each mechanism (pipelined back-to-back issue, several operations
// in flight, bubble, back-to-back start of Design 2, idle gap of Design 2)
// is counted and must occur at least once.
module tb_mmm_mx_top;
  import tb_mont_pkg::*;
  localparam int unsigned K1 = 128;
  localparam int unsigned K2 = 1024;
  localparam int unsigned NOPS1 = 40;
  localparam int unsigned NOPS2 = 3;
  typedef mont_ref#(K1) ref1_t;
  typedef mont_ref#(K2) ref2_t;

  typedef struct packed {
    logic [K1-1:0] a, b, n;
    int            acc_edge;
  } op1_t;
  typedef struct packed {
    logic [K2-1:0] a, b, n;
    int            acc_edge;
  } op2_t;

  logic          clk = 1'b0, rst_n = 1'b0;
  logic          d1_in_valid = 1'b0, d1_in_ready, d1_out_valid;
  logic [K1-1:0] d1_a = '0, d1_b = '0, d1_n = '0;
  logic [K1:0]   d1_s, d1_c;
  logic          d2_start = 1'b0, d2_ready, d2_done;
  logic [K2-1:0] d2_a = '0, d2_b = '0, d2_n = '0;
  logic [K2:0]   d2_s, d2_c;

  int checks = 0, failures = 0;
  int edges = 0;
  int issued1 = 0, received1 = 0, issued2 = 0, received2 = 0;
  int n1_back_to_back = 0, n1_bubble = 0, n1_max_inflight = 0;
  int n2_back_to_back = 0, n2_idle_gap = 0;
  int last_acc1 = -100, idle2 = 0;

  op1_t q1[$], o1, p1;
  op2_t q2[$], o2, p2;

  mmm_mx_top dut (.*);

  always #5 clk = ~clk;
  always @(posedge clk) edges++;

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s", what);
    end
  endtask

  // Design 1 traffic
  always @(negedge clk) if (rst_n) begin
    if (d1_out_valid) begin
      check(q1.size() > 0, "design 1 result with nothing in flight");
      if (q1.size() > 0) begin
        o1 = q1.pop_front();
        check(ref1_t::check(o1.a, o1.b, o1.n, d1_s, d1_c), "design 1 result");
        check(edges - o1.acc_edge == 2 * K1, "design 1 latency");
        received1++;
      end
    end
    d1_in_valid = 1'b0;
    if (d1_in_ready && issued1 < NOPS1) begin
      if (issued1 % 13 == 5 && last_acc1 == edges - 1) n1_bubble++;
      else begin
        p1.n = ref1_t::rand_mod();
        p1.b = ref1_t::rand_below(p1.n);
        p1.a = ref1_t::rand_word();
        if (issued1 == 0) begin p1.n = '1; p1.b = p1.n - 1; p1.a = '1; end
        p1.acc_edge = edges + 1;
        {d1_a, d1_b, d1_n} = {p1.a, p1.b, p1.n};
        d1_in_valid = 1'b1;
        if (p1.acc_edge - last_acc1 == 2) n1_back_to_back++;
        last_acc1 = p1.acc_edge;
        q1.push_back(p1);
        issued1++;
        if (q1.size() > n1_max_inflight) n1_max_inflight = q1.size();
      end
    end
  end

  // Design 2 traffic
  always @(negedge clk) if (rst_n) begin
    if (d2_done) begin
      check(q2.size() > 0, "design 2 result with nothing in flight");
      if (q2.size() > 0) begin
        o2 = q2.pop_front();
        check(ref2_t::check(o2.a, o2.b, o2.n, d2_s, d2_c), "design 2 result");
        check(edges - o2.acc_edge == 2 * K2, "design 2 latency");
        received2++;
      end
    end
    d2_start = 1'b0;
    if (q2.size() == 0) idle2++;
    if (d2_ready && issued2 < NOPS2 && (issued2 != 2 || idle2 >= 5)) begin
      if (q2.size() > 0) n2_back_to_back++;
      else if (issued2 > 0) n2_idle_gap++;
      p2.n = ref2_t::rand_mod();
      p2.b = ref2_t::rand_below(p2.n);
      p2.a = ref2_t::rand_word();
      p2.acc_edge = edges + 1;
      {d2_a, d2_b, d2_n} = {p2.a, p2.b, p2.n};
      d2_start = 1'b1;
      q2.push_back(p2);
      issued2++;
      idle2 = 0;
    end
  end

  initial begin
    repeat (3) @(posedge clk);
    #1 rst_n = 1'b1;
    wait (received1 == NOPS1 && received2 == NOPS2);
    @(negedge clk);
    check(n1_back_to_back > 0, "design 1 back-to-back issue happened");
    check(n1_bubble > 0, "design 1 bubble happened");
    check(n1_max_inflight > 1, "design 1 held several operations at once");
    check(n2_back_to_back > 0, "design 2 back-to-back start happened");
    check(n2_idle_gap > 0, "design 2 idle gap happened");
    $display("d1: back_to_back=%0d bubbles=%0d max_in_flight=%0d; d2: back_to_back=%0d idle_gaps=%0d",
             n1_back_to_back, n1_bubble, n1_max_inflight, n2_back_to_back, n2_idle_gap);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    wait (edges == NOPS2 * (2 * K2 + 20) + 200);
    failures++;
    $display("watchdog: design 1 %0d of %0d, design 2 %0d of %0d", received1, NOPS1,
             received2, NOPS2);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
