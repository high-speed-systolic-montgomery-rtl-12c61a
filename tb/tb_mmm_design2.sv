// tb_mmm_design2 -- end-to-end test of the one-row multiplier at K = 24.
//
// Runs random multiplications (plus corner cases). Some are started in the
// last cycle of the previous one (back to back), others after an idle gap.
// For every result it checks the Montgomery relation against an independent
// modular reference (tb_mont_pkg) and the latency of 2K cycles from
// acceptance to done; during idle gaps it checks that the result stays put
// and ready stays high. Back-to-back starts and idle gaps are counted and
// must both occur.
module tb_mmm_design2;
  import tb_mont_pkg::*;
  localparam int unsigned K = 24;
  localparam int unsigned NOPS = 60;
  typedef mont_ref#(K) ref_t;

  logic         clk = 1'b0, rst_n = 1'b0;
  logic         start = 1'b0, ready, done;
  logic [K-1:0] a = '0, b = '0, n = '0;
  logic [K:0]   s_out, c_out;

  int checks = 0, failures = 0;
  int edges = 0;
  int issued = 0, received = 0;
  int n_back_to_back = 0, n_idle_gap = 0;

  typedef struct packed {
    logic [K-1:0] a, b, n;
    int           acc_edge;
  } op_t;
  op_t          q[$];
  op_t          o;
  logic [K-1:0] cur_a, cur_b, cur_n;
  bit           in_flight = 1'b0;
  bit           gap_mode = 1'b0;
  logic [K:0]   held_s, held_c;
  bit           have_held = 1'b0;

  mmm_design2 #(.K(K)) dut (.*);

  always #5 clk = ~clk;
  always @(posedge clk) edges++;

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s", what);
    end
  endtask

  always @(negedge clk) if (rst_n) begin
    // response
    if (done) begin
      check(q.size() > 0, "done with nothing in flight");
      if (q.size() > 0) begin
        o = q.pop_front();
        check(ref_t::check(o.a, o.b, o.n, s_out, c_out),
              $sformatf("result a=%h b=%h n=%h s=%h c=%h", o.a, o.b, o.n, s_out, c_out));
        check(edges - o.acc_edge == 2 * K,
              $sformatf("latency %0d expected %0d", edges - o.acc_edge, 2 * K));
      end
      received++;
      in_flight = (q.size() > 0);
      held_s = s_out; held_c = c_out; have_held = 1'b1;
    end else if (have_held && !in_flight) begin
      check(ready && s_out == held_s && c_out == held_c, "idle: result held, ready high");
    end
    // stimulus
    start = 1'b0;
    if (ready && issued < NOPS && (!gap_mode || $urandom_range(0, 3) == 0)) begin
      if (in_flight) n_back_to_back++;
      else if (issued > 0) n_idle_gap++;
      cur_n = ref_t::rand_mod();
      cur_b = ref_t::rand_below(cur_n);
      cur_a = ref_t::rand_word();
      if (issued == 0) begin cur_n = '1; cur_b = cur_n - 1; cur_a = '1; end
      if (issued == 1) cur_a = '0;
      if (issued == 2) begin cur_n = K'(3); cur_b = K'(2); end
      {a, b, n} = {cur_a, cur_b, cur_n};
      start = 1'b1;
      q.push_back({cur_a, cur_b, cur_n, edges + 1});
      issued++;
      gap_mode = ($urandom_range(0, 2) == 0);
    end
    if (start) in_flight = 1'b1;
  end

  initial begin
    repeat (3) @(posedge clk);
    #1 rst_n = 1'b1;
    wait (received == NOPS);
    repeat (4) @(negedge clk);
    check(n_back_to_back > 0, "back-to-back start happened");
    check(n_idle_gap > 0, "idle gap happened");
    $display("back_to_back=%0d idle_gaps=%0d", n_back_to_back, n_idle_gap);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    wait (edges == NOPS * (2 * K + 10) + 100);
    failures++;
    $display("watchdog: received %0d of %0d", received, NOPS);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
