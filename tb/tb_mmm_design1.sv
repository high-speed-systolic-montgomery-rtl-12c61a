// tb_mmm_design1 -- end-to-end test of the two-dimensional pipelined
// multiplier at K = 16.
//
// Streams random multiplications (plus corner cases) into the array, mostly
// back to back (one every two cycles) with occasional bubbles, and checks
// for every result: the Montgomery relation against an independent modular
// reference (tb_mont_pkg), arrival in issue order, and the latency of 2K
// cycles from acceptance to the result. It also checks that in_ready is
// high every other cycle and counts how often the pipeline held more than
// one operation and how often back-to-back issue and bubbles occurred.
module tb_mmm_design1;
  import tb_mont_pkg::*;
  localparam int unsigned K = 16;
  localparam int unsigned NOPS = 300;
  typedef mont_ref#(K) ref_t;

  typedef struct packed {
    logic [K-1:0] a, b, n;
    int           acc_edge;
  } op_t;

  logic         clk = 1'b0, rst_n = 1'b0;
  logic         in_valid = 1'b0, in_ready, out_valid;
  logic [K-1:0] a = '0, b = '0, n = '0;
  logic [K:0]   s_out, c_out;

  int checks = 0, failures = 0;
  int edges = 0;
  int issued = 0, received = 0;
  int n_back_to_back = 0, n_bubble = 0, n_overlap = 0, max_inflight = 0;
  int last_acc = -100;
  op_t q[$];

  mmm_design1 #(.K(K)) dut (.*);

  always #5 clk = ~clk;
  always @(posedge clk) edges++;

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s", what);
    end
  endtask

  function automatic op_t make_op(int idx);
    op_t o;
    o.n = ref_t::rand_mod();
    o.b = ref_t::rand_below(o.n);
    o.a = ref_t::rand_word();
    case (idx)
      0: begin o.n = '1; o.b = o.n - 1; o.a = '1; end
      1: begin o.a = '0; end
      2: begin o.n = '1; o.b = '0; o.a = '1; end
      3: begin o.n = K'(3); o.b = K'(2); o.a = '1; end
      default: ;
    endcase
    o.acc_edge = 0;
    return o;
  endfunction

  // Stimulus and response, both on the falling edge.
  op_t pending;
  bit  have_pending = 1'b0;
  int  prev_ready = -1;
  always @(negedge clk) if (rst_n) begin
    // the handshake must open every other cycle
    if (prev_ready != -1) check(in_ready != prev_ready[0], "in_ready alternates");
    prev_ready = int'(in_ready);
    // response
    if (out_valid) begin
      if (q.size() == 0) check(1'b0, "result with nothing in flight");
      else begin
        op_t o;
        o = q.pop_front();
        check(ref_t::check(o.a, o.b, o.n, s_out, c_out),
              $sformatf("result a=%h b=%h n=%h s=%h c=%h", o.a, o.b, o.n, s_out, c_out));
        check(edges - o.acc_edge == 2 * K,
              $sformatf("latency %0d expected %0d", edges - o.acc_edge, 2 * K));
        received++;
      end
    end
    // stimulus: decide what the next rising edge will see
    in_valid = 1'b0;
    if (in_ready && issued < NOPS) begin
      if ($urandom_range(0, 9) == 0) n_bubble++;
      else begin
        pending = make_op(issued);
        pending.acc_edge = edges + 1;
        {a, b, n} = {pending.a, pending.b, pending.n};
        in_valid = 1'b1;
        if (pending.acc_edge - last_acc == 2) n_back_to_back++;
        last_acc = pending.acc_edge;
        q.push_back(pending);
        issued++;
        if (q.size() > 1) n_overlap++;
        if (q.size() > max_inflight) max_inflight = q.size();
      end
    end
  end

  initial begin
    repeat (3) @(posedge clk);
    #1 rst_n = 1'b1;
    wait (received == NOPS);
    @(negedge clk);
    check(q.size() == 0, "all results returned");
    check(n_back_to_back > 0, "back-to-back issue happened");
    check(n_bubble > 0, "pipeline bubble happened");
    check(n_overlap > 0 && max_inflight >= K - 1, "several operations in flight");
    $display("back_to_back=%0d bubbles=%0d max_in_flight=%0d", n_back_to_back, n_bubble,
             max_inflight);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    wait (edges == 4 * NOPS + 8 * K + 100);
    failures++;
    $display("watchdog: received %0d of %0d", received, NOPS);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
