// tb_mx_row -- tests one registered row of basic cells through complete
// two-cycle iterations with random operands (W = 12 columns).
//
// After the ctrl = 0 cycle the registers must hold St + 2*Ct = sin + cin + a*B.
// After the ctrl = 1 cycle they must hold S + 2*C = St + 2*Ct + q*N with
// q = St_0, S_0 = 0 for odd N, and the shifted outputs sin_out = S >> 1,
// cin_out = C. Operands are kept small enough that no carry leaves the row.
// A cycle with en = 0 must leave the registers unchanged.
module tb_mx_row;
  localparam int unsigned W = 12;

  logic         clk = 1'b0, rst_n, en, ctrl, a_bit, q;
  logic [W-1:0] b, n, sin, cin, sum_q, carry_q, sin_out, cin_out;
  int checks = 0, failures = 0;
  int cycles = 0;

  mx_row #(.W(W)) dut (.*);

  always #5 clk = ~clk;
  always @(posedge clk) cycles++;

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s", what);
    end
  endtask

  initial begin
    longint v0, v1, exp0, exp1;
    logic   qexp;
    rst_n = 1'b0; en = 1'b1; ctrl = 1'b0; a_bit = 1'b0;
    b = '0; n = '0; sin = '0; cin = '0;
    @(posedge clk); #1;
    rst_n = 1'b1;
    check(sum_q == '0 && carry_q == '0, "reset clears registers");
    for (int t = 0; t < 300; t++) begin
      // first cycle of the iteration
      ctrl  = 1'b0;
      a_bit = 1'($urandom);
      b     = W'($urandom_range(0, (1 << (W - 3)) - 1));
      n     = W'($urandom_range(0, (1 << (W - 3)) - 1)) | W'(1);
      sin   = W'($urandom_range(0, (1 << (W - 3)) - 1));
      cin   = W'($urandom_range(0, (1 << (W - 3)) - 1));
      exp0  = longint'(sin) + longint'(cin) + (a_bit ? longint'(b) : 0);
      @(posedge clk); #1;
      v0 = longint'(sum_q) + 2 * longint'(carry_q);
      check(v0 == exp0, $sformatf("ctrl=0 value %0d expected %0d", v0, exp0));
      qexp = sum_q[0];
      check(q == qexp, "q is the LSB of the intermediate sum");
      // optionally hold one cycle with the enable low
      if (t % 7 == 3) begin
        logic [W-1:0] s_hold, c_hold;
        s_hold = sum_q; c_hold = carry_q;
        en = 1'b0; ctrl = 1'b1;
        @(posedge clk); #1;
        check(sum_q == s_hold && carry_q == c_hold, "en=0 holds the registers");
        en = 1'b1;
      end
      // second cycle of the iteration
      ctrl = 1'b1;
      exp1 = v0 + (qexp ? longint'(n) : 0);
      // inputs for the ctrl = 0 group must not matter now
      sin = W'($urandom); cin = W'($urandom); b = W'($urandom); a_bit = 1'($urandom);
      @(posedge clk); #1;
      v1 = longint'(sum_q) + 2 * longint'(carry_q);
      check(v1 == exp1, $sformatf("ctrl=1 value %0d expected %0d", v1, exp1));
      check(sum_q[0] == 1'b0, "S_0 is zero after adding q*N");
      check(sin_out == (sum_q >> 1) && cin_out == carry_q, "shifted outputs");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    wait (cycles == 5000);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
