// mmm_design2 -- one-dimensional systolic Montgomery multiplier ("Design 2").
//
// Computes a carry-save pair (S, C) with S + C = A*B*2^(-K) mod N, S + C < 2N,
// for odd N < 2^K, B < N and any K-bit A, without a final subtraction and
// without precomputing B + N.
//
// Structure: a single row of basic cells (mx_row) whose shifted outputs are
// fed back to its own sin/cin inputs, so the row performs all K iterations
// one after another. B and N are applied to the row in parallel; the bits of
// A are applied serially, a new bit every second cycle. Each iteration takes
// two cycles (ctrl = 0: add a_i*B, ctrl = 1: add q*N), 2K cycles in all.
//
// Timing: start is accepted on a clock edge where ready is high; A, B and N
// are captured then. ready is high when idle and during the last cycle of a
// multiplication, so multiplications can follow each other with no gap.
// done is high, and (s_out, c_out) hold the result, in the one cycle that
// starts 2K clock edges after acceptance; while idle the result stays put.
//
// Choices of this implementation, not of the source design: two guard
// columns above the K operand bits (see mmm_design1); A, B and N captured
// in registers (A in a shift register that supplies a_i); during the first
// iteration the fed-back sin/cin are forced to zero (the algorithm's
// initialisation); the start/ready/done handshake and synchronous reset.
// Assertions flag operands that break the preconditions (N odd, B < N).
module mmm_design2 #(
  parameter int unsigned K = 1024
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         start,
  output logic         ready,
  input  logic [K-1:0] a,
  input  logic [K-1:0] b,
  input  logic [K-1:0] n,
  output logic         done,
  output logic [K:0]   s_out,      // sum vector of the result
  output logic [K:0]   c_out       // carry vector of the result (bit j has weight 2^j)
);
  localparam int unsigned W  = K + 2;
  localparam int unsigned IW = (K > 1) ? $clog2(K) : 1;

  logic          busy, ctrl, done_q;
  logic [IW-1:0] iter;
  logic [K-1:0]  a_sr, b_q, n_q;
  logic          last;

  logic [W-1:0]  sin_fb, cin_fb, sin_in, cin_in;
  logic [W-1:0]  sum_q_unused, carry_q_unused;
  logic          q_unused;

  assign last  = busy && ctrl && (iter == IW'(K - 1));
  assign ready = !busy || last;
  assign done  = done_q;

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      busy   <= 1'b0;
      ctrl   <= 1'b0;
      iter   <= '0;
      done_q <= 1'b0;
      a_sr   <= '0;
      b_q    <= '0;
      n_q    <= '0;
    end else begin
      done_q <= last;
      if (start && ready) begin
        busy <= 1'b1;
        ctrl <= 1'b0;
        iter <= '0;
        a_sr <= a;
        b_q  <= b;
        n_q  <= n;
      end else if (busy) begin
        ctrl <= ~ctrl;
        if (ctrl) begin
          iter <= iter + 1'b1;
          a_sr <= a_sr >> 1;
          if (last) busy <= 1'b0;
        end
      end
    end
  end

  // Operand preconditions of the Montgomery recurrence (simulation only).
  always_ff @(posedge clk) begin
    if (rst_n && start && ready) begin
      assert (n[0] == 1'b1) else $error("mmm_design2: modulus N must be odd");
      assert (b < n) else $error("mmm_design2: multiplicand B must be below N");
    end
  end

  // Initialisation: the first iteration starts from Sin = Cin = 0.
  always_comb begin
    if (iter == '0) begin
      sin_in = '0;
      cin_in = '0;
    end else begin
      sin_in = sin_fb;
      cin_in = cin_fb;
    end
  end

  mx_row #(.W(W)) u_row (
    .clk    (clk),
    .rst_n  (rst_n),
    .en     (busy),
    .ctrl   (ctrl),
    .a_bit  (a_sr[0]),
    .b      ({2'b00, b_q}),
    .n      ({2'b00, n_q}),
    .sin    (sin_in),
    .cin    (cin_in),
    .sum_q  (sum_q_unused),
    .carry_q(carry_q_unused),
    .q      (q_unused),
    .sin_out(sin_fb),
    .cin_out(cin_fb)
  );

  assign s_out = sin_fb[K:0];
  assign c_out = cin_fb[K:0];
endmodule
