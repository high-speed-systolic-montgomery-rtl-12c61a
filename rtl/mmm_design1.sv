// mmm_design1 -- two-dimensional, bit-parallel, pipelined systolic Montgomery
// multiplier ("Design 1").
//
// Computes a carry-save pair (S, C) with S + C = A*B*2^(-K) mod N, S + C < 2N,
// for odd N < 2^K, B < N and any K-bit A, without a final subtraction and
// without precomputing B + N.
//
// Structure: K rows of basic cells (mx_row), row i performing iteration i of
// the algorithm with multiplier bit a_i. Every row spends two cycles on an
// operation: with ctrl = 0 it adds a_i*B to the shifted result of row i-1,
// with ctrl = 1 it adds q*N to its own intermediate result. A single ctrl
// flip-flop toggles every cycle and is shared by all rows, so each row hands
// its finished iteration to the next row at the same clock edge at which it
// picks up the next operation from the row above. Row 0 sees Sin = Cin = 0.
//
// Timing: an operation is accepted on a clock edge with in_valid & in_ready
// (in_ready is high during ctrl = 1 cycles, i.e. every other cycle). Its
// result (s_out, c_out) is presented, with out_valid high, for the one cycle
// that starts 2K clock edges after acceptance. A new operation can be
// accepted every two cycles, so K operations are in flight at once.
//
// Choices of this implementation, not of the source design:
//  * Each row has two guard columns above the K operand bits (b, n = 0
//    there). With exactly K columns the carry out of the top cell in the
//    ctrl = 0 cycle is lost whenever Sin + Cin + a_i*B reaches 2^K.
//  * A, B, N and a valid flag travel down the array in per-row operand
//    registers that advance every two cycles, so each row works on the
//    operands of the operation it holds and different operands can follow
//    one another back to back.
//  * Handshake, synchronous active-low reset and the output valid flag.
// Assertions flag operands that break the preconditions (N odd, B < N).
module mmm_design1 #(
  parameter int unsigned K = 128
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         in_valid,
  output logic         in_ready,
  input  logic [K-1:0] a,
  input  logic [K-1:0] b,
  input  logic [K-1:0] n,
  output logic         out_valid,
  output logic [K:0]   s_out,      // sum vector of the result
  output logic [K:0]   c_out       // carry vector of the result (bit j has weight 2^j)
);
  localparam int unsigned W = K + 2;

  logic ctrl;
  logic out_valid_q;

  logic [K-1:0] op_a [K];
  logic [K-1:0] op_b [K];
  logic [K-1:0] op_n [K];
  logic         op_v [K];

  logic [W-1:0] row_sin_out [K];
  logic [W-1:0] row_cin_out [K];

  assign in_ready  = ctrl;
  assign out_valid = out_valid_q;

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      ctrl        <= 1'b0;
      out_valid_q <= 1'b0;
    end else begin
      ctrl        <= ~ctrl;
      out_valid_q <= ctrl & op_v[K-1];
    end
  end

  // Operand preconditions of the Montgomery recurrence (simulation only).
  always_ff @(posedge clk) begin
    if (rst_n && in_valid && in_ready) begin
      assert (n[0] == 1'b1) else $error("mmm_design1: modulus N must be odd");
      assert (b < n) else $error("mmm_design1: multiplicand B must be below N");
    end
  end

  // Operand registers: advance one row at the end of every ctrl = 1 cycle.
  always_ff @(posedge clk) begin
    if (!rst_n) begin
      for (int i = 0; i < K; i++) begin
        op_v[i] <= 1'b0;
        op_a[i] <= '0;
        op_b[i] <= '0;
        op_n[i] <= '0;
      end
    end else if (ctrl) begin
      op_v[0] <= in_valid;
      op_a[0] <= a;
      op_b[0] <= b;
      op_n[0] <= n;
      for (int i = 1; i < K; i++) begin
        op_v[i] <= op_v[i-1];
        op_a[i] <= op_a[i-1];
        op_b[i] <= op_b[i-1];
        op_n[i] <= op_n[i-1];
      end
    end
  end

  for (genvar i = 0; i < K; i++) begin : g_row
    logic [W-1:0] sin_i, cin_i;
    logic [W-1:0] sum_q_unused, carry_q_unused;
    logic         q_unused;

    if (i == 0) begin : g_first
      assign sin_i = '0;
      assign cin_i = '0;
    end else begin : g_next
      assign sin_i = row_sin_out[i-1];
      assign cin_i = row_cin_out[i-1];
    end

    mx_row #(.W(W)) u_row (
      .clk    (clk),
      .rst_n  (rst_n),
      .en     (1'b1),
      .ctrl   (ctrl),
      .a_bit  (op_a[i][i]),
      .b      ({2'b00, op_b[i]}),
      .n      ({2'b00, op_n[i]}),
      .sin    (sin_i),
      .cin    (cin_i),
      .sum_q  (sum_q_unused),
      .carry_q(carry_q_unused),
      .q      (q_unused),
      .sin_out(row_sin_out[i]),
      .cin_out(row_cin_out[i])
    );
  end

  assign s_out = row_sin_out[K-1][K:0];
  assign c_out = row_cin_out[K-1][K:0];
endmodule
