// mx_row -- one row of basic cells with registered outputs: a single
// iteration of the modified Montgomery multiplication (MMM_MX) in two cycles.
//
// The row holds W basic cells, each followed by a sum and a carry flip-flop.
// Column j's carry has weight 2^(j+1), so inside the row it feeds column
// j+1 (ct_{j+1} = carry_j, ct_0 = 0); the sum stays in column j (st_j = sum_j).
//   cycle with ctrl = 0 : (Ct, St) <= Cin + Sin + a_i*B
//   cycle with ctrl = 1 : (C,  S ) <= Ct + St + q*N,  q = St_0 (own register)
// After the second cycle the registered sum bit S_0 is always 0 (N is odd),
// and the row presents the next iteration's inputs
//   sin_out = S >> 1 (top bit 0),  cin_out = C
// i.e. the divide-by-two of the algorithm is pure wiring.
//
// Interface: sin/cin are the shifted outputs of the preceding iteration
// (another row, or this row's own outputs for the one-row multiplier). B and
// N must be held for both cycles of an iteration. Registers load on every
// clock edge with en = 1 and clear on a synchronous active-low reset; reset
// and enable are choices of this implementation. The operand pairing, the
// q = St_0 rule and the shift wiring follow the source design; W is the
// number of columns (operand width plus two guard columns, see the
// multipliers).
module mx_row #(
  parameter int unsigned W = 130
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         en,
  input  logic         ctrl,
  input  logic         a_bit,     // a_i of this iteration (used while ctrl = 0)
  input  logic [W-1:0] b,
  input  logic [W-1:0] n,
  input  logic [W-1:0] sin,       // previous iteration's sum, already shifted
  input  logic [W-1:0] cin,       // previous iteration's carry
  output logic [W-1:0] sum_q,     // registered sum outputs
  output logic [W-1:0] carry_q,   // registered carry outputs
  output logic         q,         // quotient bit, LSB of the registered sum
  output logic [W-1:0] sin_out,   // sum_q shifted right: next iteration's sin
  output logic [W-1:0] cin_out    // carry_q: next iteration's cin
);
  logic [W-1:0] sum_d, carry_d, ct;

  assign q       = sum_q[0];
  assign ct      = {carry_q[W-2:0], 1'b0};
  assign sin_out = {1'b0, sum_q[W-1:1]};
  assign cin_out = carry_q;

  for (genvar j = 0; j < W; j++) begin : g_col
    basic_cell u_bc (
      .ctrl (ctrl),
      .a_i  (a_bit),
      .q    (q),
      .b_j  (b[j]),
      .n_j  (n[j]),
      .sin_j(sin[j]),
      .st_j (sum_q[j]),
      .cin_j(cin[j]),
      .ct_j (ct[j]),
      .sum  (sum_d[j]),
      .carry(carry_d[j])
    );
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      sum_q   <= '0;
      carry_q <= '0;
    end else if (en) begin
      sum_q   <= sum_d;
      carry_q <= carry_d;
    end
  end
endmodule
