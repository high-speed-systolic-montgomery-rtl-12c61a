// gfa -- gated full adder, the arithmetic core of every basic cell.
//
// Adds three single-bit quantities, one of which is the AND of two inputs:
//   {carry, sum} = (in1 & in2) + in3 + in4
// In the modified Montgomery iteration the gated term is either a_i*b_j
// (first cycle of an iteration) or q*n_j (second cycle), while in3/in4 are
// the sum and carry bits of the running carry-save accumulator.
//
// Purely combinational, no clock. The function is the one the source
// algorithm specifies; the gate-level form (XOR sum, majority carry) is the
// ordinary full-adder structure chosen here.
module gfa (
  input  logic in1,   // gating bit: a_i or q
  input  logic in2,   // gated operand bit: b_j or n_j
  input  logic in3,   // accumulator sum bit
  input  logic in4,   // accumulator carry bit
  output logic sum,
  output logic carry
);
  logic g;

  always_comb begin
    g     = in1 & in2;
    sum   = g ^ in3 ^ in4;
    carry = (g & in3) | (g & in4) | (in3 & in4);
  end
endmodule
