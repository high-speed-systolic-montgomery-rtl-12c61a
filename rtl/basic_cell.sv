// basic_cell -- computing element of both systolic multipliers.
//
// Four single-bit 2-to-1 multiplexers, all steered by ctrl, pick one of two
// groups of operands for a gated full adder:
//   ctrl = 0 : in1 = a_i, in2 = b_j, in3 = sin_j, in4 = cin_j
//              (add a_i*B to the shifted result of the previous iteration)
//   ctrl = 1 : in1 = q,   in2 = n_j, in3 = st_j,  in4 = ct_j
//              (add q*N to the intermediate result of the first cycle)
// so one adder serves both halves of a Montgomery iteration.
//
// Combinational; the output flip-flops belong to the row that holds the
// cell (mx_row). Structure and operand pairing follow the source design.
module basic_cell (
  input  logic ctrl,   // 0: first cycle of an iteration, 1: second cycle
  input  logic a_i,    // multiplier bit of this iteration
  input  logic q,      // quotient bit (LSB of the intermediate sum)
  input  logic b_j,    // multiplicand bit
  input  logic n_j,    // modulus bit
  input  logic sin_j,  // sum bit from the previous iteration, already shifted
  input  logic st_j,   // intermediate sum bit of this iteration
  input  logic cin_j,  // carry bit from the previous iteration
  input  logic ct_j,   // intermediate carry bit of this iteration (from column j-1)
  output logic sum,
  output logic carry
);
  logic in1, in2, in3, in4;

  always_comb begin
    in1 = ctrl ? q     : a_i;
    in2 = ctrl ? n_j   : b_j;
    in3 = ctrl ? st_j  : sin_j;
    in4 = ctrl ? ct_j  : cin_j;
  end

  gfa u_gfa (
    .in1  (in1),
    .in2  (in2),
    .in3  (in3),
    .in4  (in4),
    .sum  (sum),
    .carry(carry)
  );
endmodule
