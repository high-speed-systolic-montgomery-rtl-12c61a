// mmm_mx_top -- the two systolic Montgomery multipliers side by side.
//
// d1_* : Design 1, the two-dimensional pipelined array (mmm_design1) at the
//        128-bit size it is evaluated at; one multiplication accepted every
//        two cycles, each finished 2*K1 cycles after acceptance.
// d2_* : Design 2, the one-row variant (mmm_design2) at the 1024-bit size it
//        is evaluated at; one multiplication every 2*K2 cycles.
// Both return the Montgomery product A*B*2^(-K) mod N in carry-save form
// (s + c, below 2N); adding the two vectors, and a final reduction if a
// fully reduced result is wanted, is left to the user. The two share only
// clock and reset; their ports and handshakes are those of the sub-modules.
module mmm_mx_top #(
  parameter int unsigned K1 = 128,
  parameter int unsigned K2 = 1024
) (
  input  logic          clk,
  input  logic          rst_n,
  // Design 1
  input  logic          d1_in_valid,
  output logic          d1_in_ready,
  input  logic [K1-1:0] d1_a,
  input  logic [K1-1:0] d1_b,
  input  logic [K1-1:0] d1_n,
  output logic          d1_out_valid,
  output logic [K1:0]   d1_s,
  output logic [K1:0]   d1_c,
  // Design 2
  input  logic          d2_start,
  output logic          d2_ready,
  input  logic [K2-1:0] d2_a,
  input  logic [K2-1:0] d2_b,
  input  logic [K2-1:0] d2_n,
  output logic          d2_done,
  output logic [K2:0]   d2_s,
  output logic [K2:0]   d2_c
);
  mmm_design1 #(.K(K1)) u_design1 (
    .clk      (clk),
    .rst_n    (rst_n),
    .in_valid (d1_in_valid),
    .in_ready (d1_in_ready),
    .a        (d1_a),
    .b        (d1_b),
    .n        (d1_n),
    .out_valid(d1_out_valid),
    .s_out    (d1_s),
    .c_out    (d1_c)
  );

  mmm_design2 #(.K(K2)) u_design2 (
    .clk      (clk),
    .rst_n    (rst_n),
    .start    (d2_start),
    .ready    (d2_ready),
    .a        (d2_a),
    .b        (d2_b),
    .n        (d2_n),
    .done     (d2_done),
    .s_out    (d2_s),
    .c_out    (d2_c)
  );
endmodule
