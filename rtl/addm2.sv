// addm2: adder modulo two ("AddM2"), W bits wide.
//
// Adds two polynomials over GF(2): each output coefficient is the XOR of the
// two input coefficients, with no carry between bit positions. It forms both
// the running result R_i = r_i XOR R_(i-1) in each pipeline stage and, inside
// the partial remainder former, the subtraction of the modulus P(x).
// Purely combinational.
//
// Ports: a, b (W-bit operands), s (W-bit sum).
module addm2 #(
  parameter int unsigned W = pmm_pkg::DEFAULT_N
) (
  input  logic [W-1:0] a,
  input  logic [W-1:0] b,
  output logic [W-1:0] s
);

  always_comb s = a ^ b;

endmodule
