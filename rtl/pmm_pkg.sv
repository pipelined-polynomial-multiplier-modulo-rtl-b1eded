// pmm_pkg: constants shared by the pipelined polynomial multiplier modulo P(x).
//
// The multiplier works on polynomials over GF(2) (binary coefficients). An
// operand polynomial of degree below N is held as an N-bit vector, bit i being
// the coefficient of x^i; the modulus P(x) has degree exactly N and is held as
// an (N+1)-bit vector whose top bit is 1. DEFAULT_N = 4 is the size of the
// worked example and of the FPGA build the design follows (four-bit polynomials,
// four pipeline stages).
package pmm_pkg;

  // Degree of the modulus, width of the operands, and number of pipeline stages.
  parameter int unsigned DEFAULT_N = 4;

endpackage
