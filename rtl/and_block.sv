// and_block: the gating block ("AND_i") of a pipeline stage.
//
// An N-bit word of polynomial coefficients passes to the output when the
// control bit (one coefficient b_i of the multiplier B(x)) is 1; otherwise the
// output is all zeros. In GF(2) this is the product b_i * r_i of one
// multiplier coefficient with a partial remainder. Purely combinational.
//
// Ports: ctrl (the b_i bit), din (N-bit partial remainder), dout (N bits).
module and_block #(
  parameter int unsigned N = pmm_pkg::DEFAULT_N
) (
  input  logic         ctrl,
  input  logic [N-1:0] din,
  output logic [N-1:0] dout
);

  always_comb dout = din & {N{ctrl}};

endmodule
