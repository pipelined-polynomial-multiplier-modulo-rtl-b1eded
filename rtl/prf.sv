// prf: partial remainder former ("PRF").
//
// Computes r_i = (x * r_(i-1)) mod P(x) for a partial remainder r_(i-1) of
// degree below N and a modulus P(x) of degree N. Doubling (multiplying by x)
// is a one-place shift towards the high coefficients, which gives an (N+1)-bit
// value 2r. Its top bit H says whether 2r reaches degree N:
//   H = 0: 2r is already reduced and is passed on unchanged;
//   H = 1: P(x) is subtracted (added mod 2) once, which clears bit N.
// The structure is the one of the design: an N-bit adder modulo two on the
// low bits and a two-way multiplexer steered by H. Because P(x) has a 1 in
// bit N, only its N low bits (p_low) take part in the addition.
// Purely combinational.
//
// Ports: r_prev (N bits), p_low (bits N-1..0 of P), r_next (N bits).
module prf #(
  parameter int unsigned N = pmm_pkg::DEFAULT_N
) (
  input  logic [N-1:0] r_prev,
  input  logic [N-1:0] p_low,
  output logic [N-1:0] r_next
);

  logic         h;        // top bit of 2*r_prev
  logic [N-1:0] dbl_low;  // bits N-1..0 of 2*r_prev
  logic [N-1:0] reduced;  // 2*r_prev with P(x) added mod 2

  assign {h, dbl_low} = {r_prev, 1'b0};

  addm2 #(.W(N)) u_add (
    .a(dbl_low),
    .b(p_low),
    .s(reduced)
  );

  // Multiplexer MS
  always_comb r_next = h ? reduced : dbl_low;

endmodule
