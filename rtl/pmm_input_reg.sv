// pmm_input_reg: input registers RgA(x), RgB(x) and RgP(x) of the multiplier.
//
// On each rising clock edge they take in one triple of polynomials: the
// multiplicand A(x), the multiplier B(x) and the modulus P(x), together with a
// valid bit. They isolate the pipeline from the source of the data stream and
// add one clock of latency. Only the N low bits of P(x) are kept: its bit N is
// 1 by definition. Active-low asynchronous reset clears all of them.
//
// Ports: clk, rst_n; v_in, a_in, b_in, p_in (N bits each) in;
//        v_out, a_out, b_out, p_out out, one clock later.
module pmm_input_reg #(
  parameter int unsigned N = pmm_pkg::DEFAULT_N
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         v_in,
  input  logic [N-1:0] a_in,
  input  logic [N-1:0] b_in,
  input  logic [N-1:0] p_in,
  output logic         v_out,
  output logic [N-1:0] a_out,
  output logic [N-1:0] b_out,
  output logic [N-1:0] p_out
);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      v_out <= 1'b0;
      a_out <= '0;
      b_out <= '0;
      p_out <= '0;
    end else begin
      v_out <= v_in;
      a_out <= a_in;
      b_out <= b_in;
      p_out <= p_in;
    end
  end

endmodule
