// pmm_top: N-stage pipelined multiplier of polynomials modulo P(x).
//
// Computes R(x) = A(x) * B(x) mod P(x) over GF(2), for A and B of degree below
// N and a modulus P of degree N (in a cryptosystem built on non-positional
// polynomial notation, one residue channel per irreducible P). The multiplier
// B is scanned from its lowest coefficient: stage k adds b_(k-1) times the
// partial remainder r_(k-1) = x^(k-1) A mod P into the running result and
// forms the next partial remainder by one shift and a conditional subtraction
// of P. Each of the N stages holds a different multiplication, so a new
// triple (A, B, P) can be accepted on every clock and, once the pipeline is
// full, a result leaves on every clock. Each triple carries its own modulus,
// so consecutive multiplications may use different P(x).
//
// Timing: with IN_REG = 0 the input pins feed the logic of stage 1 directly
// and the result of a triple presented before rising edge t is on r from edge
// t+N-1 on, i.e. after the N-th clock counting the one that takes the triple in
// (the schedule of the four-stage worked example: first result after clock 4).
// IN_REG = 1 places the input registers RgA, RgB, RgP in front and makes the
// latency N+1 clocks. out_valid marks results; in_valid marks inputs. There is
// no stall: the pipeline advances on every clock.
//
// stage_acc[k] shows the intermediate result R_k held in the buffer register
// of stage k+1 (stage_acc[N-1] is the final result register RgR), the view
// given by the timing diagram of the design.
//
// The valid bits, the reset and IN_REG are choices of this implementation.
module pmm_top #(
  parameter int unsigned N      = pmm_pkg::DEFAULT_N,
  parameter bit          IN_REG = 1'b0
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         in_valid,
  input  logic [N-1:0] a,          // multiplicand A(x)
  input  logic [N-1:0] b,          // multiplier B(x)
  input  logic [N:0]   p,          // modulus P(x), bit N must be 1
  output logic         out_valid,
  output logic [N-1:0] r,          // A*B mod P
  output logic [N-1:0] stage_acc [N]
);

  // Pipeline signals between stages: index k is the input of stage k+1.
  logic         v_s   [N+1];
  logic [N-1:0] r_s   [N+1];
  logic [N-1:0] acc_s [N+1];
  logic [N-1:0] b_s   [N+1];
  logic [N-1:0] p_s   [N+1];

  if (IN_REG) begin : g_in_reg
    pmm_input_reg #(.N(N)) u_in (
      .clk  (clk),
      .rst_n(rst_n),
      .v_in (in_valid),
      .a_in (a),
      .b_in (b),
      .p_in (p[N-1:0]),
      .v_out(v_s[0]),
      .a_out(r_s[0]),
      .b_out(b_s[0]),
      .p_out(p_s[0])
    );
  end else begin : g_no_in_reg
    assign v_s[0] = in_valid;
    assign r_s[0] = a;
    assign b_s[0] = b;
    assign p_s[0] = p[N-1:0];
  end
  assign acc_s[0] = '0;

  for (genvar k = 0; k < N; k++) begin : g_stage
    pmm_stage #(
      .N    (N),
      .FIRST(k == 0),
      .LAST (k == N - 1)
    ) u_stage (
      .clk    (clk),
      .rst_n  (rst_n),
      .v_in   (v_s[k]),
      .r_in   (r_s[k]),
      .acc_in (acc_s[k]),
      .b_in   (b_s[k]),
      .p_in   (p_s[k]),
      .v_out  (v_s[k+1]),
      .r_out  (r_s[k+1]),
      .acc_out(acc_s[k+1]),
      .b_out  (b_s[k+1]),
      .p_out  (p_s[k+1])
    );
    assign stage_acc[k] = acc_s[k+1];
  end

  assign out_valid = v_s[N];
  assign r         = acc_s[N];

  // The modulus must have degree exactly N whenever a triple is presented,
  // during reset too (sources keep in_valid low then).
  a_modulus_degree : assert property (@(posedge clk)
    in_valid |-> p[N])
    else $error("pmm_top: modulus without a coefficient at x^N");

endmodule
