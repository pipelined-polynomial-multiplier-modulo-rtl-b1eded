// pmm_stage: one stage of the pipelined multiplier modulo P(x).
//
// Stage k (k = 1..N) holds, in its buffer registers, the state of one
// multiplication after k steps of the low-order-first algorithm
//   r_0 = A,      r_k = (x * r_(k-1)) mod P
//   R_0 = b_0 A,  R_k = R_(k-1) + b_k r_k          (+ is XOR)
// Its logic takes the state left by stage k-1 and forms
//   the gated term  b_(k-1) * r_(k-1)             (AND block),
//   the new result  R_(k-1) = R_(k-2) + that term  (adder modulo two),
//   the next remainder r_k = PRF(r_(k-1), P)       (partial remainder former),
// and, on the rising clock edge, stores them with the remaining multiplier
// coefficients (shifted one place down, so that the next stage finds b_k in
// bit 0) and the modulus.
//
// FIRST = 1 gives stage 1, which has no adder: its result register takes the
// gated term b_0 * A directly (acc_in is then ignored). LAST = 1 gives stage
// N, which has only the AND block, the adder and the result register RgR;
// r_out, b_out and p_out are then constant zero.
//
// A valid bit travels with the data so that bubbles in the input stream are
// marked; it and the active-low asynchronous reset are additions of this
// implementation. Latency through a stage is one clock.
module pmm_stage #(
  parameter int unsigned N     = pmm_pkg::DEFAULT_N,
  parameter bit          FIRST = 1'b0,
  parameter bit          LAST  = 1'b0
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         v_in,    // the word entering this stage is valid
  input  logic [N-1:0] r_in,    // partial remainder r_(k-1) (A for stage 1)
  input  logic [N-1:0] acc_in,  // intermediate result R_(k-2)
  input  logic [N-1:0] b_in,    // remaining multiplier coefficients, b_(k-1) in bit 0
  input  logic [N-1:0] p_in,    // modulus P(x), bits N-1..0 (bit N is 1)
  output logic         v_out,
  output logic [N-1:0] r_out,   // Rg r_k
  output logic [N-1:0] acc_out, // Rg R_(k-1)
  output logic [N-1:0] b_out,   // RgB(x).k
  output logic [N-1:0] p_out    // RgP(x).k
);

  logic [N-1:0] gated;
  logic [N-1:0] acc_next;

  and_block #(.N(N)) u_and (
    .ctrl(b_in[0]),
    .din (r_in),
    .dout(gated)
  );

  if (FIRST) begin : g_first
    assign acc_next = gated;
  end else begin : g_add
    addm2 #(.W(N)) u_addm2 (
      .a(gated),
      .b(acc_in),
      .s(acc_next)
    );
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      v_out   <= 1'b0;
      acc_out <= '0;
    end else begin
      v_out   <= v_in;
      acc_out <= acc_next;
    end
  end

  if (LAST) begin : g_last
    assign r_out = '0;
    assign b_out = '0;
    assign p_out = '0;
  end else begin : g_carry
    logic [N-1:0] r_next;

    prf #(.N(N)) u_prf (
      .r_prev(r_in),
      .p_low (p_in),
      .r_next(r_next)
    );

    always_ff @(posedge clk or negedge rst_n) begin
      if (!rst_n) begin
        r_out <= '0;
        b_out <= '0;
        p_out <= '0;
      end else begin
        r_out <= r_next;
        b_out <= b_in >> 1;
        p_out <= p_in;
      end
    end
  end

endmodule
