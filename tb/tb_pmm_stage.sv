// tb_pmm_stage: self-checking test of one pipeline stage in its three forms
// (first stage, middle stage, last stage), all driven by the same random
// inputs. After each rising edge the buffer registers must hold
//   R = [R_in +] b_in[0] * r_in,  r = (x * r_in) mod P,  b = b_in >> 1,  P,
// with the reference remainder from long division (pmm_ref_pkg). Reset and
// the valid bit are checked too.
module tb_pmm_stage;
  import pmm_ref_pkg::*;
  localparam int unsigned N = 4;
  logic clk = 1'b0, rst_n = 1'b0;
  logic v_in;
  logic [N-1:0] r_in, acc_in, b_in, p_in;
  logic         v_o   [3];
  logic [N-1:0] r_o   [3];
  logic [N-1:0] acc_o [3];
  logic [N-1:0] b_o   [3];
  logic [N-1:0] p_o   [3];
  logic [N-1:0] exp_gated, exp_r, exp_b, exp_p;
  logic exp_v;
  logic [N-1:0] exp_acc_in;
  logic [63:0] rem;
  int checks = 0, failures = 0;

  for (genvar i = 0; i < 3; i++) begin : g_dut
    pmm_stage #(.N(N), .FIRST(i == 0), .LAST(i == 2)) dut (
      .clk(clk), .rst_n(rst_n), .v_in(v_in),
      .r_in(r_in), .acc_in(acc_in), .b_in(b_in), .p_in(p_in),
      .v_out(v_o[i]), .r_out(r_o[i]), .acc_out(acc_o[i]), .b_out(b_o[i]), .p_out(p_o[i])
    );
  end

  always #5 clk = ~clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s (r_in=%b acc_in=%b b_in=%b p_in=%b)", what, exp_r, exp_acc_in, exp_b, exp_p);
    end
  endtask

  initial begin
    repeat (3000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    {v_in, r_in, acc_in, b_in, p_in} = '1;
    repeat (2) @(posedge clk);
    #1;
    for (int i = 0; i < 3; i++)
      check({v_o[i], r_o[i], acc_o[i], b_o[i], p_o[i]} == '0, "reset");
    rst_n = 1'b1;
    for (int t = 0; t < 1000; t++) begin
      @(negedge clk);
      {v_in, r_in, acc_in, b_in, p_in} = (4 * N + 1)'($urandom);
      exp_gated  = b_in[0] ? r_in : '0;
      rem        = polymod(64'(r_in) << 1, (64'(1) << N) | 64'(p_in), N);
      exp_r      = rem[N-1:0];
      exp_b      = b_in >> 1;
      exp_p      = p_in;
      exp_v      = v_in;
      exp_acc_in = acc_in;
      @(posedge clk);
      #1;
      for (int i = 0; i < 3; i++) check(v_o[i] == exp_v, "valid");
      check(acc_o[0] == exp_gated, "first stage R");
      check(acc_o[1] == (exp_acc_in ^ exp_gated), "middle stage R");
      check(acc_o[2] == (exp_acc_in ^ exp_gated), "last stage R");
      for (int i = 0; i < 2; i++) begin
        check(r_o[i] == exp_r, "partial remainder");
        check(b_o[i] == exp_b, "multiplier shift");
        check(p_o[i] == exp_p, "modulus");
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
