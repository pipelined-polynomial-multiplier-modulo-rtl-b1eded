// tb_pmm_input_reg: self-checking test of the input registers.
// Random triples are presented on every clock; each output must equal what
// was presented one clock earlier, and reset must clear everything.
module tb_pmm_input_reg;
  localparam int unsigned N = 4;
  logic clk = 1'b0, rst_n = 1'b0;
  logic v_in, v_out;
  logic [N-1:0] a_in, b_in, p_in, a_out, b_out, p_out;
  logic [3*N:0] prev;
  int checks = 0, failures = 0;

  pmm_input_reg #(.N(N)) dut (
    .clk(clk), .rst_n(rst_n),
    .v_in(v_in), .a_in(a_in), .b_in(b_in), .p_in(p_in),
    .v_out(v_out), .a_out(a_out), .b_out(b_out), .p_out(p_out)
  );

  always #5 clk = ~clk;

  initial begin
    repeat (2000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    {v_in, a_in, b_in, p_in} = '1;
    repeat (2) @(posedge clk);
    #1;
    checks++;
    if ({v_out, a_out, b_out, p_out} !== '0) begin failures++; $display("FAIL reset"); end
    rst_n = 1'b1;
    for (int i = 0; i < 500; i++) begin
      @(negedge clk);
      {v_in, a_in, b_in, p_in} = (3 * N + 1)'($urandom);
      prev = {v_in, a_in, b_in, p_in};
      @(posedge clk);
      #1;
      checks++;
      if ({v_out, a_out, b_out, p_out} !== prev) begin
        failures++;
        $display("FAIL got %h expected %h", {v_out, a_out, b_out, p_out}, prev);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
