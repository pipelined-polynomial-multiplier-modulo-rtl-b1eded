// tb_addm2: exhaustive self-checking test of the 4-bit adder modulo two.
// The expected sum is built coefficient by coefficient: bit i is 1 when exactly
// one of the two operands has a 1 there.
module tb_addm2;
  localparam int unsigned W = 4;
  logic clk = 1'b0;
  logic [W-1:0] a, b, s, expect_s;
  int checks = 0, failures = 0;

  addm2 #(.W(W)) dut (.a(a), .b(b), .s(s));

  always #5 clk = ~clk;

  initial begin
    repeat (1000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < (1 << W); i++)
      for (int j = 0; j < (1 << W); j++) begin
        a = W'(i);
        b = W'(j);
        for (int k = 0; k < W; k++) expect_s[k] = (a[k] != b[k]);
        @(posedge clk);
        checks++;
        if (s !== expect_s) begin
          failures++;
          $display("FAIL a=%b b=%b s=%b expected %b", a, b, s, expect_s);
        end
      end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
