// tb_and_block: exhaustive self-checking test of the gating block.
// Every 4-bit word is applied with the control bit 0 and 1; the output must be
// the word itself or zero.
module tb_and_block;
  localparam int unsigned N = 4;
  logic clk = 1'b0;
  logic ctrl;
  logic [N-1:0] din, dout;
  int checks = 0, failures = 0;

  and_block #(.N(N)) dut (.ctrl(ctrl), .din(din), .dout(dout));

  always #5 clk = ~clk;

  initial begin
    repeat (1000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int c = 0; c < 2; c++)
      for (int w = 0; w < (1 << N); w++) begin
        ctrl = c[0];
        din  = N'(w);
        @(posedge clk);
        checks++;
        if (dout !== (c == 1 ? N'(w) : '0)) begin
          failures++;
          $display("FAIL ctrl=%0d din=%b dout=%b", c, din, dout);
        end
      end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
