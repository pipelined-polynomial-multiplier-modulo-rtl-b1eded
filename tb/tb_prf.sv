// tb_prf: exhaustive self-checking test of the partial remainder former.
// For every 4-bit remainder and every degree-4 modulus (bit 4 set), the output
// must equal (x * r) mod P computed by long division in pmm_ref_pkg. The test
// also counts how often each multiplexer path (reduce / pass) was exercised.
module tb_prf;
  import pmm_ref_pkg::*;
  localparam int unsigned N = 4;
  logic clk = 1'b0;
  logic [N-1:0] r_prev, p_low, r_next;
  logic [63:0] expected;
  int checks = 0, failures = 0, n_reduce = 0, n_pass = 0;

  prf #(.N(N)) dut (.r_prev(r_prev), .p_low(p_low), .r_next(r_next));

  always #5 clk = ~clk;

  initial begin
    repeat (1000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    // Table 2 of the worked example: r1 of the first triple, 2*0101 mod 10011.
    r_prev = 4'b0101; p_low = 4'b0011;
    @(posedge clk);
    checks++;
    if (r_next !== 4'b1010) begin failures++; $display("FAIL example r1=%b", r_next); end
    r_prev = 4'b1010;
    @(posedge clk);
    checks++;
    if (r_next !== 4'b0111) begin failures++; $display("FAIL example r2=%b", r_next); end

    for (int pl = 0; pl < (1 << N); pl++)
      for (int rv = 0; rv < (1 << N); rv++) begin
        r_prev   = N'(rv);
        p_low    = N'(pl);
        expected = polymod(64'(rv) << 1, (64'(1) << N) | 64'(pl), N);
        if (r_prev[N-1]) n_reduce++; else n_pass++;
        @(posedge clk);
        checks++;
        if (r_next !== expected[N-1:0]) begin
          failures++;
          $display("FAIL r=%b p=1%b got %b expected %b", r_prev, p_low, r_next, expected[N-1:0]);
        end
      end
    checks++;
    if (n_reduce == 0 || n_pass == 0) failures++;
    $display("paths: reduce=%0d pass=%0d", n_reduce, n_pass);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
