// tb_pmm_stream_n10: streaming workload of the speed comparison, K = 50
// triples on a ten-stage pipeline (N = 10), run twice: without input
// registers (latency N) and with them (IN_REG = 1, latency N + 1).
//
// The 50 triples use random operands of degree below 10 and moduli drawn from
// the irreducible polynomials of degree 10. They are fed on 50 consecutive
// clocks; the results must leave on 50 consecutive clocks, so the whole
// stream takes N + K - 1 = 59 clocks (60 with input registers) against
// N * K = 500 clocks for a one-multiplication-at-a-time unit of the same
// clock period, a gain of 441 clock periods.
module tb_pmm_stream_n10;
  import pmm_ref_pkg::*;
  localparam int unsigned N = 10;
  localparam int unsigned K = 50;

  logic clk = 1'b0, rst_n = 1'b0;
  logic in_valid = 1'b0;
  logic [N-1:0] a = '0, b = '0;
  logic [N:0]   p = '0;
  logic         ov [2];
  logic [N-1:0] r  [2];
  logic [N-1:0] sa0 [N];
  logic [N-1:0] sa1 [N];

  pmm_top #(.N(N), .IN_REG(1'b0)) dut0 (
    .clk(clk), .rst_n(rst_n), .in_valid(in_valid), .a(a), .b(b), .p(p),
    .out_valid(ov[0]), .r(r[0]), .stage_acc(sa0)
  );
  pmm_top #(.N(N), .IN_REG(1'b1)) dut1 (
    .clk(clk), .rst_n(rst_n), .in_valid(in_valid), .a(a), .b(b), .p(p),
    .out_valid(ov[1]), .r(r[1]), .stage_acc(sa1)
  );

  always #5 clk = ~clk;

  logic [N-1:0] ja [K];
  logic [N-1:0] jb [K];
  logic [N:0]   jp [K];
  int cyc = 0, first_in = 0;
  int n_out [2] = '{0, 0};
  int first_out [2] = '{0, 0};
  int last_out [2] = '{0, 0};
  int checks = 0, failures = 0;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL @%0d: %s", cyc, what);
    end
  endtask

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always @(posedge clk) cyc <= cyc + 1;

  for (genvar d = 0; d < 2; d++) begin : g_mon
    always @(posedge clk) begin
      #1;
      if (rst_n && ov[d]) begin
        logic [63:0] e;
        int i;
        i = n_out[d];
        if (i < K) begin
          e = mulmod(64'(ja[i]), 64'(jb[i]), 64'(jp[i]), N);
          check(r[d] == e[N-1:0], $sformatf("pipeline %0d triple %0d: %b expected %b",
                                            d, i, r[d], e[N-1:0]));
        end else begin
          check(1'b0, "extra result");
        end
        if (i == 0) first_out[d] = cyc;
        last_out[d] = cyc;
        n_out[d]++;
      end
    end
  end

  initial begin
    logic [N:0] irr [$];
    for (int q = 1; q < (1 << N); q += 2)
      if (irreducible((64'(1) << N) | 64'(q), N)) irr.push_back({1'b1, N'(q)});
    // 99 irreducible polynomials of degree 10 over GF(2)
    check(irr.size() == 99, $sformatf("%0d irreducible moduli of degree 10", irr.size()));
    for (int i = 0; i < K; i++) begin
      ja[i] = N'($urandom);
      jb[i] = N'($urandom);
      jp[i] = irr[$urandom_range(irr.size() - 1)];
    end

    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    for (int i = 0; i < K; i++) begin
      @(negedge clk);
      if (i == 0) first_in = cyc + 1;
      in_valid = 1'b1;
      a = ja[i];
      b = jb[i];
      p = jp[i];
    end
    @(negedge clk);
    in_valid = 1'b0;
    repeat (N + 4) @(posedge clk);
    #2;

    for (int d = 0; d < 2; d++) begin
      int total;
      total = last_out[d] - first_in + 1;
      check(n_out[d] == K, $sformatf("pipeline %0d gave %0d results", d, n_out[d]));
      check(first_out[d] - first_in + 1 == N + d,
            $sformatf("pipeline %0d first-result latency %0d", d, first_out[d] - first_in + 1));
      check(total == N + d + K - 1, $sformatf("pipeline %0d stream took %0d clocks", d, total));
      $display("pipeline %0d (IN_REG=%0d): %0d triples in %0d clocks, sequential %0d, gain %0d",
               d, d, K, total, N * K, N * K - total);
    end
    check(N * K - (N + K - 1) == 441, "gain of 441 clock periods");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
