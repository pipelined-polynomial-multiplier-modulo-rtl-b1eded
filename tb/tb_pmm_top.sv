// tb_pmm_top: end-to-end self-checking test of the pipelined multiplier at its
// default size (N = 4, no input registers).
//
//  1. The worked example: three triples (A, B, P) fed on three consecutive
//     clocks; the intermediate results R_0..R_3 in every stage are checked
//     clock by clock against the published step table, and the three products
//     0001, 0010, 0100 must leave after clocks 4, 5 and 6.
//  2. Every (A, B) pair for each of the three irreducible polynomials of
//     degree 4, fed back to back: one result per clock, each N clocks after
//     its input, and the whole burst must take N + K - 1 clocks.
//  3. Random triples with random moduli and random gaps in the stream.
//  4. A reset in the middle of a stream: the pipeline must empty at once.
// Results are compared with pmm_ref_pkg (full product, then long division).
// The test also counts how often each mechanism happened: the remainder
// former reducing by P and passing 2r unchanged, a multiplier coefficient
// gating a term out, a full pipeline, a gap, a change of modulus between
// neighbouring triples and the mid-stream reset; one that never happened is
// a failure.
module tb_pmm_top;
  import pmm_ref_pkg::*;
  localparam int unsigned N = pmm_pkg::DEFAULT_N;

  logic clk = 1'b0, rst_n = 1'b0;
  logic in_valid = 1'b0;
  logic [N-1:0] a = '0, b = '0;
  logic [N:0]   p = '0;
  logic out_valid;
  logic [N-1:0] r;
  logic [N-1:0] stage_acc [N];

  pmm_top dut (
    .clk(clk), .rst_n(rst_n), .in_valid(in_valid), .a(a), .b(b), .p(p),
    .out_valid(out_valid), .r(r), .stage_acc(stage_acc)
  );

  always #5 clk = ~clk;

  typedef struct {
    logic [N-1:0] a, b;
    logic [N:0]   p;
    int           issue;
  } job_t;

  job_t expq[$];
  int cyc = 0;
  int checks = 0, failures = 0;
  int n_out = 0, last_out_cyc = 0;
  bit monitor_on = 1'b0;
  logic [N:0] last_p = '0;
  int n_reduce = 0, n_pass = 0, n_gated = 0, n_full = 0, n_bubble = 0,
      n_pchange = 0, n_reset = 0;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL @%0d: %s", cyc, what);
    end
  endtask

  // Watchdog
  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always @(posedge clk) cyc <= cyc + 1;

  // Scoreboard: every result must match the oldest outstanding job, N-1
  // clocks after the clock that took the job in.
  always @(posedge clk) begin
    #1;
    if (monitor_on && out_valid) begin
      if (expq.size() == 0) begin
        check(1'b0, "result without a pending input");
      end else begin
        job_t j;
        logic [63:0] e;
        j = expq.pop_front();
        e = mulmod(64'(j.a), 64'(j.b), 64'(j.p), N);
        check(r == e[N-1:0], $sformatf("A=%b B=%b P=%b: R=%b expected %b",
                                       j.a, j.b, j.p, r, e[N-1:0]));
        check(cyc - j.issue == N - 1, $sformatf("latency %0d clocks", cyc - j.issue + 1));
      end
      n_out++;
      last_out_cyc = cyc;
    end
  end

  // Mechanism counters, sampled just before each rising edge.
  for (genvar k = 0; k < N; k++) begin : g_mon
    always @(negedge clk) begin
      if (rst_n && dut.g_stage[k].u_stage.v_in) begin
        if (!dut.g_stage[k].u_stage.b_in[0]) n_gated++;
      end
    end
  end
  for (genvar k = 0; k < N - 1; k++) begin : g_mon_prf
    always @(negedge clk) begin
      if (rst_n && dut.g_stage[k].u_stage.v_in) begin
        if (dut.g_stage[k].u_stage.g_carry.u_prf.h) n_reduce++;
        else n_pass++;
      end
    end
  end
  always @(negedge clk) begin
    if (rst_n && in_valid && out_valid) begin
      bit all = 1'b1;
      for (int k = 0; k < N - 1; k++) all &= dut.v_s[k+1];
      if (all) n_full++;
    end
  end

  task automatic feed(input logic [N-1:0] fa, input logic [N-1:0] fb, input logic [N:0] fp);
    job_t j;
    @(negedge clk);
    in_valid = 1'b1;
    a = fa;
    b = fb;
    p = fp;
    if (last_p != '0 && fp != last_p) n_pchange++;
    last_p = fp;
    j.a = fa;
    j.b = fb;
    j.p = fp;
    j.issue = cyc + 1;
    expq.push_back(j);
  endtask

  task automatic gap();
    @(negedge clk);
    in_valid = 1'b0;
    a = N'($urandom);
    b = N'($urandom);
    p = {1'b1, N'($urandom)};
    n_bubble++;
  endtask

  task automatic drain();
    @(negedge clk);
    in_valid = 1'b0;
    repeat (N + 2) @(posedge clk);
    #2;
    check(expq.size() == 0, "results missing after drain");
  endtask

  // Worked example (Tables 1 and 2 of the design description).
  logic [N-1:0] ex_a [3] = '{4'b0101, 4'b1011, 4'b1100};
  logic [N-1:0] ex_b [3] = '{4'b1011, 4'b1101, 4'b1010};
  logic [N:0]   ex_p [3] = '{5'b10011, 5'b11001, 5'b11111};
  // Expected R_k in stage k+1 after clock c (1..6) for triple t: triple t is
  // in stage c - t.
  logic [N-1:0] ex_R [3][4] = '{'{4'b0101, 4'b1111, 4'b1111, 4'b0001},
                                '{4'b1011, 4'b1011, 4'b1100, 4'b0010},
                                '{4'b0000, 4'b0111, 4'b0111, 4'b0100}};

  initial begin
    int start_cyc, burst;
    logic [N:0] irr [$];

    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    @(posedge clk);
    #1;

    // ---- 1. worked example ----
    monitor_on = 1'b1;
    start_cyc = cyc + 1;
    for (int t = 0; t < 3; t++) feed(ex_a[t], ex_b[t], ex_p[t]);
    @(negedge clk);
    in_valid = 1'b0;
    for (int c = 4; c <= 6; c++) @(posedge clk);
    // Checks of the stage registers are made by the process below.
    wait (cyc >= start_cyc + 6);
    @(posedge clk);
    #2;
    check(last_out_cyc - start_cyc + 1 == 6, $sformatf("example took %0d clocks",
                                                     last_out_cyc - start_cyc + 1));
    check(expq.size() == 0, "example results missing");

    // ---- 2. exhaustive, back to back, per irreducible modulus ----
    for (int q = 0; q < (1 << N); q++)
      if (irreducible((64'(1) << N) | 64'(q), N)) irr.push_back({1'b1, N'(q)});
    check(irr.size() == 3, $sformatf("%0d irreducible moduli of degree 4", irr.size()));
    n_out = 0;
    start_cyc = cyc + 1;
    burst = irr.size() * (1 << (2 * N));
    foreach (irr[i])
      for (int x = 0; x < (1 << N); x++)
        for (int y = 0; y < (1 << N); y++) feed(N'(x), N'(y), irr[i]);
    drain();
    check(n_out == burst, "burst result count");
    check(last_out_cyc - start_cyc + 1 == N + burst - 1,
          $sformatf("burst of %0d took %0d clocks", burst, last_out_cyc - start_cyc + 1));

    // ---- 3. random stream with gaps ----
    for (int i = 0; i < 2000; i++) begin
      if ($urandom_range(3) == 0) gap();
      feed(N'($urandom), N'($urandom), {1'b1, N'($urandom)});
    end
    drain();

    // ---- 4. reset in the middle of a stream ----
    for (int i = 0; i < N - 1; i++) feed(N'($urandom), N'($urandom), {1'b1, N'($urandom)});
    @(negedge clk);
    in_valid = 1'b0;
    #2;
    rst_n = 1'b0;
    n_reset++;
    #1;
    check(out_valid == 1'b0, "out_valid cleared by reset");
    for (int k = 0; k < N; k++) check(stage_acc[k] == '0, "stage register cleared by reset");
    expq.delete();
    @(posedge clk);
    @(negedge clk);
    rst_n = 1'b1;
    n_out = 0;
    repeat (N + 2) @(posedge clk);
    #2;
    check(n_out == 0, "no result after reset");
    feed(4'b0101, 4'b1011, 5'b10011);
    drain();

    $display("mechanisms: reduce=%0d pass=%0d gated=%0d full=%0d gaps=%0d modulus_changes=%0d resets=%0d",
             n_reduce, n_pass, n_gated, n_full, n_bubble, n_pchange, n_reset);
    check(n_reduce > 0, "PRF reduction never happened");
    check(n_pass > 0, "PRF pass-through never happened");
    check(n_gated > 0, "zero multiplier coefficient never happened");
    check(n_full > 0, "full pipeline never happened");
    check(n_bubble > 0, "gap in the stream never happened");
    check(n_pchange > 0, "modulus change never happened");
    check(n_reset > 0, "mid-stream reset never happened");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // Clock-by-clock comparison with the published step table.
  initial begin
    int base;
    wait (rst_n);
    @(posedge clk);
    base = cyc;   // the next rising edge is clock 1 of the example
    for (int c = 1; c <= 6; c++) begin
      @(posedge clk);
      #1;
      for (int t = 0; t < 3; t++) begin
        int k;
        k = c - 1 - t;   // stage index holding triple t after clock c
        if (k >= 0 && k < N)
          check(stage_acc[k] == ex_R[t][k],
                $sformatf("clock %0d triple %0d R_%0d=%b expected %b", c, t + 1, k,
                          stage_acc[k], ex_R[t][k]));
      end
      check(out_valid == (c >= 4), $sformatf("out_valid at clock %0d", c));
    end
  end
endmodule
