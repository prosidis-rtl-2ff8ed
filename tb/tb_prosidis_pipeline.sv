// tb_prosidis_pipeline: runs one pipeline (M_LEN=6, N_LEN=60, RD_LAT=1)
// against a memory model that answers read_s / read_p one cycle later, and
// compares every result with the nested-loop definition
//   M(i) = sum_j DM(p(i+j), s(j)), clamped at 0 after each addition,
// computed here for i = 0 .. N_LEN-M_LEN-1. The proteome holds exact and
// near copies of the peptide so that high scores occur, and dissimilar
// stretches so that the clamp occurs. The second and third runs have
// random stalls; the first checks the M_LEN+N_LEN+RD_LAT+1 cycle count.
module tb_prosidis_pipeline;
  import prosidis_pkg::*;
  localparam int M = 6, N = 60, L = 1;

  logic         clk = 0, rst_n = 0, enable = 0;
  logic         run_end, read_p, write_M;
  logic [M-1:0] read_s;
  aa_t          s_in, p_in;
  score_t       M_out;
  int checks = 0, failures = 0;

  prosidis_pipeline #(.M_LEN(M), .N_LEN(N), .RD_LAT(L)) dut (.*);

  always #5 clk = ~clk;

  aa_t pep [M];
  aa_t prot [N];
  int  pidx;

  // memory model: one cycle of latency
  always_ff @(posedge clk) begin
    for (int j = 0; j < M; j++) if (read_s[j]) s_in <= pep[j];
    if (read_p) begin
      p_in <= prot[pidx];
      pidx <= pidx + 1;
    end
  end

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  function automatic int ref_score(int i);
    int acc = 0;
    for (int j = 0; j < M; j++) begin
      acc += int'(dm_weight(prot[i + j], pep[j]));
      if (acc < 0) acc = 0;
    end
    return acc;
  endfunction

  task automatic run(bit stalls, int kind);
    int cyc = 0, got = 0, clamps = 0, max_s = 0;
    for (int j = 0; j < M; j++) pep[j] = aa_t'($urandom_range(19));
    for (int t = 0; t < N; t++) prot[t] = aa_t'($urandom_range(19));
    // exact copy at 10, near copy at 30, a run of G (weight -4 against most) at 45
    for (int j = 0; j < M; j++) prot[10 + j] = pep[j];
    for (int j = 0; j < M; j++) prot[30 + j] = (j == 2) ? aa_t'(7) : pep[j];
    if (kind == 1) for (int t = 40; t < 52; t++) prot[t] = aa_t'(4);  // W run
    pidx = 0;
    @(negedge clk);
    enable = 1;
    while (!run_end && cyc < 1000) begin
      @(negedge clk);
      cyc++;
      if (stalls) enable = ($urandom_range(3) != 0);
      #1;
      if (write_M) begin
        int e = ref_score(got);
        check(M_out == score_t'(e), $sformatf("M(%0d) = %0d, expected %0d", got, M_out, e));
        if (e > max_s) max_s = e;
        got++;
      end
    end
    check(got == N - M, $sformatf("%0d results, expected %0d", got, N - M));
    check(pidx == N, $sformatf("%0d proteome reads", pidx));
    if (!stalls) check(cyc == M + N + L + 1, $sformatf("run took %0d cycles", cyc));
    check(max_s >= 15, $sformatf("best score %0d shows the planted copy", max_s));
    enable = 0;
    @(negedge clk);
  endtask

  initial begin
    repeat (2) @(negedge clk);
    rst_n = 1;
    run(0, 0);
    run(1, 1);
    run(1, 0);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
