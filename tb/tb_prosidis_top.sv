// tb_prosidis_top: end-to-end test of the PROSIDIS FPGA at a reduced
// proteome length (N_LEN = 300 per section, M_LEN = 24, 4 sections).
//
// The testbench plays the host and the board: two synchronous SRAM banks
// (read latency 1), a board memory controller that grants the banks after
// a random delay (longer in the first run) and keeps them until released,
// and the
// host program: fill bank 0, write a non-start code (ignored), write
// Start, poll the status port until End, read the scores from bank 1 and
// compare each with the nested-loop definition. A second run, with new
// data and a steady grant, checks the cycle count M_LEN+N_LEN+2 from grant
// to completion. Counted mechanisms: cycles stalled waiting for the grant, clamps to zero in the
// reference, scores above 127, ignored commands, busy polls and restarts;
// each must occur at least once.
module tb_prosidis_top;
  import prosidis_pkg::*;
  localparam int NP = 4, M = 24, N = 300, AW = 19, DW = 32;

  logic          clk = 0, rst_n = 0;
  logic          ctrl_wr = 0;
  logic [7:0]    ctrl_wdata = '0;
  logic [7:0]    status_rdata;
  logic          mem_req, mem_gnt;
  logic          b0_rd_en, b1_wr_en;
  logic [AW-1:0] b0_addr, b1_addr;
  logic [DW-1:0] b0_rdata, b1_wdata;
  int checks = 0, failures = 0;

  prosidis_top #(.N_PIPES(NP), .M_LEN(M), .N_LEN(N)) dut (.*);

  always #5 clk = ~clk;

  // ---------------- board model ----------------
  logic [DW-1:0] bank0 [1 << AW];
  logic [DW-1:0] bank1 [1 << AW];
  int            gnt_delay = 0;  // cycles the board controller makes a request wait
  int            waited = 0;
  logic          gnt_r = 0;
  int            stall_cycles = 0, req_cycles = 0, bus_violations = 0;

  // grant after gnt_delay cycles of request, held until the request falls
  always_ff @(posedge clk) begin
    if (!mem_req) begin
      gnt_r  <= 1'b0;
      waited <= 0;
    end else if (!gnt_r) begin
      waited <= waited + 1;
      if (waited + 1 >= gnt_delay) gnt_r <= 1'b1;
    end
  end
  assign mem_gnt = mem_req && (gnt_r || gnt_delay == 0);

  always_ff @(posedge clk) begin
    if (b0_rd_en) b0_rdata <= bank0[b0_addr];
    if (b1_wr_en) bank1[b1_addr] <= b1_wdata;
    if ((b0_rd_en || b1_wr_en) && !mem_gnt && rst_n) bus_violations++;
    if (mem_req && rst_n) req_cycles++;
    if (mem_req && !mem_gnt && rst_n) stall_cycles++;
  end

  // ---------------- reference ----------------
  dm_t dmtab [32][32];
  aa_t pep [M];
  aa_t prot [NP][N];
  int  clamps = 0, high_scores = 0;

  function automatic int ref_score(int k, int i);
    int acc = 0;
    for (int j = 0; j < M; j++) begin
      acc += int'(dmtab[prot[k][i + j]][pep[j]]);
      if (acc < 0) begin acc = 0; clamps++; end
    end
    return acc;
  endfunction

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  task automatic ctrl_write(logic [7:0] v);
    @(negedge clk); ctrl_wr = 1; ctrl_wdata = v;
    @(negedge clk); ctrl_wr = 0;
  endtask

  int busy_polls = 0, ignored_cmds = 0, restarts = 0, grant_waits = 0;

  task automatic one_run(bit stalls, bit rich);
    aa_t rich_set [8] = '{aa_t'(4), aa_t'(8), aa_t'(9), aa_t'(10), aa_t'(13), aa_t'(1), aa_t'(7), aa_t'(15)};
    int polls = 0;
    // data: peptide, proteome sections with planted copies
    for (int j = 0; j < M; j++)
      pep[j] = rich ? rich_set[$urandom_range(7)] : aa_t'($urandom_range(19));
    for (int k = 0; k < NP; k++) begin
      for (int t = 0; t < N; t++) prot[k][t] = aa_t'($urandom_range(19));
      for (int j = 0; j < M; j++) prot[k][20 + 50 * k + j] = pep[j];
    end
    for (int j = 0; j < M; j++) bank0[j] = {$urandom, 3'($urandom), pep[j]} ;
    for (int t = 0; t < N; t++)
      for (int k = 0; k < NP; k++) bank0[M + t][8*k +: 8] = {3'($urandom), prot[k][t]};
    for (int i = 0; i <= N; i++) bank1[i] = 32'hdead_beef;
    // host program
    ctrl_write(8'h55);
    repeat (3) @(negedge clk);
    check(!mem_req, "a non-start code starts nothing");
    if (!mem_req) ignored_cmds++;
    gnt_delay = stalls ? 5 + $urandom_range(10) : 0;
    req_cycles = 0; stall_cycles = 0;
    ctrl_write(CMD_START);
    do begin
      @(negedge clk);
      polls++;
      if (status_rdata == STAT_BUSY) busy_polls++;
    end while (status_rdata != STAT_END && polls < 20000);
    check(status_rdata == STAT_END, "status reaches End");
    check(!mem_req, "banks released at End");
    if (!stalls)
      check(req_cycles == M + N + 2, $sformatf("run held the banks %0d cycles, expected %0d", req_cycles, M + N + 2));
    else
      check(req_cycles == M + N + 2 + stall_cycles,
            $sformatf("stalled run: %0d cycles with %0d stalled", req_cycles, stall_cycles));
    grant_waits += stall_cycles;
    if (stalls) check(stall_cycles == gnt_delay, $sformatf("waited %0d cycles for a grant delayed %0d", stall_cycles, gnt_delay));
    // read back
    for (int i = 0; i < N - M; i++)
      for (int k = 0; k < NP; k++) begin
        int e = ref_score(k, i);
        if (e > 127) high_scores++;
        check(bank1[i][8*k +: 8] == score_t'(e),
              $sformatf("section %0d M(%0d) = %0d, expected %0d", k, i, bank1[i][8*k +: 8], e));
      end
    check(bank1[N - M] == 32'hdead_beef, "nothing written past the last result");
  endtask

  initial begin
    for (int a = 0; a < 32; a++)
      for (int b = 0; b < 32; b++) dmtab[a][b] = dm_weight(aa_t'(a), aa_t'(b));
    repeat (3) @(negedge clk);
    rst_n = 1;
    @(negedge clk);
    check(status_rdata == STAT_IDLE, "status idle after reset");
    one_run(1, 1);
    restarts++;
    one_run(0, 0);
    check(bus_violations == 0, $sformatf("%0d bank accesses without grant", bus_violations));
    $display("mechanisms: grant_wait_cycles=%0d clamps=%0d high_scores=%0d ignored=%0d busy_polls=%0d restarts=%0d",
             grant_waits, clamps, high_scores, ignored_cmds, busy_polls, restarts);
    check(grant_waits > 0, "wait for the grant happened");
    check(clamps > 0, "clamp to zero happened");
    check(high_scores > 0, "score above 127 happened");
    check(ignored_cmds > 0, "ignored command happened");
    check(busy_polls > 0, "busy status seen");
    check(restarts > 0, "second run happened");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // stalls are counted per run; make sure the first run had some
  initial begin
    wait (restarts == 1);
    checks++;
    if (stall_cycles == 0) begin failures++; $display("FAIL no wait for the grant in the first run"); end
  end

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
