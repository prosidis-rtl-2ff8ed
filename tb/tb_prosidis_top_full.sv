// tb_prosidis_top_full: one complete computation of the PROSIDIS FPGA at
// its default size: four proteome sections of 524,000 characters scored
// against a 24-character peptide (2,096,000 characters in all).
//
// The testbench fills bank 0 with a random peptide and random proteomes
// holding planted copies of the peptide, writes Start on the control port,
// polls the status port for End, checks that the run held the memory
// banks for M_LEN + N_LEN + 2 cycles, and compares all 4 x 523,976 scores
// read from bank 1 with the nested-loop definition. The DUT keeps every
// parameter at its default.
module tb_prosidis_top_full;
  import prosidis_pkg::*;
  localparam int NP = 4, M = 24, N = 524000, AW = 19, DW = 32;

  logic          clk = 0, rst_n = 0;
  logic          ctrl_wr = 0;
  logic [7:0]    ctrl_wdata = '0;
  logic [7:0]    status_rdata;
  logic          mem_req, mem_gnt;
  logic          b0_rd_en, b1_wr_en;
  logic [AW-1:0] b0_addr, b1_addr;
  logic [DW-1:0] b0_rdata, b1_wdata;
  int checks = 0, failures = 0;

  prosidis_top dut (.*);

  always #5 clk = ~clk;

  // board: two synchronous SRAM banks of 512K x 32 bits, grant on request
  logic [DW-1:0] bank0 [1 << AW];
  logic [DW-1:0] bank1 [1 << AW];
  int            req_cycles = 0;

  assign mem_gnt = mem_req;

  always_ff @(posedge clk) begin
    if (b0_rd_en) b0_rdata <= bank0[b0_addr];
    if (b1_wr_en) bank1[b1_addr] <= b1_wdata;
    if (mem_req && rst_n) req_cycles++;
  end

  dm_t dmtab [32][32];
  aa_t pep [M];

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20) $display("FAIL %s", what);
    end
  endtask

  initial begin
    int polls = 0, mismatches = 0, best = 0, clamps = 0;
    for (int a = 0; a < 32; a++)
      for (int b = 0; b < 32; b++) dmtab[a][b] = dm_weight(aa_t'(a), aa_t'(b));
    for (int j = 0; j < M; j++) begin
      pep[j] = aa_t'($urandom_range(19));
      bank0[j] = DW'(pep[j]);
    end
    for (int t = 0; t < N; t++)
      for (int k = 0; k < NP; k++) bank0[M + t][8*k +: 8] = 8'($urandom_range(19));
    // planted copies, one per section at different places
    for (int k = 0; k < NP; k++)
      for (int j = 0; j < M; j++) bank0[M + 1000 + 130000 * k + j][8*k +: 8] = 8'(pep[j]);
    for (int i = 0; i <= N; i++) bank1[i] = 32'hdead_beef;

    repeat (3) @(negedge clk);
    rst_n = 1;
    @(negedge clk);
    ctrl_wr = 1; ctrl_wdata = CMD_START;
    @(negedge clk);
    ctrl_wr = 0;
    do begin
      @(negedge clk);
      polls++;
    end while (status_rdata != STAT_END && polls < N + 1000);
    check(status_rdata == STAT_END, "status reaches End");
    check(req_cycles == M + N + 2, $sformatf("run held the banks %0d cycles, expected %0d", req_cycles, M + N + 2));
    $display("run: %0d cycles with the banks, %0d status polls", req_cycles, polls);

    for (int i = 0; i < N - M; i++)
      for (int k = 0; k < NP; k++) begin
        int acc;
        acc = 0;
        for (int j = 0; j < M; j++) begin
          acc += int'(dmtab[bank0[M + i + j][8*k +: 5]][pep[j]]);
          if (acc < 0) begin acc = 0; clamps++; end
        end
        if (acc > best) best = acc;
        checks++;
        if (bank1[i][8*k +: 8] != score_t'(acc)) begin
          failures++;
          mismatches++;
          if (mismatches < 10)
            $display("FAIL section %0d M(%0d) = %0d, expected %0d", k, i, bank1[i][8*k +: 8], acc);
        end
      end
    check(bank1[N - M] == 32'hdead_beef, "nothing written past the last result");
    check(clamps > 0, "clamp to zero happened");
    $display("best score %0d, %0d clamps", best, clamps);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (N + 5000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
