// tb_prosidis_peptide32: the longest peptide the number formats are sized
// for, m = 32, whose best possible score 7 x 32 = 224 must come out intact
// in the unsigned 8-bit result. The FPGA is built with M_LEN = 32 and
// 160-character sections. Section 0 holds a stretch of W against an all-W
// peptide (each pair weighs 7, so the score reaches 224). The other sections
// are random with a planted copy. Every score is compared with the loop-nest
// definition.
module tb_prosidis_peptide32;
  import prosidis_pkg::*;
  localparam int NP = 4, M = 32, N = 160, AW = 19, DW = 32;

  logic          clk = 0, rst_n = 0;
  logic          ctrl_wr = 0;
  logic [7:0]    ctrl_wdata = '0;
  logic [7:0]    status_rdata;
  logic          mem_req, mem_gnt;
  logic          b0_rd_en, b1_wr_en;
  logic [AW-1:0] b0_addr, b1_addr;
  logic [DW-1:0] b0_rdata, b1_wdata;
  int checks = 0, failures = 0;

  prosidis_top #(.M_LEN(M), .N_LEN(N)) dut (.*);

  always #5 clk = ~clk;

  logic [DW-1:0] bank0 [1 << AW];
  logic [DW-1:0] bank1 [1 << AW];

  assign mem_gnt = mem_req;

  always_ff @(posedge clk) begin
    if (b0_rd_en) b0_rdata <= bank0[b0_addr];
    if (b1_wr_en) bank1[b1_addr] <= b1_wdata;
  end

  aa_t pep [M];
  aa_t prot [NP][N];

  function automatic int ref_score(int k, int i);
    int acc = 0;
    for (int j = 0; j < M; j++) begin
      acc += int'(dm_weight(prot[k][i + j], pep[j]));
      if (acc < 0) acc = 0;
    end
    return acc;
  endfunction

  initial begin
    int polls = 0, best = 0;
    for (int j = 0; j < M; j++) pep[j] = aa_t'(4);  // W
    for (int k = 0; k < NP; k++)
      for (int t = 0; t < N; t++) prot[k][t] = aa_t'($urandom_range(19));
    for (int t = 40; t < 40 + M; t++) prot[0][t] = aa_t'(4);
    for (int k = 1; k < NP; k++)
      for (int j = 0; j < M; j++) prot[k][30 * k + j] = pep[j];
    for (int j = 0; j < M; j++) bank0[j] = DW'(pep[j]);
    for (int t = 0; t < N; t++)
      for (int k = 0; k < NP; k++) bank0[M + t][8*k +: 8] = 8'(prot[k][t]);
    for (int i = 0; i <= N; i++) bank1[i] = '0;

    repeat (3) @(negedge clk);
    rst_n = 1;
    @(negedge clk);
    ctrl_wr = 1; ctrl_wdata = CMD_START;
    @(negedge clk);
    ctrl_wr = 0;
    do begin
      @(negedge clk);
      polls++;
    end while (status_rdata != STAT_END && polls < 5000);
    checks++;
    if (status_rdata != STAT_END) begin failures++; $display("FAIL no End"); end

    for (int i = 0; i < N - M; i++)
      for (int k = 0; k < NP; k++) begin
        int e;
        e = ref_score(k, i);
        if (e > best) best = e;
        checks++;
        if (bank1[i][8*k +: 8] != score_t'(e)) begin
          failures++;
          $display("FAIL section %0d M(%0d) = %0d, expected %0d", k, i, bank1[i][8*k +: 8], e);
        end
      end
    checks++;
    if (best != 224 || bank1[40][7:0] != 8'd224) begin
      failures++;
      $display("FAIL best score %0d, M_0(40) = %0d, expected 224", best, bank1[40][7:0]);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
