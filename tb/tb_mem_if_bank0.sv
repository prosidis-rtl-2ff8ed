// tb_mem_if_bank0: peptide strobes address S_BASE+j, proteome strobes
// address consecutive words from P_BASE (restarting on start), and the
// returned word is split into the byte-lane characters.
module tb_mem_if_bank0;
  import prosidis_pkg::*;
  localparam int M = 6, NP = 4, AW = 12, DW = 32, SB = 100, PB = 200;

  logic          clk = 0, rst_n = 0, start = 0, read_p = 0;
  logic [M-1:0]  read_s = '0;
  logic          b0_rd_en;
  logic [AW-1:0] b0_addr;
  logic [DW-1:0] b0_rdata = '0;
  aa_t           s_out;
  aa_t           p_out [NP];
  int checks = 0, failures = 0;

  mem_if_bank0 #(.M_LEN(M), .N_PIPES(NP), .ADDR_W(AW), .DATA_W(DW),
                 .S_BASE(SB), .P_BASE(PB)) dut (.*);

  always #5 clk = ~clk;

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  initial begin
    repeat (2) @(negedge clk);
    rst_n = 1;
    @(negedge clk);
    check(!b0_rd_en, "no read when idle");
    for (int j = 0; j < M; j++) begin
      read_s = M'(1) << j; #1;
      check(b0_rd_en && b0_addr == AW'(SB + j), $sformatf("peptide %0d address %0d", j, b0_addr));
      @(negedge clk);
    end
    read_s = '0;
    for (int t = 0; t < 10; t++) begin
      read_p = (t % 3 != 2); #1;   // a gap every third cycle
      check(b0_rd_en == read_p, "rd_en follows read_p");
      if (read_p) check(b0_addr == AW'(PB + t - t / 3), $sformatf("proteome address %0d at %0d", b0_addr, t));
      @(negedge clk);
    end
    read_p = 0;
    start = 1; @(negedge clk); start = 0;
    read_p = 1; #1;
    check(b0_addr == AW'(PB), "start restarts the proteome address");
    @(negedge clk); read_p = 0;
    // byte-lane split
    for (int k = 0; k < 50; k++) begin
      logic [DW-1:0] w = $urandom;
      b0_rdata = w; #1;
      check(s_out == w[4:0], "peptide character from bits 4:0");
      for (int q = 0; q < NP; q++)
        check(p_out[q] == w[8*q +: 5], $sformatf("lane %0d", q));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (500) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
