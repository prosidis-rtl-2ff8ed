// tb_mem_if_bank1: each result flag gives one registered write, one cycle
// later, of the byte-packed scores at the next address from R_BASE; start
// restarts the addresses.
module tb_mem_if_bank1;
  import prosidis_pkg::*;
  localparam int NP = 4, AW = 12, DW = 32, RB = 300;

  logic          clk = 0, rst_n = 0, start = 0, write_M = 0;
  score_t        M_in [NP];
  logic          b1_wr_en;
  logic [AW-1:0] b1_addr;
  logic [DW-1:0] b1_wdata;
  int checks = 0, failures = 0;

  mem_if_bank1 #(.N_PIPES(NP), .ADDR_W(AW), .DATA_W(DW), .R_BASE(RB)) dut (.*);

  always #5 clk = ~clk;

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  initial begin
    int n_wr = 0;
    logic [DW-1:0] exp_w;
    logic          exp_en;
    foreach (M_in[k]) M_in[k] = '0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    exp_en = 0; exp_w = '0;
    for (int t = 0; t < 40; t++) begin
      write_M = ($urandom_range(3) != 0);
      foreach (M_in[k]) M_in[k] = score_t'($urandom);
      if (t == 20) begin start = 1; write_M = 0; end else start = 0;
      exp_en = write_M;
      exp_w  = {M_in[3], M_in[2], M_in[1], M_in[0]};
      @(negedge clk);
      check(b1_wr_en == exp_en, $sformatf("wr_en at %0d", t));
      if (exp_en) begin
        check(b1_wdata == exp_w, $sformatf("data %h, expected %h", b1_wdata, exp_w));
        check(b1_addr == AW'(RB + n_wr), $sformatf("address %0d, expected %0d", b1_addr, RB + n_wr));
        n_wr++;
      end
      if (t == 20) n_wr = 0;
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
