// tb_ctrl_port_mgr: a write of the start code gives exactly one go pulse
// one cycle later; other codes and idle cycles give none.
module tb_ctrl_port_mgr;
  import prosidis_pkg::*;

  logic       clk = 0, rst_n = 0, ctrl_wr = 0, go;
  logic [7:0] ctrl_wdata = '0;
  int checks = 0, failures = 0;

  ctrl_port_mgr dut (.*);

  always #5 clk = ~clk;

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  // write a value, then watch go for three cycles
  task automatic write_and_watch(logic [7:0] v, int exp_pulses);
    int pulses = 0;
    @(negedge clk); ctrl_wr = 1; ctrl_wdata = v;
    @(negedge clk); ctrl_wr = 0; ctrl_wdata = $urandom;
    check(go == (exp_pulses > 0), $sformatf("go one cycle after writing %h", v));
    if (go) pulses++;
    repeat (3) begin @(negedge clk); if (go) pulses++; end
    check(pulses == exp_pulses, $sformatf("%0d go pulses after writing %h", pulses, v));
  endtask

  initial begin
    repeat (2) @(negedge clk);
    check(go == 0, "no go in reset");
    rst_n = 1;
    write_and_watch(CMD_START, 1);
    write_and_watch(8'h00, 0);
    write_and_watch(8'h81, 0);
    write_and_watch(8'hff, 0);
    write_and_watch(CMD_START, 1);
    // data equal to the start code without a strobe does nothing
    @(negedge clk); ctrl_wdata = CMD_START;
    repeat (3) begin @(negedge clk); check(go == 0, "no go without strobe"); end
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
