// tb_status_port_mgr: the status port reads idle after reset, busy after
// go, End after stop, and busy again after the next go.
module tb_status_port_mgr;
  import prosidis_pkg::*;

  logic       clk = 0, rst_n = 0, go = 0, stop = 0;
  logic [7:0] status_rdata;
  int checks = 0, failures = 0;

  status_port_mgr dut (.*);

  always #5 clk = ~clk;

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s (status %h)", what, status_rdata); end
  endtask

  task automatic pulse(ref logic sig);
    @(negedge clk); sig = 1;
    @(negedge clk); sig = 0;
  endtask

  initial begin
    repeat (2) @(negedge clk);
    rst_n = 1;
    @(negedge clk);
    check(status_rdata == 8'h00, "idle after reset");
    pulse(go);
    check(status_rdata == 8'h02, "busy after go");
    repeat (5) @(negedge clk);
    check(status_rdata == 8'h02, "busy holds");
    pulse(stop);
    check(status_rdata == 8'h01, "End after stop");
    repeat (5) @(negedge clk);
    check(status_rdata == STAT_END, "End holds");
    pulse(go);
    check(status_rdata == STAT_BUSY, "busy after second go");
    pulse(stop);
    check(status_rdata == STAT_END, "End after second stop");
    rst_n = 0;
    #1;
    check(status_rdata == STAT_IDLE, "reset clears status");
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
