// tb_bus_requester: go raises the request; enable follows the grant, so a
// late grant delays the run and a withdrawn grant stalls it; run_end drops
// request and enable and gives one stop pulse.
module tb_bus_requester;
  logic clk = 0, rst_n = 0, go = 0, mem_gnt = 0, run_end = 0;
  logic stop, mem_req, enable;
  int checks = 0, failures = 0;

  bus_requester dut (.*);

  always #5 clk = ~clk;

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  initial begin
    int stops;
    repeat (2) @(negedge clk);
    rst_n = 1;
    @(negedge clk);
    check(!mem_req && !enable && !stop, "idle after reset");
    @(negedge clk); go = 1;
    @(negedge clk); go = 0;
    check(mem_req, "request after go");
    check(!enable, "no enable before grant");
    repeat (3) @(negedge clk);
    check(mem_req && !enable, "waits for grant");
    mem_gnt = 1; #1;
    check(enable, "enable with grant");
    repeat (4) begin
      @(negedge clk);
      check(enable && mem_req, "enable held while granted");
    end
    run_end = 1; #1;
    check(!mem_req && !enable, "run_end releases the banks at once");
    stops = 0;
    @(negedge clk);
    check(stop, "stop one cycle after run_end");
    run_end = 0;
    repeat (4) begin
      if (stop) stops++;
      @(negedge clk);
    end
    check(stops == 1, $sformatf("%0d stop pulses", stops));
    check(!mem_req && !enable, "idle after stop");
    mem_gnt = 0;
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
