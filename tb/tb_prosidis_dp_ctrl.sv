// tb_prosidis_dp_ctrl: checks the controller's schedule with M_LEN=4,
// N_LEN=10, RD_LAT=1: peptide strobes in order, N_LEN proteome strobes,
// strobes delayed by the latency, N_LEN-M_LEN result flags on the right
// steps, run_end after M_LEN+N_LEN+RD_LAT+1 cycles, a stall that stretches
// the run by its length, and the return to idle when enable falls.
module tb_prosidis_dp_ctrl;
  localparam int M = 4, N = 10, L = 1;

  logic clk = 0, rst_n = 0, enable = 0;
  logic run_end, read_p, p_valid, write_M;
  logic [M-1:0] read_s, cap_s;
  int checks = 0, failures = 0;

  prosidis_dp_ctrl #(.M_LEN(M), .N_LEN(N), .RD_LAT(L)) dut (.*);

  always #5 clk = ~clk;

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  // One run; enable drops for stall_len cycles once stall_at proteome
  // requests have been issued (stall_len 0: no stall).
  task automatic run(int stall_at, int stall_len);
    int cyc = 0, s_seen = 0, p_req = 0, w_cnt = 0, step = 0, stall_left = stall_len;
    logic [M-1:0] prev_s = '0;
    logic prev_p = 0;
    enable = 1;
    while (!run_end && cyc < 200) begin
      @(negedge clk);
      cyc++;
      // enable for the coming cycle, then sample what it produces
      if (stall_left > 0 && p_req == stall_at) begin
        enable = 0;
        stall_left--;
      end else begin
        enable = 1;
      end
      #1;
      if (run_end) break;
      if (!enable) check(read_p == 0 && read_s == '0, "no request while stalled");
      if (read_s != '0) begin
        check(read_s == (M'(1) << s_seen), $sformatf("read_s order %b", read_s));
        s_seen++;
      end
      check(cap_s == prev_s, "cap_s is read_s delayed by one cycle");
      check(p_valid == prev_p, "p_valid is read_p delayed by one cycle");
      if (write_M) begin
        check(p_valid && step >= M - 1 && step <= N - 2, $sformatf("write_M at step %0d", step));
        w_cnt++;
      end
      if (p_valid) step++;
      if (read_p) p_req++;
      prev_s = read_s; prev_p = read_p;
    end
    enable = 1;
    check(s_seen == M, $sformatf("peptide strobes %0d", s_seen));
    check(p_req == N, $sformatf("proteome strobes %0d", p_req));
    check(step == N, $sformatf("pipeline steps %0d", step));
    check(w_cnt == N - M, $sformatf("results %0d", w_cnt));
    // enable was first sampled at the posedge before the first negedge
    check(cyc == M + N + L + 1 + stall_len, $sformatf("run length %0d cycles", cyc));
    @(negedge clk);
    check(run_end, "run_end holds while enable is high");
    enable = 0;
    @(negedge clk);
    check(!run_end, "run_end clears when enable falls");
    repeat (2) @(negedge clk);
  endtask

  initial begin
    repeat (2) @(negedge clk);
    rst_n = 1;
    @(negedge clk);
    check(!run_end && read_s == '0 && !read_p, "idle after reset");
    run(0, 0);
    run(5, 3);
    run(0, 2);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
