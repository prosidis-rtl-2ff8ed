// tb_prosidis_cell: checks out_M = max(0, in_M + DM(p,s)) over random and
// corner inputs, including scores above 127 that must stay positive and
// sums that must be clamped to 0.
module tb_prosidis_cell;
  import prosidis_pkg::*;

  aa_t    p, s;
  score_t in_M, out_M;
  int     checks = 0, failures = 0;

  prosidis_cell dut (.p, .s, .in_M, .out_M);

  task automatic apply(int pp, int ss, int m);
    int exp_v;
    p = aa_t'(pp); s = aa_t'(ss); in_M = score_t'(m);
    #1;
    exp_v = m + int'(dm_weight(p, s));
    if (exp_v < 0) exp_v = 0;
    checks++;
    if (out_M !== score_t'(exp_v)) begin
      failures++;
      $display("FAIL p=%0d s=%0d in=%0d out=%0d exp=%0d", pp, ss, m, out_M, exp_v);
    end
  endtask

  initial begin
    // hand-worked cases
    apply(4, 4, 0);      // W W: 0 + 7
    apply(7, 0, 0);      // G I: 0 - 4 -> clamp
    apply(7, 0, 3);      // 3 - 4 -> clamp
    apply(7, 0, 4);      // 4 - 4 = 0
    apply(7, 0, 130);    // 126, crosses 128 downward
    apply(4, 4, 150);    // 157, above 127
    apply(4, 4, 248);    // 255
    apply(1, 10, 200);   // 196
    // random
    for (int k = 0; k < 3000; k++)
      apply($urandom_range(19), $urandom_range(19), $urandom_range(248));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
