// tb_dm_lut: checks the weighting-matrix ROM against BLOSUM62 entries
// written out here by hand (after saturation to [-8,7]), its symmetry over
// all 400 amino-acid pairs and the zero weight of the 12 unused codes.
module tb_dm_lut;
  import prosidis_pkg::*;

  aa_t a, b;
  dm_t dm;
  int  checks = 0, failures = 0;

  dm_lut dut (.a, .b, .dm);

  // Alphabet positions: I0 F1 V2 L3 W4 M5 A6 G7 C8 Y9 P10 T11 S12 H13 E14
  // D15 Q16 N17 K18 R19.
  task automatic expect_w(int x, int y, int w);
    a = aa_t'(x); b = aa_t'(y);
    #1;
    checks++;
    if (dm !== dm_t'(w)) begin
      failures++;
      $display("FAIL DM(%0d,%0d) = %0d, expected %0d", x, y, dm, w);
    end
  endtask

  initial begin
    // diagonal: I F V L W M A G C Y P T S H E D Q N K R
    int diag [20] = '{4, 6, 4, 4, 7, 5, 4, 6, 7, 7, 7, 5, 4, 7, 5, 6, 5, 6, 5, 5};
    for (int k = 0; k < 20; k++) expect_w(k, k, diag[k]);
    expect_w(0, 2, 3);    // I V
    expect_w(0, 3, 2);    // I L
    expect_w(1, 9, 3);    // F Y
    expect_w(4, 9, 2);    // W Y
    expect_w(4, 1, 1);    // W F
    expect_w(14, 15, 2);  // E D
    expect_w(14, 16, 2);  // E Q
    expect_w(18, 19, 2);  // K R
    expect_w(17, 15, 1);  // N D
    expect_w(12, 11, 1);  // S T
    expect_w(12, 6, 1);   // S A
    expect_w(7, 0, -4);   // G I
    expect_w(4, 17, -4);  // W N
    expect_w(4, 10, -4);  // W P
    expect_w(15, 3, -4);  // D L
    expect_w(1, 10, -4);  // F P
    expect_w(8, 14, -4);  // C E
    expect_w(6, 4, -3);   // A W
    expect_w(13, 9, 2);   // H Y
    expect_w(5, 3, 2);    // M L
    expect_w(6, 8, 0);    // A C
    expect_w(19, 13, 0);  // R H
    // symmetry
    for (int x = 0; x < 20; x++)
      for (int y = x + 1; y < 20; y++) begin
        dm_t w1;
        a = aa_t'(x); b = aa_t'(y); #1; w1 = dm;
        a = aa_t'(y); b = aa_t'(x); #1;
        checks++;
        if (dm !== w1) begin
          failures++;
          $display("FAIL asymmetric DM(%0d,%0d)", x, y);
        end
      end
    // unused codes
    for (int x = 20; x < 32; x++) begin
      expect_w(x, 3, 0);
      expect_w(5, x, 0);
    end
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
