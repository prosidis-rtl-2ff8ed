// dm_lut: the weighting-matrix look-up table of one computing element.
//
// Given a proteome character a and a peptide character b (5-bit codes) it
// returns the 4-bit two's-complement similarity DM(a,b). The table is a
// constant ROM of 32 x 32 entries (the 20 x 20 = 400 amino-acid pairs plus
// zeros for the unused codes) built at elaboration time from the scaled
// BLOSUM62 matrix in prosidis_pkg, so no data file is needed. The use of
// BLOSUM62 and the 4-bit range follow the original design; the saturation
// that brings it into range and the zero weight of unused codes are this
// design's choices.
//
// Timing: purely combinational, no clock.
module dm_lut
  import prosidis_pkg::*;
(
  input  aa_t a,   // proteome character p(i+j)
  input  aa_t b,   // peptide character s(j)
  output dm_t dm   // DM(a,b)
);

  localparam int unsigned ENTRIES = 1 << (2 * AA_W);

  function automatic logic [ENTRIES-1:0][DM_W-1:0] build_rom();
    logic [ENTRIES-1:0][DM_W-1:0] rom;
    for (int unsigned x = 0; x < (1 << AA_W); x++)
      for (int unsigned y = 0; y < (1 << AA_W); y++)
        rom[x * (1 << AA_W) + y] = dm_weight(aa_t'(x), aa_t'(y));
    return rom;
  endfunction

  localparam logic [ENTRIES-1:0][DM_W-1:0] ROM = build_rom();

  assign dm = dm_t'(ROM[{a, b}]);

endmodule
