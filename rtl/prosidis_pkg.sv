// prosidis_pkg: types, constants and the similarity table shared by the
// PROSIDIS protein-similarity processor.
//
// Amino acids are 5-bit codes 0..19 in the order of the alphabet
// {I,F,V,L,W,M,A,G,C,Y,P,T,S,H,E,D,Q,N,K,R}; codes 20..31 are not amino
// acids. Similarity weights are 4-bit two's complement ([-8,7]) and
// similarity scores are 8-bit unsigned (never negative), as in the
// original design. The weighting matrix is BLOSUM62, whose entries lie in
// [-4,11]; the three entries above 7 (W/W=11, C/C=9, H/H=8) are saturated
// to 7 so that every weight fits in 4 bits. The saturation is this
// design's choice of how to bring the matrix into range. Codes that are not
// amino acids weigh 0.
package prosidis_pkg;

  localparam int unsigned AA_W    = 5;   // bits per amino-acid character
  localparam int unsigned DM_W    = 4;   // bits per similarity weight
  localparam int unsigned SCORE_W = 8;   // bits per similarity score M(i)
  localparam int unsigned N_AA    = 20;  // alphabet size

  localparam int signed DM_MAX = 7;
  localparam int signed DM_MIN = -8;

  typedef logic        [AA_W-1:0]    aa_t;
  typedef logic signed [DM_W-1:0]    dm_t;
  typedef logic        [SCORE_W-1:0] score_t;

  // Host command and status codes on the 8-bit control and status ports.
  localparam logic [7:0] CMD_START  = 8'h01;
  localparam logic [7:0] STAT_IDLE  = 8'h00;
  localparam logic [7:0] STAT_BUSY  = 8'h02;
  localparam logic [7:0] STAT_END   = 8'h01;

  // BLOSUM62 in its customary row/column order A R N D C Q E G H I L K M F
  // P S T W Y V, unscaled.
  function automatic int blosum62_std(int unsigned r, int unsigned c);
    int row [20][20];
    row = '{
      '{ 4,-1,-2,-2, 0,-1,-1, 0,-2,-1,-1,-1,-1,-2,-1, 1, 0,-3,-2, 0},
      '{-1, 5, 0,-2,-3, 1, 0,-2, 0,-3,-2, 2,-1,-3,-2,-1,-1,-3,-2,-3},
      '{-2, 0, 6, 1,-3, 0, 0, 0, 1,-3,-3, 0,-2,-3,-2, 1, 0,-4,-2,-3},
      '{-2,-2, 1, 6,-3, 0, 2,-1,-1,-3,-4,-1,-3,-3,-1, 0,-1,-4,-3,-3},
      '{ 0,-3,-3,-3, 9,-3,-4,-3,-3,-1,-1,-3,-1,-2,-3,-1,-1,-2,-2,-1},
      '{-1, 1, 0, 0,-3, 5, 2,-2, 0,-3,-2, 1, 0,-3,-1, 0,-1,-2,-1,-2},
      '{-1, 0, 0, 2,-4, 2, 5,-2, 0,-3,-3, 1,-2,-3,-1, 0,-1,-3,-2,-2},
      '{ 0,-2, 0,-1,-3,-2,-2, 6,-2,-4,-4,-2,-3,-3,-2, 0,-2,-2,-3,-3},
      '{-2, 0, 1,-1,-3, 0, 0,-2, 8,-3,-3,-1,-2,-1,-2,-1,-2,-2, 2,-3},
      '{-1,-3,-3,-3,-1,-3,-3,-4,-3, 4, 2,-3, 1, 0,-3,-2,-1,-3,-1, 3},
      '{-1,-2,-3,-4,-1,-2,-3,-4,-3, 2, 4,-2, 2, 0,-3,-2,-1,-2,-1, 1},
      '{-1, 2, 0,-1,-3, 1, 1,-2,-1,-3,-2, 5,-1,-3,-1, 0,-1,-3,-2,-2},
      '{-1,-1,-2,-3,-1, 0,-2,-3,-2, 1, 2,-1, 5, 0,-2,-1,-1,-1,-1, 1},
      '{-2,-3,-3,-3,-2,-3,-3,-3,-1, 0, 0,-3, 0, 6,-4,-2,-2, 1, 3,-1},
      '{-1,-2,-2,-1,-3,-1,-1,-2,-2,-3,-3,-1,-2,-4, 7,-1,-1,-4,-3,-2},
      '{ 1,-1, 1, 0,-1, 0, 0, 0,-1,-2,-2, 0,-1,-2,-1, 4, 1,-3,-2,-2},
      '{ 0,-1, 0,-1,-1,-1,-1,-2,-2,-1,-1,-1,-1,-2,-1, 1, 5,-2,-2, 0},
      '{-3,-3,-4,-4,-2,-2,-3,-2,-2,-3,-2,-3,-1, 1,-4,-3,-2,11, 2,-3},
      '{-2,-2,-2,-3,-2,-1,-2,-3, 2,-1,-1,-2,-1, 3,-3,-2,-2, 2, 7,-1},
      '{ 0,-3,-3,-3,-1,-2,-2,-3,-3, 3, 1,-2, 1,-1,-2,-2, 0,-3,-1, 4}
    };
    return row[r][c];
  endfunction

  // Position in the customary BLOSUM order of each code of this design's
  // alphabet I F V L W M A G C Y P T S H E D Q N K R.
  function automatic int unsigned aa_to_std(aa_t a);
    int unsigned map [20];
    map = '{9, 13, 19, 10, 17, 12, 0, 7, 4, 18, 14, 16, 15, 8, 6, 3, 5, 2, 11, 1};
    return map[a];
  endfunction

  // Scaled weight DM(a,b) for two 5-bit codes.
  function automatic dm_t dm_weight(aa_t a, aa_t b);
    int w;
    if (a >= AA_W'(N_AA) || b >= AA_W'(N_AA)) return '0;
    w = blosum62_std(aa_to_std(a), aa_to_std(b));
    if (w > DM_MAX) w = DM_MAX;
    if (w < DM_MIN) w = DM_MIN;
    return dm_t'(w);
  endfunction

endpackage
