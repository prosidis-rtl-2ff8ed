// prosidis_cell: the elementary computing element of the PROSIDIS pipeline.
//
// It adds the similarity weight DM(p,s) of one proteome/peptide character
// pair to the partial score in_M of the previous stage and clamps the result
// at zero: out_M = max(0, in_M + DM(p,s)). As in the original circuit the
// weight comes from a look-up table, an adder forms the sum and a
// multiplexer steered by the sign bit selects either the sum or 0.
//
// The sum is formed on SCORE_W+1 bits so that its top bit is a true sign:
// in_M is unsigned and may exceed 127 (the maximum score is 7*m, 168 for
// m = 24), so an 8-bit sign bit would misread large scores. A positive sum
// above 255 cannot happen for peptides up to 36 characters; it would wrap,
// as the original 8-bit output would.
//
// Timing: purely combinational; the delay registers sit between cells in
// prosidis_pipeline.
module prosidis_cell
  import prosidis_pkg::*;
(
  input  aa_t    p,      // proteome character (broadcast bus)
  input  aa_t    s,      // peptide character held by this stage
  input  score_t in_M,   // partial score from the previous stage
  output score_t out_M   // partial score to the next stage
);

  dm_t                       dm;
  logic signed [SCORE_W:0]   sum;

  dm_lut u_lut (.a(p), .b(s), .dm(dm));

  always_comb begin
    sum   = $signed({1'b0, in_M}) + (SCORE_W + 1)'(dm);
    out_M = sum[SCORE_W] ? '0 : sum[SCORE_W-1:0];
  end

endmodule
