// prosidis_pipeline: one linear systolic pipeline of PROSIDIS with its
// data path controller.
//
// It computes, for every window i of the proteome section p,
//   M(i) = sum over j of DM(p(i+j), s(j)), clamped at 0 after each step,
// using M_LEN computing elements, one per peptide character: stage j holds
// s(j) in a register. The proteome character p(t) is broadcast on a bus to
// all stages at step t; stage j adds DM(p(t), s(j)) to the partial score of
// window t-j that stage j-1 produced one step earlier and that waited in
// the delay register between the two stages. Stage 0 starts every window
// from 0. The last stage's output, M(t-M_LEN+1), leaves the pipeline
// unregistered and is qualified by write_M. This structure (per-stage
// peptide character, broadcast proteome bus, one delay register per stage
// boundary) follows the original design; the register that holds s(j) and
// the latency handling are this design's own.
//
// Interface: read_s / read_p request data from memory; s_in and p_in must
// carry the requested character RD_LAT cycles later. enable starts the run
// and stalls it when low; run_end reports completion (see
// prosidis_dp_ctrl for the exact timing).
module prosidis_pipeline
  import prosidis_pkg::*;
#(
  parameter int unsigned M_LEN  = 24,
  parameter int unsigned N_LEN  = 524000,
  parameter int unsigned RD_LAT = 1
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             enable,
  output logic             run_end,
  output logic [M_LEN-1:0] read_s,
  output logic             read_p,
  input  aa_t              s_in,     // peptide character from memory
  input  aa_t              p_in,     // proteome character from memory
  output score_t           M_out,    // similarity of the finished window
  output logic             write_M   // M_out is a result
);

  logic [M_LEN-1:0] cap_s;
  logic             p_valid;

  prosidis_dp_ctrl #(.M_LEN(M_LEN), .N_LEN(N_LEN), .RD_LAT(RD_LAT)) u_ctrl (
    .clk, .rst_n, .enable, .run_end, .read_s, .read_p,
    .cap_s, .p_valid, .write_M
  );

  aa_t    s_reg  [M_LEN];   // peptide character of each stage
  score_t in_m   [M_LEN];   // partial score entering each stage
  score_t out_m  [M_LEN];   // partial score leaving each stage

  for (genvar j = 0; j < M_LEN; j++) begin : g_stage
    always_ff @(posedge clk or negedge rst_n) begin
      if (!rst_n)        s_reg[j] <= '0;
      else if (cap_s[j]) s_reg[j] <= s_in;
    end

    prosidis_cell u_cell (.p(p_in), .s(s_reg[j]), .in_M(in_m[j]), .out_M(out_m[j]));

    if (j == 0) begin : g_first
      assign in_m[j] = '0;
    end else begin : g_delay
      // Delay element between stage j-1 and stage j.
      always_ff @(posedge clk or negedge rst_n) begin
        if (!rst_n)       in_m[j] <= '0;
        else if (p_valid) in_m[j] <= out_m[j-1];
      end
    end
  end

  assign M_out = out_m[M_LEN-1];

endmodule
