// mem_if_bank0: read interface between the pipelines and board memory
// bank 0, which holds the peptide and the proteome sections.
//
// Bank 0 layout (32-bit words): words S_BASE .. S_BASE+M_LEN-1 hold s(j)
// in bits [4:0]; words P_BASE .. P_BASE+N_LEN-1 hold, for each position t,
// the character p_k(t) of proteome section k in byte k, bits [8k+4:8k].
// Packing the sections byte-aligned in one word follows the original
// design; placing the peptide in the same bank ahead of the proteome is
// this design's choice.
//
// The pipelines run in lockstep, so one set of strobes (read_s one-hot,
// read_p) drives the bank: read_s[j] reads word S_BASE+j, read_p reads the
// next proteome word from a counter that start clears. The returned word
// is split combinationally: s_out is the peptide character for every
// pipeline, p_out[k] the character for pipeline k. These outputs are plain
// wires from bits of b0_rdata; bits 7:5 of each byte are not used.
//
// Timing: rd_en and addr are combinational from the strobes; the memory
// returns rdata a fixed number of cycles later (RD_LAT of the pipelines).
module mem_if_bank0
  import prosidis_pkg::*;
#(
  parameter int unsigned M_LEN   = 24,
  parameter int unsigned N_PIPES = 4,
  parameter int unsigned ADDR_W  = 19,
  parameter int unsigned DATA_W  = 32,
  parameter int unsigned S_BASE  = 0,
  parameter int unsigned P_BASE  = 24
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              start,     // clears the proteome word counter
  input  logic [M_LEN-1:0]  read_s,
  input  logic              read_p,
  output logic              b0_rd_en,
  output logic [ADDR_W-1:0] b0_addr,
  input  logic [DATA_W-1:0] b0_rdata,
  output aa_t               s_out,
  output aa_t               p_out [N_PIPES]
);

  initial begin
    assert (8 * N_PIPES <= DATA_W)
      else $error("mem_if_bank0: %0d byte lanes do not fit a %0d-bit word", N_PIPES, DATA_W);
  end

  logic [ADDR_W-1:0] pcnt;   // proteome words read so far
  logic [ADDR_W-1:0] s_idx;

  always_comb begin
    s_idx = '0;
    for (int j = 0; j < M_LEN; j++)
      if (read_s[j]) s_idx = ADDR_W'(j);
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)      pcnt <= '0;
    else if (start)  pcnt <= '0;
    else if (read_p) pcnt <= pcnt + 1'b1;
  end

  assign b0_rd_en = read_p || (read_s != '0);
  assign b0_addr  = read_p ? ADDR_W'(P_BASE) + pcnt : ADDR_W'(S_BASE) + s_idx;

  assign s_out = b0_rdata[AA_W-1:0];
  for (genvar k = 0; k < N_PIPES; k++) begin : g_lane
    assign p_out[k] = b0_rdata[8*k +: AA_W];
  end

endmodule
