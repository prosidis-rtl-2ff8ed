// mem_if_bank1: write interface between the pipelines and board memory
// bank 1, which receives the similarity scores.
//
// When the pipelines flag a result (write_M), the N_PIPES 8-bit scores are
// packed byte-aligned into one word, score k in byte k, and written at the
// next address, starting from R_BASE after each start. Word R_BASE+i thus
// holds M_k(i) of all sections k, which the host reads back in one DMA as
// in the original design; the base address and registered write are this
// design's own.
//
// Timing: the write (wr_en, addr, wdata) is registered, one cycle after
// write_M.
module mem_if_bank1
  import prosidis_pkg::*;
#(
  parameter int unsigned N_PIPES = 4,
  parameter int unsigned ADDR_W  = 19,
  parameter int unsigned DATA_W  = 32,
  parameter int unsigned R_BASE  = 0
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              start,    // restarts the address counter
  input  logic              write_M,  // the scores are results
  input  score_t            M_in [N_PIPES],
  output logic              b1_wr_en,
  output logic [ADDR_W-1:0] b1_addr,
  output logic [DATA_W-1:0] b1_wdata
);

  initial begin
    assert (8 * N_PIPES <= DATA_W)
      else $error("mem_if_bank1: %0d byte lanes do not fit a %0d-bit word", N_PIPES, DATA_W);
  end

  logic [ADDR_W-1:0] wcnt;   // results written so far
  logic [DATA_W-1:0] packed_m;

  always_comb begin
    packed_m = '0;
    for (int k = 0; k < N_PIPES; k++)
      packed_m[8*k +: SCORE_W] = M_in[k];
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      wcnt     <= '0;
      b1_wr_en <= 1'b0;
      b1_addr  <= '0;
      b1_wdata <= '0;
    end else begin
      b1_wr_en <= write_M;
      if (write_M) begin
        b1_addr  <= ADDR_W'(R_BASE) + wcnt;
        b1_wdata <= packed_m;
      end
      if (start)        wcnt <= '0;
      else if (write_M) wcnt <= wcnt + 1'b1;
    end
  end

endmodule
