// prosidis_top: the PROSIDIS FPGA, a coprocessor that scores a short
// peptide against four proteome sections at once.
//
// N_PIPES copies of the systolic pipeline (prosidis_pipeline, M_LEN stages
// each) run in lockstep, each on its own proteome section of N_LEN
// characters and all with the same peptide. Around them sit the parts that
// tie them to the prototyping board: the control port manager (host writes
// Start), the status port manager (host polls End), the bus requester
// (takes the board memory banks from the board memory controller and
// enables the pipelines while they are granted), the bank-0 read interface
// (peptide and byte-packed proteomes) and the bank-1 write interface
// (byte-packed scores). This arrangement follows the original block
// diagram; the port protocols are this design's own.
//
// Host sequence: fill bank 0 (peptide at S_BASE, proteome words at
// P_BASE), write CMD_START on the control port, poll the status port for
// STAT_END, read N_LEN-M_LEN result words from bank 1 at R_BASE.
//
// Interface: the board memory banks are synchronous SRAMs with a read
// latency of RD_LAT cycles; mem_req/mem_gnt arbitrate both banks with the
// board memory controller.
module prosidis_top
  import prosidis_pkg::*;
#(
  parameter int unsigned N_PIPES = 4,
  parameter int unsigned M_LEN   = 24,
  parameter int unsigned N_LEN   = 524000,
  parameter int unsigned RD_LAT  = 1,
  parameter int unsigned ADDR_W  = 19,
  parameter int unsigned DATA_W  = 32,
  parameter int unsigned S_BASE  = 0,
  parameter int unsigned P_BASE  = M_LEN,
  parameter int unsigned R_BASE  = 0
) (
  input  logic              clk,
  input  logic              rst_n,
  // control and status ports
  input  logic              ctrl_wr,
  input  logic [7:0]        ctrl_wdata,
  output logic [7:0]        status_rdata,
  // board memory controller arbitration
  output logic              mem_req,
  input  logic              mem_gnt,
  // board memory bank 0 (read)
  output logic              b0_rd_en,
  output logic [ADDR_W-1:0] b0_addr,
  input  logic [DATA_W-1:0] b0_rdata,
  // board memory bank 1 (write)
  output logic              b1_wr_en,
  output logic [ADDR_W-1:0] b1_addr,
  output logic [DATA_W-1:0] b1_wdata
);

  logic go, stop, enable, all_end;

  ctrl_port_mgr u_ctrl_port (.clk, .rst_n, .ctrl_wr, .ctrl_wdata, .go);

  status_port_mgr u_status_port (.clk, .rst_n, .go, .stop, .status_rdata);

  bus_requester u_bus_req (
    .clk, .rst_n, .go, .stop, .mem_req, .mem_gnt, .enable, .run_end(all_end)
  );

  logic [M_LEN-1:0] read_s  [N_PIPES];
  logic             read_p  [N_PIPES];
  logic             write_M [N_PIPES];
  logic             run_end [N_PIPES];
  score_t           M_out   [N_PIPES];
  aa_t              p_lane  [N_PIPES];
  aa_t              s_bus;

  for (genvar k = 0; k < N_PIPES; k++) begin : g_pipe
    prosidis_pipeline #(.M_LEN(M_LEN), .N_LEN(N_LEN), .RD_LAT(RD_LAT)) u_pipe (
      .clk, .rst_n, .enable,
      .run_end (run_end[k]),
      .read_s  (read_s[k]),
      .read_p  (read_p[k]),
      .s_in    (s_bus),
      .p_in    (p_lane[k]),
      .M_out   (M_out[k]),
      .write_M (write_M[k])
    );
  end

  always_comb begin
    all_end = 1'b1;
    for (int k = 0; k < N_PIPES; k++) all_end &= run_end[k];
  end

  mem_if_bank0 #(
    .M_LEN(M_LEN), .N_PIPES(N_PIPES), .ADDR_W(ADDR_W), .DATA_W(DATA_W),
    .S_BASE(S_BASE), .P_BASE(P_BASE)
  ) u_bank0 (
    .clk, .rst_n, .start(go),
    .read_s(read_s[0]), .read_p(read_p[0]),
    .b0_rd_en, .b0_addr, .b0_rdata,
    .s_out(s_bus), .p_out(p_lane)
  );

  mem_if_bank1 #(
    .N_PIPES(N_PIPES), .ADDR_W(ADDR_W), .DATA_W(DATA_W), .R_BASE(R_BASE)
  ) u_bank1 (
    .clk, .rst_n, .start(go),
    .write_M(write_M[0]), .M_in(M_out),
    .b1_wr_en, .b1_addr, .b1_wdata
  );

  // The replicated controllers must stay in lockstep: bank 0 and bank 1
  // follow the strobes of pipeline 0 only.
  for (genvar k = 1; k < N_PIPES; k++) begin : g_lockstep
    a_lockstep: assert property (@(posedge clk) disable iff (!rst_n)
      read_s[k] == read_s[0] && read_p[k] == read_p[0] &&
      write_M[k] == write_M[0] && run_end[k] == run_end[0]);
  end

endmodule
