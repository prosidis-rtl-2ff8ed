// status_port_mgr: status port manager of the PROSIDIS FPGA.
//
// The host polls the 8-bit status port until it reads the End value. This
// block holds the state of the computation: STAT_IDLE after reset,
// STAT_BUSY from the go pulse until the bus requester reports stop, then
// STAT_END until the next go. The port and the End value follow the
// original design; the three codes and the busy state are this design's
// own.
//
// Timing: status changes in the cycle after go or stop is sampled.
module status_port_mgr
  import prosidis_pkg::*;
(
  input  logic       clk,
  input  logic       rst_n,
  input  logic       go,           // computation started
  input  logic       stop,         // computation finished
  output logic [7:0] status_rdata  // value read by the host
);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)    status_rdata <= STAT_IDLE;
    else if (go)   status_rdata <= STAT_BUSY;
    else if (stop) status_rdata <= STAT_END;
  end

endmodule
