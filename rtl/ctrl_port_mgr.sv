// ctrl_port_mgr: control port manager of the PROSIDIS FPGA.
//
// The host starts a computation by writing the start value on the 8-bit
// control port. This block registers each port write and turns a write of
// CMD_START into a one-cycle go pulse for the bus requester; other values
// are ignored. The port itself and its role follow the original design; the
// write-strobe handshake and the code 8'h01 are this design's own.
//
// Timing: go is high in the cycle after the write strobe is sampled.
module ctrl_port_mgr
  import prosidis_pkg::*;
(
  input  logic       clk,
  input  logic       rst_n,
  input  logic       ctrl_wr,     // host write strobe, one cycle per write
  input  logic [7:0] ctrl_wdata,  // value written
  output logic       go           // start pulse
);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) go <= 1'b0;
    else        go <= ctrl_wr && (ctrl_wdata == CMD_START);
  end

endmodule
