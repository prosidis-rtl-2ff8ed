// bus_requester: memory-bus owner of the PROSIDIS FPGA.
//
// The board memory banks are shared with the host, which fills and empties
// them by DMA through the board memory controller. On go this block raises
// mem_req and waits for mem_gnt; the pipelines are stalled (enable low)
// until the grant arrives, then enabled. When the pipelines raise run_end
// the block releases the banks, lowers enable and sends a one-cycle stop to
// the status port manager. Only the block's name and its go, stop, enable
// and end connections come from the original design; the request/grant
// protocol is this design's own.
//
// Protocol: once given, the grant must stay until mem_req falls. The
// pipelines still complete reads and result writes a few cycles after a
// request, so the banks cannot be taken away in mid-run; an assertion
// checks this rule.
//
// Timing: enable follows mem_gnt combinationally while a run is active;
// stop is the cycle after run_end is sampled.
module bus_requester (
  input  logic clk,
  input  logic rst_n,
  input  logic go,        // start request from the control port
  output logic stop,      // run finished, to the status port
  output logic mem_req,   // request for the board memory banks
  input  logic mem_gnt,   // banks granted to the FPGA
  output logic enable,    // run / stall to the pipelines
  input  logic run_end    // pipelines finished
);

  typedef enum logic [1:0] {B_IDLE, B_RUN, B_STOP} bstate_t;
  bstate_t state;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) state <= B_IDLE;
    else begin
      unique case (state)
        B_IDLE:  if (go) state <= B_RUN;
        B_RUN:   if (run_end) state <= B_STOP;
        B_STOP:  state <= B_IDLE;
        default: state <= B_IDLE;
      endcase
    end
  end

  assign mem_req = (state == B_RUN) && !run_end;
  assign enable  = mem_req && mem_gnt;
  assign stop    = (state == B_STOP);

  // The banks are only used while they are requested.
  a_enable_needs_req: assert property (@(posedge clk) disable iff (!rst_n)
    enable |-> mem_req);

  // The board memory controller keeps the grant until the banks are released.
  a_grant_held: assert property (@(posedge clk) disable iff (!rst_n)
    mem_req && mem_gnt |=> mem_gnt || !mem_req);

endmodule
