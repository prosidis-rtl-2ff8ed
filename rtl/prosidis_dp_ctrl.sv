// prosidis_dp_ctrl: data path controller of one PROSIDIS pipeline.
//
// It enforces the systolic schedule t = i + j, stage = j: stage j works on
// window i at time t, every stage sees the same proteome character p(t)
// and the partial score moves one stage per step.
//
// A run has two request phases. LOAD issues read_s[j] for j = 0..M_LEN-1,
// one per cycle, to fetch the peptide; STREAM issues read_p N_LEN times to
// fetch p(0)..p(N_LEN-1). Memory data returns RD_LAT cycles after a
// request; the controller delays its strobes by the same amount to give
// cap_s (stage j latches the peptide character) and p_valid (the pipeline
// steps on the character on the bus). The step index t counts p_valid;
// write_M marks the steps t = M_LEN-1 .. N_LEN-2, whose last-stage output
// is the result M(t-M_LEN+1) for windows 0 .. N_LEN-M_LEN-1.
//
// Interface: enable is a level. A run starts when enable is seen high in
// IDLE; while enable is low during LOAD or STREAM no request is issued
// (a stall: data already requested still arrives and is used). After the
// last request and RD_LAT cycles of drain, run_end rises and stays high
// until enable falls, which returns the controller to IDLE.
//
// Timing: with enable held high, read_s[0] is issued one cycle after
// enable is first sampled and run_end rises M_LEN + N_LEN + RD_LAT + 1
// cycles after it: M_LEN + N_LEN request cycles, as in the original design,
// plus one start cycle and the memory latency. The phase structure and the
// exact strobe timing are this design's own; the original gives only the
// signal names and the cycle count M_LEN + N_LEN.
module prosidis_dp_ctrl #(
  parameter int unsigned M_LEN  = 24,      // peptide length m
  parameter int unsigned N_LEN  = 524000,  // proteome section length n
  parameter int unsigned RD_LAT = 1        // memory read latency in cycles
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             enable,    // run / stall
  output logic             run_end,   // run finished
  output logic [M_LEN-1:0] read_s,    // request peptide character j
  output logic             read_p,    // request next proteome character
  output logic [M_LEN-1:0] cap_s,     // peptide character j on the bus now
  output logic             p_valid,   // proteome character on the bus now
  output logic             write_M    // last-stage output is a result
);

  localparam int unsigned CNT_W = $clog2((M_LEN > N_LEN ? M_LEN : N_LEN) + 1);
  localparam int unsigned LAT_W = $clog2(RD_LAT + 1) + 1;

  typedef enum logic [2:0] {S_IDLE, S_LOAD, S_STREAM, S_DRAIN, S_DONE} state_t;

  state_t           state;
  logic [CNT_W-1:0] cnt;    // requests issued in the current phase
  logic [CNT_W-1:0] t;      // pipeline steps taken in this run
  logic [LAT_W-1:0] drain;  // drain cycles elapsed

  initial begin
    assert (M_LEN >= 1 && N_LEN > M_LEN)
      else $error("prosidis_dp_ctrl: need 1 <= M_LEN < N_LEN");
  end

  // Requests, issued only while enabled.
  always_comb begin
    read_s = '0;
    read_p = 1'b0;
    for (int j = 0; j < M_LEN; j++)
      read_s[j] = enable && (state == S_LOAD) && (cnt == CNT_W'(j));
    if (enable && state == S_STREAM) read_p      = 1'b1;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state <= S_IDLE;
      cnt   <= '0;
      drain <= '0;
    end else begin
      unique case (state)
        S_IDLE: begin
          cnt <= '0;
          if (enable) state <= S_LOAD;
        end
        S_LOAD: if (enable) begin
          if (cnt == CNT_W'(M_LEN - 1)) begin
            cnt   <= '0;
            state <= S_STREAM;
          end else begin
            cnt <= cnt + 1'b1;
          end
        end
        S_STREAM: if (enable) begin
          if (cnt == CNT_W'(N_LEN - 1)) begin
            cnt   <= '0;
            drain <= '0;
            state <= (RD_LAT == 0) ? S_DONE : S_DRAIN;
          end else begin
            cnt <= cnt + 1'b1;
          end
        end
        S_DRAIN: begin
          drain <= drain + 1'b1;
          if (drain == LAT_W'(RD_LAT - 1)) state <= S_DONE;
        end
        S_DONE:  if (!enable) state <= S_IDLE;
        default: state <= S_IDLE;
      endcase
    end
  end

  assign run_end = (state == S_DONE);

  // Delay the strobes by the memory latency.
  generate
    if (RD_LAT == 0) begin : g_nolat
      assign cap_s   = read_s;
      assign p_valid = read_p;
    end else begin : g_lat
      logic [RD_LAT-1:0][M_LEN-1:0] s_dly;
      logic [RD_LAT-1:0]            p_dly;
      always_ff @(posedge clk or negedge rst_n) begin
        if (!rst_n) begin
          s_dly <= '0;
          p_dly <= '0;
        end else begin
          s_dly[0] <= read_s;
          p_dly[0] <= read_p;
          for (int k = 1; k < RD_LAT; k++) begin
            s_dly[k] <= s_dly[k-1];
            p_dly[k] <= p_dly[k-1];
          end
        end
      end
      assign cap_s   = s_dly[RD_LAT-1];
      assign p_valid = p_dly[RD_LAT-1];
    end
  endgenerate

  // Step counter and result window.
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)                t <= '0;
    else if (state == S_IDLE)  t <= '0;
    else if (p_valid)          t <= t + 1'b1;
  end

  assign write_M = p_valid && (t >= CNT_W'(M_LEN - 1)) && (t <= CNT_W'(N_LEN - 2));

  // A strobe is one-hot or idle, and the two phases never overlap.
  a_read_onehot: assert property (@(posedge clk) disable iff (!rst_n)
    $onehot0(read_s) && !(read_p && (read_s != '0)));

endmodule
