// bmode_controller: finite state machine sequencing the back end processor.
//
// One frame is processed in two passes, each a state that streams a memory through a
// functional unit and a state that waits for that unit's last valid output:
//   IDLE -> ENV_RUN -> ENV_WAIT -> LOG_RUN -> LOG_WAIT -> DONE -> IDLE
// ENV_RUN reads the input memory line by line into the envelope detector; ENV_WAIT
// holds until the last envelope sample is written to the envelope memory. LOG_RUN
// reads the envelope memory into log compression; LOG_WAIT holds until the output
// memory's write address reaches its last value, which ends the frame. Waiting in a
// state for a valid signal before moving on follows the processor's controller; the
// state list is this design's reading of it.
//
// Per-line filtering (this design's choice): each scan line of SAMPLES samples is
// followed by HALF zero samples, and its first sample is flagged det_first so that the
// Hilbert filter starts from an empty history. The detector therefore returns
// SAMPLES + HALF outputs per line; the first HALF (its group delay) are dropped and
// the rest are written in order, so envelope sample k lines up with RF sample k.
//
// Interface: memory ports as in sdp_ram (one-cycle read latency); det_* and lc_valid
// are aligned with the memory read data one clock after the read. start is taken in
// IDLE only; done pulses for one clock in DONE; busy is high outside IDLE.
// Timing: a frame takes about LINES*(SAMPLES+HALF) + LINES*SAMPLES clocks plus the
// two pipeline latencies.
module bmode_controller
  import bmode_pkg::*;
#(
  parameter int unsigned SAMPLES = FRAME_SAMPLES,
  parameter int unsigned LINES   = FRAME_LINES,
  parameter int unsigned HALF    = FIR_HALF,
  parameter int unsigned TOTAL   = SAMPLES * LINES,
  parameter int unsigned ADDR_W  = $clog2(TOTAL)
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              start,
  output logic              busy,
  output logic              done,
  output ctrl_state_t       state,
  // input memory read, envelope detector input control
  output logic              in_rd_en,
  output logic [ADDR_W-1:0] in_rd_addr,
  output logic              det_valid,
  output logic              det_first,
  output logic              det_zero,
  // envelope detector output, envelope memory
  input  logic              det_out_valid,
  output logic              env_we,
  output logic [ADDR_W-1:0] env_waddr,
  output logic              env_rd_en,
  output logic [ADDR_W-1:0] env_rd_addr,
  // log compression
  output logic              lc_valid,
  input  logic              lc_out_valid,
  output logic              out_we,
  output logic [ADDR_W-1:0] out_waddr
);

  localparam int unsigned SPAN = SAMPLES + HALF;   // detector inputs per line
  localparam int unsigned IW   = $clog2(SPAN + 1);
  localparam int unsigned LW   = $clog2(LINES + 1);

  ctrl_state_t       state_n;
  logic [IW-1:0]     idx;        // position in the current line (read side)
  logic [LW-1:0]     line;
  logic [ADDR_W-1:0] base;       // address of sample 0 of the current line
  logic [IW-1:0]     oc;         // position in the current line (detector output side)
  logic [ADDR_W-1:0] ridx;       // envelope memory read address in LOG_RUN
  logic              env_last, out_last, feed_last, line_last;

  // ---- read / feed side ----
  assign in_rd_en    = (state == ST_ENV_RUN) && (idx < IW'(SAMPLES));
  assign in_rd_addr  = base + ADDR_W'(idx);
  assign env_rd_en   = (state == ST_LOG_RUN);
  assign env_rd_addr = ridx;
  assign line_last   = (idx == IW'(SPAN - 1));
  assign feed_last   = line_last && (line == LW'(LINES - 1));

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      det_valid <= 1'b0;
      det_first <= 1'b0;
      det_zero  <= 1'b0;
      lc_valid  <= 1'b0;
    end else begin
      det_valid <= (state == ST_ENV_RUN);
      det_first <= (state == ST_ENV_RUN) && (idx == '0);
      det_zero  <= (idx >= IW'(SAMPLES));
      lc_valid  <= (state == ST_LOG_RUN);
    end
  end

  always_ff @(posedge clk) begin
    if (!rst_n || state == ST_IDLE) begin
      idx  <= '0;
      line <= '0;
      base <= '0;
      ridx <= '0;
    end else if (state == ST_ENV_RUN) begin
      if (line_last) begin
        idx  <= '0;
        line <= line + 1'b1;
        base <= base + ADDR_W'(SAMPLES);
      end else begin
        idx <= idx + 1'b1;
      end
    end else if (state == ST_LOG_RUN) begin
      ridx <= ridx + 1'b1;
    end
  end

  // ---- write side ----
  assign env_we   = det_out_valid && (oc >= IW'(HALF));
  assign env_last = env_we && (env_waddr == ADDR_W'(TOTAL - 1));
  assign out_we   = lc_out_valid;
  assign out_last = out_we && (out_waddr == ADDR_W'(TOTAL - 1));

  always_ff @(posedge clk) begin
    if (!rst_n || state == ST_IDLE) begin
      oc        <= '0;
      env_waddr <= '0;
      out_waddr <= '0;
    end else begin
      if (det_out_valid)
        oc <= (oc == IW'(SPAN - 1)) ? '0 : oc + 1'b1;
      if (env_we)
        env_waddr <= env_waddr + 1'b1;
      if (out_we)
        out_waddr <= out_waddr + 1'b1;
    end
  end

  // ---- state machine ----
  always_comb begin
    state_n = state;
    unique case (state)
      ST_IDLE:     if (start)                   state_n = ST_ENV_RUN;
      ST_ENV_RUN:  if (feed_last)               state_n = ST_ENV_WAIT;
      ST_ENV_WAIT: if (env_last)                state_n = ST_LOG_RUN;
      ST_LOG_RUN:  if (ridx == ADDR_W'(TOTAL - 1)) state_n = ST_LOG_WAIT;
      ST_LOG_WAIT: if (out_last)                state_n = ST_DONE;
      ST_DONE:                                  state_n = ST_IDLE;
      default:                                  state_n = ST_IDLE;
    endcase
  end

  always_ff @(posedge clk) begin
    if (!rst_n) state <= ST_IDLE;
    else        state <= state_n;
  end

  assign busy = (state != ST_IDLE);
  assign done = (state == ST_DONE);

  // Writes stay inside the frame and arrive only in the state that expects them.
  a_env_in_range: assert property (@(posedge clk) disable iff (!rst_n)
    env_we |-> (state == ST_ENV_RUN || state == ST_ENV_WAIT));
  a_out_in_range: assert property (@(posedge clk) disable iff (!rst_n)
    out_we |-> (state == ST_LOG_RUN || state == ST_LOG_WAIT));

endmodule
