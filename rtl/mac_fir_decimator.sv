// mac_fir_decimator - dual-channel polyphase decimate-by-2 FIR filter on a
// single multiply-accumulate engine.
//
// This is the architecture the published design selects for both FIR stages of the
// channel filter (the inverse sinc stage and the generic FIR stage): the I
// and Q streams are time-multiplexed onto one sample store and one MAC, and
// only every second output of the full-rate filter is computed, which is the
// polyphase form of a decimate-by-2 filter. One output pair costs 2*TAPS MAC
// cycles, so the clock must run at least TAPS times the input sample rate
// (as noted there, the clock rate grows with the filter order).
//
// Operation: the I and Q samples of each input are time-multiplexed onto a
// single write line into one circular sample store (channel in the top
// address bit): I is written in the clock of in_valid, Q in the next clock,
// so inputs must be at least two clocks apart. Every second input, counted
// from reset, starts a computation on the newest TAPS samples: first the I
// channel, then the Q channel, one tap per clock,
//   acc = sum_{k=0}^{TAPS-1} h[k] * x[n-k].
// Each result is shifted right by COEF_FRAC (truncation) and saturated to
// OUT_W bits; after the Q channel finishes, out_valid pulses for one clock
// with out_i/out_q, 2*TAPS clocks after the edge that took the starting
// input. A start may coincide with the last MAC cycle of the previous output,
// so two inputs every 2*TAPS clocks is the highest sustained rate. The store
// is deeper than the longest filter, so inputs may keep arriving during a
// computation; a start request that finds the engine still busy is an
// overrun (flagged on the sticky overrun output and by an assertion).
// Samples older than the first one written after reset read as zero.
//
// STAGE picks the coefficient table (dfe_pkg); mode picks GSM or DECT and
// with it the filter length. Change mode only together with rst
// (synchronous, active high). Coefficient values, widths, truncation and
// saturation are this design's choices; the published design fixes the structure
// and the filter orders.
module mac_fir_decimator
  import dfe_pkg::*;
#(
  parameter fir_stage_e  STAGE  = STAGE_INVSINC,
  parameter int unsigned DATA_W = 16,
  parameter int unsigned OUT_W  = 16,
  parameter int unsigned ACC_W  = DATA_W + COEF_W + $clog2(MAX_TAPS)
) (
  input  logic                     clk,
  input  logic                     rst,
  input  mode_e                    mode,
  input  logic                     in_valid,
  input  logic signed [DATA_W-1:0] in_i,
  input  logic signed [DATA_W-1:0] in_q,
  output logic                     out_valid,
  output logic signed [OUT_W-1:0]  out_i,
  output logic signed [OUT_W-1:0]  out_q,
  output logic                     busy,
  output logic                     overrun
);

  localparam int unsigned AW     = $clog2(MAX_TAPS + 2);
  localparam int unsigned DEPTH  = 1 << AW;
  localparam int unsigned KW     = $clog2(MAX_TAPS + 1);

  typedef logic signed [ACC_W-1:0] acc_t;

  logic signed [DATA_W-1:0] mem [2*DEPTH];   // {channel, index}
  logic [AW-1:0]            wr_ptr;
  logic [AW-1:0]            base;            // index of newest sample of the computation
  logic                     phase;           // toggles per input; start on phase 1
  logic [KW-1:0]            nsamp;           // samples written since reset, saturating
  logic [KW-1:0]            navail;          // valid samples for the running computation
  logic [KW-1:0]            k;
  logic                     ch;              // 0 = I, 1 = Q
  logic [KW-1:0]            taps;
  acc_t                     acc;
  acc_t                     acc_next;
  logic signed [DATA_W-1:0] x_k;
  coef_t                    h_k;
  logic                     start;
  logic                     last_cycle;
  logic                     q_pend;          // Q sample of the last input still to be written
  logic [AW-1:0]            q_addr;
  logic signed [DATA_W-1:0] q_hold;
  logic                     wr_en;
  logic [AW:0]              wr_addr;
  logic signed [DATA_W-1:0] wr_data;

  assign taps  = KW'(fir_taps(STAGE, mode));
  assign start = in_valid && phase;
  // Final MAC cycle of an output pair: a new start may coincide with it.
  assign last_cycle = busy && ch && (k == taps - 1'b1);

  // Operand fetch for tap k of the current channel.
  always_comb begin
    logic [AW-1:0] rd;
    rd  = base - AW'(k);
    x_k = (k < navail) ? mem[{ch, rd}] : '0;
    h_k = fir_coef(STAGE, mode, 32'(k));
    acc_next = acc + acc_t'(x_k) * acc_t'(h_k);
  end

  function automatic logic signed [OUT_W-1:0] scale_sat(acc_t a);
    acc_t s;
    s = a >>> COEF_FRAC;
    if (s > acc_t'(2**(OUT_W-1) - 1))       return {1'b0, {(OUT_W-1){1'b1}}};
    else if (s < -acc_t'(2**(OUT_W-1)))     return {1'b1, {(OUT_W-1){1'b0}}};
    else                                    return OUT_W'(s);
  endfunction

  // I/Q time-division multiplex onto one write line: I is written in the
  // clock of in_valid, Q (held in q_hold) in the clock after it.
  always_comb begin
    wr_en   = in_valid || q_pend;
    wr_addr = in_valid ? {1'b0, wr_ptr} : {1'b1, q_addr};
    wr_data = in_valid ? in_i : q_hold;
  end

  // Sample store: one write port, never reset.
  always_ff @(posedge clk) begin
    if (wr_en) mem[wr_addr] <= wr_data;
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      q_pend <= 1'b0;
      q_addr <= '0;
      q_hold <= '0;
    end else begin
      q_pend <= in_valid;
      if (in_valid) begin
        q_addr <= wr_ptr;
        q_hold <= in_q;
      end
    end
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      wr_ptr    <= '0;
      base      <= '0;
      phase     <= 1'b0;
      nsamp     <= '0;
      navail    <= '0;
      k         <= '0;
      ch        <= 1'b0;
      acc       <= '0;
      busy      <= 1'b0;
      overrun   <= 1'b0;
      out_valid <= 1'b0;
      out_i     <= '0;
      out_q     <= '0;
    end else begin
      out_valid <= 1'b0;
      if (in_valid) begin
        wr_ptr <= wr_ptr + 1'b1;
        phase  <= ~phase;
        if (nsamp != KW'(MAX_TAPS)) nsamp <= nsamp + 1'b1;
      end
      if (busy) begin
        if (k == taps - 1'b1) begin
          k   <= '0;
          acc <= '0;
          if (!ch) begin
            out_i <= scale_sat(acc_next);
            ch    <= 1'b1;
          end else begin
            out_q     <= scale_sat(acc_next);
            out_valid <= 1'b1;
            ch        <= 1'b0;
            busy      <= start;          // back-to-back: next output starts at once
            if (start) begin
              base   <= wr_ptr;
              navail <= (nsamp == KW'(MAX_TAPS)) ? nsamp : nsamp + 1'b1;
            end
          end
        end else begin
          k   <= k + 1'b1;
          acc <= acc_next;
        end
        if (start && !last_cycle) overrun <= 1'b1;
      end else if (start) begin
        busy <= 1'b1;
        base <= wr_ptr;
        navail <= (nsamp == KW'(MAX_TAPS)) ? nsamp : nsamp + 1'b1;
        k    <= '0;
        ch   <= 1'b0;
        acc  <= '0;
      end
    end
  end

  // The TDM write line needs a free clock after every input.
  a_input_spacing: assert property (@(posedge clk) disable iff (rst) !(in_valid && q_pend))
    else $error("mac_fir_decimator: inputs on consecutive clocks");

  // A new output may only be requested once the previous one is finished.
  a_no_overrun: assert property (@(posedge clk) disable iff (rst) !(busy && start && !last_cycle))
    else $error("mac_fir_decimator: input rate too high for %0d taps", taps);

endmodule
