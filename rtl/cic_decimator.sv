// cic_decimator - N-th order comb (CIC) decimator for one channel, with a
// GSM and a DECT setting selected at run time.
//
// Transfer function (as published): H(z) = [(1 - z^-MD) / (1 - z^-1)]^N.
// It is built the usual multiplier-less way: N integrators running at the
// input rate, a decimate-by-M switch, then N comb sections y = x - x[-D]
// running at the output rate. GSM uses M = 16, D = 1 and DECT uses M = 8,
// D = 2 (published values), N = 5 for both. Every register has
// REG_W = N*log2(M*D) + B_IN bits (the register growth bound) and wraps around in two's
// complement; the comb differences undo any integrator overflow exactly.
// Both modes have M*D = 16, so REG_W and the DC gain (M*D)^N = 2^20 are the
// same for both.
//
// Interface: in_valid/in_x deliver input samples. The M-th sample since the
// last output (counted from reset) is passed through the integrators and,
// in the same clock, through the combs; one clock after that sample
// out_valid pulses with out_y, the comb output with its REG_W-OUT_W least
// significant bits dropped (truncation, this design's choice). Output k
// therefore equals the full-rate filter output at input index k*M + M - 1.
// mode selects the setting; change it only together with rst (synchronous,
// active high), which clears all state. The integrator chain is computed
// combinationally inside one clock, like the carry-ripple adders the
// published design reports; pipelining it is left out for clarity.
module cic_decimator
  import dfe_pkg::*;
#(
  parameter int unsigned N      = CIC_ORDER,
  parameter int unsigned B_IN   = 3,
  parameter int unsigned M_GSM  = CIC_M_GSM,
  parameter int unsigned D_GSM  = CIC_D_GSM,
  parameter int unsigned M_DECT = CIC_M_DECT,
  parameter int unsigned D_DECT = CIC_D_DECT,
  parameter int unsigned OUT_W  = 16
) (
  input  logic                    clk,
  input  logic                    rst,
  input  mode_e                   mode,
  input  logic                    in_valid,
  input  logic signed [B_IN-1:0]  in_x,
  output logic                    out_valid,
  output logic signed [OUT_W-1:0] out_y
);

  localparam int unsigned MD_MAX = (M_GSM*D_GSM > M_DECT*D_DECT) ? M_GSM*D_GSM : M_DECT*D_DECT;
  localparam int unsigned REG_W  = N*$clog2(MD_MAX) + B_IN;
  localparam int unsigned D_MAX  = (D_GSM > D_DECT) ? D_GSM : D_DECT;
  localparam int unsigned M_MAX  = (M_GSM > M_DECT) ? M_GSM : M_DECT;
  localparam int unsigned CNT_W  = $clog2(M_MAX);

  typedef logic signed [REG_W-1:0] acc_t;

  acc_t             integ      [N];
  acc_t             integ_next [N];
  acc_t             comb_dly   [N][D_MAX];
  acc_t             comb_val   [N+1];
  logic [CNT_W-1:0] cnt;
  logic [CNT_W-1:0] m_last;
  int unsigned      d_sel;

  assign m_last = (mode == MODE_GSM) ? CNT_W'(M_GSM - 1) : CNT_W'(M_DECT - 1);
  assign d_sel  = (mode == MODE_GSM) ? D_GSM : D_DECT;

  // Integrator chain: each stage adds the freshly updated previous stage.
  always_comb begin
    integ_next[0] = integ[0] + REG_W'(in_x);
    for (int s = 1; s < N; s++)
      integ_next[s] = integ[s] + integ_next[s-1];
  end

  // Comb chain at the decimated rate: y = x - x delayed by D decimated samples.
  always_comb begin
    comb_val[0] = integ_next[N-1];
    for (int s = 0; s < N; s++)
      comb_val[s+1] = comb_val[s] - comb_dly[s][d_sel-1];
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      for (int s = 0; s < N; s++) begin
        integ[s] <= '0;
        for (int d = 0; d < D_MAX; d++) comb_dly[s][d] <= '0;
      end
      cnt       <= '0;
      out_valid <= 1'b0;
      out_y     <= '0;
    end else begin
      out_valid <= 1'b0;
      if (in_valid) begin
        for (int s = 0; s < N; s++) integ[s] <= integ_next[s];
        if (cnt == m_last) begin
          cnt <= '0;
          for (int s = 0; s < N; s++) begin
            comb_dly[s][0] <= comb_val[s];
            for (int d = 1; d < D_MAX; d++) comb_dly[s][d] <= comb_dly[s][d-1];
          end
          out_valid <= 1'b1;
          out_y     <= OUT_W'(comb_val[N] >>> (REG_W - OUT_W));
        end else begin
          cnt <= cnt + 1'b1;
        end
      end
    end
  end

endmodule
