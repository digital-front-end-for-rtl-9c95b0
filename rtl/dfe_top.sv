// dfe_top - digital front-end of a GSM/DECT software radio receiver.
//
// Input is the bitstream of a bandpass sigma-delta ADC that subsamples the
// second IF (IF2) at fs = 4*IF2/3, so the wanted channel appears at 3fs/4.
// The chain brings it to complex baseband at the standard's symbol rate:
//
//   sd_bit -> +/-1 -> iq_downconverter (mux mixer, 3fs/4 -> DC)
//          -> cic_decimator x2 (I and Q, 5th order, /16 GSM, /8 DECT)
//          -> mac_fir_decimator STAGE_INVSINC (droop correction, /2)
//          -> mac_fir_decimator STAGE_GENERIC (channel filter, /2)
//          -> out_i/out_q at fs/64 (GSM) or fs/32 (DECT)
//
// With the published rates (GSM fs = 17.333 MHz, 64x the 270.833 ksym/s
// symbol rate; DECT 32x the 1.152 Msym/s symbol rate) the output is one
// complex sample per symbol. The single clock must be fast enough for the
// MAC stages: a FIR stage with T taps needs 2*T clocks per pair of its input
// samples. In GSM that is 1.5 clocks per ADC sample (generic FIR, 48 taps
// at fs/32), in DECT exactly 2 (16 taps at fs/8 and 32 taps at fs/16), so
// sd_valid may be asserted at most every second clock; a 73.728 MHz clock
// serves DECT at fs = 36.864 MHz. A faster input sets overrun.
//
// Interface: sd_valid marks one ADC output bit sd_bit (1 = +1, 0 = -1).
// mode selects GSM or DECT; it must be changed only while rst (synchronous,
// active high) is asserted. out_valid pulses with each baseband sample pair;
// busy is high while either MAC engine is computing.
// The mapping of the ADC bit, the 16-bit word width between the stages and
// the overrun flag are this design's choices; the chain and its decimation
// factors follow the published design.
module dfe_top
  import dfe_pkg::*;
#(
  parameter int unsigned DATA_W = 16,
  parameter int unsigned OUT_W  = 16
) (
  input  logic                    clk,
  input  logic                    rst,
  input  mode_e                   mode,
  input  logic                    sd_valid,
  input  logic                    sd_bit,
  output logic                    out_valid,
  output logic signed [OUT_W-1:0] out_i,
  output logic signed [OUT_W-1:0] out_q,
  output logic                    busy,
  output logic                    overrun
);

  localparam int unsigned ADC_W = 2;

  logic signed [ADC_W-1:0]  adc_x;
  logic                     mix_valid;
  logic signed [ADC_W:0]    mix_i, mix_q;
  logic                     cic_valid_i, cic_valid_q;
  logic signed [DATA_W-1:0] cic_i, cic_q;
  logic                     inv_valid;
  logic signed [DATA_W-1:0] inv_i, inv_q;
  logic                     inv_busy, inv_overrun;
  logic                     gen_busy, gen_overrun;

  assign adc_x = sd_bit ? ADC_W'(1) : -ADC_W'(1);

  iq_downconverter #(.IN_W(ADC_W)) u_mixer (
    .clk, .rst,
    .in_valid (sd_valid),
    .in_x     (adc_x),
    .out_valid(mix_valid),
    .out_i    (mix_i),
    .out_q    (mix_q)
  );

  cic_decimator #(.B_IN(ADC_W+1), .OUT_W(DATA_W)) u_cic_i (
    .clk, .rst, .mode,
    .in_valid (mix_valid),
    .in_x     (mix_i),
    .out_valid(cic_valid_i),
    .out_y    (cic_i)
  );

  cic_decimator #(.B_IN(ADC_W+1), .OUT_W(DATA_W)) u_cic_q (
    .clk, .rst, .mode,
    .in_valid (mix_valid),
    .in_x     (mix_q),
    .out_valid(cic_valid_q),
    .out_y    (cic_q)
  );

  mac_fir_decimator #(.STAGE(STAGE_INVSINC), .DATA_W(DATA_W), .OUT_W(DATA_W)) u_invsinc (
    .clk, .rst, .mode,
    .in_valid (cic_valid_i),
    .in_i     (cic_i),
    .in_q     (cic_q),
    .out_valid(inv_valid),
    .out_i    (inv_i),
    .out_q    (inv_q),
    .busy     (inv_busy),
    .overrun  (inv_overrun)
  );

  mac_fir_decimator #(.STAGE(STAGE_GENERIC), .DATA_W(DATA_W), .OUT_W(OUT_W)) u_generic (
    .clk, .rst, .mode,
    .in_valid (inv_valid),
    .in_i     (inv_i),
    .in_q     (inv_q),
    .out_valid(out_valid),
    .out_i    (out_i),
    .out_q    (out_q),
    .busy     (gen_busy),
    .overrun  (gen_overrun)
  );

  assign overrun = inv_overrun | gen_overrun;
  assign busy    = inv_busy | gen_busy;

  // The two comb decimators share one input strobe and stay in lock step.
  a_cic_lockstep: assert property (@(posedge clk) disable iff (rst) cic_valid_i == cic_valid_q);

endmodule
