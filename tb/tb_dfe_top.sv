// tb_dfe_top - end-to-end test of the digital front-end at its default
// parameters.
//
// A behavioural bandpass sigma-delta modulator (bp_sdm_model) turns a test
// tone near 3fs/4 into the one-bit stream the receiver expects; one ADC bit
// is offered every second clock, the highest rate the DECT setting allows.
// Four runs are made, each after a reset with a new mode (so the mode switch
// GSM <-> DECT is exercised): an in-band and an out-of-band tone for GSM
// (fs = 17.333 MHz, offsets 40 kHz and 300 kHz) and for DECT (fs = 36.864
// MHz, offsets 300 kHz and 2 MHz).
//
// Checks:
//  * every output pair equals a bit-exact reference computed here from the
//    recorded bitstream: the mixer sequences, five moving sums of length 16
//    decimated by M, then the two FIR convolutions with the tables of
//    dfe_pkg, each shifted right by 15 and saturated;
//  * one output per 64 (GSM) or 32 (DECT) ADC samples;
//  * the in-band tone comes out at least 20 dB stronger than the
//    out-of-band one, and rotating in the positive sense (a tone above the
//    carrier stays above it: no spectrum reversal);
//  * no overrun, and that the mechanisms of the design all happened: mode
//    switches, comb integrator wrap-around, back-to-back MAC operation in
//    both FIR stages, and decimation in every stage.
module tb_dfe_top;
  import dfe_pkg::*;

  localparam int unsigned NS = 64 * 300;     // ADC samples per run

  logic               clk = 1'b0;
  logic               rst;
  mode_e              mode;
  logic               sd_valid;
  logic               sd_bit;
  logic               out_valid;
  logic signed [15:0] out_i, out_q;
  logic               busy, overrun;

  logic sdm_en, sdm_bit;
  real  amp, freq;

  int checks = 0, failures = 0;
  int mode_switches = 0, wraps = 0, b2b_inv = 0, b2b_gen = 0;
  int n_cic = 0, n_inv = 0, n_out = 0;

  dfe_top dut (.*);

  bp_sdm_model u_sdm (.clk, .rst, .en(sdm_en), .amp, .freq, .bit_out(sdm_bit));

  always #5 clk = ~clk;

  initial begin
    repeat (4 * 2 * NS + 20000) @(posedge clk);
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end

  task automatic check(bit cond, string what);
    checks++;
    if (!cond) begin
      failures++;
      if (failures < 20) $display("FAIL %s", what);
    end
  endtask

  // Recorded stimulus and response of the current run.
  int bits [NS];
  int got_i [$], got_q [$];

  always @(posedge clk) begin
    #1;
    if (!rst && out_valid) begin
      got_i.push_back(int'(out_i));
      got_q.push_back(int'(out_q));
    end
  end

  // Mechanism counters (hierarchical observation of the design).
  logic signed [22:0] int5_q;
  always @(posedge clk) begin
    int5_q <= dut.u_cic_i.integ[4];
    if (!rst) begin
      if (dut.u_cic_i.integ[4][22] != int5_q[22] && dut.u_cic_i.integ[4][21] == int5_q[21]) wraps++;
      if (dut.cic_valid_i) n_cic++;
      if (dut.inv_valid) n_inv++;
      if (dut.inv_valid && dut.inv_busy) b2b_inv++;
      if (out_valid && dut.gen_busy) b2b_gen++;
    end
  end

  function automatic int sat16(longint v);
    if (v > 32767) return 32767;
    if (v < -32768) return -32768;
    return int'(v);
  endfunction

  // Bit-exact reference of the whole chain for one channel.
  task automatic reference(mode_e m, bit q, output int y [$]);
    int unsigned M  = (m == MODE_GSM) ? 16 : 8;
    int unsigned T1 = (m == MODE_GSM) ? 24 : 16;
    int unsigned T2 = (m == MODE_GSM) ? 48 : 32;
    longint s [NS];
    longint t [NS];
    int c [$];
    int f1 [$];
    // mixer: cos = [1 0 -1 0], sin = [0 1 0 -1]
    for (int n = 0; n < NS; n++) begin
      int ph = n % 4;
      if (!q) s[n] = (ph == 0) ? bits[n] : (ph == 2) ? -bits[n] : 0;
      else    s[n] = (ph == 1) ? bits[n] : (ph == 3) ? -bits[n] : 0;
    end
    // five moving sums of length 16
    for (int st = 0; st < 5; st++) begin
      longint run = 0;
      for (int n = 0; n < NS; n++) begin
        run += s[n];
        if (n >= 16) run -= s[n-16];
        t[n] = run;
      end
      s = t;
    end
    c = {};
    for (int n = int'(M) - 1; n < NS; n += M) c.push_back(int'(s[n] >>> 7));
    f1 = {};
    for (int n = 1; n < c.size(); n += 2) begin
      longint acc = 0;
      for (int k = 0; k < int'(T1); k++)
        if (n - k >= 0)
          acc += longint'((m == MODE_GSM) ? INVSINC_GSM[k] : INVSINC_DECT[k]) * c[n-k];
      f1.push_back(sat16(acc >>> 15));
    end
    y = {};
    for (int n = 1; n < f1.size(); n += 2) begin
      longint acc = 0;
      for (int k = 0; k < int'(T2); k++)
        if (n - k >= 0)
          acc += longint'((m == MODE_GSM) ? GENERIC_GSM[k] : GENERIC_DECT[k]) * f1[n-k];
      y.push_back(sat16(acc >>> 15));
    end
  endtask

  // One run: reset into mode m, feed NS ADC bits of a tone, check, return
  // the mean output power over the second half.
  task automatic run(mode_e m, real tone_amp, real tone_freq, output real power, output real rot);
    int ref_i [$], ref_q [$];
    int dec = (m == MODE_GSM) ? 64 : 32;
    int n_cic0, n_inv0;
    real acc_p;
    int  np;
    @(negedge clk);
    if (m != mode) mode_switches++;
    rst = 1'b1; mode = m; amp = tone_amp; freq = tone_freq;
    sdm_en = 1'b0; sd_valid = 1'b0; sd_bit = 1'b0;
    repeat (3) @(negedge clk);
    rst = 1'b0;
    got_i = {}; got_q = {};
    n_cic0 = n_cic; n_inv0 = n_inv;
    for (int n = 0; n < NS; n++) begin
      sdm_en = 1'b1; sd_valid = 1'b0;
      @(negedge clk);
      sdm_en = 1'b0;
      sd_valid = 1'b1; sd_bit = sdm_bit;
      bits[n] = sdm_bit ? 1 : -1;
      @(negedge clk);
    end
    sd_valid = 1'b0;
    repeat (200) @(negedge clk);
    check(n_cic - n_cic0 == NS / (dec / 4), "comb output count");
    check(n_inv - n_inv0 == NS / (dec / 2), "inverse sinc output count");
    check(got_i.size() == NS / dec, $sformatf("output count %0d, expected %0d", got_i.size(), NS / dec));
    reference(m, 1'b0, ref_i);
    reference(m, 1'b1, ref_q);
    for (int k = 0; k < got_i.size() && k < ref_i.size(); k++) begin
      check(got_i[k] == ref_i[k], $sformatf("mode %0d I[%0d] = %0d, reference %0d", m, k, got_i[k], ref_i[k]));
      check(got_q[k] == ref_q[k], $sformatf("mode %0d Q[%0d] = %0d, reference %0d", m, k, got_q[k], ref_q[k]));
    end
    check(!overrun, "no overrun");
    acc_p = 0.0; np = 0;
    for (int k = got_i.size() / 2; k < got_i.size(); k++) begin
      acc_p += real'(got_i[k]) * real'(got_i[k]) + real'(got_q[k]) * real'(got_q[k]);
      np++;
    end
    power = (np > 0) ? acc_p / real'(np) : 0.0;
    // Rotation sense: sum of Im(y[k] * conj(y[k-1])), positive for a tone
    // above the carrier when the spectrum is not reversed.
    rot = 0.0;
    for (int k = got_i.size() / 2 + 1; k < got_i.size(); k++)
      rot += real'(got_q[k]) * real'(got_i[k-1]) - real'(got_i[k]) * real'(got_q[k-1]);
  endtask

  initial begin
    real p_gsm_in, p_gsm_out, p_dect_in, p_dect_out;
    real r_gsm, r_dect, r_unused;
    real fs_gsm  = 17.333333e6;
    real fs_dect = 36.864e6;
    mode = MODE_GSM; rst = 1'b1; amp = 0.0; freq = 0.0;
    sdm_en = 1'b0; sd_valid = 1'b0; sd_bit = 1'b0;

    // Carrier at 3fs/4 + df is the sampled sequence -fs/4 + df.
    run(MODE_GSM, 0.5, -0.25 + 40.0e3 / fs_gsm, p_gsm_in, r_gsm);
    run(MODE_DECT, 0.5, -0.25 + 300.0e3 / fs_dect, p_dect_in, r_dect);
    run(MODE_GSM, 0.5, -0.25 + 300.0e3 / fs_gsm, p_gsm_out, r_unused);
    run(MODE_DECT, 0.5, -0.25 + 2.0e6 / fs_dect, p_dect_out, r_unused);
    $display("GSM  output power: in-band %0.1f, out-of-band %0.1f", p_gsm_in, p_gsm_out);
    $display("DECT output power: in-band %0.1f, out-of-band %0.1f", p_dect_in, p_dect_out);
    // A tone of amplitude 0.5 reaches the output at about 2048 LSB.
    check(p_gsm_in > 1.0e6, "GSM in-band tone reaches the output");
    check(p_dect_in > 1.0e6, "DECT in-band tone reaches the output");
    check(r_gsm > 0.0, "GSM: tone above the carrier comes out at a positive frequency");
    check(r_dect > 0.0, "DECT: tone above the carrier comes out at a positive frequency");
    check(p_gsm_in > 100.0 * p_gsm_out, "GSM: 300 kHz tone at least 20 dB below 40 kHz tone");
    check(p_dect_in > 100.0 * p_dect_out, "DECT: 2 MHz tone at least 20 dB below 300 kHz tone");

    $display("mode switches %0d, integrator wraps %0d, back-to-back inverse sinc %0d, generic %0d",
             mode_switches, wraps, b2b_inv, b2b_gen);
    check(mode_switches >= 2, "mode switch exercised");
    check(wraps > 0, "comb integrator wrap-around exercised");
    check(b2b_inv > 0, "back-to-back MAC in inverse sinc stage");
    check(b2b_gen > 0, "back-to-back MAC in generic stage");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
