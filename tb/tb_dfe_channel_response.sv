// tb_dfe_channel_response - measures the channel filter of the front-end
// (comb decimator, inverse sinc FIR, generic FIR) against the GSM and DECT
// channel specifications.
//
// The decimation chain of dfe_top is rebuilt here with a 12-bit comb input
// so that a clean complex baseband tone A*exp(j*2*pi*f*n/fs) can be applied
// instead of a one-bit stream. A complex tone passes a linear filter and a
// decimator with constant magnitude, so after the filters have settled the
// relative gain at f is the mean of |out_i + j*out_q| divided by the same
// mean measured at DC.
//
// Checks, per standard:
//  * peak-to-peak gain variation over the passband (0 to 82 % of the
//    channel bandwidth) within the channel ripple of the standard's table:
//    0.1 dB for GSM, 0.5 dB for DECT;
//  * the gain at the channel bandwidth edge (100 kHz / 700 kHz) at least
//    20 dB (GSM) and 13.4 dB (DECT) below the passband;
//  * one output per 64 (GSM) or 32 (DECT) input samples.
module tb_dfe_channel_response;
  import dfe_pkg::*;

  localparam int unsigned B_IN = 12;
  localparam real         AMP  = 512.0;
  localparam real         PI   = 3.14159265358979;

  logic               clk = 1'b0;
  logic               rst;
  mode_e              mode;
  logic               in_valid;
  logic signed [B_IN-1:0] in_i, in_q;
  logic               cic_valid_i, cic_valid_q;
  logic signed [15:0] cic_i, cic_q;
  logic               inv_valid, inv_busy, inv_overrun;
  logic signed [15:0] inv_i, inv_q;
  logic               out_valid, gen_busy, gen_overrun;
  logic signed [15:0] out_i, out_q;

  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  cic_decimator #(.B_IN(B_IN)) u_cic_i (
    .clk, .rst, .mode, .in_valid, .in_x(in_i), .out_valid(cic_valid_i), .out_y(cic_i));
  cic_decimator #(.B_IN(B_IN)) u_cic_q (
    .clk, .rst, .mode, .in_valid, .in_x(in_q), .out_valid(cic_valid_q), .out_y(cic_q));
  mac_fir_decimator #(.STAGE(STAGE_INVSINC)) u_inv (
    .clk, .rst, .mode, .in_valid(cic_valid_i), .in_i(cic_i), .in_q(cic_q),
    .out_valid(inv_valid), .out_i(inv_i), .out_q(inv_q), .busy(inv_busy), .overrun(inv_overrun));
  mac_fir_decimator #(.STAGE(STAGE_GENERIC)) u_gen (
    .clk, .rst, .mode, .in_valid(inv_valid), .in_i(inv_i), .in_q(inv_q),
    .out_valid(out_valid), .out_i(out_i), .out_q(out_q), .busy(gen_busy), .overrun(gen_overrun));

  initial begin
    repeat (3000000) @(posedge clk);
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end

  task automatic check(bit cond, string what);
    checks++;
    if (!cond) begin
      failures++;
      $display("FAIL %s", what);
    end
  endtask

  real mag_sum;
  int  n_out, n_avg;

  always @(posedge clk) begin
    #1;
    if (!rst && out_valid) begin
      n_out++;
      if (n_out > 40) begin      // filters settled
        mag_sum += $sqrt(real'(out_i) * real'(out_i) + real'(out_q) * real'(out_q));
        n_avg++;
      end
    end
  end

  // Gain (linear) of the chain at offset f for a complex tone.
  task automatic measure(mode_e m, real fs, real f, output real mag);
    int dec = (m == MODE_GSM) ? 64 : 32;
    int ns  = dec * 56;
    @(negedge clk);
    rst = 1'b1; mode = m; in_valid = 1'b0;
    repeat (3) @(negedge clk);
    rst = 1'b0; n_out = 0; n_avg = 0; mag_sum = 0.0;
    for (int n = 0; n < ns; n++) begin
      real ph = 2.0 * PI * f * real'(n) / fs;
      in_valid = 1'b1;
      in_i = B_IN'($rtoi(AMP * $cos(ph) + ((AMP * $cos(ph) >= 0.0) ? 0.5 : -0.5)));
      in_q = B_IN'($rtoi(AMP * $sin(ph) + ((AMP * $sin(ph) >= 0.0) ? 0.5 : -0.5)));
      @(negedge clk);
      in_valid = 1'b0;
      @(negedge clk);
    end
    repeat (300) @(negedge clk);
    check(n_out == ns / dec, $sformatf("output count %0d, expected %0d", n_out, ns / dec));
    check(!inv_overrun && !gen_overrun, "no overrun");
    mag = (n_avg > 0) ? mag_sum / real'(n_avg) : 0.0;
  endtask

  task automatic run_standard(string name, mode_e m, real fs, real fpass, real fedge,
                              real ripple_db, real edge_db);
    real g, g0, gmax, gmin, gedge, r_db, e_db;
    measure(m, fs, 0.0, g0);
    gmax = g0; gmin = g0;
    for (int k = 1; k <= 8; k++) begin
      measure(m, fs, fpass * real'(k) / 8.0, g);
      if (g > gmax) gmax = g;
      if (g < gmin) gmin = g;
    end
    measure(m, fs, fedge, gedge);
    r_db = 20.0 * $log10(gmax / gmin);
    e_db = 20.0 * $log10(gedge / g0);
    $display("%s: DC output magnitude %0.1f, passband ripple %0.3f dB p-p (limit %0.1f), gain at %0.0f kHz %0.1f dB (limit -%0.1f)",
             name, g0, r_db, ripple_db, fedge / 1.0e3, e_db, edge_db);
    check(g0 > 1000.0, {name, ": tone reaches the output"});
    check(r_db <= ripple_db, {name, ": passband ripple within the channel ripple spec"});
    check(e_db <= -edge_db, {name, ": attenuation at the channel bandwidth edge"});
  endtask

  initial begin
    mode = MODE_GSM; rst = 1'b1; in_valid = 1'b0; in_i = '0; in_q = '0;
    run_standard("GSM",  MODE_GSM,  17.333333e6, 82.0e3,  100.0e3, 0.1, 20.0);
    run_standard("DECT", MODE_DECT, 36.864e6,    574.0e3, 700.0e3, 0.5, 13.4);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
