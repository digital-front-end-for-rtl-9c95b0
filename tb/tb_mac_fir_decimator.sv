// tb_mac_fir_decimator - self-checking test of the dual-channel MAC FIR
// decimator with both coefficient sets (inverse sinc and generic FIR stage),
// each in GSM and DECT mode. The work is done by two fir_stage_harness
// instances; this module adds the clock, the watchdog and the final report,
// and requires that back-to-back outputs and output saturation both occurred.
module tb_mac_fir_decimator;
  import dfe_pkg::*;

  logic clk = 1'b0;
  always #5 clk = ~clk;

  int   checks_a, failures_a, b2b_a, sat_a;
  int   checks_b, failures_b, b2b_b, sat_b;
  logic done_a, done_b;
  int   checks, failures;

  fir_stage_harness #(.STAGE(STAGE_INVSINC)) u_inv (
    .clk, .checks(checks_a), .failures(failures_a), .back_to_back(b2b_a),
    .saturations(sat_a), .done(done_a));
  fir_stage_harness #(.STAGE(STAGE_GENERIC)) u_gen (
    .clk, .checks(checks_b), .failures(failures_b), .back_to_back(b2b_b),
    .saturations(sat_b), .done(done_b));

  initial begin
    repeat (200000) @(posedge clk);
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks_a + checks_b, failures_a + failures_b + 1);
    $finish;
  end

  initial begin
    wait (done_a && done_b);
    checks   = checks_a + checks_b + 2;
    failures = failures_a + failures_b;
    if (b2b_a == 0 || b2b_b == 0) begin
      failures++;
      $display("FAIL back-to-back operation never happened");
    end
    if (sat_a + sat_b == 0) begin
      failures++;
      $display("FAIL output saturation never happened");
    end
    $display("back-to-back outputs: inverse sinc %0d, generic %0d; saturations %0d",
             b2b_a, b2b_b, sat_a + sat_b);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
