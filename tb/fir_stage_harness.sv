// fir_stage_harness - drives and checks one mac_fir_decimator instance.
//
// For each mode (GSM, then DECT) it resets the filter, feeds NS random
// full-scale I/Q samples and compares every output pair with a direct
// convolution of the same samples with the stage's coefficient table,
// shifted right by 15 and saturated to 16 bits. The first half of the
// samples is sent at the highest rate the engine sustains (one sample every
// TAPS clocks, so each output starts in the clock its predecessor ends), the
// second half with random extra gaps. It checks the output count (one per
// two inputs), the latency (2*TAPS clocks from the starting input) and that
// no overrun is flagged. Results are reported through checks/failures.
module fir_stage_harness
  import dfe_pkg::*;
#(
  parameter fir_stage_e  STAGE = STAGE_INVSINC,
  parameter int unsigned NS    = 400
) (
  input  logic clk,
  output int   checks,
  output int   failures,
  output int   back_to_back,
  output int   saturations,
  output logic done
);
  logic                rst;
  mode_e               mode;
  logic                in_valid;
  logic signed [15:0]  in_i, in_q;
  logic                out_valid;
  logic signed [15:0]  out_i, out_q;
  logic                busy, overrun;

  mac_fir_decimator #(.STAGE(STAGE)) dut (.*);

  int xi [NS];
  int xq [NS];
  int n_in, n_out;
  int start_cycles [$];
  int cycle = 0;

  always_ff @(posedge clk) cycle <= cycle + 1;

  task automatic check(bit cond, string what);
    checks++;
    if (!cond) begin
      failures++;
      $display("FAIL stage %0d mode %0d: %s", STAGE, mode, what);
    end
  endtask

  function automatic coef_t coef(mode_e m, int k);
    if (STAGE == STAGE_INVSINC) return (m == MODE_GSM) ? INVSINC_GSM[k] : INVSINC_DECT[k];
    else                        return (m == MODE_GSM) ? GENERIC_GSM[k] : GENERIC_DECT[k];
  endfunction

  function automatic int ref_out(mode_e m, int n, bit q);
    longint acc = 0;
    int taps = (STAGE == STAGE_INVSINC) ? ((m == MODE_GSM) ? 24 : 16)
                                        : ((m == MODE_GSM) ? 48 : 32);
    for (int k = 0; k < taps; k++)
      if (n - k >= 0) acc += longint'(coef(m, k)) * longint'(q ? xq[n-k] : xi[n-k]);
    acc = acc >>> 15;
    if (acc > 32767) begin saturations++; acc = 32767; end
    if (acc < -32768) begin saturations++; acc = -32768; end
    return int'(acc);
  endfunction

  // Output checker.
  always @(posedge clk) begin
    #1;
    if (!rst && out_valid) begin
      int n, taps, t0;
      n    = 2*n_out + 1;
      taps = (STAGE == STAGE_INVSINC) ? ((mode == MODE_GSM) ? 24 : 16)
                                      : ((mode == MODE_GSM) ? 48 : 32);
      t0   = (start_cycles.size() > 0) ? start_cycles.pop_front() : 0;
      check(int'(out_i) == ref_out(mode, n, 1'b0), $sformatf("I output %0d", n_out));
      check(int'(out_q) == ref_out(mode, n, 1'b1), $sformatf("Q output %0d", n_out));
      // cycle has already advanced past the edge that set out_valid
      check(cycle - 1 - t0 == 2*taps,
            $sformatf("latency %0d, expected %0d", cycle - 1 - t0, 2*taps));
      if (busy) back_to_back++;
      n_out++;
    end
  end

  task automatic run_mode(mode_e m);
    int taps = (STAGE == STAGE_INVSINC) ? ((m == MODE_GSM) ? 24 : 16)
                                        : ((m == MODE_GSM) ? 48 : 32);
    for (int n = 0; n < NS; n++) begin
      xi[n] = int'($urandom_range(0, 65535)) - 32768;
      xq[n] = int'($urandom_range(0, 65535)) - 32768;
    end
    @(negedge clk);
    mode = m; rst = 1'b1; in_valid = 1'b0;
    repeat (3) @(negedge clk);
    rst = 1'b0; n_in = 0; n_out = 0; start_cycles.delete();
    for (int n = 0; n < NS; n++) begin
      in_valid = 1'b1;
      in_i = 16'(xi[n]);
      in_q = 16'(xq[n]);
      @(posedge clk);
      if (n % 2 == 1) start_cycles.push_back(cycle);
      @(negedge clk);
      in_valid = 1'b0;
      repeat (taps - 1 + ((n < NS/2) ? 0 : $urandom_range(0, 6))) @(negedge clk);
    end
    repeat (2*taps + 4) @(negedge clk);
    check(n_out == NS/2, $sformatf("output count %0d", n_out));
    check(!overrun, "no overrun");
  endtask

  initial begin
    checks = 0; failures = 0; back_to_back = 0; saturations = 0; done = 1'b0;
    rst = 1'b1; mode = MODE_GSM; in_valid = 1'b0; in_i = '0; in_q = '0;
    run_mode(MODE_GSM);
    run_mode(MODE_DECT);
    done = 1'b1;
  end
endmodule
