// tb_cic_decimator - self-checking test of the 5th-order comb decimator.
//
// For each mode (GSM: M=16, D=1; DECT: M=8, D=2) random samples are fed with
// random gaps in the valid strobe. The reference filters the same samples
// with five cascaded moving sums of length M*D = 16 at the input rate (the
// direct form of [(1 - z^-MD)/(1 - z^-1)]^5, in 64-bit integers, no wrap) and
// takes every M-th result; the DUT output must equal it after dropping the
// REG_W-OUT_W low bits. Also checked: one output per M inputs, output one
// clock after the M-th input, and that the wrap-around of the last
// integrator really happened (the reference never wraps, so a match after a
// wrap shows that two's complement wrap-around is harmless).
module tb_cic_decimator;
  import dfe_pkg::*;

  localparam int unsigned B_IN  = 3;
  localparam int unsigned OUT_W = 16;
  localparam int unsigned REG_W = 5*4 + B_IN;
  localparam int unsigned NS    = 3000;

  logic                    clk = 1'b0;
  logic                    rst;
  mode_e                   mode;
  logic                    in_valid;
  logic signed [B_IN-1:0]  in_x;
  logic                    out_valid;
  logic signed [OUT_W-1:0] out_y;

  int checks = 0, failures = 0;
  int wraps = 0;

  cic_decimator #(.B_IN(B_IN), .OUT_W(OUT_W)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (40000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // Wrap-around of the last integrator: its sign flips with a jump larger
  // than half the register range.
  logic signed [REG_W-1:0] last_int_q;
  always_ff @(posedge clk) begin
    last_int_q <= dut.integ[4];
    if (!rst && (dut.integ[4][REG_W-1] != last_int_q[REG_W-1]) &&
        (dut.integ[4][REG_W-2] == last_int_q[REG_W-2]))
      wraps <= wraps + 1;
  end

  task automatic check(bit cond, string what);
    checks++;
    if (!cond) begin
      failures++;
      $display("FAIL %s", what);
    end
  endtask

  task automatic run_mode(mode_e m);
    int unsigned M = (m == MODE_GSM) ? 16 : 8;
    longint x [NS];
    longint s [6][NS];
    longint ref_full;
    int n_out;
    for (int n = 0; n < NS; n++) x[n] = longint'($urandom_range(0, 7)) - 4;
    // Five moving sums of length 16, zero initial state.
    for (int n = 0; n < NS; n++) s[0][n] = x[n];
    for (int st = 1; st <= 5; st++)
      for (int n = 0; n < NS; n++) begin
        s[st][n] = 0;
        for (int j = 0; j < 16; j++) if (n - j >= 0) s[st][n] += s[st-1][n-j];
      end

    mode = m; rst = 1'b1; in_valid = 1'b0; in_x = '0;
    repeat (3) @(posedge clk);
    @(negedge clk); rst = 1'b0;
    n_out = 0;
    for (int n = 0; n < NS; n++) begin
      while ($urandom_range(0, 2) == 0) begin
        @(negedge clk); in_valid = 1'b0;
        @(posedge clk); #1;
        check(!out_valid, "no output without an input");
      end
      @(negedge clk);
      in_valid = 1'b1;
      in_x     = B_IN'(x[n]);
      @(posedge clk); #1;
      if ((n % M) == M - 1) begin
        check(out_valid, "output after every M-th input");
        if (out_valid) begin
          ref_full = s[5][n] >>> (REG_W - OUT_W);
          check(longint'(out_y) == ref_full, $sformatf("value n=%0d dut=%0d ref=%0d", n, out_y, ref_full));
          n_out++;
        end
      end else begin
        check(!out_valid, "no output between decimation points");
      end
    end
    @(negedge clk); in_valid = 1'b0;
    check(n_out == NS / M, "output count = inputs / M");
  endtask

  initial begin
    run_mode(MODE_GSM);
    run_mode(MODE_DECT);
    run_mode(MODE_GSM);
    check(wraps > 0, "integrator wrap-around exercised");
    $display("integrator wraps seen: %0d", wraps);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
