// bp_sdm_model - behavioural (non-synthesizable) model of a 4th-order
// bandpass sigma-delta ADC that subsamples a test tone, for simulation only.
//
// The modulator is the classic second-order lowpass loop (two delaying
// integrators with gain 1/2, one-bit quantizer) turned into a bandpass loop
// by the substitution z^-1 -> -z^-2, which doubles the order to 4 and moves
// the noise notch from DC to fs/4. Each enabled clock it samples the input
//   u[n] = amp * cos(2*pi*freq*n + phase0)
// (freq in cycles per ADC sample; a carrier at 3fs/4 + df, as the receiver's
// subsampled IF2, is the same sequence as -fs/4 + df) and emits one bit,
// 1 = +1, 0 = -1. rst clears the loop state and the sample index.
module bp_sdm_model (
  input  logic clk,
  input  logic rst,
  input  logic en,
  input  real  amp,
  input  real  freq,
  output logic bit_out
);
  real    i1 [2];       // first resonator, samples n-1 and n-2
  real    i2 [2];       // second resonator
  real    u_d [2];      // input, delayed
  real    y_d [2];      // output, delayed
  longint n;

  localparam real PI = 3.14159265358979;

  always_ff @(posedge clk) begin
    real u, i1n, i2n, y;
    if (rst) begin
      i1 <= '{0.0, 0.0}; i2 <= '{0.0, 0.0};
      u_d <= '{0.0, 0.0}; y_d <= '{0.0, 0.0};
      n <= 0;
      bit_out <= 1'b0;
    end else if (en) begin
      u   = amp * $cos(2.0 * PI * freq * real'(n) + 0.3);
      i1n = -i1[1] - 0.5 * (u_d[1] - y_d[1]);
      i2n = -i2[1] - 0.5 * (i1[1] - y_d[1]);
      y   = (i2n >= 0.0) ? 1.0 : -1.0;
      i1  <= '{i1n, i1[0]};
      i2  <= '{i2n, i2[0]};
      u_d <= '{u, u_d[0]};
      y_d <= '{y, y_d[0]};
      n   <= n + 1;
      bit_out <= (y > 0.0);
    end
  end
endmodule
