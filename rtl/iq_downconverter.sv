// iq_downconverter - multiplier-less digital quadrature downconversion.
//
// The IF is subsampled in the second Nyquist zone with fs = 4*IF2/3, so the
// wanted image sits at 3fs/4. Mixing it to DC needs cosine and sine carriers
// at fs/4 (equivalently 3fs/4), which sampled at fs are the periodic
// sequences cos = [1 0 -1 0] and sin = [0 1 0 -1]. Multiplying by 0 or +/-1
// needs no multiplier: a 2-bit phase counter drives two multiplexers that
// pick +x, 0 or -x for each branch, as the published design proposes.
//
//   phase   0    1    2    3
//   I      +x    0   -x    0
//   Q       0   +x    0   -x
//
// Interface: in_valid marks a new ADC sample in_x (two's complement, IN_W
// bits). One clock later out_valid pulses with out_i/out_q (IN_W+1 bits, so
// that negating the most negative input cannot overflow). The phase counter
// advances on every valid sample and is cleared by the synchronous,
// active-high rst; the first sample after reset uses phase 0.
// The sign convention of the Q sequence follows the published design; the output
// width and the register stage are this design's choices.
module iq_downconverter #(
  parameter int unsigned IN_W = 2
) (
  input  logic                   clk,
  input  logic                   rst,
  input  logic                   in_valid,
  input  logic signed [IN_W-1:0] in_x,
  output logic                   out_valid,
  output logic signed [IN_W:0]   out_i,
  output logic signed [IN_W:0]   out_q
);

  logic [1:0]            phase;
  logic signed [IN_W:0]  x_pos, x_neg;
  logic signed [IN_W:0]  i_sel, q_sel;

  assign x_pos = (IN_W+1)'(in_x);
  assign x_neg = -x_pos;

  always_comb begin
    unique case (phase)
      2'd0:    begin i_sel = x_pos; q_sel = '0;    end
      2'd1:    begin i_sel = '0;    q_sel = x_pos; end
      2'd2:    begin i_sel = x_neg; q_sel = '0;    end
      default: begin i_sel = '0;    q_sel = x_neg; end
    endcase
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      phase     <= 2'd0;
      out_valid <= 1'b0;
      out_i     <= '0;
      out_q     <= '0;
    end else begin
      out_valid <= in_valid;
      if (in_valid) begin
        phase <= phase + 2'd1;
        out_i <= i_sel;
        out_q <= q_sel;
      end
    end
  end

endmodule
