// input_encoder: forms the redundant input streams of the protected FFT.
//
//   x5 = x1 + x2 + x3   (input side of Parseval check P1)
//   x6 = x1 + x2 + x4   (input side of Parseval check P2)
//   x7 = x1 + x3 + x4   (input side of Parseval check P3)
//   xp = x1 + x2 + x3 + x4  (input of the parity FFT)
// Each is a complex, sample-by-sample sum, two bits wider than the inputs
// so that nothing overflows. The four sums are the design's; the widths
// are this implementation's choice.
//
// Timing: purely combinational.
module input_encoder #(
  parameter int unsigned W = 8
) (
  input  logic signed [W-1:0] x_re [4],
  input  logic signed [W-1:0] x_im [4],
  output logic signed [W+1:0] x5_re, x5_im,
  output logic signed [W+1:0] x6_re, x6_im,
  output logic signed [W+1:0] x7_re, x7_im,
  output logic signed [W+1:0] xp_re, xp_im
);

  logic signed [W+1:0] er [4];
  logic signed [W+1:0] ei [4];

  always_comb begin
    for (int i = 0; i < 4; i++) begin
      er[i] = (W+2)'(x_re[i]);
      ei[i] = (W+2)'(x_im[i]);
    end
  end

  assign x5_re = er[0] + er[1] + er[2];
  assign x5_im = ei[0] + ei[1] + ei[2];
  assign x6_re = er[0] + er[1] + er[3];
  assign x6_im = ei[0] + ei[1] + ei[3];
  assign x7_re = er[0] + er[2] + er[3];
  assign x7_im = ei[0] + ei[2] + ei[3];
  assign xp_re = er[0] + er[1] + er[2] + er[3];
  assign xp_im = ei[0] + ei[1] + ei[2] + ei[3];

endmodule
