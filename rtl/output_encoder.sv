// output_encoder: forms the encoded FFT output streams checked by Parseval.
//
//   X5 = X1 + X2 + X3, X6 = X1 + X2 + X4, X7 = X1 + X3 + X4
// from the outputs of the four protected FFTs, sample by sample. Because
// the FFT is linear, X5 is the transform of x5 = x1 + x2 + x3, so the sum
// of squares of X5 can be compared with that of x5 without a redundant
// FFT. The sums are the design's; the two extra bits of width are this
// implementation's choice.
//
// Timing: purely combinational.
module output_encoder #(
  parameter int unsigned W = 28
) (
  input  logic signed [W-1:0] z_re [4],
  input  logic signed [W-1:0] z_im [4],
  output logic signed [W+1:0] z5_re, z5_im,
  output logic signed [W+1:0] z6_re, z6_im,
  output logic signed [W+1:0] z7_re, z7_im
);

  logic signed [W+1:0] er [4];
  logic signed [W+1:0] ei [4];

  always_comb begin
    for (int i = 0; i < 4; i++) begin
      er[i] = (W+2)'(z_re[i]);
      ei[i] = (W+2)'(z_im[i]);
    end
  end

  assign z5_re = er[0] + er[1] + er[2];
  assign z5_im = ei[0] + ei[1] + ei[2];
  assign z6_re = er[0] + er[1] + er[3];
  assign z6_im = ei[0] + ei[1] + ei[3];
  assign z7_re = er[0] + er[2] + er[3];
  assign z7_im = ei[0] + ei[2] + ei[3];

endmodule
