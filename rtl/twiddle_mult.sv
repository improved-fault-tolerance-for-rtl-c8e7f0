// twiddle_mult: multiplies a complex sample by W8^e = exp(-j*2*pi*e/8),
// e = 0..3, the twiddle factors needed between the second and third stage
// of an 8-point radix-2^2 pipelined FFT.
//
// e = 0 (x1) and e = 2 (-j) are exact: a shift or a swap with negation.
// e = 1 and e = 3 use the one non-trivial constant C = round(cos(pi/4) *
// 2^TW_F): (r + j i)(1 - j)/sqrt(2) = C(r + i) + j C(i - r) and
// (r + j i)(-1 - j)/sqrt(2) = C(i - r) - j C(r + i). The result keeps all
// TW_F fractional bits, so the multiplier is exactly linear in its input
// (no rounding), which keeps the parity stream's FFT equal to the sum of
// the protected FFTs. The only deviation from an ideal transform is the
// quantisation of C itself, which the Parseval checks absorb in their
// threshold. The design only states that a multiplier performs the twiddle
// multiplication; this structure is this implementation's own.
//
// Timing: purely combinational.
module twiddle_mult #(
  parameter int unsigned W    = 10,  // input word width
  parameter int unsigned TW_F = 16   // fractional bits of the constant
) (
  input  logic signed [W-1:0]      ar,
  input  logic signed [W-1:0]      ai,
  input  logic        [1:0]        e,
  output logic signed [W+TW_F:0]   pr,
  output logic signed [W+TW_F:0]   pi
);

  localparam int unsigned PW = W + TW_F + 1;
  localparam logic signed [PW-1:0] C45 =
      PW'($rtoi(0.7071067811865476 * (2.0 ** TW_F) + 0.5));

  logic signed [PW-1:0] r_ext, i_ext, s, d, cs, cd;

  assign r_ext = PW'(ar);
  assign i_ext = PW'(ai);
  assign s     = r_ext + i_ext;
  assign d     = i_ext - r_ext;
  assign cs    = s * C45;
  assign cd    = d * C45;

  always_comb begin
    unique case (e)
      2'd0: begin pr = r_ext <<< TW_F; pi = i_ext <<< TW_F;    end
      2'd1: begin pr = cs;             pi = cd;                end
      2'd2: begin pr = i_ext <<< TW_F; pi = -(r_ext <<< TW_F); end
      default: begin pr = cd;          pi = -cs;               end
    endcase
  end

endmodule
