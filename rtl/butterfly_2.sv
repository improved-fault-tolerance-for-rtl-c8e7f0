// butterfly_2: radix-2 single-delay-feedback butterfly with a built-in -j
// rotation ("Butterfly II").
//
// It works like butterfly_1 (c1 = 0: load the feedback register and output
// its old contents; c1 = 1: output stored + B, store stored - B), but the
// incoming sample may first be multiplied by -j. Multiplying by -j swaps the
// real and imaginary parts and negates the new imaginary part; as in the
// design's Swap-MUX, the swap is done by two multiplexers and the negation by
// exchanging the adder and subtractor on the imaginary path, so no
// multiplier is needed. The rotation is applied while c1 = 1 and c2 = 1,
// i.e. to the samples that enter the add/subtract phase and belong to the
// odd-frequency half of the previous Butterfly I. (The written description
// of the design states the swap for c1 = 0, c2 = 1; this module uses the
// polarity that makes the arithmetic a correct FFT, with c1 = 1 meaning
// add/subtract exactly as in butterfly_1.) Depth, widths and reset are
// choices of this implementation.
//
// Timing: the register shifts on every clock with en = 1; E is
// combinational from B and the register contents.
module butterfly_2 #(
  parameter int unsigned W     = 9,
  parameter int unsigned DEPTH = 2
) (
  input  logic                clk,
  input  logic                rst_n,
  input  logic                en,
  input  logic                c1,
  input  logic                c2,
  input  logic signed [W-1:0] br,
  input  logic signed [W-1:0] bi,
  output logic signed [W:0]   er,
  output logic signed [W:0]   ei
);

  logic signed [W:0] fb_re [DEPTH];
  logic signed [W:0] fb_im [DEPTH];
  logic signed [W:0] b_re, b_im, head_re, head_im;
  logic signed [W:0] sw_re, sw_im;      // Swap-MUX outputs
  logic              swap;
  logic signed [W:0] sum_re, sum_im, dif_re, dif_im;
  logic signed [W:0] nxt_re, nxt_im;

  assign b_re    = (W+1)'(br);
  assign b_im    = (W+1)'(bi);
  assign head_re = fb_re[DEPTH-1];
  assign head_im = fb_im[DEPTH-1];
  assign swap    = c1 & c2;

  // Swap-MUX: route Bi to the real path and Br to the imaginary path.
  assign sw_re = swap ? b_im : b_re;
  assign sw_im = swap ? b_re : b_im;

  // -j * (r + j i) = i - j r: the real path keeps its +/- roles, the
  // imaginary path exchanges them.
  assign sum_re = head_re + sw_re;
  assign dif_re = head_re - sw_re;
  assign sum_im = swap ? head_im - sw_im : head_im + sw_im;
  assign dif_im = swap ? head_im + sw_im : head_im - sw_im;

  always_comb begin
    if (c1) begin
      er     = sum_re;
      ei     = sum_im;
      nxt_re = dif_re;
      nxt_im = dif_im;
    end else begin
      er     = head_re;
      ei     = head_im;
      nxt_re = b_re;
      nxt_im = b_im;
    end
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      for (int i = 0; i < DEPTH; i++) begin
        fb_re[i] <= '0;
        fb_im[i] <= '0;
      end
    end else if (en) begin
      for (int i = DEPTH - 1; i > 0; i--) begin
        fb_re[i] <= fb_re[i-1];
        fb_im[i] <= fb_im[i-1];
      end
      fb_re[0] <= nxt_re;
      fb_im[0] <= nxt_im;
    end
  end

endmodule
