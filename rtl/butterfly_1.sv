// butterfly_1: radix-2 single-delay-feedback butterfly ("Butterfly I").
//
// A DEPTH-word feedback register (real and imaginary) sits beside a
// complex adder and subtractor. While c1 = 0 the incoming sample A is
// written into the feedback register and the word leaving the register
// (a difference from the previous c1 = 1 phase) is sent to the output B.
// While c1 = 1 the sample leaving the register (stored DEPTH samples
// earlier) is added to A and the sum goes to B, while the difference
// (stored - A) is written back into the register, to leave it during the
// next c1 = 0 phase. With c1 held low for DEPTH samples and high for
// DEPTH samples this computes x(n) +/- x(n+DEPTH) in a continuous stream.
// The mux arrangement and the two feedback registers follow the Butterfly I
// structure of the design; the register depth, the one-bit output growth and
// the synchronous active-low reset are choices of this implementation.
//
// Timing: the register shifts on every clock with en = 1; B is
// combinational from A and the register contents.
module butterfly_1 #(
  parameter int unsigned W     = 8,  // input word width (two's complement)
  parameter int unsigned DEPTH = 4   // feedback register length in samples
) (
  input  logic                clk,
  input  logic                rst_n,
  input  logic                en,
  input  logic                c1,
  input  logic signed [W-1:0] ar,
  input  logic signed [W-1:0] ai,
  output logic signed [W:0]   br,
  output logic signed [W:0]   bi
);

  logic signed [W:0] fb_re [DEPTH];
  logic signed [W:0] fb_im [DEPTH];
  logic signed [W:0] a_re, a_im, head_re, head_im;
  logic signed [W:0] sum_re, sum_im, dif_re, dif_im;
  logic signed [W:0] nxt_re, nxt_im;

  assign a_re    = (W+1)'(ar);
  assign a_im    = (W+1)'(ai);
  assign head_re = fb_re[DEPTH-1];
  assign head_im = fb_im[DEPTH-1];
  assign sum_re  = head_re + a_re;
  assign sum_im  = head_im + a_im;
  assign dif_re  = head_re - a_re;
  assign dif_im  = head_im - a_im;

  always_comb begin
    if (c1) begin
      br     = sum_re;
      bi     = sum_im;
      nxt_re = dif_re;
      nxt_im = dif_im;
    end else begin
      br     = head_re;
      bi     = head_im;
      nxt_re = a_re;
      nxt_im = a_im;
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
