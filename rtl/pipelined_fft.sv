// pipelined_fft: 8-point streaming FFT, one complex sample per enabled clock.
//
// Structure (radix-2^2 single-delay feedback, decimation in frequency):
//   Butterfly I (4-word feedback) -> Butterfly II (2-word feedback, -j via
//   Swap-MUX) -> twiddle multiplier W8^(n3(k1+2k2)) -> Butterfly I
//   (1-word feedback) -> output register.
// A 3-bit sample counter drives the butterfly controls. With t the
// counter value, stage 1 uses c1 = t[2]; stage 2 sees its samples four
// clocks later, so c1 = t[1] and c2 = ~t[2]; the twiddle and stage 3 see
// index u = t + 2 (= t - 6 mod 8) with n3 = u[0], k2 = u[1], k1 = u[2].
// Replacing each stage of the transform by one butterfly is the design's
// main area saving; the counter, the twiddle placement and the widths are
// this implementation's own.
//
// Interface: present x(0)..x(7) of each frame on consecutive enabled
// cycles (en = 1), frames back to back; the first sample after reset is
// x(0) of a frame. Every enabled clock moves the whole pipeline by one
// sample; with en = 0 it holds. Outputs leave in bit-reversed order:
// X(0), X(4), X(2), X(6), X(1), X(5), X(3), X(7), with out_k giving the
// bin. out_re/out_im carry TW_F fractional bits (value = out / 2^TW_F) and
// the full integer growth of the transform, so nothing is rounded.
//
// Timing: out_valid is high for one cycle after each enabled clock once
// the pipeline is primed; X(0) of frame f follows the enabled clock that
// takes x(7) of frame f, i.e. the latency is 8 enabled samples. A frame is
// flushed by the samples of the next frame.
module pipelined_fft #(
  parameter int unsigned IN_W = 8,   // input word width
  parameter int unsigned TW_F = 16   // twiddle fractional bits
) (
  input  logic                           clk,
  input  logic                           rst_n,
  input  logic                           en,
  input  logic signed [IN_W-1:0]         in_re,
  input  logic signed [IN_W-1:0]         in_im,
  output logic                           out_valid,
  output logic        [2:0]              out_k,
  output logic signed [IN_W+TW_F+3:0]    out_re,
  output logic signed [IN_W+TW_F+3:0]    out_im
);

  localparam int unsigned W1 = IN_W + 1;          // after stage 1
  localparam int unsigned W2 = IN_W + 2;          // after stage 2
  localparam int unsigned WT = W2 + TW_F + 1;     // after twiddle
  localparam int unsigned WO = WT + 1;            // after stage 3

  logic [2:0] t, u, v;
  logic [2:0] fill;
  logic       primed;

  logic signed [W1-1:0] s1_re, s1_im;
  logic signed [W2-1:0] s2_re, s2_im;
  logic signed [WT-1:0] tw_re, tw_im;
  logic signed [WO-1:0] s3_re, s3_im;
  logic [1:0]           tw_e;

  assign u      = t + 3'd2;   // stage-3 input index  (t - 6)
  assign v      = t + 3'd1;   // stage-3 output index (t - 7)
  assign tw_e   = u[0] ? {u[1], 1'b0} + {1'b0, u[2]} : 2'd0;
  assign primed = (fill == 3'd7);

  butterfly_1 #(.W(IN_W), .DEPTH(4)) u_stage1 (
    .clk, .rst_n, .en, .c1(t[2]),
    .ar(in_re), .ai(in_im), .br(s1_re), .bi(s1_im)
  );

  butterfly_2 #(.W(W1), .DEPTH(2)) u_stage2 (
    .clk, .rst_n, .en, .c1(t[1]), .c2(~t[2]),
    .br(s1_re), .bi(s1_im), .er(s2_re), .ei(s2_im)
  );

  twiddle_mult #(.W(W2), .TW_F(TW_F)) u_twiddle (
    .ar(s2_re), .ai(s2_im), .e(tw_e), .pr(tw_re), .pi(tw_im)
  );

  butterfly_1 #(.W(WT), .DEPTH(1)) u_stage3 (
    .clk, .rst_n, .en, .c1(u[0]),
    .ar(tw_re), .ai(tw_im), .br(s3_re), .bi(s3_im)
  );

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      t         <= '0;
      fill      <= '0;
      out_valid <= 1'b0;
      out_k     <= '0;
      out_re    <= '0;
      out_im    <= '0;
    end else if (en) begin
      t         <= t + 3'd1;
      fill      <= primed ? fill : fill + 3'd1;
      out_valid <= primed;
      out_k     <= {v[0], v[1], v[2]};
      out_re    <= s3_re;
      out_im    <= s3_im;
    end else begin
      out_valid <= 1'b0;
    end
  end

endmodule
