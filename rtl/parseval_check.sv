// parseval_check: sum-of-squares (SOS) check of one encoded FFT stream.
//
// By Parseval's theorem an N-point DFT without scaling satisfies
//   sum_k |X(k)|^2 = N * sum_n |x(n)|^2.
// The module accumulates |x|^2 = re^2 + im^2 over each input frame of N
// samples and holds the total; it accumulates |X|^2 over the matching
// output frame and, on its last sample, compares the two. The output
// samples carry FRAC fractional bits (energy: 2*FRAC), so the input energy
// is scaled by N * 2^(2*FRAC) before the comparison. Fixed-point twiddle
// constants make the equality approximate; the check fires (chk_err = 1)
// only when |E_out - N*E_in| exceeds THRESH, in units of the integer input
// scale. An error that changes the output energy by less than THRESH goes
// unnoticed, a known limit of SOS checking. The check itself is the
// design's; the frame-by-frame accumulation, the hold register and the
// threshold value are this implementation's choices.
//
// Interface: input samples are counted on in_valid, output samples on
// out_valid, both from reset in frames of N. The output frame of a given
// input frame must end no later than the input frame that follows it (true
// for the pipelined FFT, whose latency equals N).
// Timing: chk_valid is a one-cycle pulse in the cycle after the last output
// sample of a frame, with chk_err valid alongside.
module parseval_check #(
  parameter int unsigned IN_W   = 10,   // encoded input width
  parameter int unsigned DW     = 30,   // encoded output width
  parameter int unsigned FRAC   = 16,   // fractional bits of the output
  parameter int unsigned N      = 8,    // transform length (power of two)
  parameter longint unsigned THRESH = 256
) (
  input  logic                   clk,
  input  logic                   rst_n,
  input  logic                   in_valid,
  input  logic signed [IN_W-1:0] in_re,
  input  logic signed [IN_W-1:0] in_im,
  input  logic                   out_valid,
  input  logic signed [DW-1:0]   out_re,
  input  logic signed [DW-1:0]   out_im,
  output logic                   chk_valid,
  output logic                   chk_err
);

  localparam int unsigned LOGN = $clog2(N);
  localparam int unsigned IEW  = 2 * IN_W + LOGN + 1;       // input energy
  localparam int unsigned OEW  = 2 * DW + LOGN + 1;         // output energy
  localparam int unsigned SEW  = IEW + LOGN + 2 * FRAC;     // scaled input energy
  localparam int unsigned CW   = ((OEW > SEW) ? OEW : SEW) + 2;

  logic [LOGN-1:0]  in_cnt, out_cnt;
  logic [IEW-1:0]   acc_in, e_in_hold, e_in_next;
  logic [OEW-1:0]   acc_out, e_out_next;
  logic [2*IN_W-1:0] sq_in;
  logic [2*DW-1:0]   sq_out;
  logic signed [CW-1:0] diff, mag;
  logic [CW-1:0]     limit;

  // |x|^2 of the current samples (each square is non-negative).
  assign sq_in  = (2*IN_W)'(in_re * in_re) + (2*IN_W)'(in_im * in_im);
  assign sq_out = (2*DW)'(out_re * out_re) + (2*DW)'(out_im * out_im);

  assign e_in_next  = acc_in + IEW'(sq_in);
  assign e_out_next = acc_out + OEW'(sq_out);

  assign diff  = $signed(CW'(e_out_next)) - $signed(CW'(e_in_hold) << (LOGN + 2 * FRAC));
  assign mag   = (diff < 0) ? -diff : diff;
  assign limit = CW'(THRESH) << (2 * FRAC);

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      in_cnt    <= '0;
      out_cnt   <= '0;
      acc_in    <= '0;
      acc_out   <= '0;
      e_in_hold <= '0;
      chk_valid <= 1'b0;
      chk_err   <= 1'b0;
    end else begin
      chk_valid <= 1'b0;
      if (in_valid) begin
        in_cnt <= in_cnt + 1'b1;
        if (in_cnt == LOGN'(N - 1)) begin
          e_in_hold <= e_in_next;
          acc_in    <= '0;
        end else begin
          acc_in    <= e_in_next;
        end
      end
      if (out_valid) begin
        out_cnt <= out_cnt + 1'b1;
        if (out_cnt == LOGN'(N - 1)) begin
          acc_out   <= '0;
          chk_valid <= 1'b1;
          chk_err   <= ($unsigned(mag) > limit);
        end else begin
          acc_out   <= e_out_next;
        end
      end
    end
  end

endmodule
