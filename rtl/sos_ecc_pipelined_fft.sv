// sos_ecc_pipelined_fft: four 8-point pipelined FFTs protected against soft
// errors by a parity FFT and three Parseval (sum-of-squares) checks arranged
// as a Hamming-style code.
//
// Data path (one complex sample per stream per enabled clock):
//   x1..x4 -> four pipelined_fft -> Z1..Z4 -----------------+
//   input_encoder: x = x1+x2+x3+x4 -> parity pipelined_fft -> P
//   input_encoder: x5, x6, x7 ------+                        |
//   output_encoder: X5, X6, X7 -----+-> parseval_check x3    |
//                                     -> {c1,c2,c3} ---------+-> error_corrector -> Y1..Y4
// Check c1 covers streams 1,2,3; c2 covers 1,2,4; c3 covers 1,3,4, so a
// single faulty stream gives a unique syndrome. The faulty stream's frame
// is replaced by P minus the other three streams. This arrangement is the
// design's; the pipelined FFT replaces the parallel FFTs of earlier
// schemes to save area.
//
// Soft-error injection (not part of the protected function, provided for
// test): while inj_en is high, inj_re/inj_im are XORed onto the output of
// FFT inj_ch (0..3: stream FFTs 1..4, 4: parity FFT) before any checking.
//
// Interface: assert in_valid with x_re/x_im holding sample n of the current
// frame of each stream, n = 0..7 on consecutive valid cycles, frames back
// to back from reset. Outputs are in bit-reversed bin order (y_k gives the
// bin), rounded to integers of OUT_W bits; err_loc, err_detected and
// uncorrectable describe the frame the current y sample belongs to.
// Timing: the output sample at position j of frame f is computed on the
// clock after the enabled clock that takes input sample 8(f+1)+j+7 (counting
// from 0 after reset) and is visible, with y_valid, in the cycle after that:
// without stalls, 16 samples plus two clocks after its frame's position j
// entered. The FFT stage accounts for 8 samples, the frame buffer of the
// corrector for 8 more. Two further frames flush the pipeline.
module sos_ecc_pipelined_fft
  import fft_pkg::*;
#(
  parameter int unsigned     IN_W   = 8,    // input sample width
  parameter int unsigned     OUT_W  = 16,   // output sample width
  parameter int unsigned     TW_F   = 16,   // twiddle fractional bits
  parameter longint unsigned THRESH = 256   // Parseval check threshold
) (
  input  logic                               clk,
  input  logic                               rst_n,
  input  logic                               in_valid,
  input  logic signed [IN_W-1:0]             x_re [4],
  input  logic signed [IN_W-1:0]             x_im [4],
  input  logic                               inj_en,
  input  logic        [2:0]                  inj_ch,
  input  logic        [IN_W+TW_F+3:0]        inj_re,
  input  logic        [IN_W+TW_F+3:0]        inj_im,
  output logic                               y_valid,
  output logic        [2:0]                  y_k,
  output logic signed [OUT_W-1:0]            y_re [4],
  output logic signed [OUT_W-1:0]            y_im [4],
  output logic        [2:0]                  syndrome,
  output err_loc_e                           err_loc,
  output logic                               err_detected,
  output logic                               uncorrectable
);

  localparam int unsigned EW = IN_W + 2;          // encoded input width
  localparam int unsigned ZW = IN_W + TW_F + 4;   // stream FFT output width
  localparam int unsigned PW = EW + TW_F + 4;     // parity FFT output width
  localparam int unsigned XW = ZW + 2;            // encoded output width

  // Encoded inputs.
  logic signed [EW-1:0] x5_re, x5_im, x6_re, x6_im, x7_re, x7_im, xp_re, xp_im;

  // FFT outputs.
  logic              z_valid [4];
  logic [2:0]        z_k [4];
  logic signed [ZW-1:0] zf_re [4];
  logic signed [ZW-1:0] zf_im [4];
  logic signed [ZW-1:0] z_re [4];
  logic signed [ZW-1:0] z_im [4];
  logic              p_valid;
  logic [2:0]        p_k;
  logic signed [PW-1:0] pf_re, pf_im, p_re, p_im;

  // Encoded outputs and checks.
  logic signed [XW-1:0] z5_re, z5_im, z6_re, z6_im, z7_re, z7_im;
  logic [2:0]           chk_valid;
  logic [2:0]           chk_err;

  input_encoder #(.W(IN_W)) u_in_enc (
    .x_re, .x_im,
    .x5_re, .x5_im, .x6_re, .x6_im, .x7_re, .x7_im, .xp_re, .xp_im
  );

  for (genvar i = 0; i < NUM_CH; i++) begin : g_fft
    pipelined_fft #(.IN_W(IN_W), .TW_F(TW_F)) u_fft (
      .clk, .rst_n, .en(in_valid),
      .in_re(x_re[i]), .in_im(x_im[i]),
      .out_valid(z_valid[i]), .out_k(z_k[i]),
      .out_re(zf_re[i]), .out_im(zf_im[i])
    );
    // Soft-error injection point of stream FFT i.
    assign z_re[i] = zf_re[i] ^ ((inj_en && inj_ch == 3'(i)) ? inj_re : '0);
    assign z_im[i] = zf_im[i] ^ ((inj_en && inj_ch == 3'(i)) ? inj_im : '0);
  end

  pipelined_fft #(.IN_W(EW), .TW_F(TW_F)) u_parity_fft (
    .clk, .rst_n, .en(in_valid),
    .in_re(xp_re), .in_im(xp_im),
    .out_valid(p_valid), .out_k(p_k),
    .out_re(pf_re), .out_im(pf_im)
  );
  assign p_re = pf_re ^ ((inj_en && inj_ch == 3'd4) ? PW'(inj_re) : '0);
  assign p_im = pf_im ^ ((inj_en && inj_ch == 3'd4) ? PW'(inj_im) : '0);

  output_encoder #(.W(ZW)) u_out_enc (
    .z_re, .z_im,
    .z5_re, .z5_im, .z6_re, .z6_im, .z7_re, .z7_im
  );

  parseval_check #(.IN_W(EW), .DW(XW), .FRAC(TW_F), .N(FFT_N), .THRESH(THRESH)) u_p1 (
    .clk, .rst_n, .in_valid, .in_re(x5_re), .in_im(x5_im),
    .out_valid(z_valid[0]), .out_re(z5_re), .out_im(z5_im),
    .chk_valid(chk_valid[0]), .chk_err(chk_err[0])
  );
  parseval_check #(.IN_W(EW), .DW(XW), .FRAC(TW_F), .N(FFT_N), .THRESH(THRESH)) u_p2 (
    .clk, .rst_n, .in_valid, .in_re(x6_re), .in_im(x6_im),
    .out_valid(z_valid[0]), .out_re(z6_re), .out_im(z6_im),
    .chk_valid(chk_valid[1]), .chk_err(chk_err[1])
  );
  parseval_check #(.IN_W(EW), .DW(XW), .FRAC(TW_F), .N(FFT_N), .THRESH(THRESH)) u_p3 (
    .clk, .rst_n, .in_valid, .in_re(x7_re), .in_im(x7_im),
    .out_valid(z_valid[0]), .out_re(z7_re), .out_im(z7_im),
    .chk_valid(chk_valid[2]), .chk_err(chk_err[2])
  );

  error_corrector #(.DW(ZW), .PW(PW), .FRAC(TW_F), .OUT_W(OUT_W), .N(FFT_N)) u_corr (
    .clk, .rst_n,
    .in_valid(z_valid[0]), .in_k(z_k[0]),
    .z_re, .z_im, .p_re, .p_im,
    .chk_valid(chk_valid[0]), .chk_syn({chk_err[0], chk_err[1], chk_err[2]}),
    .y_valid, .y_k, .y_re, .y_im, .y_syn(syndrome),
    .err_loc, .err_detected, .uncorrectable
  );

  // All five FFTs run in lock step, and so do the three checks.
  a_lockstep: assert property (@(posedge clk) disable iff (!rst_n)
      (z_valid[1] == z_valid[0]) && (z_valid[2] == z_valid[0]) &&
      (z_valid[3] == z_valid[0]) && (p_valid == z_valid[0]) &&
      (z_k[1] == z_k[0]) && (z_k[2] == z_k[0]) && (z_k[3] == z_k[0]) && (p_k == z_k[0]) &&
      (chk_valid[1] == chk_valid[0]) && (chk_valid[2] == chk_valid[0]));

endmodule
