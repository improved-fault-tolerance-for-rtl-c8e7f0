// error_corrector: error detection and correction unit of the protected FFT.
//
// The four protected FFT outputs Z1..Z4 and the parity FFT output P (the
// transform of x1 + x2 + x3 + x4) enter frame by frame. A frame can only be
// judged after the three Parseval checks have seen all of it, so every
// stream passes through an N-sample delay line. The syndrome {c1,c2,c3} of
// a frame arrives with chk_valid just after the frame's last sample; it is
// decoded with the design's error table (111: Z1, 110: Z2, 101: Z3,
// 011: Z4) and applied while that frame leaves the delay line. The faulty
// stream is rebuilt from the parity FFT, e.g. Y1 = P - Z2 - Z3 - Z4; the
// others pass unchanged. Syndromes outside the table are reported as
// uncorrectable and the data is passed on unchanged (this class and its
// handling are this implementation's choice). An error in the parity FFT
// itself is not seen by the checks and does not reach the outputs unless a
// correction uses it.
//
// Outputs are rounded to nearest from FRAC fractional bits and saturated to
// OUT_W bits.
//
// Interface: samples enter on in_valid with their bin index in_k. Each
// enabled sample pushes one sample out of the delay line once it is full,
// so a frame leaves while the next frame enters.
// Timing: y_* and the error flags are registered; y_valid is high in the
// cycle after the in_valid cycle that pushed the sample out. The sample
// leaves N in_valid samples after it entered.
module error_corrector
  import fft_pkg::*;
#(
  parameter int unsigned DW    = 28,  // width of Z1..Z4
  parameter int unsigned PW    = 30,  // width of the parity output P
  parameter int unsigned FRAC  = 16,  // fractional bits of Z and P
  parameter int unsigned OUT_W = 16,  // width of the corrected outputs
  parameter int unsigned N     = 8    // frame length
) (
  input  logic                     clk,
  input  logic                     rst_n,
  input  logic                     in_valid,
  input  logic        [2:0]        in_k,
  input  logic signed [DW-1:0]     z_re [4],
  input  logic signed [DW-1:0]     z_im [4],
  input  logic signed [PW-1:0]     p_re,
  input  logic signed [PW-1:0]     p_im,
  input  logic                     chk_valid,
  input  logic        [2:0]        chk_syn,     // {c1, c2, c3}
  output logic                     y_valid,
  output logic        [2:0]        y_k,
  output logic signed [OUT_W-1:0]  y_re [4],
  output logic signed [OUT_W-1:0]  y_im [4],
  output logic        [2:0]        y_syn,       // syndrome of the y frame
  output err_loc_e                 err_loc,
  output logic                     err_detected,
  output logic                     uncorrectable
);

  localparam int unsigned CW   = PW + 2;
  localparam int unsigned LOGN = $clog2(N);

  // One delay-line entry.
  typedef struct packed {
    logic        [2:0]    k;
    logic signed [DW-1:0] zr0, zr1, zr2, zr3;
    logic signed [DW-1:0] zi0, zi1, zi2, zi3;
    logic signed [PW-1:0] pr, pi;
  } entry_t;

  entry_t          dl [N];
  entry_t          head;
  logic [LOGN:0]   fill;
  logic            full;
  logic [2:0]      syn_q, syn;
  err_loc_e        loc;

  logic signed [CW-1:0] zr [4];
  logic signed [CW-1:0] zi [4];
  logic signed [CW-1:0] sel_re [4];
  logic signed [CW-1:0] sel_im [4];
  logic signed [OUT_W-1:0] rnd_re [4];
  logic signed [OUT_W-1:0] rnd_im [4];

  assign head = dl[N-1];
  assign full = (fill == (LOGN+1)'(N));
  // The syndrome of a frame is used from the cycle it arrives.
  assign syn  = chk_valid ? chk_syn : syn_q;
  assign loc  = decode_syndrome(syn);

  // Round to nearest and saturate to OUT_W bits.
  function automatic logic signed [OUT_W-1:0] round_sat(input logic signed [CW-1:0] v);
    logic signed [CW-1:0] r;
    logic signed [CW-1:0] hi, lo;
    r  = (v + (CW'(1) <<< (FRAC - 1))) >>> FRAC;
    hi = CW'((64'(1) << (OUT_W - 1)) - 1);
    lo = -CW'(64'(1) << (OUT_W - 1));
    if (r > hi)      return OUT_W'(hi);
    else if (r < lo) return OUT_W'(lo);
    else             return OUT_W'(r);
  endfunction

  always_comb begin
    zr[0] = CW'(head.zr0); zr[1] = CW'(head.zr1);
    zr[2] = CW'(head.zr2); zr[3] = CW'(head.zr3);
    zi[0] = CW'(head.zi0); zi[1] = CW'(head.zi1);
    zi[2] = CW'(head.zi2); zi[3] = CW'(head.zi3);
    for (int i = 0; i < 4; i++) begin
      sel_re[i] = zr[i];
      sel_im[i] = zi[i];
    end
    // Rebuild the located stream from the parity FFT.
    unique case (loc)
      LOC_Z1: begin
        sel_re[0] = CW'(head.pr) - zr[1] - zr[2] - zr[3];
        sel_im[0] = CW'(head.pi) - zi[1] - zi[2] - zi[3];
      end
      LOC_Z2: begin
        sel_re[1] = CW'(head.pr) - zr[0] - zr[2] - zr[3];
        sel_im[1] = CW'(head.pi) - zi[0] - zi[2] - zi[3];
      end
      LOC_Z3: begin
        sel_re[2] = CW'(head.pr) - zr[0] - zr[1] - zr[3];
        sel_im[2] = CW'(head.pi) - zi[0] - zi[1] - zi[3];
      end
      LOC_Z4: begin
        sel_re[3] = CW'(head.pr) - zr[0] - zr[1] - zr[2];
        sel_im[3] = CW'(head.pi) - zi[0] - zi[1] - zi[2];
      end
      default: ;
    endcase
    for (int i = 0; i < 4; i++) begin
      rnd_re[i] = round_sat(sel_re[i]);
      rnd_im[i] = round_sat(sel_im[i]);
    end
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      for (int i = 0; i < N; i++) dl[i] <= '0;
      fill          <= '0;
      syn_q         <= '0;
      y_valid       <= 1'b0;
      y_k           <= '0;
      y_syn         <= '0;
      err_loc       <= LOC_NONE;
      err_detected  <= 1'b0;
      uncorrectable <= 1'b0;
      for (int i = 0; i < 4; i++) begin
        y_re[i] <= '0;
        y_im[i] <= '0;
      end
    end else begin
      if (chk_valid) syn_q <= chk_syn;
      y_valid <= in_valid && full;
      if (in_valid) begin
        for (int i = N - 1; i > 0; i--) dl[i] <= dl[i-1];
        dl[0] <= '{k: in_k,
                   zr0: z_re[0], zr1: z_re[1], zr2: z_re[2], zr3: z_re[3],
                   zi0: z_im[0], zi1: z_im[1], zi2: z_im[2], zi3: z_im[3],
                   pr: p_re, pi: p_im};
        if (!full) fill <= fill + 1'b1;
        if (full) begin
          y_k           <= head.k;
          y_syn         <= syn;
          err_loc       <= loc;
          err_detected  <= (syn != 3'b000);
          uncorrectable <= (loc == LOC_UNCORR);
          for (int i = 0; i < 4; i++) begin
            y_re[i] <= rnd_re[i];
            y_im[i] <= rnd_im[i];
          end
        end
      end
    end
  end

endmodule
