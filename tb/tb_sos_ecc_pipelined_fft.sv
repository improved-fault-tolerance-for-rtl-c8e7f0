// tb_sos_ecc_pipelined_fft: end-to-end test of the protected FFT system at
// its default parameters.
//
// Four random input streams are transformed frame by frame. For each frame
// the testbench picks a scenario: no fault, a soft error on one of the four
// stream FFTs (injected by XOR on that FFT's output for one or more bins of
// the frame), or a soft error on the parity FFT. It computes every output
// bin of every stream with a floating-point DFT and checks that
//   - all outputs equal the rounded DFT (within one LSB), i.e. injected
//     errors on a stream are corrected and errors on the parity FFT do not
//     reach the outputs;
//   - the reported error location and syndrome match the table
//     (Z1: 111, Z2: 110, Z3: 101, Z4: 011, none: 000);
//   - the first output appears after the documented latency and every
//     frame comes out in bit-reversed bin order.
// Frame 0 is the ramp 1..8 on every stream. Stall cycles (in_valid = 0) are
// inserted at random. It counts how often
// each mechanism happened and fails if one never did.
module tb_sos_ecc_pipelined_fft;
  import fft_pkg::*;

  localparam int unsigned IN_W  = 8;
  localparam int unsigned OUT_W = 16;
  localparam int unsigned TW_F  = 16;
  localparam int unsigned ZW    = IN_W + TW_F + 4;
  localparam int NFR = 60;                       // frames checked
  localparam int NIN = NFR + 2;                  // frames fed (two flush the pipeline)
  localparam real PI = 3.14159265358979;

  logic clk = 1'b0, rst_n = 1'b0, in_valid = 1'b0;
  logic signed [IN_W-1:0] x_re [4];
  logic signed [IN_W-1:0] x_im [4];
  logic inj_en;
  logic [2:0] inj_ch;
  logic [ZW-1:0] inj_re, inj_im;
  logic y_valid;
  logic [2:0] y_k;
  logic signed [OUT_W-1:0] y_re [4];
  logic signed [OUT_W-1:0] y_im [4];
  logic [2:0] syndrome;
  err_loc_e err_loc;
  logic err_detected, uncorrectable;

  sos_ecc_pipelined_fft dut (.*);

  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  int smp_re [NIN][4][8];
  int smp_im [NIN][4][8];
  int scen   [NIN];          // -1 none, 0..3 stream FFT, 4 parity FFT
  logic [7:0] inj_bins [NIN];
  logic [ZW-1:0] mask_re [NIN];
  logic [ZW-1:0] mask_im [NIN];
  int cnt_none = 0, cnt_stall = 0, cnt_parity = 0;
  int cnt_corr [4] = '{default: 0};
  int n_taken = 0;           // enabled input samples so far
  int z_cnt = 0;             // FFT output samples so far (model)
  logic z_vis = 1'b0;        // model: an FFT output is visible this cycle
  int y_cnt = 0;
  int cyc = 0, first_y_cyc = -1, last_in_cyc [NIN];

  initial begin
    #2000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always @(posedge clk) cyc <= cyc + 1;   // cycle after edge e has cyc = e

  // Model of the FFT output timing: an output becomes visible after every
  // enabled clock once seven samples have been taken before it.
  always @(posedge clk) begin
    if (!rst_n) begin
      z_vis <= 1'b0;
    end else begin
      if (z_vis) z_cnt <= z_cnt + 1;
      z_vis <= in_valid && (n_taken >= 7);
      if (in_valid) n_taken <= n_taken + 1;
    end
  end

  // Injection follows the visible FFT output sample.
  always_comb begin
    int f, b;
    f = z_cnt / 8;
    b = z_cnt % 8;
    inj_en = 1'b0;
    inj_ch = 3'd0;
    inj_re = '0;
    inj_im = '0;
    if (z_vis && f < NIN && scen[f] >= 0 && inj_bins[f][b]) begin
      inj_en = 1'b1;
      inj_ch = 3'(scen[f]);
      inj_re = mask_re[f];
      inj_im = mask_im[f];
    end
  end

  function automatic void dft(input int f, input int ch, input int k,
                              output real re, output real im);
    re = 0.0; im = 0.0;
    for (int n = 0; n < 8; n++) begin
      real a;
      a = -2.0 * PI * real'(n * k) / 8.0;
      re += real'(smp_re[f][ch][n]) * $cos(a) - real'(smp_im[f][ch][n]) * $sin(a);
      im += real'(smp_re[f][ch][n]) * $sin(a) + real'(smp_im[f][ch][n]) * $cos(a);
    end
  endfunction

  function automatic logic near(input real got, input real exp_v);
    real d;
    d = got - exp_v;
    return (d < 1.01) && (d > -1.01);
  endfunction

  function automatic logic [2:0] exp_syn(input int s);
    case (s)
      0: return 3'b111;
      1: return 3'b110;
      2: return 3'b101;
      3: return 3'b011;
      default: return 3'b000;
    endcase
  endfunction

  function automatic err_loc_e exp_loc(input int s);
    case (s)
      0: return LOC_Z1;
      1: return LOC_Z2;
      2: return LOC_Z3;
      3: return LOC_Z4;
      default: return LOC_NONE;
    endcase
  endfunction

  // Output checker.
  always @(posedge clk) begin
    if (rst_n && y_valid) begin
      int f, pos;
      logic [2:0] ek;
      f   = y_cnt / 8;
      pos = y_cnt % 8;
      ek  = {pos[0], pos[1], pos[2]};
      if (y_cnt == 0) begin
        first_y_cyc = cyc;
        // Bin 0 of frame 0 is visible two cycles after sample 7 of frame 1
        // was presented (no stalls occur in the first frames).
        checks++;
        if (first_y_cyc != last_in_cyc[1] + 2) begin
          failures++;
          $display("latency: first y at cycle %0d, frame 1 ended at %0d", first_y_cyc, last_in_cyc[1]);
        end
      end
      checks++;
      if (y_k !== ek) begin
        failures++;
        $display("frame %0d pos %0d: bin %0d, expected %0d", f, pos, y_k, ek);
      end
      checks++;
      if (syndrome !== exp_syn(scen[f]) || err_loc !== exp_loc(scen[f]) ||
          err_detected !== (scen[f] >= 0 && scen[f] < 4) || uncorrectable) begin
        failures++;
        $display("frame %0d scen %0d: syndrome %b loc %0d det %b unc %b",
                 f, scen[f], syndrome, err_loc, err_detected, uncorrectable);
      end
      for (int ch = 0; ch < 4; ch++) begin
        real rr, ri;
        dft(f, ch, int'(y_k), rr, ri);
        checks++;
        if (!near(real'(y_re[ch]), rr) || !near(real'(y_im[ch]), ri)) begin
          failures++;
          $display("frame %0d scen %0d ch %0d k %0d: got (%0d,%0d) expected (%f,%f)",
                   f, scen[f], ch, y_k, y_re[ch], y_im[ch], rr, ri);
        end
      end
      if (pos == 7) begin
        if (scen[f] < 0) cnt_none++;
        else if (scen[f] == 4) cnt_parity++;
        else cnt_corr[scen[f]]++;
      end
      y_cnt++;
    end
  end

  initial begin
    for (int f = 0; f < NIN; f++) begin
      // Frame 0 clean; then cycle through the scenarios with some randomness.
      if (f == 0 || f >= NFR) scen[f] = -1;
      else scen[f] = int'($urandom_range(5)) - 1;
      inj_bins[f] = 8'($urandom_range(255)) | 8'(1 << $urandom_range(7));
      // Errors of at least 2^3 in the integer part of one component.
      mask_re[f] = ZW'($urandom_range(32'hFFFF)) << (TW_F + 3);
      mask_im[f] = ZW'($urandom_range(32'hFFFF)) << TW_F;
      if (mask_re[f] == '0) mask_re[f] = ZW'(1) << (TW_F + 5);
      for (int ch = 0; ch < 4; ch++)
        for (int n = 0; n < 8; n++) begin
          smp_re[f][ch][n] = int'($urandom_range(255)) - 128;
          smp_im[f][ch][n] = int'($urandom_range(255)) - 128;
        end
    end
    // Frame 0 of every stream is the ramp 1, 2, ..., 8 (real), the sample
    // input shown in the design's simulation results.
    for (int ch = 0; ch < 4; ch++)
      for (int n = 0; n < 8; n++) begin
        smp_re[0][ch][n] = n + 1;
        smp_im[0][ch][n] = 0;
      end
    // Make sure every scenario occurs at least once.
    for (int s = -1; s <= 4; s++) scen[2 + s] = s;

    for (int ch = 0; ch < 4; ch++) begin
      x_re[ch] = '0;
      x_im[ch] = '0;
    end
    repeat (3) @(posedge clk);
    rst_n <= 1'b1;
    @(posedge clk);
    for (int f = 0; f < NIN; f++) begin
      for (int n = 0; n < 8; n++) begin
        if (f > 2 && $urandom_range(4) == 0) begin
          in_valid <= 1'b0;
          cnt_stall++;
          @(posedge clk);
        end
        if (n == 7) last_in_cyc[f] = cyc + 1;   // cycle in which sample 7 is presented
        in_valid <= 1'b1;
        for (int ch = 0; ch < 4; ch++) begin
          x_re[ch] <= IN_W'(smp_re[f][ch][n]);
          x_im[ch] <= IN_W'(smp_im[f][ch][n]);
        end
        @(posedge clk);
      end
    end
    in_valid <= 1'b0;
    repeat (5) @(posedge clk);

    checks++;
    if (y_cnt != 8 * NFR + 1) begin
      failures++;
      $display("output samples %0d, expected %0d", y_cnt, 8 * NFR + 1);
    end
    // Every mechanism must have happened.
    checks++;
    if (cnt_none == 0 || cnt_parity == 0 || cnt_stall == 0 ||
        cnt_corr[0] == 0 || cnt_corr[1] == 0 || cnt_corr[2] == 0 || cnt_corr[3] == 0) begin
      failures++;
      $display("a mechanism never happened");
    end
    $display("frames: clean %0d, corrected Z1 %0d Z2 %0d Z3 %0d Z4 %0d, parity fault %0d, stall cycles %0d",
             cnt_none, cnt_corr[0], cnt_corr[1], cnt_corr[2], cnt_corr[3], cnt_parity, cnt_stall);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
