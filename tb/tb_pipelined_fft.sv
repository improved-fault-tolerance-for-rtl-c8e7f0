// tb_pipelined_fft: self-checking test of the 8-point pipelined FFT.
//
// Streams random frames (plus an impulse and a constant frame) back to back
// with occasional en = 0 stall cycles, computes the DFT of each frame in
// floating point inside the testbench, and compares every output bin
// (scaled by 2^-TW_F) with it. Also checks the bit-reversed bin order and
// that the first output of a frame follows 8 enabled samples after its
// first input (the pipeline latency).
module tb_pipelined_fft;
  localparam int unsigned IN_W = 8;
  localparam int unsigned TW_F = 16;
  localparam int unsigned OW   = IN_W + TW_F + 4;
  localparam int NFR = 40;
  localparam real PI = 3.14159265358979;

  logic clk = 1'b0, rst_n = 1'b0, en = 1'b0;
  logic signed [IN_W-1:0] in_re, in_im;
  logic out_valid;
  logic [2:0] out_k;
  logic signed [OW-1:0] out_re, out_im;

  int checks = 0, failures = 0;
  int fr_re [NFR+1][8];
  int fr_im [NFR+1][8];
  int n_in = 0, n_out = 0;   // samples in / out
  int en_cycles = 0;         // enabled cycles seen
  int first_out_en = -1;

  pipelined_fft #(.IN_W(IN_W), .TW_F(TW_F)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    #200000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // Reference DFT of frame f, bin k.
  function automatic void dft(input int f, input int k, output real re, output real im);
    re = 0.0; im = 0.0;
    for (int n = 0; n < 8; n++) begin
      real a;
      a = -2.0 * PI * real'(n * k) / 8.0;
      re += real'(fr_re[f][n]) * $cos(a) - real'(fr_im[f][n]) * $sin(a);
      im += real'(fr_re[f][n]) * $sin(a) + real'(fr_im[f][n]) * $cos(a);
    end
  endfunction

  // Output monitor.
  always @(posedge clk) begin
    if (rst_n && out_valid) begin
      int f, pos;
      real rr, ri, gr, gi;
      logic [2:0] expk;
      f   = n_out / 8;
      pos = n_out % 8;
      expk = {pos[0], pos[1], pos[2]};
      checks++;
      if (out_k !== expk) begin
        failures++;
        $display("bin order: frame %0d pos %0d k=%0d exp %0d", f, pos, out_k, expk);
      end
      if (n_out == 0) begin
        checks++;
        if (en_cycles != 9) begin   // 8 enabled samples, output seen after the 9th edge
          failures++;
          $display("latency: first output after %0d enabled clocks", en_cycles);
        end
      end
      if (f <= NFR) begin
        dft(f, int'(out_k), rr, ri);
        gr = real'(out_re) / (2.0 ** TW_F);
        gi = real'(out_im) / (2.0 ** TW_F);
        checks++;
        if ((gr - rr) > 0.02 || (rr - gr) > 0.02 || (gi - ri) > 0.02 || (ri - gi) > 0.02) begin
          failures++;
          $display("frame %0d k=%0d got (%f,%f) exp (%f,%f)", f, out_k, gr, gi, rr, ri);
        end
      end
      n_out++;
    end
  end

  always @(posedge clk) if (rst_n && en) en_cycles++;

  initial begin
    for (int f = 0; f <= NFR; f++)
      for (int n = 0; n < 8; n++) begin
        if (f == 0) begin fr_re[f][n] = (n == 0) ? 100 : 0; fr_im[f][n] = 0; end
        else if (f == 1) begin fr_re[f][n] = -128; fr_im[f][n] = 127; end
        else if (f == 2) begin fr_re[f][n] = n + 1; fr_im[f][n] = 0; end
        else begin
          fr_re[f][n] = int'($urandom_range(255)) - 128;
          fr_im[f][n] = int'($urandom_range(255)) - 128;
        end
      end
    in_re = '0; in_im = '0;
    repeat (3) @(posedge clk);
    rst_n <= 1'b1;
    for (int f = 0; f <= NFR; f++) begin
      for (int n = 0; n < 8; n++) begin
        // occasional stall cycles after the first frame
        if (f > 3 && $urandom_range(3) == 0) begin
          en <= 1'b0;
          @(posedge clk);
        end
        en    <= 1'b1;
        in_re <= IN_W'(fr_re[f][n]);
        in_im <= IN_W'(fr_im[f][n]);
        @(posedge clk);
      end
    end
    en <= 1'b0;
    repeat (4) @(posedge clk);
    checks++;
    if (n_out != 8 * NFR + 1) begin
      failures++;
      $display("output count %0d, expected %0d", n_out, 8 * NFR + 1);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
