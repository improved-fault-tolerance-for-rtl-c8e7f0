// tb_parseval_check: self-checking test of the sum-of-squares check.
//
// Input frames of random 10-bit complex samples are fed on in_valid; the
// output side receives, one frame later, the exact DFT of each frame
// computed in floating point and scaled by 2^FRAC, as the pipelined FFT
// would deliver it. Per frame the testbench either leaves the DFT intact
// (the check must stay quiet), adds a large error to one bin (must fire),
// or adds an error of 1/256 to one bin, whose energy change stays below
// the threshold (must stay quiet). It also checks that chk_valid pulses
// exactly once per frame, in the cycle after the last output sample.
module tb_parseval_check;
  localparam int unsigned IN_W = 10;
  localparam int unsigned DW   = 30;
  localparam int unsigned FRAC = 16;
  localparam int unsigned N    = 8;
  localparam int NFR = 60;
  localparam real PI = 3.14159265358979;

  logic clk = 1'b0, rst_n = 1'b0;
  logic in_valid = 1'b0, out_valid = 1'b0;
  logic signed [IN_W-1:0] in_re = '0, in_im = '0;
  logic signed [DW-1:0] out_re = '0, out_im = '0;
  logic chk_valid, chk_err;
  int checks = 0, failures = 0;
  int xr [NFR][N], xi [NFR][N];
  longint yr [NFR][N], yi [NFR][N];
  int scen [NFR];             // 0 clean, 1 large error, 2 small error
  int n_chk = 0, n_big = 0, n_small = 0;
  logic last_out = 1'b0;

  parseval_check #(.IN_W(IN_W), .DW(DW), .FRAC(FRAC), .N(N), .THRESH(256)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // chk_valid must follow the last output sample of each frame.
  always @(posedge clk) begin
    if (rst_n) begin
      checks++;
      if (chk_valid !== last_out) begin
        failures++;
        $display("chk_valid %b, expected %b", chk_valid, last_out);
      end
      if (chk_valid) begin
        checks++;
        if (chk_err !== (scen[n_chk] == 1)) begin
          failures++;
          $display("frame %0d scenario %0d: chk_err %b", n_chk, scen[n_chk], chk_err);
        end
        n_chk++;
      end
    end
  end

  initial begin
    for (int f = 0; f < NFR; f++) begin
      int kb;
      scen[f] = (f < 3) ? f : int'($urandom_range(2));
      for (int n = 0; n < N; n++) begin
        xr[f][n] = int'($urandom_range(1023)) - 512;
        xi[f][n] = int'($urandom_range(1023)) - 512;
      end
      for (int k = 0; k < N; k++) begin
        real re, im;
        re = 0.0; im = 0.0;
        for (int n = 0; n < N; n++) begin
          real a;
          a = -2.0 * PI * real'(n * k) / real'(N);
          re += real'(xr[f][n]) * $cos(a) - real'(xi[f][n]) * $sin(a);
          im += real'(xr[f][n]) * $sin(a) + real'(xi[f][n]) * $cos(a);
        end
        yr[f][k] = longint'(re * (2.0 ** FRAC));
        yi[f][k] = longint'(im * (2.0 ** FRAC));
      end
      // Error in the direction of the value so that the energy grows.
      kb = int'($urandom_range(N - 1));
      if (scen[f] == 1) yr[f][kb] += (yr[f][kb] < 0) ? -(64'sd100 <<< FRAC) : (64'sd100 <<< FRAC);
      if (scen[f] == 2) yr[f][kb] += (yr[f][kb] < 0) ? -(64'sd1 <<< (FRAC - 8)) : (64'sd1 <<< (FRAC - 8));
      if (scen[f] == 1) n_big++;
      if (scen[f] == 2) n_small++;
    end
    repeat (2) @(posedge clk);
    rst_n <= 1'b1;
    // Output frame f runs alongside input frame f+1.
    for (int f = 0; f <= NFR; f++) begin
      for (int n = 0; n < N; n++) begin
        if (f > 1 && $urandom_range(4) == 0) begin
          in_valid <= 1'b0; out_valid <= 1'b0;
          @(posedge clk);
          last_out <= 1'b0;
        end
        in_valid <= (f < NFR);
        if (f < NFR) begin
          in_re <= IN_W'(xr[f][n]);
          in_im <= IN_W'(xi[f][n]);
        end
        out_valid <= (f > 0);
        if (f > 0) begin
          out_re <= DW'(yr[f-1][n]);
          out_im <= DW'(yi[f-1][n]);
        end
        @(posedge clk);
        last_out <= (f > 0) && (n == N - 1);
      end
    end
    in_valid <= 1'b0; out_valid <= 1'b0;
    @(posedge clk);
    last_out <= 1'b0;
    repeat (3) @(posedge clk);
    checks++;
    if (n_chk != NFR || n_big == 0 || n_small == 0) begin
      failures++;
      $display("checks seen %0d of %0d (big %0d small %0d)", n_chk, NFR, n_big, n_small);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
