// tb_twiddle_mult: self-checking test of the W8^e twiddle multiplier.
//
// For random inputs and every exponent e = 0..3 the product is compared
// with (r + j i) * exp(-j*2*pi*e/8) computed in floating point. e = 0 and
// e = 2 must be exact; e = 1 and e = 3 may differ only by the quantisation
// of cos(pi/4) to TW_F fractional bits.
module tb_twiddle_mult;
  localparam int unsigned W    = 10;
  localparam int unsigned TW_F = 16;
  localparam real PI = 3.14159265358979;

  logic signed [W-1:0] ar, ai;
  logic [1:0] e;
  logic signed [W+TW_F:0] pr, pi;
  int checks = 0, failures = 0;

  twiddle_mult #(.W(W), .TW_F(TW_F)) dut (.*);

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int t = 0; t < 2000; t++) begin
      int r, i;
      real ang, xr, xi, gr, gi, tol;
      r = int'($urandom_range(1023)) - 512;
      i = int'($urandom_range(1023)) - 512;
      if (t == 0) begin r = -512; i = -512; end
      if (t == 1) begin r = 511;  i = -512; end
      ar = W'(r);
      ai = W'(i);
      e  = 2'(t % 4);
      #1;
      ang = -2.0 * PI * real'(t % 4) / 8.0;
      xr = real'(r) * $cos(ang) - real'(i) * $sin(ang);
      xi = real'(r) * $sin(ang) + real'(i) * $cos(ang);
      gr = real'(pr) / (2.0 ** TW_F);
      gi = real'(pi) / (2.0 ** TW_F);
      tol = (t % 2 == 0) ? 1.0e-9 : 2.0e-3;
      checks++;
      if (gr - xr > tol || xr - gr > tol || gi - xi > tol || xi - gi > tol) begin
        failures++;
        $display("e=%0d x=(%0d,%0d): got (%f,%f) expected (%f,%f)", t % 4, r, i, gr, gi, xr, xi);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
