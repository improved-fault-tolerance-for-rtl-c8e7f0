// tb_input_encoder: self-checking test of the input encoder. Random and
// extreme inputs; x5, x6, x7 and the parity input are compared with sums
// worked out in the testbench.
module tb_input_encoder;
  localparam int unsigned W = 8;
  logic signed [W-1:0] x_re [4];
  logic signed [W-1:0] x_im [4];
  logic signed [W+1:0] x5_re, x5_im, x6_re, x6_im, x7_re, x7_im, xp_re, xp_im;
  int checks = 0, failures = 0;
  int vr [4], vi [4];

  input_encoder #(.W(W)) dut (.*);

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic expect_eq(input int got, input int exp_v, input string what);
    checks++;
    if (got != exp_v) begin
      failures++;
      $display("%s: got %0d expected %0d", what, got, exp_v);
    end
  endtask

  initial begin
    for (int t = 0; t < 1000; t++) begin
      for (int c = 0; c < 4; c++) begin
        vr[c] = (t == 0) ? -128 : (t == 1) ? 127 : int'($urandom_range(255)) - 128;
        vi[c] = (t == 0) ? 127 : (t == 1) ? -128 : int'($urandom_range(255)) - 128;
        x_re[c] = W'(vr[c]);
        x_im[c] = W'(vi[c]);
      end
      #1;
      expect_eq(int'(x5_re), vr[0] + vr[1] + vr[2], "x5 re");
      expect_eq(int'(x5_im), vi[0] + vi[1] + vi[2], "x5 im");
      expect_eq(int'(x6_re), vr[0] + vr[1] + vr[3], "x6 re");
      expect_eq(int'(x6_im), vi[0] + vi[1] + vi[3], "x6 im");
      expect_eq(int'(x7_re), vr[0] + vr[2] + vr[3], "x7 re");
      expect_eq(int'(x7_im), vi[0] + vi[2] + vi[3], "x7 im");
      expect_eq(int'(xp_re), vr[0] + vr[1] + vr[2] + vr[3], "x re");
      expect_eq(int'(xp_im), vi[0] + vi[1] + vi[2] + vi[3], "x im");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
