// tb_output_encoder: self-checking test of the output encoder at the width
// of the stream FFT outputs. X5, X6 and X7 are compared with sums worked
// out in the testbench for random and extreme inputs.
module tb_output_encoder;
  localparam int unsigned W = 28;
  logic signed [W-1:0] z_re [4];
  logic signed [W-1:0] z_im [4];
  logic signed [W+1:0] z5_re, z5_im, z6_re, z6_im, z7_re, z7_im;
  int checks = 0, failures = 0;
  longint vr [4], vi [4];

  output_encoder #(.W(W)) dut (.*);

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic expect_eq(input longint got, input longint exp_v, input string what);
    checks++;
    if (got != exp_v) begin
      failures++;
      $display("%s: got %0d expected %0d", what, got, exp_v);
    end
  endtask

  initial begin
    for (int t = 0; t < 1000; t++) begin
      for (int c = 0; c < 4; c++) begin
        vr[c] = longint'($urandom_range(32'h0FFF_FFFF)) - 64'sh0800_0000;
        vi[c] = longint'($urandom_range(32'h0FFF_FFFF)) - 64'sh0800_0000;
        if (t == 0) begin vr[c] = -64'sh0800_0000; vi[c] = 64'sh07FF_FFFF; end
        z_re[c] = W'(vr[c]);
        z_im[c] = W'(vi[c]);
      end
      #1;
      expect_eq(longint'(z5_re), vr[0] + vr[1] + vr[2], "X5 re");
      expect_eq(longint'(z5_im), vi[0] + vi[1] + vi[2], "X5 im");
      expect_eq(longint'(z6_re), vr[0] + vr[1] + vr[3], "X6 re");
      expect_eq(longint'(z6_im), vi[0] + vi[1] + vi[3], "X6 im");
      expect_eq(longint'(z7_re), vr[0] + vr[2] + vr[3], "X7 re");
      expect_eq(longint'(z7_im), vi[0] + vi[2] + vi[3], "X7 im");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
