// tb_butterfly_1: self-checking test of the single-delay-feedback Butterfly I.
//
// Drives blocks of 2*DEPTH random samples with c1 low for the first DEPTH
// and high for the second DEPTH (with random en = 0 stalls) and checks,
// against sums worked out in the testbench, that the output is a + b during
// the c1 = 1 half and a - b during the following c1 = 0 half, where a is a
// sample of the first half and b the sample DEPTH positions later.
module tb_butterfly_1;
  localparam int unsigned W = 8;
  localparam int unsigned D = 4;
  localparam int NBLK = 50;

  logic clk = 1'b0, rst_n = 1'b0, en = 1'b0, c1 = 1'b0;
  logic signed [W-1:0] ar = '0, ai = '0;
  logic signed [W:0]   br, bi;
  int checks = 0, failures = 0;
  int a_re [NBLK+1][D], a_im [NBLK+1][D], b_re [NBLK+1][D], b_im [NBLK+1][D];

  butterfly_1 #(.W(W), .DEPTH(D)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input int er, input int ei, input string what);
    checks++;
    if (int'(br) != er || int'(bi) != ei) begin
      failures++;
      $display("%s: got (%0d,%0d) expected (%0d,%0d)", what, br, bi, er, ei);
    end
  endtask

  initial begin
    for (int b = 0; b <= NBLK; b++)
      for (int i = 0; i < D; i++) begin
        a_re[b][i] = int'($urandom_range(255)) - 128;
        a_im[b][i] = int'($urandom_range(255)) - 128;
        b_re[b][i] = int'($urandom_range(255)) - 128;
        b_im[b][i] = int'($urandom_range(255)) - 128;
      end
    a_re[0][0] = -128; b_re[0][0] = 127;  a_im[0][0] = -128; b_im[0][0] = -128;
    repeat (2) @(posedge clk);
    rst_n <= 1'b1;
    for (int b = 0; b <= NBLK; b++) begin
      for (int h = 0; h < 2; h++)
        for (int i = 0; i < D; i++) begin
          if ($urandom_range(3) == 0) begin
            en <= 1'b0;
            @(posedge clk);
          end
          en <= 1'b1;
          c1 <= (h == 1);
          ar <= W'(h ? b_re[b][i] : a_re[b][i]);
          ai <= W'(h ? b_im[b][i] : a_im[b][i]);
          @(negedge clk);
          if (h == 1)
            check(a_re[b][i] + b_re[b][i], a_im[b][i] + b_im[b][i], "sum");
          else if (b > 0)
            check(a_re[b-1][i] - b_re[b-1][i], a_im[b-1][i] - b_im[b-1][i], "difference");
          @(posedge clk);
        end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
