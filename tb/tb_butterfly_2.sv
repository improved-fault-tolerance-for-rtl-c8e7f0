// tb_butterfly_2: self-checking test of Butterfly II with its -j Swap-MUX.
//
// Same block structure as for Butterfly I (c1 low for DEPTH samples, high
// for DEPTH samples), while c2 alternates from block to block. In blocks
// with c2 = 1 the second-half sample b is multiplied by -j before the
// butterfly, so the expected outputs are a + (-j)b and a - (-j)b, with
// -j(r + j i) = i - j r worked out in the testbench.
module tb_butterfly_2;
  localparam int unsigned W = 9;
  localparam int unsigned D = 2;
  localparam int NBLK = 60;

  logic clk = 1'b0, rst_n = 1'b0, en = 1'b0, c1 = 1'b0, c2 = 1'b0;
  logic signed [W-1:0] br = '0, bi = '0;
  logic signed [W:0]   er, ei;
  int checks = 0, failures = 0, rotated = 0;
  int a_re [NBLK+1][D], a_im [NBLK+1][D], b_re [NBLK+1][D], b_im [NBLK+1][D];
  int r_re [NBLK+1][D], r_im [NBLK+1][D];   // b after the optional -j

  butterfly_2 #(.W(W), .DEPTH(D)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input int xr, input int xi, input string what);
    checks++;
    if (int'(er) != xr || int'(ei) != xi) begin
      failures++;
      $display("%s: got (%0d,%0d) expected (%0d,%0d)", what, er, ei, xr, xi);
    end
  endtask

  initial begin
    for (int b = 0; b <= NBLK; b++)
      for (int i = 0; i < D; i++) begin
        a_re[b][i] = int'($urandom_range(511)) - 256;
        a_im[b][i] = int'($urandom_range(511)) - 256;
        b_re[b][i] = int'($urandom_range(511)) - 256;
        b_im[b][i] = int'($urandom_range(511)) - 256;
        if (b % 2 == 1) begin
          r_re[b][i] = b_im[b][i];
          r_im[b][i] = -b_re[b][i];
        end else begin
          r_re[b][i] = b_re[b][i];
          r_im[b][i] = b_im[b][i];
        end
      end
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
          c2 <= (b % 2 == 1);
          br <= W'(h ? b_re[b][i] : a_re[b][i]);
          bi <= W'(h ? b_im[b][i] : a_im[b][i]);
          @(negedge clk);
          if (h == 1) begin
            check(a_re[b][i] + r_re[b][i], a_im[b][i] + r_im[b][i], "sum");
            if (b % 2 == 1) rotated++;
          end else if (b > 0) begin
            check(a_re[b-1][i] - r_re[b-1][i], a_im[b-1][i] - r_im[b-1][i], "difference");
          end
          @(posedge clk);
        end
    end
    checks++;
    if (rotated == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
