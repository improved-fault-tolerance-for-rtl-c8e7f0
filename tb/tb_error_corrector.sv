// tb_error_corrector: self-checking test of the error detection and
// correction unit.
//
// Frames of four random full-precision streams Z1..Z4 enter with a parity
// stream P = Z1 + Z2 + Z3 + Z4. Per frame the testbench picks a scenario:
// no error (syndrome 000), one corrupted stream with its table syndrome
// (111, 110, 101, 011), an uncorrectable syndrome (100, 010 or 001: data
// must pass unchanged, flagged), a value beyond the output range (must
// saturate), or a false table syndrome on clean data, as an upset inside a
// check would give (the needless correction must still give the right
// values). The syndrome is given with chk_valid together with the first
// sample of the next frame, the latest moment the unit accepts it. Every
// output must equal the original, uncorrupted value rounded to nearest.
module tb_error_corrector;
  import fft_pkg::*;
  localparam int unsigned DW = 28, PW = 30, FRAC = 16, OUT_W = 16, N = 8;
  localparam int NFR = 120;

  logic clk = 1'b0, rst_n = 1'b0, in_valid = 1'b0;
  logic [2:0] in_k = '0;
  logic signed [DW-1:0] z_re [4];
  logic signed [DW-1:0] z_im [4];
  logic signed [PW-1:0] p_re = '0, p_im = '0;
  logic chk_valid = 1'b0;
  logic [2:0] chk_syn = '0;
  logic y_valid;
  logic [2:0] y_k, y_syn;
  logic signed [OUT_W-1:0] y_re [4];
  logic signed [OUT_W-1:0] y_im [4];
  err_loc_e err_loc;
  logic err_detected, uncorrectable;

  error_corrector #(.DW(DW), .PW(PW), .FRAC(FRAC), .OUT_W(OUT_W), .N(N)) dut (.*);

  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  longint vr [NFR][N][4], vi [NFR][N][4];
  int scen [NFR];     // 0 none, 1..4 stream, 5 uncorrectable, 6 saturation,
                      // 7..10 false syndrome for stream 1..4 on clean data
  logic [2:0] syn_of [NFR];
  int y_cnt = 0;
  int seen [11] = '{default: 0};

  initial begin
    #2000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic longint rnd_sat(input longint v);
    longint r;
    r = (v + (64'sd1 <<< (FRAC - 1))) >>> FRAC;
    if (r > 32767) r = 32767;
    if (r < -32768) r = -32768;
    return r;
  endfunction

  always @(posedge clk) begin
    if (rst_n && y_valid) begin
      int f, pos;
      err_loc_e el;
      f = y_cnt / N;
      pos = y_cnt % N;
      case (scen[f])
        0, 6: el = LOC_NONE;
        1: el = LOC_Z1;
        2: el = LOC_Z2;
        3, 9: el = LOC_Z3;
        4, 10: el = LOC_Z4;
        5: el = LOC_UNCORR;
        7: el = LOC_Z1;
        default: el = LOC_Z2;
      endcase
      checks++;
      if (y_k !== 3'(pos) || err_loc !== el || y_syn !== syn_of[f] ||
          err_detected !== (syn_of[f] != 3'b000) || uncorrectable !== (scen[f] == 5)) begin
        failures++;
        $display("frame %0d: k %0d loc %0d syn %b det %b unc %b", f, y_k, err_loc, y_syn,
                 err_detected, uncorrectable);
      end
      for (int c = 0; c < 4; c++) begin
        checks++;
        if (longint'(y_re[c]) != rnd_sat(vr[f][pos][c]) || longint'(y_im[c]) != rnd_sat(vi[f][pos][c])) begin
          failures++;
          $display("frame %0d scen %0d pos %0d ch %0d: got (%0d,%0d) expected (%0d,%0d)", f, scen[f],
                   pos, c, y_re[c], y_im[c], rnd_sat(vr[f][pos][c]), rnd_sat(vi[f][pos][c]));
        end
      end
      if (pos == N - 1) seen[scen[f]]++;
      y_cnt++;
    end
  end

  initial begin
    for (int f = 0; f < NFR; f++) begin
      scen[f] = (f < 11) ? f : int'($urandom_range(10));
      case (scen[f])
        1, 7:  syn_of[f] = 3'b111;
        2, 8:  syn_of[f] = 3'b110;
        3, 9:  syn_of[f] = 3'b101;
        4, 10: syn_of[f] = 3'b011;
        5: syn_of[f] = 3'(1 << $urandom_range(2));
        default: syn_of[f] = 3'b000;
      endcase
      for (int n = 0; n < N; n++)
        for (int c = 0; c < 4; c++) begin
          vr[f][n][c] = longint'($urandom_range(32'h0FFF_FFFF)) - 64'sh0800_0000;
          vi[f][n][c] = longint'($urandom_range(32'h0FFF_FFFF)) - 64'sh0800_0000;
          if (scen[f] != 6) begin   // keep within +/-1000 so that nothing saturates
            vr[f][n][c] = vr[f][n][c] % (64'sd1000 <<< FRAC);
            vi[f][n][c] = vi[f][n][c] % (64'sd1000 <<< FRAC);
          end
        end
    end
    for (int c = 0; c < 4; c++) begin z_re[c] = '0; z_im[c] = '0; end
    repeat (2) @(posedge clk);
    rst_n <= 1'b1;
    for (int f = 0; f <= NFR; f++) begin
      for (int n = 0; n < N; n++) begin
        longint sr, si;
        if (f > 2 && $urandom_range(4) == 0) begin
          in_valid <= 1'b0; chk_valid <= 1'b0;
          @(posedge clk);
        end
        in_valid  <= 1'b1;
        in_k      <= 3'(n);
        chk_valid <= (n == 0) && (f > 0);
        chk_syn   <= (f > 0) ? syn_of[f-1] : 3'b000;
        sr = 0; si = 0;
        for (int c = 0; c < 4; c++) begin
          longint zr, zi;
          zr = (f < NFR) ? vr[f][n][c] : 0;
          zi = (f < NFR) ? vi[f][n][c] : 0;
          sr += zr; si += zi;
          // Corrupt the located stream after forming the parity.
          if (f < NFR && scen[f] == c + 1) begin
            zr = zr ^ 64'h0123_4560;
            zi = zi + (64'sd77 <<< FRAC);
          end
          z_re[c] <= DW'(zr);
          z_im[c] <= DW'(zi);
        end
        p_re <= PW'(sr);
        p_im <= PW'(si);
        @(posedge clk);
      end
    end
    in_valid <= 1'b0; chk_valid <= 1'b0;
    repeat (3) @(posedge clk);
    checks++;
    if (y_cnt != N * NFR) begin
      failures++;
      $display("outputs %0d, expected %0d", y_cnt, N * NFR);
    end
    for (int s = 0; s < 11; s++) begin
      checks++;
      if (seen[s] == 0) begin
        failures++;
        $display("scenario %0d never ran", s);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
