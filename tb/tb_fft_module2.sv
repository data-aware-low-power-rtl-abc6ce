// tb_fft_module2: checks module 2 on random data. Each pair of beats
// (p[0] = 0, 1) presents 16 values z(8*p[0] + lane); after the stage-6 PE
// and the cross-lane network, the output word in lane l at output beat
// p[0] = j must be the 16-point DFT Z(bit-reverse4(8*j + l)), delivered two
// enabled beats (PE delay and output register) after its input pair.
// Reference in double precision; TOL LSBs allowed for rounding and
// for the 14-bit coefficients (inputs kept to +/-4000 so that the
// coefficient error stays below one LSB). Includes stall beats.
module tb_fft_module2;
  localparam int  W = 22, NG = 40, TOL = 6;
  localparam real PI = 3.14159265358979323846;

  logic clk = 1'b0, rst_n = 1'b0, en = 1'b0, bf6 = 1'b0, k6 = 1'b0;
  logic signed [W-1:0] in_re [8], in_im [8], out_re [8], out_im [8];
  int zr [NG+2][16], zi [NG+2][16];
  int checks = 0, failures = 0, stalls = 0;

  fft_module2 #(.W(W)) dut (.*);

  always #5 clk = ~clk;

  function automatic int brev4(int v);
    return ((v & 1) << 3) | ((v & 2) << 1) | ((v & 4) >> 1) | ((v & 8) >> 3);
  endfunction

  initial begin
    int c = 0;
    for (int g = 0; g < NG + 2; g++)
      for (int n = 0; n < 16; n++) begin
        zr[g][n] = (g < NG) ? $signed($urandom_range(8000)) - 4000 : 0;
        zi[g][n] = (g < NG) ? $signed($urandom_range(8000)) - 4000 : 0;
      end
    for (int l = 0; l < 8; l++) begin in_re[l] = '0; in_im[l] = '0; end
    repeat (2) @(posedge clk);
    rst_n <= 1'b1;
    while (c < (NG + 2) * 2) begin
      @(negedge clk);
      if ($urandom_range(5) == 0) begin
        en = 1'b0;
        stalls++;
        @(posedge clk);
        continue;
      end
      en  = 1'b1;
      bf6 = c[0];
      k6  = c[0];   // network input position is two beats behind: same parity
      for (int l = 0; l < 8; l++) begin
        in_re[l] = W'(zr[c / 2][8 * (c % 2) + l]);
        in_im[l] = W'(zi[c / 2][8 * (c % 2) + l]);
      end
      @(posedge clk);
      #1;
      // output register now holds position c - 2
      if (c >= 2 && c - 2 < NG * 2) begin
        int g, j;
        g = (c - 2) / 2;
        j = (c - 2) % 2;
        for (int l = 0; l < 8; l++) begin
          int  kk;
          real sr, si, a, er, ei;
          kk = brev4(8 * j + l);
          sr = 0.0; si = 0.0;
          for (int n = 0; n < 16; n++) begin
            a  = 2.0 * PI * ((n * kk) % 16) / 16.0;
            sr += zr[g][n] * $cos(a) + zi[g][n] * $sin(a);
            si += zi[g][n] * $cos(a) - zr[g][n] * $sin(a);
          end
          er = real'(out_re[l]) - sr; if (er < 0.0) er = -er;
          ei = real'(out_im[l]) - si; if (ei < 0.0) ei = -ei;
          checks++;
          if (er > TOL || ei > TOL) begin
            failures++;
            if (failures < 10)
              $display("FAIL: group %0d bin %0d got (%0d,%0d) want (%0.1f,%0.1f)",
                       g, kk, out_re[l], out_im[l], sr, si);
          end
        end
      end
      c++;
    end
    if (stalls == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
