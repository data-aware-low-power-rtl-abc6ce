// tb_ofdm_roundtrip: OFDM modulation and demodulation of 512-subcarrier
// symbols through the full-size processor, as in a 512-point OFDM PHY.
//
// Three symbols of random QPSK points (+/-A on both parts, all 512
// subcarriers loaded) are inverse-transformed in IFFT mode. The time-domain
// output is put back in natural order (bin index = bit-reverse of the output
// position), scaled down by 2^SHIFT with rounding, clipped to 12 bits, and
// transformed again in FFT mode. Demodulation must recover every QPSK point:
// the sign of each part is compared, and the amplitude must be within 10%
// of 512*A/2^SHIFT. Also checks the IFFT output itself against a
// double-precision inverse DFT for the first symbol.
module tb_ofdm_roundtrip;
  import fft_pkg::*;

  localparam int  NS = 3, A = 128, SHIFT = 3, TOL = 24;
  localparam real PI_R = 3.14159265358979323846;

  logic clk = 1'b0, rst_n = 1'b0, in_valid = 1'b0, inverse = 1'b0;
  logic signed [DATA_W-1:0] in_re [LANES], in_im [LANES];
  logic                     out_valid, out_first;
  logic [POS_W-1:0]         out_pos;
  logic signed [INT_W-1:0]  out_re [LANES], out_im [LANES];

  fft512_r25 dut (.*);

  always #5 clk = ~clk;

  int sym_re [NS][FFT_N], sym_im [NS][FFT_N];    // QPSK points per subcarrier
  int td_re  [NS][FFT_N], td_im  [NS][FFT_N];    // IFFT output, natural order
  int rx_re  [NS][FFT_N], rx_im  [NS][FFT_N];    // FFT output, natural order
  int checks = 0, failures = 0, clipped = 0, outs = 0;

  function automatic int bitrev9(int v);
    int r = 0;
    for (int i = 0; i < 9; i++) r |= ((v >> i) & 1) << (8 - i);
    return r;
  endfunction

  function automatic int to12(int v);
    int s = (v + (1 <<< (SHIFT - 1))) >>> SHIFT;
    if (s > 2047)  begin clipped++; return 2047;  end
    if (s < -2048) begin clipped++; return -2048; end
    return s;
  endfunction

  // one pass of NS frames plus two frames of zero padding (frames are
  // counted in whole multiples of 64 beats from reset, so padding is kept
  // to whole frames); data chosen by pass
  task automatic stream(bit inv);
    for (int f = 0; f < NS + 2; f++)
      for (int t = 0; t < BEATS; t++) begin
        if ($urandom_range(7) == 0) begin
          in_valid <= 1'b0;
          @(posedge clk);
        end
        in_valid <= 1'b1;
        inverse  <= inv;
        for (int l = 0; l < LANES; l++) begin
          int n = (8 * t + l) % FFT_N;
          if (f >= NS) begin
            in_re[l] <= '0; in_im[l] <= '0;
          end else if (inv) begin
            in_re[l] <= DATA_W'(sym_re[f][n]); in_im[l] <= DATA_W'(sym_im[f][n]);
          end else begin
            in_re[l] <= DATA_W'(to12(td_re[f][n])); in_im[l] <= DATA_W'(to12(td_im[f][n]));
          end
        end
        @(posedge clk);
      end
    in_valid <= 1'b0;
    repeat (4) @(posedge clk);
  endtask

  // Output frames are numbered from the first out_first on: 0..NS-1 are the
  // IFFT symbols, NS and NS+1 the padding, NS+2..2*NS+1 the FFT symbols.
  int gframe = -1;

  always @(posedge clk) begin
    if (rst_n && out_valid) begin
      int g, t;
      if (out_first) gframe++;
      g = gframe;
      t = out_pos;
      if ((g >= 0 && g < NS) || (g >= NS + 2 && g < 2 * NS + 2)) begin
        for (int l = 0; l < LANES; l++) begin
          int k;
          k = bitrev9(8 * t + l);
          if (g < NS) begin td_re[g][k] = out_re[l]; td_im[g][k] = out_im[l]; end
          else begin rx_re[g - NS - 2][k] = out_re[l]; rx_im[g - NS - 2][k] = out_im[l]; end
        end
        outs++;
      end
    end
  end

  initial begin
    int amp;
    for (int s = 0; s < NS; s++)
      for (int k = 0; k < FFT_N; k++) begin
        sym_re[s][k] = $urandom_range(1) ? A : -A;
        sym_im[s][k] = $urandom_range(1) ? A : -A;
      end
    for (int l = 0; l < LANES; l++) begin in_re[l] = '0; in_im[l] = '0; end
    repeat (3) @(posedge clk);
    rst_n <= 1'b1;
    @(posedge clk);

    // modulation: IFFT
    stream(1'b1);
    checks++;
    if (outs != NS * BEATS) begin failures++; $display("FAIL: IFFT pass gave %0d beats", outs); end
    // spot-check the time-domain symbol 0 against an inverse DFT
    for (int n = 0; n < FFT_N; n += 7) begin
      real sr = 0.0, si = 0.0, a;
      sr = 0.0; si = 0.0;
      for (int k = 0; k < FFT_N; k++) begin
        a  = 2.0 * PI_R * ((n * k) % FFT_N) / FFT_N;
        sr += sym_re[0][k] * $cos(a) - sym_im[0][k] * $sin(a);
        si += sym_im[0][k] * $cos(a) + sym_re[0][k] * $sin(a);
      end
      checks++;
      if (td_re[0][n] - sr > TOL || sr - td_re[0][n] > TOL ||
          td_im[0][n] - si > TOL || si - td_im[0][n] > TOL) begin
        failures++;
        $display("FAIL: IFFT sample %0d got (%0d,%0d) want (%0.1f,%0.1f)", n, td_re[0][n], td_im[0][n], sr, si);
      end
    end

    // demodulation: FFT of the scaled time-domain symbols
    outs = 0;
    stream(1'b0);
    checks++;
    if (outs != NS * BEATS) begin failures++; $display("FAIL: FFT pass gave %0d beats", outs); end
    amp = FFT_N * A / (1 << SHIFT);
    for (int s = 0; s < NS; s++)
      for (int k = 0; k < FFT_N; k++) begin
        bit ok;
        ok = ((rx_re[s][k] > 0) == (sym_re[s][k] > 0)) && ((rx_im[s][k] > 0) == (sym_im[s][k] > 0));
        ok &= (rx_re[s][k] * 10 > amp * 9 || -rx_re[s][k] * 10 > amp * 9);
        ok &= (rx_re[s][k] * 10 < amp * 11 && -rx_re[s][k] * 10 < amp * 11);
        ok &= (rx_im[s][k] * 10 > amp * 9 || -rx_im[s][k] * 10 > amp * 9);
        ok &= (rx_im[s][k] * 10 < amp * 11 && -rx_im[s][k] * 10 < amp * 11);
        checks++;
        if (!ok) begin
          failures++;
          if (failures < 10)
            $display("FAIL: symbol %0d subcarrier %0d got (%0d,%0d) sent (%0d,%0d)",
                     s, k, rx_re[s][k], rx_im[s][k], sym_re[s][k], sym_im[s][k]);
        end
      end
    $display("time-domain samples clipped: %0d", clipped);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (3000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
