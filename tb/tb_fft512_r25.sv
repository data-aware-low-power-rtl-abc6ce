// tb_fft512_r25: end-to-end test of the 512-point, eight-lane FFT at its
// default parameters.
//
// Streams four frames through the pipeline: random full-scale samples
// (FFT), a mix of three complex tones (IFFT), the most negative constant
// (FFT; largest possible output, checks the word growth) and random samples
// again (IFFT); a fifth frame of zeros pushes the last one out. The inverse
// input is random except on the first beat of a frame, where it selects the
// mode. Random stall beats (in_valid low) are
// inserted in the middle of frames. Every output word is compared with a
// double-precision DFT computed here; the difference may not exceed TOL
// output LSBs per part. Also checked: out_pos/out_first sequencing, the
// latency of 70 enabled beats, and that each mechanism of the pipeline
// (FIFO fill, butterfly phase, -j, W8/W16/W32/W512 twiddles, stall,
// back-to-back frames) occurred.
module tb_fft512_r25;
  import fft_pkg::*;

  localparam int NF  = 4;        // frames checked
  localparam int TOL = 24;       // allowed error, output LSBs
  localparam int DW  = DATA_W;
  localparam int OW  = INT_W;

  logic clk = 1'b0, rst_n = 1'b0, in_valid = 1'b0, inverse = 1'b0;
  localparam bit INV [NF+1] = '{1'b0, 1'b1, 1'b0, 1'b1, 1'b0};
  logic signed [DW-1:0] in_re [LANES], in_im [LANES];
  logic                 out_valid, out_first;
  logic [POS_W-1:0]     out_pos;
  logic signed [OW-1:0] out_re [LANES], out_im [LANES];

  fft512_r25 dut (.*);

  always #5 clk = ~clk;

  int  checks = 0, failures = 0;
  int  xr [NF+1][FFT_N], xi [NF+1][FFT_N];
  real rr [NF][FFT_N], ri [NF][FFT_N];
  real ct [FFT_N], st [FFT_N];
  real maxerr = 0.0;

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20) $display("FAIL: %s", what);
    end
  endtask

  function automatic int bitrev9(int v);
    int r = 0;
    for (int i = 0; i < 9; i++) r |= ((v >> i) & 1) << (8 - i);
    return r;
  endfunction

  // ---------------- stimulus and reference ----------------
  initial begin
    for (int n = 0; n < FFT_N; n++) begin
      ct[n] = $cos(2.0 * PI * n / FFT_N);
      st[n] = $sin(2.0 * PI * n / FFT_N);
    end
    for (int n = 0; n < FFT_N; n++) begin
      real a, b;
      xr[0][n] = $signed($urandom_range(4095)) - 2048;
      xi[0][n] = $signed($urandom_range(4095)) - 2048;
      a = 700.0 * ct[(5 * n) % FFT_N] + 500.0 * ct[(77 * n) % FFT_N] - 600.0 * st[(300 * n) % FFT_N];
      b = 700.0 * st[(5 * n) % FFT_N] - 500.0 * st[(77 * n) % FFT_N] + 600.0 * ct[(300 * n) % FFT_N];
      xr[1][n] = $rtoi(a);
      xi[1][n] = $rtoi(b);
      xr[2][n] = -2048;
      xi[2][n] = -2048;
      xr[3][n] = $signed($urandom_range(4095)) - 2048;
      xi[3][n] = $signed($urandom_range(4095)) - 2048;
      xr[NF][n] = 0;
      xi[NF][n] = 0;
    end
    for (int f = 0; f < NF; f++)
      for (int k = 0; k < FFT_N; k++) begin
        real sr, si;
        sr = 0.0;
        si = 0.0;
        for (int n = 0; n < FFT_N; n++) begin
          int m;
          m = (n * k) % FFT_N;
          // (xr + j xi)(cos - j sin)
          if (INV[f]) begin
            // (xr + j xi)(cos + j sin)
            sr += xr[f][n] * ct[m] - xi[f][n] * st[m];
            si += xi[f][n] * ct[m] + xr[f][n] * st[m];
          end else begin
            sr += xr[f][n] * ct[m] + xi[f][n] * st[m];
            si += xi[f][n] * ct[m] - xr[f][n] * st[m];
          end
        end
        rr[f][k] = sr;
        ri[f][k] = si;
      end
  end

  int stalls = 0, beats = 0;
  int first_out_beat = -1;

  initial begin
    for (int l = 0; l < LANES; l++) begin in_re[l] = '0; in_im[l] = '0; end
    repeat (3) @(posedge clk);
    rst_n <= 1'b1;
    @(posedge clk);
    for (int f = 0; f <= NF; f++) begin
      // the zero frame is lengthened to cover the 70-beat latency
      for (int t = 0; t < ((f == NF) ? BEATS + 8 : BEATS); t++) begin
        // random stall beats, not in frame 0 so the latency check is exact
        if (f > 0 && $urandom_range(9) == 0) begin
          in_valid <= 1'b0;
          stalls++;
          @(posedge clk);
        end
        in_valid <= 1'b1;
        inverse  <= (t == 0) ? INV[f] : 1'($urandom_range(1));
        for (int l = 0; l < LANES; l++) begin
          in_re[l] <= DW'(xr[f][(8 * t + l) % FFT_N]);
          in_im[l] <= DW'(xi[f][(8 * t + l) % FFT_N]);
        end
        @(posedge clk);
      end
    end
    in_valid <= 1'b0;
    repeat (5) @(posedge clk);
    finish_up();
  end

  // ---------------- output checking ----------------
  int outs = 0, firsts = 0;

  // beats counts the enabled clock edges before the current one
  always @(posedge clk) begin
    if (rst_n && out_valid && outs < NF * BEATS) begin
      int f, t;
      f = outs / BEATS;
      t = outs % BEATS;
      if (outs == 0) first_out_beat = beats;
      check(out_pos == POS_W'(t), $sformatf("out_pos %0d expected %0d", out_pos, t));
      check(out_first == (t == 0), "out_first");
      if (out_first) firsts++;
      for (int l = 0; l < LANES; l++) begin
        int  k;
        real er, ei;
        k  = bitrev9(8 * t + l);
        er = real'(out_re[l]) - rr[f][k];
        ei = real'(out_im[l]) - ri[f][k];
        if (er < 0.0) er = -er;
        if (ei < 0.0) ei = -ei;
        if (er > maxerr) maxerr = er;
        if (ei > maxerr) maxerr = ei;
        check(er <= TOL && ei <= TOL,
              $sformatf("frame %0d bin %0d: got (%0d, %0d) want (%0.1f, %0.1f)",
                        f, k, out_re[l], out_im[l], rr[f][k], ri[f][k]));
      end
      outs++;
    end
    if (in_valid) beats++;
  end

  // ---------------- mechanism coverage ----------------
  int n_switch = 0;
  bit last_mode = 1'b0;
  int n_fill = 0, n_bf = 0, n_mj = 0, n_w8 = 0, n_w16 = 0, n_w32 = 0, n_w512 = 0, n_b2b = 0;

  always @(posedge clk) begin
    if (in_valid) begin
      if (dut.u_ctrl.pos[0][5]) n_bf++; else n_fill++;
      if (dut.g_lane[0].u_m1.p1[5] & dut.g_lane[0].u_m1.p1[4]) n_mj++;
      if (dut.g_lane[0].u_m1.e8  != 0) n_w8++;
      if (dut.g_lane[0].u_m1.e16 != 0) n_w16++;
      if (dut.g_lane[0].u_m1.e32 != 0) n_w32++;
      if (dut.g_lane[3].u_m1.e512 != 0) n_w512++;
      // a new input frame starts while the previous is still in flight
      if (dut.u_ctrl.pos[0] == 0 && beats > 0 && beats < NF * BEATS) n_b2b++;
      if (dut.u_ctrl.pos[0] == 0 && beats > 0 && inverse != last_mode) n_switch++;
      if (dut.u_ctrl.pos[0] == 0) last_mode = inverse;
    end
  end

  task automatic finish_up();
    $display("max error %0.2f LSB, stalls %0d, first output after %0d beats", maxerr, stalls, first_out_beat);
    $display("fill %0d bf %0d -j %0d w8 %0d w16 %0d w32 %0d w512 %0d back-to-back %0d mode switches %0d",
             n_fill, n_bf, n_mj, n_w8, n_w16, n_w32, n_w512, n_b2b, n_switch);
    check(outs == NF * BEATS, $sformatf("%0d output beats, expected %0d", outs, NF * BEATS));
    check(firsts == NF, "out_first count");
    check(first_out_beat == 70, $sformatf("latency %0d beats, expected 70", first_out_beat));
    check(n_fill > 0, "FIFO fill phase never seen");
    check(n_bf > 0, "butterfly phase never seen");
    check(n_mj > 0, "-j rotation never used");
    check(n_w8 > 0 && n_w16 > 0 && n_w32 > 0, "constant twiddle never used");
    check(n_w512 > 0, "W512 twiddle never used");
    check(stalls > 0, "no stall happened");
    check(n_switch > 0, "FFT/IFFT mode never switched");
    check(n_b2b > 0, "no back-to-back frames");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  endtask

  initial begin
    repeat (2000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
