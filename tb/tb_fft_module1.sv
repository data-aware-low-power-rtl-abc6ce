// tb_fft_module1: checks one lane of module 1 (lane index 3) on three
// back-to-back random frames. The testbench plays the control unit (stage
// positions trailing the beat count by 0, 33, 50, 59, 64 and 67 beats). The
// module's output at position p must equal
//   W512^(n6*K5) * sum_{m=0..31} x(16*m + n6) * W32^(m*K5),
// K5 = bit-reverse5(p[5:1]), n6 = 8*p[0] + lane, where the lane carries
// x(8*t + lane) at beat t. The reference is computed in double precision;
// TOL LSBs of rounding error are allowed.
module tb_fft_module1;
  localparam int  W = 22, LANE = 3, NF = 3, TOL = 6;
  localparam int  OFF [6] = '{0, 33, 50, 59, 64, 67};
  localparam real PI = 3.14159265358979323846;

  logic clk = 1'b0, rst_n = 1'b0, en = 1'b0;
  logic [5:0] pos [6];
  logic signed [W-1:0] in_re = '0, in_im = '0, out_re, out_im;
  int yr [NF+2][64], yi [NF+2][64];
  int checks = 0, failures = 0;
  real maxerr = 0.0;

  fft_module1 #(.W(W), .LANE(LANE)) dut (.*);

  always #5 clk = ~clk;

  function automatic int brev5(int v);
    int r = 0;
    for (int i = 0; i < 5; i++) r |= ((v >> i) & 1) << (4 - i);
    return r;
  endfunction

  task automatic ref_value(int f, int p, output real vr, output real vi);
    int  k5, n6;
    real sr, si, a;
    k5 = brev5(p >> 1);
    n6 = 8 * (p & 1) + LANE;
    sr = 0.0; si = 0.0;
    for (int m = 0; m < 32; m++) begin
      a  = 2.0 * PI * ((m * k5) % 32) / 32.0;
      // x(16m + n6) is lane beat 2m + p[0]
      sr += yr[f][2 * m + (p & 1)] * $cos(a) + yi[f][2 * m + (p & 1)] * $sin(a);
      si += yi[f][2 * m + (p & 1)] * $cos(a) - yr[f][2 * m + (p & 1)] * $sin(a);
    end
    a  = 2.0 * PI * ((n6 * k5) % 512) / 512.0;
    vr = sr * $cos(a) + si * $sin(a);
    vi = si * $cos(a) - sr * $sin(a);
  endtask

  initial begin
    int c = 0;
    for (int f = 0; f < NF + 2; f++)
      for (int t = 0; t < 64; t++) begin
        yr[f][t] = (f < NF) ? $signed($urandom_range(4095)) - 2048 : 0;
        yi[f][t] = (f < NF) ? $signed($urandom_range(4095)) - 2048 : 0;
      end
    for (int s = 0; s < 6; s++) pos[s] = '0;
    repeat (2) @(posedge clk);
    rst_n <= 1'b1;
    while (c < (NF + 2) * 64) begin
      @(negedge clk);
      en    = 1'b1;
      in_re = W'(yr[c / 64][c % 64]);
      in_im = W'(yi[c / 64][c % 64]);
      for (int s = 0; s < 6; s++) pos[s] = 6'((c - OFF[s]) & 63);
      #1;
      if (c - OFF[5] >= 0 && c - OFF[5] < NF * 64) begin
        real vr, vi, er, ei;
        ref_value((c - OFF[5]) / 64, (c - OFF[5]) % 64, vr, vi);
        er = real'(out_re) - vr; if (er < 0.0) er = -er;
        ei = real'(out_im) - vi; if (ei < 0.0) ei = -ei;
        if (er > maxerr) maxerr = er;
        if (ei > maxerr) maxerr = ei;
        checks++;
        if (er > TOL || ei > TOL) begin
          failures++;
          if (failures < 10)
            $display("FAIL: frame %0d pos %0d got (%0d,%0d) want (%0.1f,%0.1f)",
                     (c - OFF[5]) / 64, (c - OFF[5]) % 64, out_re, out_im, vr, vi);
        end
      end
      @(posedge clk);
      c++;
    end
    $display("max error %0.2f LSB", maxerr);
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
