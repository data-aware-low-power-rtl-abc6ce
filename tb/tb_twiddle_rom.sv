// tb_twiddle_rom: reads all 512 twiddles W512^e and compares them with
// cos(2*pi*e/512) and -sin(2*pi*e/512) scaled by 2^14 and rounded here; at
// most one LSB of difference is allowed (rounding of values near .5).
module tb_twiddle_rom;
  localparam real PI = 3.14159265358979323846;
  logic [8:0] e;
  logic signed [15:0] w_re, w_im;
  int checks = 0, failures = 0;

  twiddle_rom dut (.*);

  initial begin
    for (int i = 0; i < 512; i++) begin
      real c, s;
      e = 9'(i);
      #1;
      c = $cos(2.0 * PI * i / 512.0) * 16384.0;
      s = -$sin(2.0 * PI * i / 512.0) * 16384.0;
      checks++;
      if ((real'(w_re) - c) > 1.0 || (c - real'(w_re)) > 1.0 ||
          (real'(w_im) - s) > 1.0 || (s - real'(w_im)) > 1.0) begin
        failures++;
        $display("FAIL: e=%0d got (%0d,%0d) want (%0.2f,%0.2f)", i, w_re, w_im, c, s);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #100000;
    failures++;
    $display("FAIL: watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
