// tb_cmult_bw: checks the fixed-width complex multiplier on random data and
// twiddles against integer arithmetic: (a*c - b*d) and (a*d + b*c), rounded
// half up at bit 14, must match exactly.
module tb_cmult_bw;
  localparam int W = 22;
  logic signed [W-1:0] x_re, x_im, y_re, y_im;
  logic signed [15:0]  w_re, w_im;
  int checks = 0, failures = 0;

  cmult_bw #(.W(W)) dut (.*);

  initial begin
    for (int i = 0; i < 3000; i++) begin
      longint a, b, c, d, er, ei;
      a = $signed($urandom_range(2000000)) - 1000000;
      b = $signed($urandom_range(2000000)) - 1000000;
      c = $signed($urandom_range(32768)) - 16384;
      d = $signed($urandom_range(32768)) - 16384;
      x_re = W'(a); x_im = W'(b); w_re = 16'(c); w_im = 16'(d);
      #1;
      er = (a * c - b * d + 8192) >>> 14;
      ei = (a * d + b * c + 8192) >>> 14;
      checks++;
      if (longint'(y_re) != er || longint'(y_im) != ei) begin
        failures++;
        $display("FAIL: (%0d,%0d)*(%0d,%0d) got (%0d,%0d) want (%0d,%0d)",
                 a, b, c, d, y_re, y_im, er, ei);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #1000000;
    failures++;
    $display("FAIL: watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
