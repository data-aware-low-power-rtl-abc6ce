// tb_csd_const_mult: checks the CSD constant multiplier against integer
// multiplication for the coefficients the FFT uses (cos(k*pi/16) with 14
// fractional bits), a negative one and an odd one with long runs of ones,
// on random and extreme inputs.
module tb_csd_const_mult;
  localparam int W = 22, CW = 15, OW = W + CW + 1;
  localparam int NC = 6;
  localparam int COEFS [NC] = '{16069, 15137, 11585, 3196, -9102, 32767};

  logic signed [W-1:0]  x;
  logic signed [OW-1:0] y [NC];
  int checks = 0, failures = 0;

  for (genvar i = 0; i < NC; i++) begin : g_dut
    csd_const_mult #(.W(W), .COEF(COEFS[i]), .CW(CW)) dut (.x(x), .y(y[i]));
  end

  task automatic try(int v);
    x = W'(v);
    #1;
    for (int i = 0; i < NC; i++) begin
      longint want = longint'(v) * longint'(COEFS[i]);
      checks++;
      if (longint'(y[i]) != want) begin
        failures++;
        $display("FAIL: %0d * %0d = %0d, got %0d", v, COEFS[i], want, y[i]);
      end
    end
  endtask

  initial begin
    try(0); try(1); try(-1); try(2097151); try(-2097152);
    for (int i = 0; i < 1000; i++) try($signed($urandom_range(4194303)) - 2097152);
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
