// tb_butterfly: checks the complex sum and difference of the butterfly on
// random operands (kept within range) and on the extreme values that still
// fit, against plain integer arithmetic.
module tb_butterfly;
  localparam int W = 22;
  logic signed [W-1:0] a_re, a_im, b_re, b_im, sum_re, sum_im, dif_re, dif_im;
  int checks = 0, failures = 0;

  butterfly #(.W(W)) dut (.*);

  task automatic try(int ar, int ai, int br, int bi);
    a_re = W'(ar); a_im = W'(ai); b_re = W'(br); b_im = W'(bi);
    #1;
    checks++;
    if (sum_re != W'(ar + br) || sum_im != W'(ai + bi) ||
        dif_re != W'(ar - br) || dif_im != W'(ai - bi)) begin
      failures++;
      $display("FAIL: (%0d,%0d) (%0d,%0d) -> sum (%0d,%0d) dif (%0d,%0d)",
               ar, ai, br, bi, sum_re, sum_im, dif_re, dif_im);
    end
  endtask

  initial begin
    try(0, 0, 0, 0);
    try(1, -1, 1, 1);
    try(1048575, -1048576, -1048576, 1048575);
    try(-1048576, 1048575, 1048575, -1048576);
    for (int i = 0; i < 2000; i++)
      try($signed($urandom_range(2097151)) - 1048576, $signed($urandom_range(2097151)) - 1048576,
          $signed($urandom_range(2097151)) - 1048576, $signed($urandom_range(2097151)) - 1048576);
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
