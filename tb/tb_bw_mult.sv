// tb_bw_mult: checks the Baugh-Wooley multiplier exhaustively at 5x4 bits
// and on random and extreme operands at the 22x16-bit size the FFT uses.
module tb_bw_mult;
  logic signed [4:0]  sa;  logic signed [3:0]  sb;  logic signed [8:0]  sp;
  logic signed [21:0] la;  logic signed [15:0] lb;  logic signed [37:0] lp;
  int checks = 0, failures = 0;

  bw_mult #(.AW(5), .BW(4))   u_small (.a(sa), .b(sb), .p(sp));
  bw_mult #(.AW(22), .BW(16)) u_large (.a(la), .b(lb), .p(lp));

  task automatic try_large(int a, int b);
    la = 22'(a); lb = 16'(b);
    #1;
    checks++;
    if (longint'(lp) != longint'(a) * longint'(b)) begin
      failures++;
      $display("FAIL: %0d * %0d got %0d", a, b, lp);
    end
  endtask

  initial begin
    for (int a = -16; a < 16; a++)
      for (int b = -8; b < 8; b++) begin
        sa = 5'(a); sb = 4'(b);
        #1;
        checks++;
        if (int'(sp) != a * b) begin
          failures++;
          $display("FAIL: %0d * %0d got %0d", a, b, sp);
        end
      end
    try_large(-2097152, -32768);
    try_large(2097151, 32767);
    try_large(-2097152, 32767);
    try_large(2097151, -32768);
    for (int i = 0; i < 2000; i++)
      try_large($signed($urandom_range(4194303)) - 2097152, $signed($urandom_range(65535)) - 32768);
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
