// tb_fft_control: checks the control unit's sequencing under a random
// enable: each stage position must trail the beat count by the stage's
// offset (0, 33, 50, 59, 64, 67, 69 beats), out_valid must rise only after
// 69 enabled beats and then follow en one clock later, and out_pos/out_first
// must give the network-input position of the last enabled beat. The
// FFT/IFFT mode, sampled on beat 0 of each input frame while inverse is
// random, must appear on inv_in for that frame's beats and on inv_out for
// its output beats.
module tb_fft_control;
  localparam int OFF [7] = '{0, 33, 50, 59, 64, 67, 69};
  logic clk = 1'b0, rst_n = 1'b0, en = 1'b0, inverse = 1'b0;
  logic       inv_in, inv_out;
  bit         mode [64];
  logic [5:0] pos [7];
  logic       out_valid, out_first;
  logic [5:0] out_pos;
  int checks = 0, failures = 0;

  fft_control dut (.*);

  always #5 clk = ~clk;

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin
    int beats = 0, nvalid = 0, nfirst = 0;
    bit was_en;
    repeat (2) @(posedge clk);
    rst_n <= 1'b1;
    for (int i = 0; i < 600; i++) begin
      @(negedge clk);
      en = ($urandom_range(4) != 0);
      inverse = 1'($urandom_range(1));
      #1;
      if (en && beats % 64 == 0) mode[beats / 64] = inverse;
      if (en) check(inv_in == mode[beats / 64], $sformatf("inv_in at beat %0d", beats));
      for (int s = 0; s < 7; s++)
        check(pos[s] == 6'((beats - OFF[s]) & 63),
              $sformatf("beat %0d stage %0d pos %0d", beats, s, pos[s]));
      was_en = en;
      @(posedge clk);
      #1;
      check(out_valid == (was_en && beats >= 69), $sformatf("out_valid at beat %0d", beats));
      if (was_en && beats >= 69) begin
        nvalid++;
        check(out_pos == 6'((beats - 69) & 63), "out_pos");
        check(out_first == (((beats - 69) & 63) == 0), "out_first");
        check(inv_out == mode[(beats - 69) / 64], $sformatf("inv_out at beat %0d", beats));
        if (out_first) nfirst++;
      end
      if (was_en) beats++;
    end
    check(nvalid > 0 && nfirst > 0, "no output frame seen");
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
