// tb_sdf_pe: runs random blocks of 2*DEPTH samples through one
// delay-feedback PE, with random stall beats, and checks the output stream:
// one register plus DEPTH beats after a sample position enters, the PE must
// deliver x(n)+x(n+DEPTH) for the first half of each block and
// x(n)-x(n+DEPTH) for the second half.
module tb_sdf_pe;
  localparam int W = 16, DEPTH = 4, BLK = 2 * DEPTH, NBLK = 20;
  logic clk = 1'b0, rst_n = 1'b0, en = 1'b0, bf = 1'b0;
  logic signed [W-1:0] in_re = '0, in_im = '0, out_re, out_im;
  int xr [NBLK * BLK], xi [NBLK * BLK];
  int checks = 0, failures = 0, stalls = 0;

  sdf_pe #(.W(W), .DEPTH(DEPTH)) dut (.*);

  always #5 clk = ~clk;

  // expected value for stream position q
  function automatic void expect_at(int q, output int er, output int ei);
    int b = q - (q % BLK), j = q % BLK;
    if (j < DEPTH) begin
      er = xr[b + j] + xr[b + j + DEPTH];
      ei = xi[b + j] + xi[b + j + DEPTH];
    end else begin
      er = xr[b + j - DEPTH] - xr[b + j];
      ei = xi[b + j - DEPTH] - xi[b + j];
    end
  endfunction

  initial begin
    int c = 0;
    for (int i = 0; i < NBLK * BLK; i++) begin
      xr[i] = $signed($urandom_range(2000)) - 1000;
      xi[i] = $signed($urandom_range(2000)) - 1000;
    end
    repeat (2) @(posedge clk);
    rst_n <= 1'b1;
    while (c < NBLK * BLK) begin
      @(negedge clk);
      if ($urandom_range(4) == 0) begin
        en = 1'b0;
        stalls++;
      end else begin
        en    = 1'b1;
        bf    = ((c % BLK) >= DEPTH);
        in_re = W'(xr[c]);
        in_im = W'(xi[c]);
      end
      @(posedge clk);
      #1;
      if (en) begin
        // output register now holds stream position c - DEPTH
        if (c - DEPTH >= 0 && c - DEPTH < (NBLK - 1) * BLK) begin
          int er, ei;
          expect_at(c - DEPTH, er, ei);
          checks++;
          if (out_re != W'(er) || out_im != W'(ei)) begin
            failures++;
            $display("FAIL: position %0d got (%0d,%0d) expected (%0d,%0d)",
                     c - DEPTH, out_re, out_im, er, ei);
          end
        end
        c++;
      end
    end
    if (stalls == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
