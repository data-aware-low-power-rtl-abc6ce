// tb_delay_fifo: drives the FIFO with random data and a random enable and
// checks that dout on every enabled beat is the word written DEPTH enabled
// beats earlier, using a queue as the reference.
module tb_delay_fifo;
  localparam int W = 16, DEPTH = 5;
  logic clk = 1'b0, rst_n = 1'b0, en = 1'b0;
  logic [W-1:0] din = '0, dout;
  logic [W-1:0] q [$];
  int checks = 0, failures = 0, writes = 0;

  delay_fifo #(.W(W), .DEPTH(DEPTH)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (2) @(posedge clk);
    rst_n <= 1'b1;
    for (int i = 0; i < 400; i++) begin
      @(negedge clk);
      en  = ($urandom_range(3) != 0);
      din = W'($urandom);
      #1;
      if (en) begin
        if (writes >= DEPTH) begin
          checks++;
          if (dout != q[0]) begin
            failures++;
            $display("FAIL: beat %0d dout %h expected %h", writes, dout, q[0]);
          end
          void'(q.pop_front());
        end
        q.push_back(din);
        writes++;
      end
      @(posedge clk);
    end
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
