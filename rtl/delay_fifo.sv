// delay_fifo: the first-in first-out buffer of a delay-feedback PE.
//
// A circular buffer of DEPTH words. On every enabled beat the word at the
// read/write pointer is presented on dout (the word written DEPTH enabled
// beats earlier) and din is written in its place. dout is combinational from
// the array; the array needs no reset because a PE only uses words it has
// written itself. The depth is the PE's delay (N/2 of the stage's sub-block);
// the buffer organisation is this design's choice.
module delay_fifo #(
  parameter int unsigned W     = 44,
  parameter int unsigned DEPTH = 32
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         en,
  input  logic [W-1:0] din,
  output logic [W-1:0] dout
);
  localparam int unsigned AW = (DEPTH > 1) ? $clog2(DEPTH) : 1;

  logic [W-1:0]  mem [DEPTH];
  logic [AW-1:0] ptr;

  assign dout = mem[ptr];

  always_ff @(posedge clk) begin
    if (en) mem[ptr] <= din;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)                       ptr <= '0;
    else if (en && ptr == AW'(DEPTH - 1)) ptr <= '0;
    else if (en)                      ptr <= ptr + AW'(1);
  end
endmodule
