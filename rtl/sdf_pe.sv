// sdf_pe: delay-feedback processing element (FIFO + butterfly + multiplexers).
//
// One radix-2 stage of a single-path delay-feedback pipeline. While bf is low
// (first half of each 2*DEPTH-sample block) the incoming sample is stored in
// the FIFO and the FIFO's oldest word, the difference left by the previous
// block, goes to the output. While bf is high the butterfly combines the
// FIFO output x(n) with the incoming x(n+DEPTH): the sum goes to the output
// and the difference goes back into the FIFO, to leave it during the next
// DEPTH beats. The output is registered, so a sample leaves DEPTH+1 enabled
// beats after the position it belongs to entered.
//
// Everything advances only on beats with en high. bf comes from the control
// unit (bit log2(DEPTH) of the stage's input position).
//
// The FIFO/butterfly sequencing follows the original architecture; the
// output register and the enable-gated stall are this design's choices.
module sdf_pe #(
  parameter int unsigned W     = 22,
  parameter int unsigned DEPTH = 32
) (
  input  logic                clk,
  input  logic                rst_n,
  input  logic                en,
  input  logic                bf,
  input  logic signed [W-1:0] in_re,
  input  logic signed [W-1:0] in_im,
  output logic signed [W-1:0] out_re,
  output logic signed [W-1:0] out_im
);
  logic signed [W-1:0] f_re, f_im;
  logic signed [W-1:0] s_re, s_im, d_re, d_im;
  logic [2*W-1:0]      fifo_in, fifo_out;

  delay_fifo #(.W(2*W), .DEPTH(DEPTH)) u_fifo (
    .clk, .rst_n, .en, .din(fifo_in), .dout(fifo_out)
  );

  assign f_re = fifo_out[2*W-1:W];
  assign f_im = fifo_out[W-1:0];

  butterfly #(.W(W)) u_bf (
    .a_re(f_re), .a_im(f_im), .b_re(in_re), .b_im(in_im),
    .sum_re(s_re), .sum_im(s_im), .dif_re(d_re), .dif_im(d_im)
  );

  assign fifo_in = bf ? {d_re, d_im} : {in_re, in_im};

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      out_re <= '0;
      out_im <= '0;
    end else if (en) begin
      out_re <= bf ? s_re : f_re;
      out_im <= bf ? s_im : f_im;
    end
  end
endmodule
