// butterfly: radix-2 complex butterfly.
//
// Forms the complex sum a+b and the complex difference a-b of two inputs.
// The difference is built as in the adder circuit of the delay-feedback PE:
// the second operand goes through a two's complement (negation) and then
// into the same kind of adder as the sum. Purely combinational; the caller
// provides the headroom (the word width W is not extended here).
module butterfly #(
  parameter int unsigned W = 22
) (
  input  logic signed [W-1:0] a_re,
  input  logic signed [W-1:0] a_im,
  input  logic signed [W-1:0] b_re,
  input  logic signed [W-1:0] b_im,
  output logic signed [W-1:0] sum_re,
  output logic signed [W-1:0] sum_im,
  output logic signed [W-1:0] dif_re,
  output logic signed [W-1:0] dif_im
);
  logic signed [W-1:0] nb_re, nb_im;

  always_comb begin
    nb_re  = ~b_re + W'(1);   // two's complement of b
    nb_im  = ~b_im + W'(1);
    sum_re = a_re + b_re;
    sum_im = a_im + b_im;
    dif_re = a_re + nb_re;
    dif_im = a_im + nb_im;
  end
endmodule
