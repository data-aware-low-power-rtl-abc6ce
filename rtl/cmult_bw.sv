// cmult_bw: general complex twiddle multiplier on Baugh-Wooley multipliers.
//
// y = x * w with x = a + j*b (W-bit parts) and w = c + j*d (TW_W-bit parts
// with FRAC fractional bits):
//   y_re = a*c - b*d,   y_im = a*d + b*c.
// The four real products come from bw_mult instances; each output part is
// summed at full precision and rounded once (round half up) back to W bits,
// so the multiplier is fixed-width. The caller supplies the guard bit that
// |w| = 1 needs. Combinational.
// The four-multiplier form and the rounding are this design's choices.
module cmult_bw #(
  parameter int unsigned W    = 22,
  parameter int unsigned TW_W = fft_pkg::TW_W,
  parameter int unsigned FRAC = fft_pkg::TW_FRAC
) (
  input  logic signed [W-1:0]    x_re,
  input  logic signed [W-1:0]    x_im,
  input  logic signed [TW_W-1:0] w_re,
  input  logic signed [TW_W-1:0] w_im,
  output logic signed [W-1:0]    y_re,
  output logic signed [W-1:0]    y_im
);
  localparam int unsigned PW = W + TW_W;

  logic signed [PW-1:0] ac, bd, ad, bc;
  logic signed [PW:0]   s_re, s_im;

  bw_mult #(.AW(W), .BW(TW_W)) u_ac (.a(x_re), .b(w_re), .p(ac));
  bw_mult #(.AW(W), .BW(TW_W)) u_bd (.a(x_im), .b(w_im), .p(bd));
  bw_mult #(.AW(W), .BW(TW_W)) u_ad (.a(x_re), .b(w_im), .p(ad));
  bw_mult #(.AW(W), .BW(TW_W)) u_bc (.a(x_im), .b(w_re), .p(bc));

  always_comb begin
    s_re = (PW+1)'(ac) - (PW+1)'(bd) + ((PW+1)'(1) <<< (FRAC - 1));
    s_im = (PW+1)'(ad) + (PW+1)'(bc) + ((PW+1)'(1) <<< (FRAC - 1));
    y_re = W'(s_re >>> FRAC);
    y_im = W'(s_im >>> FRAC);
  end
endmodule
