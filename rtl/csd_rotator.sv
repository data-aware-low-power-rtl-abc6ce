// csd_rotator: complex constant multiplier for the W_M twiddles (M = 8, 16, 32).
//
// Multiplies x by W_M^e, W_M = exp(-j*2*pi/M), using only CSD constant
// multipliers. W_M^e is split as (-j)^q * W_M^r with q = e / (M/4) and
// r = e mod (M/4). The (-j)^q part is a swap and negation. For r > 0,
//   x * W_M^r = (a*c_r + b*c_(M/4-r)) + j*(b*c_r - a*c_(M/4-r)),
// where c_k = cos(2*pi*k/M) and x = a + j*b, since sin(2*pi*r/M) =
// c_(M/4-r). So the only coefficients are c_1 .. c_(M/4-1): one for W8
// (cos(pi/4)), three for W16 and seven for W32, each applied to both the
// real and imaginary input by a CSD shift-and-add multiplier. The two
// products of each output part are added at full precision and rounded
// once (round half up) to FRAC fewer bits, so the output has the input's
// width W (a fixed-width multiplier); the caller supplies the guard bit.
// Combinational.
module csd_rotator #(
  parameter int unsigned W    = 22,
  parameter int unsigned M    = 32,
  parameter int unsigned FRAC = fft_pkg::TW_FRAC,
  parameter int unsigned EW   = $clog2(M)
) (
  input  logic signed [W-1:0] x_re,
  input  logic signed [W-1:0] x_im,
  input  logic [EW-1:0]       e,
  output logic signed [W-1:0] y_re,
  output logic signed [W-1:0] y_im
);
  localparam int unsigned Q  = M / 4;       // coefficients c_1 .. c_(Q-1)
  localparam int unsigned CW = FRAC + 1;
  localparam int unsigned PW = W + CW + 2;  // product and sum width
  localparam int unsigned RW = (Q > 1) ? $clog2(Q) : 1;

  logic signed [PW-1:0] pa [Q];  // a * c_k, index 0 unused
  logic signed [PW-1:0] pb [Q];  // b * c_k
  assign pa[0] = '0;
  assign pb[0] = '0;

  for (genvar k = 1; k < Q; k++) begin : g_coef
    csd_const_mult #(.W(W), .COEF(fft_pkg::cos_q(k, M, FRAC)), .CW(CW), .OW(PW))
      u_a (.x(x_re), .y(pa[k]));
    csd_const_mult #(.W(W), .COEF(fft_pkg::cos_q(k, M, FRAC)), .CW(CW), .OW(PW))
      u_b (.x(x_im), .y(pb[k]));
  end

  logic [1:0]           q;
  logic [RW-1:0]        r, rc;
  logic signed [PW-1:0] s_re, s_im;
  logic signed [W-1:0]  t_re, t_im;

  always_comb begin
    q  = 2'(e >> $clog2(Q));
    r  = RW'(e % EW'(Q));
    rc = RW'(Q - 32'(r));
    if (r == '0) begin
      s_re = PW'(x_re) <<< FRAC;
      s_im = PW'(x_im) <<< FRAC;
    end else begin
      s_re = pa[r] + pb[rc];
      s_im = pb[r] - pa[rc];
    end
    t_re = W'((s_re + (PW'(1) <<< (FRAC - 1))) >>> FRAC);
    t_im = W'((s_im + (PW'(1) <<< (FRAC - 1))) >>> FRAC);
    unique case (q)
      2'd0: begin y_re =  t_re; y_im =  t_im; end
      2'd1: begin y_re =  t_im; y_im = -t_re; end
      2'd2: begin y_re = -t_re; y_im = -t_im; end
      default: begin y_re = -t_im; y_im =  t_re; end
    endcase
  end
endmodule
