// twiddle_rom: look-up table of the general twiddle factors W_N^e.
//
// Only the first quadrant, cos and sin of 2*pi*r/N for r = 0 .. N/4-1, is
// stored (N/4 entries of two TW_W-bit words, filled at elaboration time and
// rounded to FRAC fractional bits). The two top bits of the exponent e give
// the quadrant q, and W_N^e = (-j)^q * W_N^r is formed by swapping and
// negating the stored pair. Output w = w_re + j*w_im = W_N^e.
// Combinational read.
// The original only says its table is half the size a Booth-based design
// needs; storing one quadrant is this design's choice.
module twiddle_rom #(
  parameter int unsigned N    = fft_pkg::FFT_N,
  parameter int unsigned TW_W = fft_pkg::TW_W,
  parameter int unsigned FRAC = fft_pkg::TW_FRAC,
  parameter int unsigned EW   = $clog2(N)
) (
  input  logic [EW-1:0]          e,
  output logic signed [TW_W-1:0] w_re,
  output logic signed [TW_W-1:0] w_im
);
  localparam int unsigned NQ = N / 4;
  localparam int unsigned RW = $clog2(NQ);

  typedef logic signed [TW_W-1:0] tab_t [NQ];

  function automatic tab_t fill(bit want_sin);
    tab_t t;
    for (int r = 0; r < NQ; r++)
      t[r] = TW_W'(want_sin ? fft_pkg::sin_q(r, N, FRAC) : fft_pkg::cos_q(r, N, FRAC));
    return t;
  endfunction

  localparam tab_t COS_T = fill(1'b0);
  localparam tab_t SIN_T = fill(1'b1);

  logic [1:0]            q;
  logic [RW-1:0]         r;
  logic signed [TW_W-1:0] c, s;

  always_comb begin
    q = e[EW-1 -: 2];
    r = e[RW-1:0];
    c = COS_T[r];
    s = SIN_T[r];
    // W^r = c - j*s; multiply by (-j)^q
    unique case (q)
      2'd0: begin w_re =  c; w_im = -s; end
      2'd1: begin w_re = -s; w_im = -c; end
      2'd2: begin w_re = -c; w_im =  s; end
      default: begin w_re =  s; w_im =  c; end
    endcase
  end
endmodule
