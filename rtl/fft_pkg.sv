// fft_pkg: constants and elaboration-time helpers shared by the 512-point
// modified radix-2^5 FFT.
//
// The processor takes eight complex samples per clock (one per lane), so a
// 512-point frame occupies 64 beats. The sample in lane L at beat T of a frame
// is x(8*T + L). Data widths grow by one bit per radix-2 stage plus one guard
// bit for the twiddle rotations, so no stage needs scaling or saturation.
//
// Twiddle constants are computed here at elaboration time with real
// arithmetic and rounded to TW_FRAC fractional bits; nothing is read from a
// file. W_M = exp(-j*2*pi/M) throughout.
package fft_pkg;

  localparam int unsigned FFT_N   = 512;          // transform length
  localparam int unsigned LANES   = 8;            // samples per clock
  localparam int unsigned BEATS   = FFT_N / LANES; // beats per frame (64)
  localparam int unsigned POS_W   = $clog2(BEATS); // beat index width (6)
  localparam int unsigned LANE_W  = $clog2(LANES); // lane index width (3)
  localparam int unsigned DATA_W  = 12;           // input word (per real/imag part)
  localparam int unsigned INT_W   = DATA_W + $clog2(FFT_N) + 1; // internal and output word
  localparam int unsigned TW_FRAC = 14;           // fractional bits of every twiddle constant
  localparam int unsigned TW_W    = TW_FRAC + 2;  // signed twiddle word, holds +/-1.0

  localparam real PI = 3.14159265358979323846;

  // round(cos(2*pi*num/den) * 2^frac), computed at elaboration time
  function automatic int cos_q(int num, int den, int frac);
    real v;
    v = $cos(2.0 * PI * real'(num) / real'(den)) * real'(64'(1) << frac);
    return (v >= 0.0) ? $rtoi(v + 0.5) : -$rtoi(0.5 - v);
  endfunction

  // round(sin(2*pi*num/den) * 2^frac)
  function automatic int sin_q(int num, int den, int frac);
    real v;
    v = $sin(2.0 * PI * real'(num) / real'(den)) * real'(64'(1) << frac);
    return (v >= 0.0) ? $rtoi(v + 0.5) : -$rtoi(0.5 - v);
  endfunction

  // Stage-input beat offsets of the delay-feedback stages. Stage s (1..6)
  // has a FIFO of 64>>s words and a registered output, so the data reaching
  // stage s+1 is (64>>s)+1 beats behind the data reaching stage s. Index 6 is
  // the input of the cross-lane butterfly network.
  function automatic int stage_offset(int s);
    int off;
    off = 0;
    for (int i = 0; i < s; i++) off += (BEATS >> (i + 1)) + 1;
    return off;
  endfunction

endpackage
