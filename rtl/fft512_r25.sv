// fft512_r25: 512-point modified radix-2^5 FFT processor, eight samples per clock.
//
// A multipath delay-feedback pipeline. Each beat carries eight complex
// samples: lane L at beat T of a frame holds x(8*T + L), so a frame takes 64
// beats and frames may follow each other without gaps. Per lane, module 1
// runs radix-2 stages 1..5 in delay-feedback PEs with only -j, W8, W16 and
// W32 constant rotations between them, then applies the general W512
// twiddle. Module 2 runs stage 6 per lane and stages 7..9 across the lanes.
// The control unit sequences everything from one beat counter.
//
// IFFT mode: with inverse high on the first beat of a frame, that frame is
// inverse-transformed, out = sum_k X(k) * exp(+j*2*pi*n*k/512), without the
// 1/512 scaling. This uses IFFT(X) = swap(FFT(swap(X))), swap(a + j*b) =
// b + j*a: the real and imaginary parts are exchanged on the way in and on
// the way out, with the mode carried to the output by the control unit.
// The mode may change from frame to frame.
//
// Interface: in_re/in_im are DATA_W-bit two's complement, accepted on every
// clock with in_valid high. The pipeline moves only on such beats (in_valid
// low stalls it), so the last frame is pushed out by the following frame or
// by 70 beats of padding. There is no frame-start input: frames begin every
// 64 valid beats counted from reset, so padding between bursts must be a
// whole number of frames. out_re/out_im are INT_W = DATA_W+10 bits, unscaled:
// out = sum_n x(n) * exp(-j*2*pi*n*k/512), with the twiddle rounding error.
// out_valid marks an output beat, out_pos is its beat index t and out_first
// marks t = 0; lane l then holds bin k = bit-reverse9(8*t + l).
// Latency: the output for an input beat appears 70 enabled beats later
// (69 beats of pipeline plus the output register), one clock after the
// 70th beat's rising edge.
module fft512_r25 #(
  parameter int unsigned DATA_W = fft_pkg::DATA_W,
  parameter int unsigned INT_W  = DATA_W + $clog2(fft_pkg::FFT_N) + 1
) (
  input  logic                    clk,
  input  logic                    rst_n,
  input  logic                    in_valid,
  input  logic                    inverse,
  input  logic signed [DATA_W-1:0] in_re  [fft_pkg::LANES],
  input  logic signed [DATA_W-1:0] in_im  [fft_pkg::LANES],
  output logic                    out_valid,
  output logic                    out_first,
  output logic [fft_pkg::POS_W-1:0]        out_pos,
  output logic signed [INT_W-1:0] out_re [fft_pkg::LANES],
  output logic signed [INT_W-1:0] out_im [fft_pkg::LANES]
);
  logic [fft_pkg::POS_W-1:0]        pos [7];
  logic signed [INT_W-1:0] m1_re [fft_pkg::LANES], m1_im [fft_pkg::LANES];
  logic signed [INT_W-1:0] m2_re [fft_pkg::LANES], m2_im [fft_pkg::LANES];
  logic                    inv_in, inv_out;

  fft_control u_ctrl (
    .clk, .rst_n, .en(in_valid), .inverse, .pos, .inv_in, .inv_out,
    .out_valid, .out_pos, .out_first
  );

  for (genvar l = 0; l < fft_pkg::LANES; l++) begin : g_lane
    fft_module1 #(.W(INT_W), .LANE(l)) u_m1 (
      .clk, .rst_n, .en(in_valid), .pos(pos[0:5]),
      .in_re (INT_W'(inv_in ? in_im[l] : in_re[l])),
      .in_im (INT_W'(inv_in ? in_re[l] : in_im[l])),
      .out_re(m1_re[l]), .out_im(m1_im[l])
    );
  end

  fft_module2 #(.W(INT_W)) u_m2 (
    .clk, .rst_n, .en(in_valid), .bf6(pos[5][0]), .k6(pos[6][0]),
    .in_re(m1_re), .in_im(m1_im), .out_re(m2_re), .out_im(m2_im)
  );

  always_comb begin
    for (int l = 0; l < fft_pkg::LANES; l++) begin
      out_re[l] = inv_out ? m2_im[l] : m2_re[l];
      out_im[l] = inv_out ? m2_re[l] : m2_im[l];
    end
  end
endmodule
