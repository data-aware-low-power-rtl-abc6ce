// fft_module1: first module of one lane, the radix-2^5 part of the FFT.
//
// Five delay-feedback PEs (FIFO depths 32, 16, 8, 4, 2 beats) take the
// lane's 64-sample stream through radix-2 stages 1..5, which pair samples
// 256, 128, 64, 32 and 16 indices apart. Between them the radix-2^5
// factorisation leaves only small twiddles, whose exponents are built from
// bits of the stage's input position p (the control unit's pos):
//   before PE2: -j        if p[5] & p[4]           (trivial, "BUT2")
//   before PE3: W8^e,  e  = {p[4],p[5]}    if p[3]  (CSD, 1 coefficient)
//   before PE4: W16^e, e  = {p[3],p[4],p[5]} if p[2] (CSD, 3 coefficients)
//   before PE5: W32^e, e  = {p[2]..p[5]}   if p[1]  (CSD, 7 coefficients)
// After PE5 the general twiddle W512^(n6*K5) is applied, with K5 the
// bit-reversed top five position bits {p[1],..,p[5]} and n6 = 8*p[0] + LANE;
// it comes from the quarter-wave twiddle ROM and the Baugh-Wooley complex
// multiplier. That product is combinational and feeds module 2.
// All words are W bits wide (input already sign-extended).
// Five PEs per lane and the use of CSD multipliers for W8/W16/W32 follow the
// original design; the order of the elements and the exponent wiring are
// derived here from the radix-2^5 index map.
module fft_module1
  import fft_pkg::*;
#(
  parameter int unsigned W    = INT_W,
  parameter int unsigned LANE = 0
) (
  input  logic                clk,
  input  logic                rst_n,
  input  logic                en,
  input  logic [POS_W-1:0]    pos [6],   // stage 1..5 inputs, then the W512 multiplier
  input  logic signed [W-1:0] in_re,
  input  logic signed [W-1:0] in_im,
  output logic signed [W-1:0] out_re,
  output logic signed [W-1:0] out_im
);
  logic signed [W-1:0] pe_in_re [5], pe_in_im [5];   // PE inputs (after twiddle)
  logic signed [W-1:0] pe_out_re[5], pe_out_im[5];   // registered PE outputs

  assign pe_in_re[0] = in_re;
  assign pe_in_im[0] = in_im;

  for (genvar s = 0; s < 5; s++) begin : g_pe
    sdf_pe #(.W(W), .DEPTH(BEATS >> (s + 1))) u_pe (
      .clk, .rst_n, .en,
      .bf    (pos[s][POS_W-1-s]),
      .in_re (pe_in_re[s]),  .in_im (pe_in_im[s]),
      .out_re(pe_out_re[s]), .out_im(pe_out_im[s])
    );
  end

  logic [POS_W-1:0] p1, p2, p3, p4, p5;
  assign p1 = pos[1];
  assign p2 = pos[2];
  assign p3 = pos[3];
  assign p4 = pos[4];
  assign p5 = pos[5];

  // before PE2: trivial -j rotation
  always_comb begin
    if (p1[5] & p1[4]) begin
      pe_in_re[1] =  pe_out_im[0];
      pe_in_im[1] = -pe_out_re[0];
    end else begin
      pe_in_re[1] = pe_out_re[0];
      pe_in_im[1] = pe_out_im[0];
    end
  end

  // before PE3, PE4, PE5: CSD constant rotators
  logic [2:0] e8;
  logic [3:0] e16;
  logic [4:0] e32;
  assign e8  = p2[3] ? {1'b0, p2[4], p2[5]}               : '0;
  assign e16 = p3[2] ? {1'b0, p3[3], p3[4], p3[5]}        : '0;
  assign e32 = p4[1] ? {1'b0, p4[2], p4[3], p4[4], p4[5]} : '0;

  csd_rotator #(.W(W), .M(8)) u_w8 (
    .x_re(pe_out_re[1]), .x_im(pe_out_im[1]), .e(e8),
    .y_re(pe_in_re[2]),  .y_im(pe_in_im[2])
  );
  csd_rotator #(.W(W), .M(16)) u_w16 (
    .x_re(pe_out_re[2]), .x_im(pe_out_im[2]), .e(e16),
    .y_re(pe_in_re[3]),  .y_im(pe_in_im[3])
  );
  csd_rotator #(.W(W), .M(32)) u_w32 (
    .x_re(pe_out_re[3]), .x_im(pe_out_im[3]), .e(e32),
    .y_re(pe_in_re[4]),  .y_im(pe_in_im[4])
  );

  // after PE5: general W512 twiddle
  logic [4:0]            k5;
  logic [3:0]            n6;
  logic [8:0]            e512;
  logic signed [TW_W-1:0] w_re, w_im;

  assign k5   = {p5[1], p5[2], p5[3], p5[4], p5[5]};
  assign n6   = {p5[0], 3'(LANE)};
  assign e512 = 9'(n6 * k5);

  twiddle_rom #(.N(FFT_N)) u_rom (.e(e512), .w_re, .w_im);

  cmult_bw #(.W(W)) u_mult (
    .x_re(pe_out_re[4]), .x_im(pe_out_im[4]), .w_re, .w_im,
    .y_re(out_re), .y_im(out_im)
  );
endmodule
