// fft_module2: second module, the radix-2^4 (16-point) part across the lanes.
//
// After module 1 every lane still holds 16-point transforms over the index
// n6 = 8*p[0] + lane. Module 2 finishes them with cascaded Butterfly-1
// stages:
//   stage 6: one delay-feedback PE per lane with a one-word FIFO, pairing
//            beats p[0] = 0 and 1 of the same lane;
//   stage 7: butterflies between lanes l and l+4, after a -j rotation of
//            lanes 4..7 when k6 = p[0] = 1;
//   stage 8: butterflies between lanes l and l+2, after W8^(k6 + 2*l[2])
//            on lanes with l[1] = 1 (CSD rotator);
//   stage 9: butterflies between lanes l and l+1, after
//            W16^(k6 + 2*l[2] + 4*l[1]) on odd lanes (CSD rotator).
// Stages 7..9 are combinational and end in one output register that is
// loaded on enabled beats. Output lane l at beat t holds the frequency bin
// k = bit-reverse9(8*t + l). bf6 and k6 are bit 0 of the control unit's
// positions of the stage-6 input and of the network input.
// The original describes this module only as cascaded Butterfly-1 stages;
// the split into a stage-6 PE and three cross-lane layers is derived here.
module fft_module2
  import fft_pkg::*;
#(
  parameter int unsigned W = INT_W
) (
  input  logic                clk,
  input  logic                rst_n,
  input  logic                en,
  input  logic                bf6,      // bit 0 of the stage-6 input position
  input  logic                k6,       // bit 0 of the network input position
  input  logic signed [W-1:0] in_re  [LANES],
  input  logic signed [W-1:0] in_im  [LANES],
  output logic signed [W-1:0] out_re [LANES],
  output logic signed [W-1:0] out_im [LANES]
);
  logic signed [W-1:0] a_re [LANES], a_im [LANES];  // stage 6 outputs
  logic signed [W-1:0] b_re [LANES], b_im [LANES];  // stage 7 inputs (after -j)
  logic signed [W-1:0] c_re [LANES], c_im [LANES];  // stage 7 outputs
  logic signed [W-1:0] d_re [LANES], d_im [LANES];  // stage 8 inputs (after W8)
  logic signed [W-1:0] f_re [LANES], f_im [LANES];  // stage 8 outputs
  logic signed [W-1:0] g_re [LANES], g_im [LANES];  // stage 9 inputs (after W16)
  logic signed [W-1:0] h_re [LANES], h_im [LANES];  // stage 9 outputs

  for (genvar l = 0; l < LANES; l++) begin : g_lane
    // stage 6: delay-feedback PE with a one-word FIFO
    sdf_pe #(.W(W), .DEPTH(1)) u_pe6 (
      .clk, .rst_n, .en, .bf(bf6),
      .in_re(in_re[l]), .in_im(in_im[l]), .out_re(a_re[l]), .out_im(a_im[l])
    );

    // twiddle ahead of stage 7: -j on lanes 4..7 when k6
    if (l >= 4) begin : g_w4
      assign b_re[l] = k6 ?  a_im[l] : a_re[l];
      assign b_im[l] = k6 ? -a_re[l] : a_im[l];
    end else begin : g_w4_none
      assign b_re[l] = a_re[l];
      assign b_im[l] = a_im[l];
    end

    // twiddle ahead of stage 8: W8^(k6 + 2*l[2]) on lanes with l[1] = 1
    if ((l & 2) != 0) begin : g_w8
      csd_rotator #(.W(W), .M(8)) u_w8 (
        .x_re(c_re[l]), .x_im(c_im[l]), .e({1'b0, 1'(l >> 2), k6}),
        .y_re(d_re[l]), .y_im(d_im[l])
      );
    end else begin : g_w8_none
      assign d_re[l] = c_re[l];
      assign d_im[l] = c_im[l];
    end

    // twiddle ahead of stage 9: W16^(k6 + 2*l[2] + 4*l[1]) on odd lanes
    if ((l & 1) != 0) begin : g_w16
      csd_rotator #(.W(W), .M(16)) u_w16 (
        .x_re(f_re[l]), .x_im(f_im[l]), .e({1'b0, 1'(l >> 1), 1'(l >> 2), k6}),
        .y_re(g_re[l]), .y_im(g_im[l])
      );
    end else begin : g_w16_none
      assign g_re[l] = f_re[l];
      assign g_im[l] = f_im[l];
    end
  end

  // the three cross-lane butterfly layers (BUT1 cascade)
  for (genvar l = 0; l < LANES; l++) begin : g_bf
    if ((l & 4) == 0) begin : g_s7
      butterfly #(.W(W)) u_s7 (
        .a_re(b_re[l]), .a_im(b_im[l]), .b_re(b_re[l+4]), .b_im(b_im[l+4]),
        .sum_re(c_re[l]), .sum_im(c_im[l]), .dif_re(c_re[l+4]), .dif_im(c_im[l+4])
      );
    end
    if ((l & 2) == 0) begin : g_s8
      butterfly #(.W(W)) u_s8 (
        .a_re(d_re[l]), .a_im(d_im[l]), .b_re(d_re[l+2]), .b_im(d_im[l+2]),
        .sum_re(f_re[l]), .sum_im(f_im[l]), .dif_re(f_re[l+2]), .dif_im(f_im[l+2])
      );
    end
    if ((l & 1) == 0) begin : g_s9
      butterfly #(.W(W)) u_s9 (
        .a_re(g_re[l]), .a_im(g_im[l]), .b_re(g_re[l+1]), .b_im(g_im[l+1]),
        .sum_re(h_re[l]), .sum_im(h_im[l]), .dif_re(h_re[l+1]), .dif_im(h_im[l+1])
      );
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int l = 0; l < LANES; l++) begin
        out_re[l] <= '0;
        out_im[l] <= '0;
      end
    end else if (en) begin
      for (int l = 0; l < LANES; l++) begin
        out_re[l] <= h_re[l];
        out_im[l] <= h_im[l];
      end
    end
  end
endmodule
