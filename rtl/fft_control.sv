// fft_control: control unit of the 512-point, eight-lane FFT pipeline.
//
// The whole pipeline advances on the beats where en (input valid) is high,
// so one modulo-64 beat counter is enough to sequence it: every stage sees
// the same frame, delayed by a fixed number of beats (fft_pkg::stage_offset).
// For each delay-feedback stage s = 1..6 and for the cross-lane network
// (index 6) the unit outputs pos[s-1], the in-frame beat index of the sample
// now at that stage's input. The PEs take their FIFO/butterfly phase and the
// twiddle units their exponents from these indices.
//
// A fill counter, saturating at the pipeline latency, tells when the first
// frame has reached the output. out_valid, out_pos (beat index of the output
// word, 0..63) and out_first (beat 0 of an output frame) are registered, in
// step with the output register of the cross-lane network. Counters reset
// to zero on rst_n (asynchronous, active low).
//
// FFT/IFFT mode: inverse is sampled on the first beat of every input frame.
// inv_in gives the mode of the frame now entering (valid on the same beat),
// inv_out the mode of the frame now in the output register. Because the
// latency (69 beats to the network input) lies between one and two frames,
// the frame reaching the network input at its beat 0 is always the one
// before the frame entering, whose mode is held in m_prev.
//
// The original architecture only names a control unit; this counter-based
// scheme, the stall behaviour and the mode tracking are this design's own.
module fft_control
  import fft_pkg::*;
(
  input  logic             clk,
  input  logic             rst_n,
  input  logic             en,
  input  logic             inverse,
  output logic [POS_W-1:0] pos [7],
  output logic             inv_in,
  output logic             inv_out,
  output logic             out_valid,
  output logic [POS_W-1:0] out_pos,
  output logic             out_first
);
  localparam int unsigned LAT = stage_offset(6);  // beats from input to network input
  localparam int unsigned FW  = $clog2(LAT + 1);

  logic [POS_W-1:0] cnt;
  logic [FW-1:0]    fill;
  logic             primed;

  logic             m_cur, m_prev;

  assign primed = (fill == FW'(LAT));
  assign inv_in = (pos[0] == '0) ? inverse : m_cur;

  always_comb begin
    for (int s = 0; s < 7; s++) pos[s] = cnt - POS_W'(stage_offset(s));
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      cnt       <= '0;
      fill      <= '0;
      out_valid <= 1'b0;
      out_pos   <= '0;
      out_first <= 1'b0;
      m_cur     <= 1'b0;
      m_prev    <= 1'b0;
      inv_out   <= 1'b0;
    end else begin
      out_valid <= en && primed;
      out_first <= en && primed && (pos[6] == '0);
      if (en) begin
        cnt     <= cnt + POS_W'(1);
        out_pos <= pos[6];
        if (!primed) fill <= fill + FW'(1);
        if (pos[0] == '0) begin
          m_cur  <= inverse;
          m_prev <= m_cur;
        end
        if (pos[6] == '0) inv_out <= m_prev;
      end
    end
  end
  // the m_prev hand-over assumes a latency of one to two frames
  initial assert (LAT > BEATS && LAT < 2 * BEATS)
    else $error("fft_control: pipeline latency %0d outside (%0d, %0d)", LAT, BEATS, 2 * BEATS);
endmodule
