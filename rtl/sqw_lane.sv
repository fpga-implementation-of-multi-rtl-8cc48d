// sqw_lane: one square-wave correlator of the MCPFSK detector.
//
// The lane correlates the input with the complex square wave of frequency
// TONE_HZ: real part +1 for |t| <= T/4 and -1 for T/4 < |t| <= T/2, imaginary
// part +1 for 0 <= t <= T/2 and -1 for the other half period. A phase
// accumulator (modulo FS_HZ, stepping TONE_HZ per sample) gives the position
// in the period; multiplying by +/-1 is just a sign check that chooses
// between adding the sample and adding its complement. The square wave is
// read half a phase step ahead of the sample instant (the accumulator
// starts each symbol at TONE_HZ/2, not 0), which makes its sampled sign
// pattern symmetric; without it, lanes near fs/4 respond unevenly and
// tones 50 Hz apart (h = 1/2) can be confused. This offset is this
// design's own choice. acc_i and acc_q restart with the first sample of a
// symbol and hold the symbol's correlation once its last sample is in. Inputs are used on the
// clock where s_valid is high; results appear the clock after.
module sqw_lane #(
  parameter int FS_HZ    = 8000,
  parameter int TONE_HZ  = 1900,
  parameter int SAMPLE_W = 16,
  parameter int ACC_W    = 24
) (
  input  logic                       clk,
  input  logic                       rst_n,
  input  logic                       s_valid,
  input  logic                       s_first,
  input  logic signed [SAMPLE_W-1:0] s_x,
  output logic signed [ACC_W-1:0]    acc_i,
  output logic signed [ACC_W-1:0]    acc_q
);
  localparam int PW = $clog2(FS_HZ) + 1;

  logic [PW-1:0] phase, ph_now, ph_next;
  logic          re_pos, im_pos;
  logic signed [ACC_W-1:0] xe, add_i, add_q, base_i, base_q;

  assign ph_now  = s_first ? PW'(TONE_HZ/2) : phase;   // half a step in
  assign re_pos  = (ph_now < PW'(FS_HZ/4)) || (ph_now >= PW'(3*FS_HZ/4));
  assign im_pos  = (ph_now < PW'(FS_HZ/2));
  assign ph_next = (ph_now + PW'(TONE_HZ) >= PW'(FS_HZ)) ? ph_now + PW'(TONE_HZ) - PW'(FS_HZ)
                                                         : ph_now + PW'(TONE_HZ);
  assign xe      = ACC_W'(s_x);
  assign add_i   = re_pos ? xe : -xe;
  assign add_q   = im_pos ? xe : -xe;
  assign base_i  = s_first ? '0 : acc_i;
  assign base_q  = s_first ? '0 : acc_q;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      phase <= '0; acc_i <= '0; acc_q <= '0;
    end else if (s_valid) begin
      phase <= ph_next;
      acc_i <= base_i + add_i;
      acc_q <= base_q + add_q;
    end
  end
endmodule
