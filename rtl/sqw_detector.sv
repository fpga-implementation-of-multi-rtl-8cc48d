// sqw_detector: parallel multi-frequency square-wave detector (receiver).
//
// For every symbol the receiver estimates the spectrum of the input at the
// 16 tone frequencies and picks the largest. Each tone has its own
// sqw_lane, which correlates the samples with a complex square wave of that
// tone using only sign checks and complements, so no multiplier is needed.
// All 16 lanes run in parallel on every sample (as the document describes).
// After the last sample of a symbol one shared comparator scans the lanes
// in order, lane m per clock, keeping the largest magnitude seen so far
// (the running maximum of the document's detection loop). The magnitude is
// estimated as max(|I|,|Q|) + min(|I|,|Q|)/2, which needs no multiplier and
// is within 0..+12 % of |X| at any signal phase; the document's spectrum is
// |X|^2, and the choice of this estimate is this design's own.
//
// Timing: inputs as from startbit_detect (s_valid/s_first/s_last). The scan
// starts the clock after the last sample has been accumulated and takes
// N_TONES clocks; det_valid pulses with the winning tone index, its
// Gray-coded data nibble and its magnitude N_TONES+2 clocks after the
// s_valid of the last sample. No sample may arrive during the scan.
module sqw_detector
  import mcpfsk_pkg::*;
#(
  parameter int FS_HZ    = 8000,
  parameter int FC_HZ    = 1900,
  parameter int FDEV_HZ  = 100,
  parameter int SPS      = 80,
  parameter int SAMPLE_W = 16,
  parameter int ACC_W    = SAMPLE_W + $clog2(SPS) + 1
) (
  input  logic                       clk,
  input  logic                       rst_n,
  input  logic                       s_valid,
  input  logic signed [SAMPLE_W-1:0] s_x,
  input  logic                       s_first,
  input  logic                       s_last,
  output logic                       det_valid,
  output nibble_t                    det_tone,
  output nibble_t                    det_nibble,
  output logic [ACC_W:0]             det_mag
);
  logic signed [ACC_W-1:0] acc_i [N_TONES];
  logic signed [ACC_W-1:0] acc_q [N_TONES];

  for (genvar m = 0; m < N_TONES; m++) begin : g_lane
    sqw_lane #(
      .FS_HZ   (FS_HZ),
      .TONE_HZ (tone_hz(FC_HZ, FDEV_HZ, m)),
      .SAMPLE_W(SAMPLE_W),
      .ACC_W   (ACC_W)
    ) u_lane (
      .clk, .rst_n, .s_valid, .s_first, .s_x,
      .acc_i(acc_i[m]), .acc_q(acc_q[m])
    );
  end

  // Shared magnitude unit and comparator.
  logic          scanning, start_scan;
  nibble_t       idx, best_idx;
  logic [ACC_W:0] best, mag;
  logic signed [ACC_W-1:0] si, sq;

  logic [ACC_W:0] ai, aq, mx, mn;
  always_comb begin
    si  = acc_i[idx];
    sq  = acc_q[idx];
    ai  = (ACC_W+1)'(si[ACC_W-1] ? -si : si);
    aq  = (ACC_W+1)'(sq[ACC_W-1] ? -sq : sq);
    mx  = (ai > aq) ? ai : aq;
    mn  = (ai > aq) ? aq : ai;
    mag = mx + (mn >> 1);          // |X| estimate, 0 .. +11.8 % error
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      start_scan <= 1'b0; scanning <= 1'b0; idx <= '0; best_idx <= '0; best <= '0;
      det_valid <= 1'b0; det_tone <= '0; det_nibble <= '0; det_mag <= '0;
    end else begin
      start_scan <= s_valid && s_last;
      det_valid  <= 1'b0;
      if (start_scan) begin
        scanning <= 1'b1;
        idx      <= '0;
      end else if (scanning) begin
        if (idx == '0 || mag > best) begin
          best     <= mag;
          best_idx <= idx;
        end
        if (idx == nibble_t'(N_TONES-1)) begin
          scanning   <= 1'b0;
          det_valid  <= 1'b1;
          det_tone   <= (mag > best) ? idx : best_idx;
          det_nibble <= bin2gray((mag > best) ? idx : best_idx);
          det_mag    <= (mag > best) ? mag : best;
        end
        idx <= idx + 1'b1;
      end
    end
  end

  assert property (@(posedge clk) disable iff (!rst_n) (scanning || start_scan) |-> !s_valid)
    else $error("sqw_detector: sample arrived during the scan");
endmodule
