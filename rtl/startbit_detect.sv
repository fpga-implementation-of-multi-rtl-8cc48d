// startbit_detect: burst and symbol synchronisation for the MCPFSK receiver.
//
// The transmitter is silent between bursts and every burst starts at
// oscillator phase zero, whose first sample has the full amplitude. While
// idle this block therefore compares |x| of each incoming sample with
// THRESH; the first sample that reaches it is taken as sample 0 of symbol 0
// of a burst. From there it counts SPS samples per symbol for FRAME_SYMS
// symbols and then returns to idle.
//
// Every sample inside a burst is passed on, one clock after sample_en, as
// s_valid/s_x with s_first on the first and s_last on the last sample of
// each symbol; frame_start pulses with the first sample of the burst.
// Samples outside a burst are not passed on. The document names a "startbit
// detection module for data synchronization" but not its method; the
// threshold onset detector is this design's choice.
module startbit_detect #(
  parameter int SPS        = 80,
  parameter int FRAME_SYMS = 22,
  parameter int SAMPLE_W   = 16,
  parameter int THRESH     = 4096
) (
  input  logic                       clk,
  input  logic                       rst_n,
  input  logic                       sample_en,
  input  logic signed [SAMPLE_W-1:0] x,
  output logic                       s_valid,
  output logic signed [SAMPLE_W-1:0] s_x,
  output logic                       s_first,
  output logic                       s_last,
  output logic                       frame_start,
  output logic                       busy
);
  localparam int NW = $clog2(SPS);
  localparam int SW = $clog2(FRAME_SYMS);

  logic [NW-1:0] samp;
  logic [SW-1:0] sym;
  logic [SAMPLE_W:0] mag;
  logic onset;

  assign mag   = x[SAMPLE_W-1] ? -(SAMPLE_W+1)'(x) : (SAMPLE_W+1)'(x);
  assign onset = !busy && (mag >= (SAMPLE_W+1)'(THRESH));

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      samp <= '0; sym <= '0; busy <= 1'b0;
      s_valid <= 1'b0; s_x <= '0; s_first <= 1'b0; s_last <= 1'b0; frame_start <= 1'b0;
    end else begin
      s_valid     <= 1'b0;
      s_first     <= 1'b0;
      s_last      <= 1'b0;
      frame_start <= 1'b0;
      if (sample_en) begin
        s_x <= x;
        if (onset) begin
          busy <= 1'b1; samp <= NW'(1); sym <= '0;
          s_valid <= 1'b1; s_first <= 1'b1; frame_start <= 1'b1;
        end else if (busy) begin
          s_valid <= 1'b1;
          s_first <= (samp == '0);
          if (samp == NW'(SPS-1)) begin
            s_last <= 1'b1;
            samp   <= '0;
            if (sym == SW'(FRAME_SYMS-1)) busy <= 1'b0;
            else sym <= sym + 1'b1;
          end else begin
            samp <= samp + 1'b1;
          end
        end
      end
    end
  end
endmodule
