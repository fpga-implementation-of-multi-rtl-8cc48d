// mod_framer: transmit frame controller of the MCPFSK modulator.
//
// When the byte buffer holds FRAME_BYTES bytes, a burst starts on the next
// sample strobe. A burst is a sequence of symbols of SPS samples each
// (80 = 8000 Hz x 10 ms):
//   PRE_SYMS start symbols (fixed nibbles, for the receiver to check),
//   2*FRAME_BYTES data symbols, high nibble of each byte first,
//   4 symbols carrying the CRC16 of the data bytes, high nibble first,
//   GAP_SYMS silent symbols, so the receiver sees the line go quiet.
// Each nibble is mapped to its tone index through the inverse Gray code, so
// neighbouring tones carry nibbles that differ in one bit (as the document
// prescribes). A data byte is popped from the buffer, and fed to the CRC,
// at the first sample of its high-nibble symbol.
//
// Timing: every sample_en produces, one clock later, a one-clock out_tick
// with the tone index, active (1 inside the burst proper, 0 in the gap and
// while idle) and restart (first sample of a burst) for that sample.
// The 4-bit symbol, 10 ms symbol and Gray mapping follow the document; the
// frame layout, start nibbles and gap are this design's choices.
module mod_framer
  import mcpfsk_pkg::*;
#(
  parameter int SPS         = 80,
  parameter int FRAME_BYTES = 8,
  parameter int GAP_SYMS    = 2,
  parameter int BUF_DEPTH   = 16
) (
  input  logic                         clk,
  input  logic                         rst_n,
  input  logic                         sample_en,
  input  logic [$clog2(BUF_DEPTH):0]   buf_count,
  input  logic [7:0]                   buf_data,
  output logic                         buf_pop,
  output logic                         out_tick,
  output logic                         restart,
  output nibble_t                      tone,
  output logic                         active
);
  localparam int DATA_SYMS  = 2 * FRAME_BYTES;
  localparam int BURST_SYMS = PRE_SYMS + DATA_SYMS + CRC_SYMS;
  localparam int ALL_SYMS   = BURST_SYMS + GAP_SYMS;
  localparam int SW = $clog2(ALL_SYMS + 1);
  localparam int NW = $clog2(SPS);

  logic          busy;
  logic [SW-1:0] sym;
  logic [NW-1:0] samp;
  nibble_t       cur_lo;     // low nibble of the byte being sent
  logic [15:0]   crc;
  logic          crc_clear, crc_en;

  crc16 u_crc (.clk, .rst_n, .clear(crc_clear), .en(crc_en), .data(buf_data), .crc);

  // What symbol `s` sends, given the current buffer head and CRC.
  int unsigned   s_next;
  logic          start_now, sym_wrap, first_of_sym, ending;
  logic [SW-1:0] sym_n;

  // A new burst may start on the sample right after the last gap sample.
  assign sym_wrap     = busy && (samp == NW'(SPS-1));
  assign ending       = sym_wrap && (int'(sym) == ALL_SYMS - 1);
  assign start_now    = sample_en && (!busy || ending) &&
                        (buf_count >= ($clog2(BUF_DEPTH)+1)'(FRAME_BYTES));
  assign sym_n        = start_now ? '0 : (sym_wrap ? sym + 1'b1 : sym);
  assign first_of_sym = start_now || (sample_en && sym_wrap);

  // Data byte j of the frame is taken from the buffer at its high nibble.
  logic is_data, is_crc, is_high;
  int unsigned j, c;
  always_comb begin
    s_next  = int'(sym_n);
    is_data = (s_next >= PRE_SYMS) && (s_next < PRE_SYMS + DATA_SYMS);
    is_crc  = (s_next >= PRE_SYMS + DATA_SYMS) && (s_next < BURST_SYMS);
    j       = s_next - PRE_SYMS;
    c       = s_next - PRE_SYMS - DATA_SYMS;
    is_high = is_data && (j[0] == 1'b0);
  end

  assign buf_pop   = first_of_sym && is_high;
  assign crc_en    = buf_pop;
  assign crc_clear = start_now;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      busy <= 1'b0; sym <= '0; samp <= '0; cur_lo <= '0;
      out_tick <= 1'b0; restart <= 1'b0; tone <= '0; active <= 1'b0;
    end else begin
      out_tick <= sample_en;
      restart  <= start_now;
      if (sample_en) begin
        if (start_now) begin
          busy <= 1'b1; sym <= '0; samp <= '0;
          active <= 1'b1;
          tone <= gray2bin(PRE_NIBBLES[0]);
        end else if (busy) begin
          samp <= sym_wrap ? '0 : samp + 1'b1;
          if (sym_wrap) begin
            sym <= sym_n;
            if (s_next >= ALL_SYMS) begin
              busy <= 1'b0; active <= 1'b0;
            end else if (s_next < PRE_SYMS) begin
              tone <= gray2bin(PRE_NIBBLES[s_next]);
            end else if (is_data) begin
              if (is_high) begin
                cur_lo   <= buf_data[3:0];
                tone     <= gray2bin(buf_data[7:4]);
              end else begin
                tone     <= gray2bin(cur_lo);
              end
            end else if (is_crc) begin
              tone <= gray2bin(nibble_t'(crc >> (4 * (CRC_SYMS - 1 - c))));
            end else begin
              active <= 1'b0;                              // gap
            end
          end
        end else begin
          active <= 1'b0;
        end
      end
    end
  end
endmodule
