// mcpfsk_demodulator: the receive half of the MCPFSK modem.
//
// startbit_detect finds the first sample of a burst and marks symbol
// boundaries; sqw_detector correlates each symbol with the complex square
// waves of the 16 tones and names the strongest; demod_deframer turns the
// Gray-coded nibbles back into bytes and checks the start symbols and the
// CRC16; the bytes wait in a 16-byte buffer for the UART transmitter.
//
// Timing: rx_sample is read on the 8 kHz sample_en strobe. A symbol's
// nibble is known N_TONES+3 clocks after its last sample; frame_done pulses
// with the last CRC symbol, and crc_ok / preamble_ok then hold the verdict
// on that frame. The composition follows the document's demodulator (start
// bit detection, square wave detection, CRC, serial port); the buffering
// and framing are this design's choices.
module mcpfsk_demodulator
  import mcpfsk_pkg::*;
#(
  parameter int CLK_HZ      = 25_000_000,
  parameter int FS_HZ       = 8000,
  parameter int FC_HZ       = 1900,
  parameter int FDEV_HZ     = 100,
  parameter int BAUD_SYM    = 100,
  parameter int UART_BAUD   = 9600,
  parameter int FRAME_BYTES = 8,
  parameter int BUF_DEPTH   = 16,
  parameter int SAMPLE_W    = 16,
  parameter int THRESH      = 4096
) (
  input  logic                       clk,
  input  logic                       rst_n,
  input  logic                       sample_en,
  input  logic signed [SAMPLE_W-1:0] rx_sample,
  output logic                       uart_txd,
  output logic                       busy,
  output logic                       frame_done,
  output logic                       crc_ok,
  output logic                       preamble_ok
);
  localparam int SPS        = FS_HZ / BAUD_SYM;
  localparam int FRAME_SYMS = PRE_SYMS + 2 * FRAME_BYTES + CRC_SYMS;
  localparam int ACC_W      = SAMPLE_W + $clog2(SPS) + 1;

  logic s_valid, s_first, s_last, frame_start;
  logic signed [SAMPLE_W-1:0] s_x;
  logic det_valid;
  nibble_t det_tone, det_nibble;
  logic [ACC_W:0] det_mag;
  logic byte_valid;
  logic [7:0] byte_data, tx_data;
  logic tx_ready, buf_full, buf_empty;
  logic [$clog2(BUF_DEPTH):0] buf_count;

  startbit_detect #(.SPS(SPS), .FRAME_SYMS(FRAME_SYMS), .SAMPLE_W(SAMPLE_W), .THRESH(THRESH)) u_sync (
    .clk, .rst_n, .sample_en, .x(rx_sample), .s_valid, .s_x, .s_first, .s_last, .frame_start, .busy);

  sqw_detector #(.FS_HZ(FS_HZ), .FC_HZ(FC_HZ), .FDEV_HZ(FDEV_HZ), .SPS(SPS), .SAMPLE_W(SAMPLE_W)) u_det (
    .clk, .rst_n, .s_valid, .s_x, .s_first, .s_last, .det_valid, .det_tone, .det_nibble, .det_mag);

  demod_deframer #(.FRAME_BYTES(FRAME_BYTES)) u_deframe (
    .clk, .rst_n, .frame_start, .det_valid, .det_nibble,
    .byte_valid, .byte_data, .frame_done, .crc_ok, .preamble_ok);

  byte_fifo #(.DEPTH(BUF_DEPTH), .W(8)) u_buf (
    .clk, .rst_n, .push(byte_valid), .din(byte_data), .pop(tx_ready && !buf_empty), .dout(tx_data),
    .count(buf_count), .full(buf_full), .empty(buf_empty));

  uart_tx #(.CLK_HZ(CLK_HZ), .BAUD(UART_BAUD)) u_uart (
    .clk, .rst_n, .data(tx_data), .valid(!buf_empty), .ready(tx_ready), .txd(uart_txd));
endmodule
