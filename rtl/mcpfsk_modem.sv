// mcpfsk_modem: complete MCPFSK modem, transmitter and receiver on one chip.
//
// Data bytes from the host (uart_rxd) are sent as bursts of 16-tone
// continuous-phase FSK: 4 bits per 10 ms symbol, tones 400..3400 Hz spaced
// 200 Hz around a 1900 Hz carrier, 8 kHz samples on dac_sample. Samples from
// the channel (adc_sample) are demodulated by a multiplierless square-wave
// detector and the recovered bytes leave on uart_txd; frame_done, crc_ok
// and preamble_ok report each received frame. A single sample_tick
// generator paces both halves; adc_sample is read on that strobe, and
// dac_sample changes a few clocks after it. The two halves are independent:
// to test the modem on its own, feed dac_sample back into adc_sample.
// System clock (25 MHz) and UART rate (9600 baud) are this design's choices.
module mcpfsk_modem #(
  parameter int CLK_HZ      = 25_000_000,
  parameter int FS_HZ       = 8000,
  parameter int FC_HZ       = 1900,
  parameter int FDEV_HZ     = 100,
  parameter int BAUD_SYM    = 100,
  parameter int UART_BAUD   = 9600,
  parameter int FRAME_BYTES = 8,
  parameter int THRESH      = 4096
) (
  input  logic               clk,
  input  logic               rst_n,
  input  logic               uart_rxd,
  output logic               uart_txd,
  output logic               sample_tick,
  output logic signed [15:0] dac_sample,
  output logic               tx_active,
  input  logic signed [15:0] adc_sample,
  output logic               rx_busy,
  output logic               frame_done,
  output logic               crc_ok,
  output logic               preamble_ok
);
  logic tx_valid;

  sample_tick #(.CLK_HZ(CLK_HZ), .FS_HZ(FS_HZ)) u_tick (.clk, .rst_n, .tick(sample_tick));

  mcpfsk_modulator #(
    .CLK_HZ(CLK_HZ), .FS_HZ(FS_HZ), .FC_HZ(FC_HZ), .FDEV_HZ(FDEV_HZ), .BAUD_SYM(BAUD_SYM),
    .UART_BAUD(UART_BAUD), .FRAME_BYTES(FRAME_BYTES)
  ) u_mod (
    .clk, .rst_n, .sample_en(sample_tick), .uart_rxd,
    .tx_sample(dac_sample), .tx_valid, .tx_active);

  mcpfsk_demodulator #(
    .CLK_HZ(CLK_HZ), .FS_HZ(FS_HZ), .FC_HZ(FC_HZ), .FDEV_HZ(FDEV_HZ), .BAUD_SYM(BAUD_SYM),
    .UART_BAUD(UART_BAUD), .FRAME_BYTES(FRAME_BYTES), .THRESH(THRESH)
  ) u_demod (
    .clk, .rst_n, .sample_en(sample_tick), .rx_sample(adc_sample), .uart_txd,
    .busy(rx_busy), .frame_done, .crc_ok, .preamble_ok);
endmodule
