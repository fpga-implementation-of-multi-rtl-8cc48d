// mcpfsk_modulator: the transmit half of the MCPFSK modem.
//
// Bytes arrive from the host on a UART (uart_rx) and wait in a 16-byte
// buffer (byte_fifo). When a frame's worth is there, mod_framer sends a
// burst: start symbols, the data as Gray-mapped nibbles, and the CRC16 of
// the data, one 4-bit symbol per 10 ms (80 samples at 8 kHz). For every
// sample inside the burst cpfsk_gen computes the continuous-phase
// sample of the symbol's tone on its single multiplier. Between bursts
// the output is 0.
//
// Timing: sample_en is the 8 kHz strobe. tx_sample is updated, with a
// one-clock tx_valid pulse, 4 clocks after sample_en (1 clock in the
// framer, 3 in the generator) or 2 clocks after it when silent.
// The composition follows the document's modulator (CPFSK generator, CRC,
// serial port); buffering and framing are this design's choices.
module mcpfsk_modulator
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
  parameter int SAMPLE_W    = 16
) (
  input  logic                       clk,
  input  logic                       rst_n,
  input  logic                       sample_en,
  input  logic                       uart_rxd,
  output logic signed [SAMPLE_W-1:0] tx_sample,
  output logic                       tx_valid,
  output logic                       tx_active
);
  localparam int SPS = FS_HZ / BAUD_SYM;

  logic [7:0] rx_byte, buf_data;
  logic       rx_valid, rx_err, buf_pop, buf_full, buf_empty;
  logic [$clog2(BUF_DEPTH):0] buf_count;
  logic       out_tick, restart, active;
  nibble_t    tone;
  logic signed [SAMPLE_W-1:0] gen_sample;
  logic       gen_valid, gen_busy;

  uart_rx #(.CLK_HZ(CLK_HZ), .BAUD(UART_BAUD)) u_uart (
    .clk, .rst_n, .rxd(uart_rxd), .data(rx_byte), .valid(rx_valid), .frame_err(rx_err));

  byte_fifo #(.DEPTH(BUF_DEPTH), .W(8)) u_buf (
    .clk, .rst_n, .push(rx_valid), .din(rx_byte), .pop(buf_pop), .dout(buf_data),
    .count(buf_count), .full(buf_full), .empty(buf_empty));

  mod_framer #(.SPS(SPS), .FRAME_BYTES(FRAME_BYTES), .BUF_DEPTH(BUF_DEPTH)) u_framer (
    .clk, .rst_n, .sample_en, .buf_count, .buf_data, .buf_pop,
    .out_tick, .restart, .tone, .active);

  cpfsk_gen #(.FS_HZ(FS_HZ), .FC_HZ(FC_HZ), .FDEV_HZ(FDEV_HZ), .SAMPLE_W(SAMPLE_W)) u_gen (
    .clk, .rst_n, .restart, .sample_en(out_tick && active), .tone,
    .sample(gen_sample), .sample_valid(gen_valid), .busy(gen_busy));

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      tx_sample <= '0; tx_valid <= 1'b0; tx_active <= 1'b0;
    end else begin
      tx_valid <= 1'b0;
      if (out_tick) tx_active <= active;
      if (gen_valid) begin
        tx_sample <= gen_sample; tx_valid <= 1'b1;
      end else if (out_tick && !active) begin
        tx_sample <= '0; tx_valid <= 1'b1;
      end
    end
  end

  // A UART framing error or a byte arriving at a full buffer loses data.
  assert property (@(posedge clk) disable iff (!rst_n) !(rx_valid && buf_full))
    else $warning("mcpfsk_modulator: byte dropped, buffer full");
  assert property (@(posedge clk) disable iff (!rst_n) !(out_tick && active && gen_busy))
    else $error("mcpfsk_modulator: generator still busy at the next sample");
endmodule
