// uart_tx: serial transmitter (8 data bits, no parity, 1 stop bit, LSB first).
//
// A byte is taken when valid and ready are both high; ready is high only
// while the transmitter is idle. The frame (start bit 0, eight data bits
// LSB first, stop bit 1) is shifted out with CLK_HZ/BAUD clocks per bit;
// txd idles high. The document only names a serial port ("serialop (UART)")
// for the host link; frame format and baud rate are this design's choice.
module uart_tx #(
  parameter int CLK_HZ = 25_000_000,
  parameter int BAUD   = 9600
) (
  input  logic       clk,
  input  logic       rst_n,
  input  logic [7:0] data,
  input  logic       valid,
  output logic       ready,
  output logic       txd
);
  localparam int DIV = CLK_HZ / BAUD;
  localparam int CW  = $clog2(DIV + 1);

  logic [CW-1:0] cnt;
  logic [3:0]    bits_left;   // bits still to send after the current one
  logic [8:0]    shreg;       // data bits then stop bit
  logic          busy;

  assign ready = !busy;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      busy <= 1'b0; txd <= 1'b1; cnt <= '0; bits_left <= '0; shreg <= '1;
    end else if (!busy) begin
      txd <= 1'b1;
      if (valid) begin
        busy      <= 1'b1;
        txd       <= 1'b0;                 // start bit
        shreg     <= {1'b1, data};
        bits_left <= 4'd9;
        cnt       <= CW'(DIV - 1);
      end
    end else if (cnt != '0) begin
      cnt <= cnt - 1'b1;
    end else if (bits_left != '0) begin
      txd       <= shreg[0];
      shreg     <= {1'b1, shreg[8:1]};
      bits_left <= bits_left - 1'b1;
      cnt       <= CW'(DIV - 1);
    end else begin
      busy <= 1'b0;                        // stop bit completed
    end
  end
endmodule
