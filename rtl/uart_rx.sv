// uart_rx: serial receiver (8 data bits, no parity, 1 stop bit, LSB first).
//
// rxd is synchronised through two flops. A falling edge starts a frame; the
// line is sampled again half a bit later to confirm the start bit, then once
// per bit period (CLK_HZ/BAUD clocks) in the middle of each data bit and of
// the stop bit. valid pulses for one clock with the byte after the stop bit
// is sampled; frame_err pulses instead if the stop bit reads 0. The
// document only names a serial port ("serialop (UART)") for the host link;
// frame format and baud rate are this design's choice.
module uart_rx #(
  parameter int CLK_HZ = 25_000_000,
  parameter int BAUD   = 9600
) (
  input  logic       clk,
  input  logic       rst_n,
  input  logic       rxd,
  output logic [7:0] data,
  output logic       valid,
  output logic       frame_err
);
  localparam int DIV = CLK_HZ / BAUD;
  localparam int CW  = $clog2(DIV + 1);

  typedef enum logic [1:0] {IDLE, START, DATA, STOP} state_t;
  state_t        state;
  logic [CW-1:0] cnt;
  logic [2:0]    bitn;
  logic [7:0]    shreg;
  logic [1:0]    sync;
  logic          rx;

  assign rx = sync[1];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      sync <= 2'b11;
      state <= IDLE; cnt <= '0; bitn <= '0; shreg <= '0;
      data <= '0; valid <= 1'b0; frame_err <= 1'b0;
    end else begin
      sync      <= {sync[0], rxd};
      valid     <= 1'b0;
      frame_err <= 1'b0;
      unique case (state)
        IDLE: if (!rx) begin state <= START; cnt <= CW'(DIV/2 - 1); end
        START:
          if (cnt == '0) begin
            if (!rx) begin state <= DATA; cnt <= CW'(DIV - 1); bitn <= '0; end
            else state <= IDLE;                       // glitch, not a start bit
          end else cnt <= cnt - 1'b1;
        DATA:
          if (cnt == '0) begin
            shreg <= {rx, shreg[7:1]};
            cnt   <= CW'(DIV - 1);
            if (bitn == 3'd7) state <= STOP;
            bitn <= bitn + 1'b1;
          end else cnt <= cnt - 1'b1;
        STOP:
          if (cnt == '0) begin
            state <= IDLE;
            if (rx) begin data <= shreg; valid <= 1'b1; end
            else frame_err <= 1'b1;
          end else cnt <= cnt - 1'b1;
        default: state <= IDLE;
      endcase
    end
  end
endmodule
