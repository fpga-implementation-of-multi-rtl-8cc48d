// demod_deframer: receive frame controller of the MCPFSK demodulator.
//
// frame_start (from startbit_detect) resets the symbol count and the CRC.
// Each detected nibble (det_valid) is then, in frame order:
//   one of PRE_SYMS start nibbles, compared with the expected ones;
//   a data nibble, high nibble first; every second one completes a byte,
//     which is output (byte_valid) and fed to the CRC16;
//   one of the 4 nibbles of the received CRC16, high nibble first.
// With the last CRC nibble frame_done pulses; crc_ok and preamble_ok then
// hold the verdict for that frame until the next one completes. Bytes are
// passed on as they are decoded, whatever the verdict. The frame layout
// mirrors mod_framer and is this design's choice; the document states
// only that a CRC16 provides error detection.
module demod_deframer
  import mcpfsk_pkg::*;
#(
  parameter int FRAME_BYTES = 8
) (
  input  logic       clk,
  input  logic       rst_n,
  input  logic       frame_start,
  input  logic       det_valid,
  input  nibble_t    det_nibble,
  output logic       byte_valid,
  output logic [7:0] byte_data,
  output logic       frame_done,
  output logic       crc_ok,
  output logic       preamble_ok
);
  localparam int DATA_SYMS  = 2 * FRAME_BYTES;
  localparam int BURST_SYMS = PRE_SYMS + DATA_SYMS + CRC_SYMS;
  localparam int SW = $clog2(BURST_SYMS + 1);

  logic [SW-1:0] sym;
  nibble_t       hi;
  logic [15:0]   rx_crc, crc;
  logic          pre_ok_run;
  int unsigned   s;

  crc16 u_crc (.clk, .rst_n, .clear(frame_start), .en(byte_valid), .data(byte_data), .crc);

  assign s = int'(sym);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      sym <= SW'(BURST_SYMS); hi <= '0; rx_crc <= '0; pre_ok_run <= 1'b0;
      byte_valid <= 1'b0; byte_data <= '0; frame_done <= 1'b0; crc_ok <= 1'b0; preamble_ok <= 1'b0;
    end else begin
      byte_valid <= 1'b0;
      frame_done <= 1'b0;
      if (frame_start) begin
        sym        <= '0;
        pre_ok_run <= 1'b1;
      end else if (det_valid && s < BURST_SYMS) begin
        sym <= sym + 1'b1;
        if (s < PRE_SYMS) begin
          if (det_nibble != PRE_NIBBLES[s]) pre_ok_run <= 1'b0;
        end else if (s < PRE_SYMS + DATA_SYMS) begin
          if (((s - PRE_SYMS) % 2) == 0) hi <= det_nibble;
          else begin
            byte_data  <= {hi, det_nibble};
            byte_valid <= 1'b1;
          end
        end else begin
          rx_crc <= {rx_crc[11:0], det_nibble};
          if (s == BURST_SYMS - 1) begin
            frame_done  <= 1'b1;
            crc_ok      <= ({rx_crc[11:0], det_nibble} == crc);
            preamble_ok <= pre_ok_run;
          end
        end
      end
    end
  end
endmodule
