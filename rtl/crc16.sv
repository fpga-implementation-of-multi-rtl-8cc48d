// crc16: byte-wise CRC-16 engine for frame error detection.
//
// The register is loaded with INIT on clear and absorbs one byte, MSB first,
// per clock while en is high (the eight shift-and-xor steps of the
// polynomial division are unrolled into one combinational stage). crc
// shows the register, updated one clock after en. The document names a
// CRC16 at both ends of the link but not its polynomial; this design uses
// the CCITT polynomial x^16 + x^12 + x^5 + 1 with all-ones start value.
module crc16 #(
  parameter logic [15:0] POLY = 16'h1021,
  parameter logic [15:0] INIT = 16'hFFFF
) (
  input  logic        clk,
  input  logic        rst_n,
  input  logic        clear,
  input  logic        en,
  input  logic [7:0]  data,
  output logic [15:0] crc
);
  function automatic logic [15:0] next_crc(input logic [15:0] c, input logic [7:0] d);
    logic [15:0] r;
    r = c ^ {d, 8'h00};
    for (int i = 0; i < 8; i++) r = r[15] ? ((r << 1) ^ POLY) : (r << 1);
    return r;
  endfunction

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)     crc <= INIT;
    else if (clear) crc <= INIT;
    else if (en)    crc <= next_crc(crc, data);
  end
endmodule
