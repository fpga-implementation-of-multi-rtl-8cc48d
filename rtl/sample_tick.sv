// sample_tick: divides the system clock down to the 8 kHz sample rate.
//
// A counter runs from 0 to CLK_HZ/FS_HZ-1 and tick is high for one clock
// each time it wraps, so tick is a one-cycle strobe every CLK_HZ/FS_HZ clocks.
// The 8 kHz rate is the document's; the system clock frequency is this
// design's choice (25 MHz, giving exactly 3125 clocks per sample).
module sample_tick #(
  parameter int CLK_HZ = 25_000_000,
  parameter int FS_HZ  = 8000
) (
  input  logic clk,
  input  logic rst_n,
  output logic tick
);
  localparam int DIV = CLK_HZ / FS_HZ;
  localparam int CW  = (DIV > 1) ? $clog2(DIV) : 1;

  logic [CW-1:0] cnt;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      cnt  <= '0;
      tick <= 1'b0;
    end else if (cnt == CW'(DIV-1)) begin
      cnt  <= '0;
      tick <= 1'b1;
    end else begin
      cnt  <= cnt + 1'b1;
      tick <= 1'b0;
    end
  end
endmodule
