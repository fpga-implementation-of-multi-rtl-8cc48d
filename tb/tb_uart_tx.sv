// tb_uart_tx: offers random bytes to the transmitter with random delays,
// samples txd in the middle of every bit (10 clocks per bit) and checks
// start bit, data bits LSB first and stop bit, that ready drops while a
// frame is sent, and that a frame lasts exactly 10 bit times.
module tb_uart_tx;
  localparam int DIV = 10;
  logic clk = 0, rst_n = 1, valid = 0;
  logic [7:0] data = '0;
  logic ready, txd;
  int checks = 0, failures = 0;

  uart_tx #(.CLK_HZ(1000), .BAUD(100)) dut (.clk, .rst_n, .data, .valid, .ready, .txd);
  always #5 clk = ~clk;
  initial #0.5 rst_n = 0;   // asynchronous reset from the start

  initial begin
    #2_000_000; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  task automatic check(input bit cond, input string what);
    checks++; if (!cond) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin
    repeat (3) @(negedge clk); rst_n = 1;
    repeat (5) @(negedge clk);
    check(txd == 1'b1 && ready == 1'b1, "idle line high, ready");
    for (int i = 0; i < 30; i++) begin
      byte b;
      int len;
      b = byte'($urandom);
      while (!ready) @(negedge clk);
      data = b; valid = 1;
      @(negedge clk);                 // accepted at this edge
      valid = 0; data = 8'hxx;
      // txd went low at the accepting edge; bit k centre is DIV/2 + k*DIV later.
      repeat (DIV/2 - 1) @(negedge clk);
      check(txd == 1'b0, "start bit");
      check(!ready, "ready low while sending");
      for (int k = 0; k < 8; k++) begin
        repeat (DIV) @(negedge clk);
        check(txd == b[k], $sformatf("byte %0d bit %0d", i, k));
      end
      repeat (DIV) @(negedge clk);
      check(txd == 1'b1, "stop bit");
      len = DIV/2 + 9*DIV;
      while (!ready) begin @(negedge clk); len++; end
      check(len == 10*DIV + 1, $sformatf("frame length %0d clocks", len));
      repeat ($urandom_range(0, 12)) @(negedge clk);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
