// tb_uart_rx: drives 8N1 frames (10 clocks per bit) into the receiver with
// random bytes and random idle gaps, plus frames with a bad stop bit and a
// short low glitch. Checks the received bytes, that frame_err replaces
// valid for a bad stop bit, that a glitch produces nothing, and that valid
// arrives in the stop bit (between 9 and 10.5 bit times after the start).
module tb_uart_rx;
  localparam int DIV = 10;
  logic clk = 0, rst_n = 1, rxd = 1;
  logic [7:0] data;
  logic valid, frame_err;
  int checks = 0, failures = 0;
  int n_valid = 0, n_err = 0;
  byte got [$];
  int t_start, t_valid;

  uart_rx #(.CLK_HZ(1000), .BAUD(100)) dut (.clk, .rst_n, .rxd, .data, .valid, .frame_err);
  always #5 clk = ~clk;
  initial #0.5 rst_n = 0;   // asynchronous reset from the start

  initial begin
    #2_000_000; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  task automatic check(input bit cond, input string what);
    checks++; if (!cond) begin failures++; $display("FAIL: %s", what); end
  endtask

  int cyc = 0;
  always @(posedge clk) begin
    cyc++;
    if (valid) begin n_valid++; got.push_back(data); t_valid = cyc; end
    if (frame_err) n_err++;
  end

  task automatic send(input byte b, input bit stop);
    @(negedge clk); rxd = 0; t_start = cyc;
    repeat (DIV) @(negedge clk);
    for (int i = 0; i < 8; i++) begin rxd = b[i]; repeat (DIV) @(negedge clk); end
    rxd = stop; repeat (DIV) @(negedge clk);
    rxd = 1; repeat (DIV) @(negedge clk);
  endtask

  initial begin
    byte sent [$];
    repeat (3) @(negedge clk); rst_n = 1;
    repeat (20) @(negedge clk);
    for (int i = 0; i < 40; i++) begin
      byte b;
      b = byte'($urandom);
      sent.push_back(b);
      send(b, 1'b1);
      check(t_valid - t_start >= 9*DIV && t_valid - t_start <= 10*DIV + DIV/2 + 3,
            $sformatf("valid %0d clocks after start", t_valid - t_start));
      repeat ($urandom_range(0, 15)) @(negedge clk);
    end
    check(n_valid == 40 && got.size() == 40, $sformatf("%0d bytes", n_valid));
    for (int i = 0; i < 40 && i < got.size(); i++)
      check(got[i] == sent[i], $sformatf("byte %0d: %h vs %h", i, got[i], sent[i]));
    send(8'h5A, 1'b0);                                 // bad stop bit
    repeat (3*DIV) @(negedge clk);
    check(n_err == 1 && n_valid == 40, "frame error flagged, no byte");
    @(negedge clk); rxd = 0; repeat (2) @(negedge clk); rxd = 1;   // glitch
    repeat (15*DIV) @(negedge clk);
    check(n_valid == 40 && n_err == 1, "glitch ignored");
    send(8'hC3, 1'b1);
    check(n_valid == 41 && got[40] == 8'hC3, "receives after error and glitch");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
