// tb_crc16: checks the CRC-16 engine against the published check value of
// CRC-16/CCITT-FALSE ("123456789" -> 0x29B1) and against a bit-serial
// reference on random messages, including clear in the middle of a stream
// and en held low (the register must hold).
module tb_crc16;
  import tb_ref_pkg::*;
  logic clk = 0, rst_n = 1, clear = 0, en = 0;
  logic [7:0] data = '0;
  logic [15:0] crc;
  int checks = 0, failures = 0;

  crc16 dut (.clk, .rst_n, .clear, .en, .data, .crc);
  always #5 clk = ~clk;
  initial #0.5 rst_n = 0;   // asynchronous reset from the start

  initial begin
    #1_000_000; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  task automatic check(input bit cond, input string what);
    checks++; if (!cond) begin failures++; $display("FAIL: %s", what); end
  endtask

  task automatic feed(input byte b);
    @(negedge clk); data = b; en = 1; @(negedge clk); en = 0;
  endtask

  initial begin
    string s;
    logic [15:0] ref_c;
    repeat (2) @(negedge clk); rst_n = 1;
    @(negedge clk); clear = 1; @(negedge clk); clear = 0;
    check(crc == 16'hFFFF, "init value");
    s = "123456789";
    for (int i = 0; i < s.len(); i++) feed(s[i]);
    check(crc == 16'h29B1, $sformatf("check value %h", crc));
    repeat (3) @(negedge clk);
    check(crc == 16'h29B1, "holds without en");
    for (int m = 0; m < 50; m++) begin
      int len;
      @(negedge clk); clear = 1; @(negedge clk); clear = 0;
      ref_c = 16'hFFFF;
      len = $urandom_range(1, 20);
      for (int i = 0; i < len; i++) begin
        byte b;
        b = byte'($urandom);
        ref_c = crc_bits(ref_c, b);
        feed(b);
        check(crc == ref_c, $sformatf("msg %0d byte %0d: %h vs %h", m, i, crc, ref_c));
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
