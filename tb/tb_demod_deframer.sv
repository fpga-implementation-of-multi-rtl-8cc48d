// tb_demod_deframer: feeds nibble streams as the detector would deliver
// them: a correct frame (bytes and crc_ok/preamble_ok must come out), a
// frame with one data nibble changed (crc_ok = 0), a frame with a wrong
// start symbol (preamble_ok = 0) and another correct frame. Reference
// bursts come from an independent CRC and Gray model.
module tb_demod_deframer;
  import tb_ref_pkg::*;
  localparam int FB = 8;
  logic clk = 0, rst_n = 1, frame_start = 0, det_valid = 0;
  logic [3:0] det_nibble = '0;
  logic byte_valid, frame_done, crc_ok, preamble_ok;
  logic [7:0] byte_data;
  int checks = 0, failures = 0;
  byte outb [$];
  int dones = 0;

  demod_deframer #(.FRAME_BYTES(FB)) dut (.clk, .rst_n, .frame_start, .det_valid, .det_nibble,
    .byte_valid, .byte_data, .frame_done, .crc_ok, .preamble_ok);
  always #5 clk = ~clk;
  initial #0.5 rst_n = 0;   // asynchronous reset from the start

  initial begin
    #2_000_000; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  task automatic check(input bit cond, input string what);
    checks++; if (!cond) begin failures++; $display("FAIL: %s", what); end
  endtask

  always @(posedge clk) begin
    if (byte_valid) outb.push_back(byte_data);
    if (frame_done) dones++;
  end

  task automatic run_frame(input int corrupt_at, input bit exp_crc, input bit exp_pre);
    byte d [];
    int t [];
    d = new[FB];
    foreach (d[i]) d[i] = byte'($urandom);
    burst_tones(d, t);
    outb.delete();
    @(negedge clk); frame_start = 1; @(negedge clk); frame_start = 0;
    foreach (t[i]) begin
      logic [3:0] nib;
      nib = GRAY[t[i]];
      if (i == corrupt_at) nib = nib ^ 4'b0100;
      repeat ($urandom_range(0, 3)) @(negedge clk);
      det_nibble = nib; det_valid = 1; @(negedge clk); det_valid = 0;
    end
    repeat (3) @(negedge clk);
    check(outb.size() == FB, $sformatf("%0d bytes", outb.size()));
    for (int i = 0; i < FB && i < outb.size(); i++)
      if (corrupt_at < 2 || corrupt_at >= 2 + 2*FB || (corrupt_at - 2) / 2 != i)
        check(outb[i] == d[i], $sformatf("byte %0d: %h vs %h", i, outb[i], d[i]));
    check(crc_ok == exp_crc, $sformatf("crc_ok %0d", crc_ok));
    check(preamble_ok == exp_pre, $sformatf("preamble_ok %0d", preamble_ok));
  endtask

  initial begin
    repeat (3) @(negedge clk); rst_n = 1;
    run_frame(-1, 1, 1);
    run_frame(7, 0, 1);
    run_frame(1, 1, 0);
    run_frame(-1, 1, 1);
    run_frame(2 + 2*FB + 2, 0, 1);          // a CRC nibble changed
    check(dones == 5, $sformatf("%0d frame_done pulses", dones));
    // Stray nibbles after the frame must not produce bytes.
    outb.delete();
    repeat (4) begin @(negedge clk); det_valid = 1; @(negedge clk); det_valid = 0; end
    check(outb.size() == 0 && dones == 5, "ignores symbols outside a frame");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
