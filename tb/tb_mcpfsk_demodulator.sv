// tb_mcpfsk_demodulator: the receiver from samples to UART output, at the
// document's signal parameters with a 256 kHz clock (32 clocks per sample)
// and 10 clocks per UART bit. The testbench synthesises continuous-phase
// bursts from the reference tone sequence (independent floating-point
// model), preceded by silence and low noise: a clean frame, a noisy frame,
// and a frame with one data symbol replaced by another tone. Checks the
// bytes on the UART, crc_ok and preamble_ok per frame, and that the
// synchroniser passes exactly one burst of 22 symbols to the detector.
module tb_mcpfsk_demodulator;
  import tb_ref_pkg::*;
  localparam int CLKS = 32, FS = 8000, SPS = 80, FB = 8, DIV = 10;
  localparam real PI = 3.14159265358979323846;
  logic clk = 0, rst_n = 1, sample_en = 0, uart_txd;
  logic signed [15:0] rx_sample = '0;
  logic busy, frame_done, crc_ok, preamble_ok;
  int checks = 0, failures = 0;

  mcpfsk_demodulator #(.CLK_HZ(FS*CLKS), .UART_BAUD(FS*CLKS/DIV)) dut (
    .clk, .rst_n, .sample_en, .rx_sample, .uart_txd, .busy, .frame_done, .crc_ok, .preamble_ok);
  always #5 clk = ~clk;
  initial #0.5 rst_n = 0;   // asynchronous reset from the start

  initial begin
    #20_000_000; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  task automatic check(input bit cond, input string what);
    checks++; if (!cond) begin failures++; $display("FAIL: %s", what); end
  endtask

  // UART monitor.
  byte rxb [$];
  initial forever begin
    byte b;
    @(negedge uart_txd);
    repeat (DIV/2) @(posedge clk);
    for (int i = 0; i < 8; i++) begin repeat (DIV) @(posedge clk); b[i] = uart_txd; end
    repeat (DIV) @(posedge clk);
    rxb.push_back(b);
  end

  int busy_samples = 0, dones = 0;
  bit last_crc, last_pre;
  always @(posedge clk) begin
    if (dut.s_valid) busy_samples++;           // samples taken into the burst
    if (frame_done) dones++;
  end

  task automatic put(input real v);
    repeat (CLKS-1) @(negedge clk);
    rx_sample = 16'(int'(v)); sample_en = 1;
    @(negedge clk); sample_en = 0;
  endtask

  task automatic run(input real noise, input int bad_sym, input bit exp_crc);
    byte d [];
    int t [];
    real ph;
    d = new[FB];
    foreach (d[i]) d[i] = byte'($urandom);
    burst_tones(d, t);
    rxb.delete(); busy_samples = 0;
    for (int n = 0; n < 100; n++) put(200.0 * (real'($urandom_range(0, 2000)) / 1000.0 - 1.0));
    ph = 0.0;
    foreach (t[s]) for (int n = 0; n < SPS; n++) begin
      int k;
      k = (s == bad_sym) ? (t[s] + 5) % 16 : t[s];
      put(16384.0 * $cos(ph) + noise * 32767.0 * (real'($urandom_range(0, 2000)) / 1000.0 - 1.0));
      ph = ph + 2.0 * PI * tone_freq(k) / real'(FS);
    end
    for (int n = 0; n < 2*SPS; n++) put(0.0);
    repeat (12 * FB * DIV) @(negedge clk);
    check(busy_samples == 22*SPS, $sformatf("%0d samples in the burst", busy_samples));
    check(rxb.size() == FB, $sformatf("%0d bytes", rxb.size()));
    if (exp_crc)
      for (int i = 0; i < FB && i < rxb.size(); i++)
        check(rxb[i] == d[i], $sformatf("byte %0d: %h vs %h", i, rxb[i], d[i]));
    check(crc_ok == exp_crc, $sformatf("crc_ok %0d", crc_ok));
    check(preamble_ok, "preamble_ok");
  endtask

  initial begin
    repeat (3) @(negedge clk); rst_n = 1;
    run(0.0, -1, 1);
    run(0.15, -1, 1);
    run(0.0, 9, 0);
    check(dones == 3, $sformatf("%0d frames", dones));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
