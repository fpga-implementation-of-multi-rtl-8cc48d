// tb_mcpfsk_modulator: the transmitter from UART input to samples, at the
// document's signal parameters (8 kHz, 1900 Hz carrier, 100 Hz deviation,
// 80 samples per symbol) with a 128 kHz clock and 10 clocks per UART bit to
// keep the run short. Two frames are sent over the UART. Every sample of
// each burst is compared with 0.5*cos of the accumulated phase of the
// reference tone sequence (continuous across symbols), the gap samples must
// be 0, and tx_valid must follow each sample strobe by 4 clocks in a burst.
module tb_mcpfsk_modulator;
  import tb_ref_pkg::*;
  localparam int CLKS = 16, FS = 8000, SPS = 80, FB = 8, DIV = 10, TOL = 24;
  localparam real PI = 3.14159265358979323846;
  logic clk = 0, rst_n = 1, sample_en = 0, uart_rxd = 1;
  logic signed [15:0] tx_sample;
  logic tx_valid, tx_active;
  int checks = 0, failures = 0;

  mcpfsk_modulator #(.CLK_HZ(FS*CLKS), .UART_BAUD(FS*CLKS/DIV)) dut (
    .clk, .rst_n, .sample_en, .uart_rxd, .tx_sample, .tx_valid, .tx_active);
  always #5 clk = ~clk;
  initial #0.5 rst_n = 0;   // asynchronous reset from the start

  initial begin
    #20_000_000; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  task automatic check(input bit cond, input string what);
    checks++; if (!cond) begin failures++; $display("FAIL: %s", what); end
  endtask

  int cyc = 0, last_en = 0;
  always @(posedge clk) begin
    cyc++;
    sample_en <= (cyc % CLKS == 0) && rst_n;
    if (sample_en) last_en = cyc;
  end

  // Record every output sample with its latency.
  int samples [$];
  int lat_bad = 0;
  always @(posedge clk) if (tx_valid) begin
    samples.push_back(int'(tx_sample));
    if (tx_active && cyc - last_en != 4) lat_bad++;
  end

  task automatic uart_send(input byte b);
    uart_rxd = 0; repeat (DIV) @(posedge clk);
    for (int i = 0; i < 8; i++) begin uart_rxd = b[i]; repeat (DIV) @(posedge clk); end
    uart_rxd = 1; repeat (DIV) @(posedge clk);
  endtask

  initial begin
    byte d [2][];
    int t [2][];
    int first, maxerr;
    for (int f = 0; f < 2; f++) begin
      d[f] = new[FB];
      foreach (d[f][i]) d[f][i] = byte'($urandom);
      burst_tones(d[f], t[f]);
    end
    repeat (3) @(posedge clk); rst_n = 1;
    repeat (50) @(posedge clk);
    for (int f = 0; f < 2; f++) foreach (d[f][i]) uart_send(d[f][i]);
    wait (samples.size() > 2 * 24 * SPS + 2000);
    // The first burst starts at the first non-zero sample.
    first = 0;
    while (first < samples.size() && samples[first] == 0) first++;
    maxerr = 0;
    for (int f = 0; f < 2; f++) begin
      real ph;
      int base;
      base = first + f * 24 * SPS;
      ph = 0.0;
      foreach (t[f][s]) for (int n = 0; n < SPS; n++) begin
        int e;
        e = samples[base + s*SPS + n] - int'(16384.0 * $cos(ph));
        if (e < 0) e = -e;
        if (e > maxerr) maxerr = e;
        check(e <= TOL, $sformatf("frame %0d symbol %0d sample %0d: %0d", f, s, n, samples[base + s*SPS + n]));
        ph = ph + 2.0 * PI * tone_freq(t[f][s]) / real'(FS);
      end
      for (int n = 0; n < 2*SPS; n++)
        check(samples[base + 22*SPS + n] == 0, "gap is silent");
    end
    check(lat_bad == 0, $sformatf("%0d samples with wrong latency", lat_bad));
    $display("max sample error %0d LSB", maxerr);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
