// tb_mcpfsk_modem: end-to-end test of the whole modem at its default
// parameters (25 MHz clock, 8 kHz samples, 100 symbols/s, 9600 baud UART,
// 8-byte frames).
//
// The DAC output is fed back into the ADC input through a channel model.
// The host side sends 32 bytes over the UART:
//   frame 1 "12345678" on a clean channel;
//   frames 2 and 3 "ABCDEFGH" "abcdefgh" sent back to back once frame 1's
//     bytes have left the buffer, so 16 bytes fill
//     the transmit buffer and the second burst starts straight from it;
//     in frame 3 the channel replaces one data symbol with a 3400 Hz tone,
//     which must make the CRC check fail;
//   frame 4 "HF-modem" with uniform noise of +/-0.1 full scale added.
// A UART monitor collects the bytes the receiver sends back. Checked: bytes
// of the good frames, crc_ok/preamble_ok per frame, one receiver burst per
// transmitter burst, symbol-rate timing of the burst (24 symbols of 80
// samples, 22 of them active), and that every mechanism (burst start,
// buffer full, queued frame, CRC pass, CRC fail, noise) happened.
module tb_mcpfsk_modem;
  localparam int CLK_HZ = 25_000_000, UART_BAUD = 9600, FS = 8000;
  localparam int BIT_CLKS = CLK_HZ / UART_BAUD;
  localparam int SPS = 80, NFRAMES = 4, FB = 8;
  localparam real PI = 3.14159265358979323846;

  logic clk = 0, rst_n = 1, uart_rxd = 1;
  logic uart_txd, sample_tick, tx_active, rx_busy, frame_done, crc_ok, preamble_ok;
  logic signed [15:0] dac_sample, adc_sample;

  mcpfsk_modem dut (.clk, .rst_n, .uart_rxd, .uart_txd, .sample_tick, .dac_sample, .tx_active,
                    .adc_sample, .rx_busy, .frame_done, .crc_ok, .preamble_ok);

  always #1 clk = ~clk;
  initial #0.5 rst_n = 0;   // asynchronous reset from the start

  int checks = 0, failures = 0;
  task automatic check(input bit cond, input string what);
    checks++;
    if (!cond) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin
    #120_000_000;   // 60 M clocks = 2.4 s of modem time
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // Messages.
  byte msg [NFRAMES*FB];
  initial begin
    string s;
    s = "12345678ABCDEFGHabcdefghHF-modem";
    for (int i = 0; i < NFRAMES*FB; i++) msg[i] = s[i];
  end

  // ---------------- host UART transmitter
  task automatic uart_send(input byte b);
    uart_rxd = 0; repeat (BIT_CLKS) @(posedge clk);
    for (int i = 0; i < 8; i++) begin uart_rxd = b[i]; repeat (BIT_CLKS) @(posedge clk); end
    uart_rxd = 1; repeat (BIT_CLKS) @(posedge clk);
  endtask

  // ---------------- host UART receiver
  byte rx_bytes [$];
  initial begin
    forever begin
      byte b;
      @(negedge uart_txd);
      repeat (BIT_CLKS/2) @(posedge clk);
      for (int i = 0; i < 8; i++) begin repeat (BIT_CLKS) @(posedge clk); b[i] = uart_txd; end
      repeat (BIT_CLKS) @(posedge clk);
      if (uart_txd !== 1'b1) begin failures++; $display("FAIL: UART stop bit"); end
      rx_bytes.push_back(b);
    end
  end

  // ---------------- channel: ADC = DAC (+ noise / + one corrupted symbol)
  int tx_burst = 0;          // bursts started by the transmitter
  int burst_samp = 0;        // sample index inside the current transmit burst
  int active_samps [NFRAMES+1];
  int burst_len [NFRAMES+1];
  int noise_samples = 0, corrupted_samples = 0;
  logic tx_active_d = 0;
  always @(posedge clk) begin
    if (sample_tick) begin
      real v;
      v = real'(dac_sample);
      if (tx_burst == 3 && burst_samp >= (2+3)*SPS && burst_samp < (2+4)*SPS) begin
        v = 16384.0 * $cos(2.0 * PI * 3400.0 * real'(burst_samp) / real'(FS));
        corrupted_samples++;
      end
      if (tx_burst == 4 && tx_active) begin
        v = v + 3277.0 * (real'($urandom_range(0, 2000)) / 1000.0 - 1.0);
        noise_samples++;
      end
      adc_sample <= 16'(int'(v));
    end
  end
  initial adc_sample = '0;

  // Burst bookkeeping on the transmit side (tx_active changes on the sample grid).
  logic in_burst = 0;
  always @(posedge clk) begin
    tx_active_d <= tx_active;
    if (tx_active && !tx_active_d) begin
      tx_burst++; burst_samp = 0; in_burst = 1;
    end
    if (sample_tick && in_burst) burst_samp++;
    if (dut.u_mod.u_gen.sample_valid) active_samps[tx_burst]++;
    if (sample_tick && in_burst && !tx_active && burst_samp > 24*SPS + 4) in_burst = 0;
  end

  // Transmit buffer level.
  int buf_full_seen = 0, queued_start = 0, max_fill = 0;
  always @(posedge clk) begin
    if (dut.u_mod.buf_full) buf_full_seen++;
    if (int'(dut.u_mod.buf_count) > max_fill) max_fill = int'(dut.u_mod.buf_count);
    if (dut.u_mod.u_framer.restart && dut.u_mod.buf_count >= 5'(2*FB - 1)) queued_start++;
  end

  // Receiver side.
  int rx_bursts = 0, frames = 0, crc_pass = 0, crc_fail = 0;
  logic rx_busy_d = 0;
  bit frame_crc [NFRAMES+1];
  bit frame_pre [NFRAMES+1];
  always @(posedge clk) begin
    rx_busy_d <= rx_busy;
    if (rx_busy && !rx_busy_d) rx_bursts++;
  end
  always @(negedge clk) begin
    if (dut.frame_done) begin
      frames++;
      frame_crc[frames] = crc_ok;
      frame_pre[frames] = preamble_ok;
      if (crc_ok) crc_pass++; else crc_fail++;
      $display("frame %0d done at %0t: crc_ok=%0d preamble_ok=%0d", frames, $time, crc_ok, preamble_ok);
    end
  end

  initial begin
    repeat (10) @(posedge clk);
    rst_n = 1;
    repeat (100) @(posedge clk);
    for (int i = 0; i < FB; i++) uart_send(msg[i]);
    // Frames 2 and 3 back to back while frame 1 is still on the air (its
    // bytes all taken from the buffer): 16 bytes fill the buffer.
    wait (tx_burst == 1 && dut.u_mod.buf_count == 0);
    for (int i = FB; i < 3*FB; i++) uart_send(msg[i]);
    wait (frames == 3);
    for (int i = 3*FB; i < 4*FB; i++) uart_send(msg[i]);
    wait (frames == 4);
    // Let the UART drain the last frame.
    repeat (12 * FB * BIT_CLKS) @(posedge clk);

    // Frame verdicts.
    check(frames == NFRAMES, $sformatf("%0d frames received", frames));
    for (int f = 1; f <= NFRAMES; f++) begin
      check(frame_pre[f] == 1'b1, $sformatf("preamble of frame %0d", f));
      check(frame_crc[f] == (f != 3), $sformatf("crc_ok of frame %0d is %0d", f, frame_crc[f]));
    end
    // Bytes returned over the UART.
    check(rx_bytes.size() == NFRAMES*FB, $sformatf("%0d bytes returned", rx_bytes.size()));
    begin
      int diff3;
      diff3 = 0;
      for (int i = 0; i < NFRAMES*FB && i < rx_bytes.size(); i++) begin
        if (i / FB == 2) begin
          if (rx_bytes[i] != msg[i]) diff3++;
        end else
          check(rx_bytes[i] == msg[i], $sformatf("byte %0d: got %h expected %h", i, rx_bytes[i], msg[i]));
      end
      check(diff3 == 1, $sformatf("corrupted frame differs in %0d bytes", diff3));
    end
    // Burst timing: 22 active symbols of 80 samples per burst.
    for (int f = 1; f <= NFRAMES; f++)
      check(active_samps[f] == 22*SPS, $sformatf("burst %0d active for %0d samples", f, active_samps[f]));
    check(tx_burst == NFRAMES && rx_bursts == NFRAMES, $sformatf("bursts tx %0d rx %0d", tx_burst, rx_bursts));
    // Mechanisms.
    $display("mechanisms: bursts=%0d rx_syncs=%0d buffer_full_cycles=%0d max_fill=%0d queued_starts=%0d crc_pass=%0d crc_fail=%0d corrupted=%0d noisy=%0d",
             tx_burst, rx_bursts, buf_full_seen, max_fill, queued_start, crc_pass, crc_fail, corrupted_samples, noise_samples);
    check(buf_full_seen > 0, "transmit buffer never full");
    check(queued_start > 0, "no burst started from a queued frame");
    check(crc_pass > 0 && crc_fail > 0, "CRC pass and fail both seen");
    check(corrupted_samples == SPS && noise_samples > 0, "channel impairments applied");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
