// tb_mcpfsk_modem_msk: the whole modem in its MSK setting, modulation index
// h = 1/2 (deviation unit 25 Hz, tones 1525..2275 Hz, 50 Hz apart), with the
// DAC looped back to the ADC. Clock and UART are scaled down (64 clocks per
// sample, 10 clocks per UART bit) to keep the run short; the signal
// parameters are the real ones. Three frames are sent: "12345678" and a
// frame of random bytes on a clean channel (every byte must come back and
// the CRC must pass), then a frame with +/-0.1 full-scale uniform noise
// (about 16 dB SNR). At h = 1/2 neighbouring tones are not orthogonal over
// one symbol, so noise can move a nibble to the adjacent tone; for the
// noisy frame the check is that crc_ok is set exactly when all its bytes
// are right, and the number of wrong bytes is printed.
module tb_mcpfsk_modem_msk;
  localparam int FS = 8000, CLKS = 64, DIV = 10, FB = 8, NF = 3;
  logic clk = 0, rst_n = 1, uart_rxd = 1;
  logic uart_txd, sample_tick, tx_active, rx_busy, frame_done, crc_ok, preamble_ok;
  logic signed [15:0] dac_sample, adc_sample = '0;

  mcpfsk_modem #(.CLK_HZ(FS*CLKS), .UART_BAUD(FS*CLKS/DIV), .FDEV_HZ(25)) dut (
    .clk, .rst_n, .uart_rxd, .uart_txd, .sample_tick, .dac_sample, .tx_active,
    .adc_sample, .rx_busy, .frame_done, .crc_ok, .preamble_ok);

  always #5 clk = ~clk;
  initial #0.5 rst_n = 0;   // asynchronous reset from the start

  int checks = 0, failures = 0;
  task automatic check(input bit cond, input string what);
    checks++;
    if (!cond) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin
    #100_000_000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  byte msg [NF*FB];
  initial begin
    string s;
    s = "12345678";
    for (int i = 0; i < FB; i++) msg[i] = s[i];
    for (int i = FB; i < NF*FB; i++) msg[i] = byte'($urandom);
  end

  task automatic uart_send(input byte b);
    uart_rxd = 0; repeat (DIV) @(posedge clk);
    for (int i = 0; i < 8; i++) begin uart_rxd = b[i]; repeat (DIV) @(posedge clk); end
    uart_rxd = 1; repeat (DIV) @(posedge clk);
  endtask

  byte rx_bytes [$];
  initial forever begin
    byte b;
    @(negedge uart_txd);
    repeat (DIV/2) @(posedge clk);
    for (int i = 0; i < 8; i++) begin repeat (DIV) @(posedge clk); b[i] = uart_txd; end
    repeat (DIV) @(posedge clk);
    rx_bytes.push_back(b);
  end

  // Channel: loop back, noise on the third frame.
  int frames = 0;
  always @(posedge clk) if (sample_tick) begin
    real v;
    v = real'(dac_sample);
    if (frames == 2 && tx_active) v = v + 3277.0 * (real'($urandom_range(0, 2000)) / 1000.0 - 1.0);
    adc_sample <= 16'(int'(v));
  end

  bit fcrc [NF], fpre [NF];
  always @(posedge clk) if (frame_done) begin
    #1;
    if (frames < NF) begin fcrc[frames] = crc_ok; fpre[frames] = preamble_ok; end
    frames++;
  end

  initial begin
    repeat (10) @(posedge clk);
    rst_n = 1;
    for (int f = 0; f < NF; f++) begin
      for (int i = 0; i < FB; i++) uart_send(msg[f*FB + i]);
      wait (frames == f + 1);
    end
    repeat (12 * FB * DIV) @(posedge clk);
    for (int f = 0; f < NF - 1; f++) begin
      check(fcrc[f], $sformatf("crc_ok of frame %0d", f));
      check(fpre[f], $sformatf("preamble_ok of frame %0d", f));
    end
    check(rx_bytes.size() == NF*FB, $sformatf("%0d bytes returned", rx_bytes.size()));
    for (int i = 0; i < (NF-1)*FB && i < rx_bytes.size(); i++)
      check(rx_bytes[i] == msg[i], $sformatf("byte %0d: got %h expected %h", i, rx_bytes[i], msg[i]));
    begin
      int bad;
      bad = 0;
      for (int i = (NF-1)*FB; i < NF*FB && i < rx_bytes.size(); i++) if (rx_bytes[i] != msg[i]) bad++;
      $display("noisy frame: %0d of %0d bytes wrong, crc_ok=%0d", bad, FB, fcrc[NF-1]);
      check(fcrc[NF-1] == (bad == 0), "CRC verdict of the noisy frame matches its byte errors");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
