// tb_sqw_detector: sends one 80-sample symbol of each of the 16 tones, at
// random starting phases and at several amplitudes (some with added noise),
// and checks the winning tone, its Gray-coded nibble against a literal
// Gray table, the magnitude against bounds derived from the amplitude, and
// the decision latency (N_TONES+2 clocks after the last sample).
module tb_sqw_detector;
  import mcpfsk_pkg::*;

  localparam int FS = 8000, FC = 1900, FDEV = 100, SPS = 80;
  localparam real PI = 3.14159265358979323846;
  localparam logic [3:0] GRAY [16] = '{4'h0, 4'h1, 4'h3, 4'h2, 4'h6, 4'h7, 4'h5, 4'h4,
                                      4'hC, 4'hD, 4'hF, 4'hE, 4'hA, 4'hB, 4'h9, 4'h8};

  logic clk = 0, rst_n = 1;
  logic s_valid = 0, s_first = 0, s_last = 0;
  logic signed [15:0] s_x = '0;
  logic det_valid;
  nibble_t det_tone, det_nibble;
  logic [24:0] det_mag;
  int checks = 0, failures = 0;

  sqw_detector dut (.clk, .rst_n, .s_valid, .s_x, .s_first, .s_last, .det_valid, .det_tone, .det_nibble, .det_mag);

  always #5 clk = ~clk;
  initial #0.5 rst_n = 0;   // asynchronous reset from the start

  initial begin
    #50_000_000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input bit cond, input string what);
    checks++;
    if (!cond) begin failures++; $display("FAIL: %s", what); end
  endtask

  task automatic send_symbol(input int k, input real amp, input real noise, input bit exact);
    real ph0, v;
    int lat;
    ph0 = 2.0 * PI * real'($urandom_range(0, 999)) / 1000.0;
    for (int n = 0; n < SPS; n++) begin
      @(negedge clk);
      v = amp * 32767.0 * $cos(2.0 * PI * real'(tone_hz(FC, FDEV, k)) * real'(n) / real'(FS) + ph0);
      if (noise > 0.0) v = v + noise * 32767.0 * (real'($urandom_range(0, 2000)) / 1000.0 - 1.0);
      if (v > 32767.0) v = 32767.0;
      if (v < -32768.0) v = -32768.0;
      s_x = 16'(int'(v));
      s_valid = 1; s_first = (n == 0); s_last = (n == SPS-1);
      @(negedge clk);
      s_valid = 0; s_first = 0; s_last = 0;
      if (n != SPS-1) repeat (2) @(negedge clk);
    end
    lat = 0;
    while (!det_valid && lat < 100) begin @(negedge clk); lat++; end
    check(det_tone == nibble_t'(k), $sformatf("tone %0d detected as %0d (amp %f)", k, det_tone, amp));
    check(det_nibble == GRAY[k], $sformatf("nibble for tone %0d is %h", k, det_nibble));
    if (exact) begin
      check(lat == N_TONES + 1, $sformatf("latency %0d", lat + 1));
      // max+min/2 of a tone against a square wave is near (2/pi)*SPS*A; accept 0.5..sqrt(2) times SPS*A.
      check(real'(det_mag) > 0.5 * real'(SPS) * amp * 32767.0 &&
            real'(det_mag) < 1.4143 * real'(SPS) * amp * 32767.0,
            $sformatf("magnitude %0d for amplitude %f", det_mag, amp));
    end
    repeat (5) @(negedge clk);
  endtask

  initial begin
    repeat (3) @(negedge clk);
    rst_n = 1;
    for (int rep = 0; rep < 4; rep++)
      for (int k = 0; k < N_TONES; k++) send_symbol(k, 0.5, 0.0, 1);
    for (int k = 0; k < N_TONES; k++) send_symbol(k, 0.05, 0.0, 1);
    for (int rep = 0; rep < 2; rep++)
      for (int k = 0; k < N_TONES; k++) send_symbol(k, 0.5, 0.3, 0);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
