// tb_sqw_detector_ber: bit-error rate of the square-wave detector against
// signal-to-noise ratio, the kind of curve the MCPFSK detector is judged by.
// Symbols of random tone (all 16 tones, 80 samples each, random starting
// phase) are sent straight into sqw_detector with white Gaussian noise
// (Box-Muller from $urandom). SNR here is per sample over the whole
// 0..fs/2 band: (A^2/2) / sigma^2. The signal amplitude is 0.05 of full
// scale so the noise rarely clips. Bit errors are counted through the Gray
// mapping (Hamming distance between sent and decided nibble) and the BER of
// each SNR point is printed. Checks: the BER does not rise with SNR (with a
// statistical margin), the lowest SNR point does produce errors, and the
// highest point is error-free. The curve is measured, not compared with
// published numbers.
module tb_sqw_detector_ber;
  import mcpfsk_pkg::*;

  localparam int FS = 8000, FC = 1900, FDEV = 100, SPS = 80;
  localparam int NSYM = 1500;                     // symbols per SNR point
  localparam int NPTS = 7;
  localparam real SNR_DB [NPTS] = '{-18.0, -15.0, -12.0, -9.0, -6.0, -3.0, 0.0};
  localparam real AMP = 0.05 * 32767.0;
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
    #200_000_000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input bit cond, input string what);
    checks++;
    if (!cond) begin failures++; $display("FAIL: %s", what); end
  endtask

  function automatic real urand01();   // uniform in (0, 1]
    return (real'($urandom_range(0, 999_999)) + 1.0) / 1_000_000.0;
  endfunction

  function automatic real gauss();
    return $sqrt(-2.0 * $ln(urand01())) * $cos(2.0 * PI * urand01());
  endfunction

  // Sends one symbol of tone k and returns the decided nibble.
  task automatic send_symbol(input int k, input real sigma, output nibble_t nib);
    real ph0, v;
    ph0 = 2.0 * PI * urand01();
    for (int n = 0; n < SPS; n++) begin
      @(negedge clk);
      v = AMP * $cos(2.0 * PI * real'(tone_hz(FC, FDEV, k)) * real'(n) / real'(FS) + ph0)
        + sigma * gauss();
      if (v > 32767.0) v = 32767.0;
      if (v < -32768.0) v = -32768.0;
      s_x = 16'(int'(v));
      s_valid = 1; s_first = (n == 0); s_last = (n == SPS-1);
      @(negedge clk);
      s_valid = 0; s_first = 0; s_last = 0;
    end
    while (!det_valid) @(negedge clk);
    nib = det_nibble;
  endtask

  real ber [NPTS];

  initial begin
    repeat (3) @(negedge clk);
    rst_n = 1;
    repeat (3) @(negedge clk);
    for (int p = 0; p < NPTS; p++) begin
      real sigma;
      int  bit_err;
      nibble_t nib;
      sigma = AMP / $sqrt(2.0) / (10.0 ** (SNR_DB[p] / 20.0));
      bit_err = 0;
      for (int s = 0; s < NSYM; s++) begin
        int k;
        k = $urandom_range(0, 15);
        send_symbol(k, sigma, nib);
        bit_err += $countones(nib ^ GRAY[k]);
      end
      ber[p] = real'(bit_err) / real'(4 * NSYM);
      $display("SNR %6.1f dB per sample (%5.1f dB per symbol): BER %8.5f (%0d of %0d bits)",
               SNR_DB[p], SNR_DB[p] + 10.0 * $log10(real'(SPS) / 2.0), ber[p], bit_err, 4 * NSYM);
    end
    check(ber[0] > 0.0, "lowest SNR point shows no errors: sweep does not reach the error region");
    for (int p = 1; p < NPTS; p++)
      check(ber[p] <= ber[p-1] + 0.02, $sformatf("BER rises from %f to %f at %f dB", ber[p-1], ber[p], SNR_DB[p]));
    check(ber[NPTS-1] == 0.0, "errors at the highest SNR point");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
