// tb_cpfsk_gen: checks the serial MCPFSK generator against a floating-point
// model, for the default deviation (fdev = 100 Hz, h = 2) and for the MSK
// setting (fdev = 25 Hz, h = 1/2) side by side. Bursts of 80-sample symbols
// visit all 16 tones; the model accumulates the phase of
// 0.5*cos(2*pi*sum(f_k/FS)) sample by sample, which is continuous across
// symbol changes. Each sample must match within a small tolerance, and the
// sample must arrive exactly 3 clocks after its sample_en strobe.
module tb_cpfsk_gen;
  import mcpfsk_pkg::*;

  localparam int FS = 8000, SPS = 80;
  localparam int TOL = 24;   // LSBs of a Q1.15 sample

  logic clk = 0, rst_n = 1, restart = 0, sample_en = 0;
  nibble_t tone = '0;
  logic signed [15:0] sample, sample_m;
  logic sample_valid, busy, sample_valid_m, busy_m;
  int checks = 0, failures = 0;

  cpfsk_gen dut (.clk, .rst_n, .restart, .sample_en, .tone, .sample, .sample_valid, .busy);
  cpfsk_gen #(.FDEV_HZ(25)) dut_msk (.clk, .rst_n, .restart, .sample_en, .tone,
    .sample(sample_m), .sample_valid(sample_valid_m), .busy(busy_m));

  always #5 clk = ~clk;
  initial #0.5 rst_n = 0;   // asynchronous reset from the start

  initial begin
    #20_000_000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic run_burst(input int nsym, input int seed_off);
    real ph, phm;
    int  t, lat, err, maxerr;
    ph = 0.0; phm = 0.0; maxerr = 0;
    for (int s = 0; s < nsym; s++) begin
      t = (s * 7 + seed_off) % N_TONES;        // visits every tone
      for (int n = 0; n < SPS; n++) begin
        real expv;
        @(negedge clk);
        tone = nibble_t'(t);
        restart = (s == 0 && n == 0);
        sample_en = 1;
        @(negedge clk);
        sample_en = 0; restart = 0;
        lat = 1;
        while (!sample_valid) begin @(negedge clk); lat++; end
        expv = 0.5 * 32768.0 * $cos(ph);
        err = int'(real'(sample) - expv);
        if (err < 0) err = -err;
        if (err > maxerr) maxerr = err;
        checks++;
        if (err > TOL) begin
          failures++;
          if (failures < 10) $display("sym %0d n %0d tone %0d: got %0d exp %0f", s, n, t, sample, expv);
        end
        checks++;
        if (lat != 3) begin failures++; $display("latency %0d", lat); end
        expv = 0.5 * 32768.0 * $cos(phm);
        err = int'(real'(sample_m) - expv);
        if (err < 0) err = -err;
        if (err > maxerr) maxerr = err;
        checks++;
        if (err > TOL) begin
          failures++;
          if (failures < 10) $display("h=1/2: sym %0d n %0d tone %0d: got %0d exp %0f", s, n, t, sample_m, expv);
        end
        ph  = ph  + 2.0 * 3.14159265358979323846 * (1900.0 + real'(2*t - 15) * 100.0) / real'(FS);
        phm = phm + 2.0 * 3.14159265358979323846 * (1900.0 + real'(2*t - 15) * 25.0) / real'(FS);
        while (busy || busy_m) @(negedge clk);
      end
    end
    $display("burst of %0d symbols: max error %0d LSB", nsym, maxerr);
  endtask

  initial begin
    repeat (3) @(negedge clk);
    rst_n = 1;
    run_burst(22, 0);
    run_burst(16, 3);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
