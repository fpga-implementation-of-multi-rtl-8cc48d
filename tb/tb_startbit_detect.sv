// tb_startbit_detect: SPS = 4, 3 symbols per burst, threshold 100. Feeds
// silence and sub-threshold noise (must be ignored), then bursts that begin
// with a sample above the threshold, some of negative sign. Checks that
// exactly the burst's 12 samples are passed on, unchanged, with s_first and
// s_last on sample 0 and 3 of each symbol, frame_start on the first, busy
// for the burst, and that samples after the burst are not passed on.
module tb_startbit_detect;
  localparam int SPS = 4, FS = 3, TH = 100;
  logic clk = 0, rst_n = 1, sample_en = 0;
  logic signed [15:0] x = '0, s_x;
  logic s_valid, s_first, s_last, frame_start, busy;
  int checks = 0, failures = 0;

  startbit_detect #(.SPS(SPS), .FRAME_SYMS(FS), .THRESH(TH)) dut (
    .clk, .rst_n, .sample_en, .x, .s_valid, .s_x, .s_first, .s_last, .frame_start, .busy);
  always #5 clk = ~clk;
  initial #0.5 rst_n = 0;   // asynchronous reset from the start

  initial begin
    #2_000_000; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  task automatic check(input bit cond, input string what);
    checks++; if (!cond) begin failures++; $display("FAIL: %s", what); end
  endtask

  typedef struct { int v; bit f; bit l; bit st; } out_t;
  out_t outs [$];
  always @(posedge clk) if (s_valid) outs.push_back('{int'(s_x), s_first, s_last, frame_start});

  task automatic sample(input int v);
    @(negedge clk); x = 16'(v); sample_en = 1; @(negedge clk); sample_en = 0; repeat (2) @(negedge clk);
  endtask

  initial begin
    int burst [];
    repeat (3) @(negedge clk); rst_n = 1;
    for (int rep = 0; rep < 3; rep++) begin
      outs.delete();
      for (int i = 0; i < 10; i++) sample($urandom_range(0, 2*TH-2) - (TH-1));  // |x| < TH
      check(outs.size() == 0 && !busy, "no sync on sub-threshold input");
      burst = new[SPS*FS];
      burst[0] = (rep == 1) ? -TH : TH + 50 * rep;
      for (int i = 1; i < SPS*FS; i++) burst[i] = $urandom_range(0, 400) - 200;
      foreach (burst[i]) begin
        sample(burst[i]);
        if (i < SPS*FS-1) check(busy, "busy inside the burst");
      end
      check(!busy, "idle after the burst");
      for (int i = 0; i < 3; i++) sample(50);          // tail, below threshold
      check(outs.size() == SPS*FS, $sformatf("%0d samples passed", outs.size()));
      for (int i = 0; i < outs.size() && i < SPS*FS; i++) begin
        check(outs[i].v == burst[i], "sample value");
        check(outs[i].f == (i % SPS == 0) && outs[i].l == (i % SPS == SPS-1), $sformatf("first/last at %0d", i));
        check(outs[i].st == (i == 0), "frame_start");
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
