// tb_mod_framer: runs the transmit framer with 4 samples per symbol and a
// model byte buffer. Two frames are queued (16 bytes); the tone index on
// every active out_tick must follow the reference burst (start tones 15 and
// 0, Gray-mapped data nibbles, CRC16 nibbles) for exactly 4 samples per
// symbol, followed by 2 silent symbols, and restart must mark the first
// sample of each burst. A burst must not start with fewer than 8 bytes.
module tb_mod_framer;
  import tb_ref_pkg::*;
  localparam int SPS = 4, FB = 8, GAP = 2;
  logic clk = 0, rst_n = 1, sample_en = 0;
  logic [4:0] buf_count;
  logic [7:0] buf_data;
  logic buf_pop, out_tick, restart, active;
  logic [3:0] tone;
  int checks = 0, failures = 0;
  byte bufq [$];

  assign buf_count = 5'(bufq.size());
  assign buf_data  = (bufq.size() > 0) ? bufq[0] : 8'h00;

  mod_framer #(.SPS(SPS), .FRAME_BYTES(FB), .GAP_SYMS(GAP)) dut (
    .clk, .rst_n, .sample_en, .buf_count, .buf_data, .buf_pop, .out_tick, .restart, .tone, .active);
  always #5 clk = ~clk;
  initial #0.5 rst_n = 0;   // asynchronous reset from the start

  initial begin
    #5_000_000; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  task automatic check(input bit cond, input string what);
    checks++; if (!cond) begin failures++; $display("FAIL: %s", what); end
  endtask

  always @(posedge clk) if (buf_pop) void'(bufq.pop_front());

  // Sample strobes every 5 clocks.
  initial begin
    @(posedge rst_n);
    forever begin
      repeat (4) @(negedge clk);
      sample_en = 1; @(negedge clk); sample_en = 0;
    end
  end

  // Collect what happens on out_tick.
  int seen_tones [$];
  int restarts [$];
  int idx = 0;
  always @(posedge clk) if (out_tick) begin
    seen_tones.push_back(active ? int'(tone) : -1);
    if (restart) restarts.push_back(idx);
    idx++;
  end

  initial begin
    byte d1 [], d2 [];
    int t1 [], t2 [], expect_q [$];
    d1 = new[FB]; d2 = new[FB];
    foreach (d1[i]) begin d1[i] = byte'($urandom); d2[i] = byte'($urandom); end
    burst_tones(d1, t1); burst_tones(d2, t2);
    repeat (3) @(negedge clk); rst_n = 1;
    // Seven bytes: nothing may start.
    for (int i = 0; i < FB-1; i++) bufq.push_back(d1[i]);
    repeat (200) @(negedge clk);
    check(restarts.size() == 0, "no burst with fewer than FRAME_BYTES bytes");
    begin int s0; s0 = idx;
      bufq.push_back(d1[FB-1]);
      foreach (d2[i]) bufq.push_back(d2[i]);
      wait (idx >= s0 + 2 * (t1.size() + GAP) * SPS + 10);
      // Expected stream from the first restart on.
      foreach (t1[i]) repeat (SPS) expect_q.push_back(t1[i]);
      repeat (GAP*SPS) expect_q.push_back(-1);
      foreach (t2[i]) repeat (SPS) expect_q.push_back(t2[i]);
      repeat (GAP*SPS) expect_q.push_back(-1);
      check(restarts.size() == 2, $sformatf("%0d bursts", restarts.size()));
      if (restarts.size() == 2) begin
        check(restarts[1] - restarts[0] == (t1.size() + GAP) * SPS, "second burst follows the gap");
        for (int i = 0; i < expect_q.size(); i++)
          check(seen_tones[restarts[0] + i] == expect_q[i],
                $sformatf("sample %0d: tone %0d expected %0d", i, seen_tones[restarts[0] + i], expect_q[i]));
        for (int i = 0; i < restarts[0]; i++) check(seen_tones[i] == -1, "silent before the burst");
      end
      check(bufq.size() == 0, "all bytes taken");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
