// tb_byte_fifo: random push/pop traffic against a queue model. Checks the
// head word, fill count, full and empty flags every clock, that a push into
// a full FIFO is dropped, and that simultaneous push and pop keep the count.
module tb_byte_fifo;
  logic clk = 0, rst_n = 1, push = 0, pop = 0;
  logic [7:0] din = '0, dout;
  logic [4:0] count;
  logic full, empty;
  int checks = 0, failures = 0;
  byte q [$];
  int full_pushes = 0, both = 0;

  byte_fifo dut (.clk, .rst_n, .push, .din, .pop, .dout, .count, .full, .empty);
  always #5 clk = ~clk;
  initial #0.5 rst_n = 0;   // asynchronous reset from the start

  initial begin
    #1_000_000; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  task automatic check(input bit cond, input string what);
    checks++; if (!cond) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin
    repeat (2) @(negedge clk); rst_n = 1;
    for (int cyc = 0; cyc < 3000; cyc++) begin
      int bias;
      @(negedge clk);
      check(count == 5'(q.size()), $sformatf("count %0d vs %0d", count, q.size()));
      check(full == (q.size() == 16) && empty == (q.size() == 0), "flags");
      if (q.size() > 0) check(dout == q[0], $sformatf("head %h vs %h", dout, q[0]));
      bias = (cyc / 300) % 2 ? 30 : 70;     // alternate filling and draining phases
      push = ($urandom_range(0, 99) < bias);
      pop  = ($urandom_range(0, 99) >= bias);
      if (cyc % 7 == 0) begin push = 1; pop = 1; end
      din  = 8'($urandom);
      @(posedge clk);
      if (push && pop && q.size() > 0 && q.size() < 16) both++;
      begin
        int sz;
        sz = q.size();                       // the FIFO decides on the old level
        if (pop && sz > 0) void'(q.pop_front());
        if (push) begin
          if (sz < 16) q.push_back(din);
          else full_pushes++;
        end
      end
    end
    check(full_pushes > 0 && both > 0, "overflow and simultaneous push/pop exercised");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
