// tb_dsipm_fifo: random pushes and pops on the 32 x 20 FIFO against a queue
// model, including filling it completely, draining it and clearing it.
`timescale 1ns/1ps
module tb_dsipm_fifo;
  int checks = 0, failures = 0;
  logic clk = 0, clr = 1, push = 0, pop = 0;
  logic [19:0] wdata = '0, rdata;
  logic full, empty;
  logic [5:0] count;
  logic [19:0] q[$];
  int n_full = 0;
  always #5 clk = ~clk;

  dsipm_fifo dut (.clk (clk), .clr (clr), .push (push), .wdata (wdata), .pop (pop),
                  .rdata (rdata), .full (full), .empty (empty), .count (count));

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s (t=%0t)", what, $time); end
  endtask

  initial begin
    @(negedge clk) clr = 0;
    for (int i = 0; i < 3000; i++) begin
      automatic int pp = (i / 500) % 2 ? 30 : 70;   // phases that fill and drain
      @(negedge clk);
      check(empty == (q.size() == 0), "empty flag");
      check(full == (q.size() == 32), "full flag");
      check(count == 6'(q.size()), "count");
      if (q.size() > 0) check(rdata == q[0], $sformatf("rdata %h exp %h", rdata, q[0]));
      if (full) n_full++;
      push  = ($urandom_range(99) < pp) && !full;
      pop   = ($urandom_range(99) < 100 - pp) && !empty;
      wdata = 20'($urandom);
      @(posedge clk);
      if (pop) void'(q.pop_front());
      if (push) q.push_back(wdata);
    end
    @(negedge clk) begin push = 0; pop = 0; clr = 1; end
    @(negedge clk) clr = 0;
    q.delete();
    check(empty && count == 0, "clear empties");
    check(n_full > 0, "FIFO was full at least once");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
