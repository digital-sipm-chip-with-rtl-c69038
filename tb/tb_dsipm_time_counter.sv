// tb_dsipm_time_counter: the time code must rise by one in every half clock
// period (10 ns steps at 50 MHz), start at 0 in the high phase after the
// clearing edge, and wrap after 1024 steps.
`timescale 1ns/1ps
module tb_dsipm_time_counter;
  int checks = 0, failures = 0;
  logic clk = 0, clr = 0;
  logic [9:0] ts;
  always #10 clk = ~clk;

  dsipm_time_counter dut (.clk (clk), .clr (clr), .ts (ts));

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s (t=%0t)", what, $time); end
  endtask

  initial begin
    int expv;
    repeat (3) @(negedge clk);
    clr = 1;
    @(posedge clk) #3;
    clr = 0;
    check(ts == 10'd0, $sformatf("0 after clear, got %0d", ts));
    expv = 0;
    for (int i = 0; i < 1500; i++) begin
      @(clk) #3;
      expv = (expv + 1) % 1024;
      check(ts == 10'(expv), $sformatf("step %0d: %0d expected %0d", i, ts, expv));
    end
    // clear again in the middle of a run
    @(negedge clk) clr = 1;
    @(posedge clk) #3;
    clr = 0;
    check(ts == 10'd0, "0 after second clear");
    @(negedge clk) #3;
    check(ts == 10'd1, "1 in low phase");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (3000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
