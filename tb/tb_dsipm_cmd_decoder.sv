// tb_dsipm_cmd_decoder: CMD pulses of 1 to 15 cycles in random order with
// random gaps; widths 1..12 must give exactly one cmd_valid pulse with the
// matching code one cycle after the first low sample, wider ones nothing.
`timescale 1ns/1ps
module tb_dsipm_cmd_decoder;
  import dsipm_pkg::*;
  int checks = 0, failures = 0;
  logic clk = 0, cmd = 0;
  logic cmd_valid;
  cmd_e cmd_code;
  int n_valid = 0;
  int last_code = -1;
  int unsigned cyc = 0, valid_cyc = 0;
  always #10 clk = ~clk;
  always @(posedge clk) cyc <= cyc + 1;
  // sample outputs in the middle of the cycle
  always @(negedge clk) begin
    if (cmd_valid) begin
      n_valid++;
      last_code = int'(cmd_code);
      valid_cyc = cyc;
    end
  end

  dsipm_cmd_decoder dut (.clk (clk), .cmd (cmd), .cmd_valid (cmd_valid), .cmd_code (cmd_code));

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s (t=%0t)", what, $time); end
  endtask

  initial begin
    repeat (3) @(negedge clk);
    n_valid = 0;
    for (int n = 0; n < 200; n++) begin
      automatic int w = (n < 15) ? n + 1 : $urandom_range(1, 15);
      automatic int unsigned fall_cyc;
      automatic int n_before = n_valid;
      @(negedge clk) cmd = 1;
      repeat (w) @(negedge clk);
      cmd = 0;
      fall_cyc = cyc;           // edges so far; the next one samples CMD low
      repeat (2 + $urandom_range(3)) @(negedge clk);
      if (w <= 12) begin
        check(n_valid == n_before + 1, $sformatf("width %0d: one command", w));
        check(last_code == w, $sformatf("width %0d: code %0d", w, last_code));
        check(valid_cyc == fall_cyc + 1, $sformatf("width %0d: latency", w));
      end else begin
        check(n_valid == n_before, $sformatf("width %0d ignored", w));
      end
    end
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
