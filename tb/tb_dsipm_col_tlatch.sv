// tb_dsipm_col_tlatch: each column latch follows the time bus while its hit
// line is low and keeps the value present when the hit line rose; columns
// are independent.
`timescale 1ns/1ps
module tb_dsipm_col_tlatch;
  int checks = 0, failures = 0;
  logic [9:0] ts = '0;
  logic [15:0] hit = '0;
  logic [15:0][9:0] col_ts;
  logic [9:0] held [16];

  dsipm_col_tlatch dut (.ts (ts), .col_hit (hit), .col_ts (col_ts));

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s (t=%0t)", what, $time); end
  endtask

  initial begin
    for (int n = 0; n < 400; n++) begin
      automatic int x = $urandom_range(15);
      #5 ts = 10'($urandom);
      #1;
      if (!hit[x]) begin
        hit[x] = 1;
        held[x] = ts;
      end else if ($urandom_range(1)) begin
        hit[x] = 0;
      end
      #5 ts = ts + 10'd7;
      #1;
      for (int c = 0; c < 16; c++) begin
        if (hit[c]) check(col_ts[c] == held[c], $sformatf("col %0d holds", c));
        else        check(col_ts[c] == ts, $sformatf("col %0d follows", c));
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #100000;
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
