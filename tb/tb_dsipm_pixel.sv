// tb_dsipm_pixel: checks one pixel: SPAD masking by the enable storage,
// setting of the hit flip-flop on a rising SPAD or inject edge, HitRow only
// while SendRow is high, clearing by the column reset, and that a SPAD held
// high does not set the flip-flop again without a new edge.
`timescale 1ns/1ps
module tb_dsipm_pixel;
  int checks = 0, failures = 0;
  logic clk = 0;
  logic [8:0] spad = '0, cfg_en = '0;
  logic inject = 0, cfg_we = 0, col_reset = 0, send_row = 0;
  logic hit, hit_row;
  logic [8:0] en;

  always #10 clk = ~clk;

  dsipm_pixel dut (
    .clk (clk), .spad_fire (spad), .inject (inject), .cfg_we (cfg_we), .cfg_en (cfg_en),
    .col_reset (col_reset), .send_row (send_row), .hit (hit), .hit_row (hit_row), .en (en)
  );

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s (t=%0t)", what, $time); end
  endtask

  task automatic write_en(input logic [8:0] e);
    @(negedge clk) begin cfg_we = 1; cfg_en = e; end
    @(negedge clk) cfg_we = 0;
  endtask

  task automatic clear();
    #3 col_reset = 1;
    #3 col_reset = 0;
    #1;
  endtask

  task automatic pulse(input int s);
    #3 spad[s] = 1;
    #2 spad[s] = 0;
    #1;
  endtask

  initial begin
    write_en(9'b0_0001_0001);
    check(en == 9'b0_0001_0001, "enable storage written");
    clear();
    check(!hit, "cleared");
    // every disabled SPAD is ignored, every enabled one sets the hit
    for (int s = 0; s < 9; s++) begin
      pulse(s);
      check(hit == en[s], $sformatf("SPAD %0d hit=%0d", s, hit));
      check(!hit_row, "no HitRow without SendRow");
      if (hit) begin
        send_row = 1; #1;
        check(hit_row, "HitRow with SendRow");
        send_row = 0; #1;
        clear();
        check(!hit, "column reset clears");
      end
    end
    // SPAD held high: reset clears, no new hit without a new edge
    #3 spad[0] = 1;
    #1 check(hit, "held SPAD sets hit");
    clear();
    check(!hit, "reset while SPAD high");
    #5 check(!hit, "no re-trigger without edge");
    spad[0] = 0;
    // inject with some SPAD enabled
    #3 inject = 1;
    #2 inject = 0;
    #1 check(hit, "inject sets hit");
    clear();
    // all SPADs disabled: neither SPADs nor inject reach the flip-flop
    write_en(9'h000);
    #3 inject = 1;
    #2 inject = 0;
    for (int s = 0; s < 9; s++) pulse(s);
    check(!hit, "fully masked pixel ignores inject and SPADs");
    write_en(9'h1FF);
    for (int s = 0; s < 9; s++) begin
      pulse(s);
      check(hit, $sformatf("all enabled: SPAD %0d", s));
      clear();
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
