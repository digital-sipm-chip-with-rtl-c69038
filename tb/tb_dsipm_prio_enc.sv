// tb_dsipm_prio_enc: checks the priority decoder at the two sizes the chip
// uses (16 column requests, 60 row requests) against a reference search for
// the lowest set bit, with single-bit, empty and random request vectors.
`timescale 1ns/1ps
module tb_dsipm_prio_enc;
  int checks = 0, failures = 0;

  logic [15:0] req16;
  logic [3:0]  idx16;
  logic        v16;
  logic [59:0] req60;
  logic [5:0]  idx60;
  logic        v60;

  dsipm_prio_enc u16 (.req (req16), .idx (idx16), .valid (v16));
  dsipm_prio_enc #(.N(60), .IDX_W(6)) u60 (.req (req60), .idx (idx60), .valid (v60));

  function automatic int lowest(input logic [63:0] r, input int n);
    for (int i = 0; i < n; i++) if (r[i]) return i;
    return -1;
  endfunction

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  task automatic apply(input logic [59:0] r60, input logic [15:0] r16);
    int l16, l60;
    req60 = r60;
    req16 = r16;
    #1;
    l16 = lowest(64'(r16), 16);
    l60 = lowest(64'(r60), 60);
    check(v16 == (l16 >= 0), $sformatf("valid16 %h", r16));
    if (l16 >= 0) check(idx16 == 4'(l16), $sformatf("idx16 %h -> %0d", r16, idx16));
    check(v60 == (l60 >= 0), $sformatf("valid60 %h", r60));
    if (l60 >= 0) check(idx60 == 6'(l60), $sformatf("idx60 %h -> %0d", r60, idx60));
  endtask

  initial begin
    apply('0, '0);
    for (int i = 0; i < 60; i++) apply(60'(1) << i, 16'(1) << (i % 16));
    for (int i = 0; i < 60; i++) apply(~60'(0) << i, ~16'(0) << (i % 16));
    for (int n = 0; n < 300; n++) begin
      logic [59:0] r;
      r = {$urandom, $urandom} & {$urandom, $urandom};
      apply(r, 16'($urandom) & 16'($urandom));
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
