// tb_dsipm_readout_seq: the readout sequencer against a model of the pixel
// matrix (hit flags set by the testbench, cleared by col_reset, HitRow
// answered for the sending column) and per-column time stamps. Checks that
// every hit arrives once as {T, Y, X}, that single-hit columns follow each
// other every 7 cycles, that further hits of one column follow on
// consecutive cycles, that nothing is written while the FIFO is full, and
// that only one column sends at a time.
`timescale 1ns/1ps
module tb_dsipm_readout_seq;
  localparam int NC = 16, NR = 60;
  int checks = 0, failures = 0;
  logic clk = 0, clr = 1, fifo_full = 0;
  logic [NC-1:0] col_hit, col_send, col_reset;
  logic [NR-1:0] row_hit;
  logic [NC-1:0][9:0] col_ts;
  logic push, busy;
  logic [19:0] wdata;
  bit hits [NC][NR];
  logic [19:0] words[$];
  int unsigned cyc = 0;
  int unsigned push_cyc[$];

  always #10 clk = ~clk;
  always @(posedge clk) cyc <= cyc + 1;

  dsipm_readout_seq dut (
    .clk (clk), .clr (clr), .col_hit (col_hit), .row_hit (row_hit), .col_ts (col_ts),
    .fifo_full (fifo_full), .col_send (col_send), .col_reset (col_reset),
    .fifo_push (push), .fifo_wdata (wdata), .busy (busy)
  );

  // matrix model
  always @* begin
    for (int x = 0; x < NC; x++) if (col_reset[x]) for (int y = 0; y < NR; y++) hits[x][y] = 0;
    for (int x = 0; x < NC; x++) begin
      col_hit[x] = 0;
      for (int y = 0; y < NR; y++) col_hit[x] |= hits[x][y];
    end
    row_hit = '0;
    for (int x = 0; x < NC; x++)
      if (col_send[x]) for (int y = 0; y < NR; y++) row_hit[y] |= hits[x][y];
  end

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s (t=%0t)", what, $time); end
  endtask

  always @(posedge clk) begin
    if (!clr) check($countones(col_send) <= 1, "one sending column");
    if (push) begin
      check(!fifo_full, "no push while full");
      words.push_back(wdata);
      push_cyc.push_back(cyc);
    end
  end

  function automatic logic [19:0] w(int x, int y);
    return {col_ts[x], 6'(y), 4'(x)};
  endfunction

  task automatic expect_words(input logic [19:0] exp_q[$], input string what);
    check(words.size() == exp_q.size(), $sformatf("%s: %0d words, expected %0d", what, words.size(), exp_q.size()));
    foreach (exp_q[i]) if (i < words.size())
      check(words[i] == exp_q[i], $sformatf("%s: word %0d %h expected %h", what, i, words[i], exp_q[i]));
    words.delete();
  endtask

  initial begin
    logic [19:0] exp_q[$];
    for (int x = 0; x < NC; x++) col_ts[x] = 10'(37 * x + 5);
    repeat (3) @(negedge clk);
    clr = 0;
    repeat (3) @(negedge clk);
    check(!busy && words.size() == 0, "idle without hits");

    // one hit in each of 6 columns: one word every 7 cycles, lowest X first
    foreach (hits[x, y]) hits[x][y] = 0;
    hits[1][4] = 1; hits[3][0] = 1; hits[4][59] = 1; hits[8][17] = 1; hits[12][2] = 1; hits[15][33] = 1;
    push_cyc.delete();
    repeat (80) @(negedge clk);
    exp_q = {w(1, 4), w(3, 0), w(4, 59), w(8, 17), w(12, 2), w(15, 33)};
    expect_words(exp_q, "single hits");
    for (int i = 1; i < push_cyc.size(); i++)
      check(push_cyc[i] - push_cyc[i-1] == 7, $sformatf("7 cycles per hit, got %0d", push_cyc[i] - push_cyc[i-1]));
    check(!busy, "idle again");

    // several hits in one column: written on consecutive cycles, rising Y
    hits[6][50] = 1; hits[6][9] = 1; hits[6][10] = 1; hits[6][0] = 1;
    push_cyc.delete();
    repeat (30) @(negedge clk);
    exp_q = {w(6, 0), w(6, 9), w(6, 10), w(6, 50)};
    expect_words(exp_q, "one column");
    for (int i = 1; i < push_cyc.size(); i++)
      check(push_cyc[i] - push_cyc[i-1] == 1, "consecutive writes in one column");

    // FIFO full: the sequencer waits with its captured rows
    fifo_full = 1;
    hits[2][7] = 1; hits[2][8] = 1; hits[9][1] = 1;
    repeat (40) @(negedge clk);
    check(words.size() == 0, "no writes while full");
    check(busy, "sequencer waits while full");
    fifo_full = 0;
    repeat (30) @(negedge clk);
    exp_q = {w(2, 7), w(2, 8), w(9, 1)};
    expect_words(exp_q, "after full");

    // clr forgets a captured column
    fifo_full = 1;
    hits[5][5] = 1; hits[5][6] = 1;
    repeat (20) @(negedge clk);
    clr = 1;
    @(negedge clk) clr = 0;
    fifo_full = 0;
    repeat (20) @(negedge clk);
    check(words.size() == 0, "clr drops captured rows");
    words.delete();

    // random load
    for (int r = 0; r < 20; r++) begin
      exp_q = {};
      for (int x = 0; x < NC; x++)
        for (int y = 0; y < NR; y++)
          if ($urandom_range(99) < 3) begin
            hits[x][y] = 1;
            exp_q.push_back(w(x, y));
          end
      repeat (NC * 8 + exp_q.size() + 10) @(negedge clk);
      expect_words(exp_q, $sformatf("random %0d", r));
    end

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
