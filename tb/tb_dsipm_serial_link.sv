// tb_dsipm_serial_link: one serial link with a queue standing in for the
// hit FIFO. Checks the one-cycle forwarding of SerIn, that occupied packets
// pass untouched and empty packets are filled (one word each, priority
// config > test word > hit), ReadoutSimple sending a single hit, Stop, the
// WriteID numbering (ID taken, ID+1 forwarded), WriteConfig only for the
// addressed chip, and ResetAll dropping pending words.
`timescale 1ns/1ps
module tb_dsipm_serial_link;
  import dsipm_pkg::*;
  int checks = 0, failures = 0;
  logic clk = 0, clr = 1, ser_in = 0, ser_out;
  logic cmd_valid = 0;
  cmd_e cmd_code = CMD_NONE;
  logic fifo_pop, cfg_we;
  hit_word_t fifo_rdata;
  cfg_t cfg;
  logic [ID_W-1:0] chip_id;
  hit_word_t fq[$];
  int n_cfg_we = 0;
  logic ser_in_d;

  always #10 clk = ~clk;

  dsipm_serial_link dut (
    .clk (clk), .clr (clr), .ser_in (ser_in), .ser_out (ser_out), .cmd_valid (cmd_valid),
    .cmd_code (cmd_code), .fifo_empty (fifo_empty), .fifo_rdata (fifo_rdata),
    .fifo_pop (fifo_pop), .cfg (cfg), .cfg_we (cfg_we), .chip_id (chip_id)
  );

  // FIFO model: a pop seen at the rising edge takes effect 1 ns after the
  // following falling edge, when the outputs are refreshed from the queue
  logic fifo_empty, pop_pending = 0;
  always @(posedge clk) begin
    pop_pending <= fifo_pop;
    if (fifo_pop) check(!fifo_empty, "pop from non-empty FIFO");
    if (cfg_we && !clr) n_cfg_we++;
    ser_in_d <= ser_in;
  end
  always @(negedge clk) begin
    #1;
    if (pop_pending && fq.size() > 0) void'(fq.pop_front());
    fifo_empty = (fq.size() == 0);
    fifo_rdata = (fq.size() > 0) ? fq[0] : '0;
  end

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s (t=%0t)", what, $time); end
  endtask

  // receiver on ser_out
  typedef struct { bit v; logic [DATA_W-1:0] d; } pkt_t;
  pkt_t rx_q[$];
  bit rbusy = 0;
  int rpos;
  pkt_t cur;
  always @(posedge clk) begin
    if (!clr) begin
      if (!rbusy) begin
        if (ser_out) begin rbusy = 1; rpos = 1; end
      end else begin
        if (rpos == 1) cur.v = ser_out;
        else cur.d[rpos-2] = ser_out;
        if (rpos == PKT_LEN - 1) begin rbusy = 0; rx_q.push_back(cur); end
        rpos++;
      end
    end
  end

  task automatic command(input cmd_e c);
    @(negedge clk) begin cmd_valid = 1; cmd_code = c; end
    @(negedge clk) cmd_valid = 0;
  endtask

  task automatic packet(input bit v, input logic [DATA_W-1:0] d);
    @(negedge clk) ser_in = 1;
    @(negedge clk) ser_in = v;
    for (int i = 0; i < DATA_W; i++) @(negedge clk) ser_in = d[i];
    @(negedge clk) ser_in = 0;
    repeat (3) @(negedge clk);
  endtask

  task automatic expect_pkt(input bit v, input logic [DATA_W-1:0] d, input string what);
    check(rx_q.size() == 1, $sformatf("%s: one packet (%0d)", what, rx_q.size()));
    if (rx_q.size() > 0) begin
      check(rx_q[0].v == v, $sformatf("%s: valid", what));
      if (v) check(rx_q[0].d == d, $sformatf("%s: data %h expected %h", what, rx_q[0].d, d));
    end
    rx_q.delete();
  endtask

  function automatic hit_word_t hw(int x, int y, int t);
    hit_word_t h;
    h.x = X_W'(x); h.y = Y_W'(y); h.t = TS_W'(t);
    return h;
  endfunction

  // forwarding is checked on every cycle in which the link adds nothing
  bit fwd_check = 0;
  always @(negedge clk) if (fwd_check && !clr) check(ser_out == ser_in_d, "one-cycle forwarding");

  initial begin
    cfg_t c;
    repeat (3) @(negedge clk);
    clr = 0;
    repeat (2) @(negedge clk);
    n_cfg_we = 0;

    // WriteID: take 21, forward 22 (with carry through the low bits: 23 -> 24)
    command(CMD_WRITE_ID);
    packet(1, DATA_W'(23));
    check(chip_id == 6'd23, "WriteID takes ID");
    expect_pkt(1, DATA_W'(24), "WriteID forwards ID+1");
    command(CMD_WRITE_ID);
    packet(1, {20'hABCDE, 6'd21});
    check(chip_id == 6'd21, "WriteID again");
    expect_pkt(1, {20'hABCDE, 6'd22}, "ID+1 and rest of packet kept");

    // plain forwarding, nothing to send
    fwd_check = 1;
    packet(1, 26'h2AAAAAA);
    expect_pkt(1, 26'h2AAAAAA, "forward valid packet");
    packet(0, '0);
    expect_pkt(0, '0, "forward empty packet");
    fwd_check = 0;

    // WriteConfig for another chip: ignored; for this chip: taken
    c.x = 4'd9; c.y = 6'd44; c.en = 9'h155;
    command(CMD_WRITE_CONFIG);
    packet(1, {1'b0, c, 6'd3});
    check(n_cfg_we == 0, "config for another chip ignored");
    expect_pkt(1, {1'b0, c, 6'd3}, "config packet forwarded");
    command(CMD_WRITE_CONFIG);
    packet(1, {1'b0, c, 6'd21});
    check(n_cfg_we == 1 && cfg == c, "config written");
    rx_q.delete();

    // continuous readout: occupied packets untouched, empty ones filled
    fq.push_back(hw(1, 2, 3));
    fq.push_back(hw(15, 59, 1023));
    packet(0, '0);
    expect_pkt(0, '0, "no readout before start");
    command(CMD_START_READOUT);
    packet(1, 26'h1234567);
    expect_pkt(1, 26'h1234567, "occupied packet passes");
    packet(0, '0);
    expect_pkt(1, {hw(1, 2, 3), 6'd21}, "first hit");
    packet(0, '0);
    expect_pkt(1, {hw(15, 59, 1023), 6'd21}, "second hit");
    packet(0, '0);
    expect_pkt(0, '0, "FIFO empty: packet stays empty");

    // priority: config before test word before hit
    fq.push_back(hw(7, 7, 7));
    command(CMD_INJECT_SER);
    command(CMD_READ_CONFIG);
    packet(0, '0);
    expect_pkt(1, {1'b0, c, 6'd21}, "ReadConfig first");
    packet(0, '0);
    expect_pkt(1, {TEST_WORD, 6'd21}, "test word second");
    packet(0, '0);
    expect_pkt(1, {hw(7, 7, 7), 6'd21}, "hit third");

    // stop; ReadoutSimple sends exactly one hit
    command(CMD_STOP_READOUT);
    fq.push_back(hw(2, 2, 2));
    fq.push_back(hw(3, 3, 3));
    packet(0, '0);
    expect_pkt(0, '0, "stopped");
    command(CMD_READOUT_SIMPLE);
    packet(0, '0);
    expect_pkt(1, {hw(2, 2, 2), 6'd21}, "ReadoutSimple one hit");
    packet(0, '0);
    expect_pkt(0, '0, "ReadoutSimple only one");

    // back-to-back packets: one word per 28 cycles
    command(CMD_START_READOUT);
    for (int i = 0; i < 5; i++) fq.push_back(hw(i, i, i));
    @(negedge clk);
    for (int p = 0; p < 6; p++) begin
      ser_in = 1;
      repeat (PKT_LEN) @(negedge clk) ser_in = 0;
    end
    repeat (3) @(negedge clk);
    check(rx_q.size() == 6, "six back-to-back packets");
    if (rx_q.size() == 6) begin
      check(rx_q[0].v && rx_q[0].d == {hw(3, 3, 3), 6'd21}, "back-to-back 0");
      for (int i = 0; i < 5; i++)
        check(rx_q[i+1].v && rx_q[i+1].d == {hw(i, i, i), 6'd21}, $sformatf("back-to-back %0d", i + 1));
    end
    rx_q.delete();

    // ResetAll drops pending words and stops readout
    command(CMD_INJECT_SER);
    fq.push_back(hw(9, 9, 9));
    @(negedge clk) clr = 1;
    @(negedge clk) clr = 0;
    packet(0, '0);
    expect_pkt(0, '0, "ResetAll drops pending");
    check(chip_id == 6'd21, "ResetAll keeps ID");

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
