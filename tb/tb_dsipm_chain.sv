// tb_dsipm_chain: end-to-end test of three chips in a daisy chain, at the
// chip's default size (16 x 60 pixels of 9 SPADs, 32-word FIFO).
//
// The testbench plays the data acquisition: it drives the shared clk and cmd
// lines, injects packets into the first chip's ser_in and decodes the last
// chip's ser_out. It numbers the chips with WriteID, programs the SPAD
// enables of every pixel with WriteConfig, reads the configuration back,
// fires single SPADs at known times (checking time stamps, masked SPADs and
// the shared time stamp of a column), injects hits into the matrix until a
// FIFO fills, and exercises InjectFIFO, InjectSerializer, ReadoutSimple,
// Start/StopReadout, ResetMatrix and ResetAll. Expected words are computed
// from the packet format and the command timing, not taken from the chips.
`timescale 1ns/1ps
module tb_dsipm_chain;
  import dsipm_pkg::*;

  localparam int NC = 3;
  localparam int CLK_HALF = 10;   // 50 MHz

  logic clk = 1'b0;
  logic cmd = 1'b0;
  logic [NC:0] ser;
  logic [DEF_NCOL-1:0][DEF_NROW-1:0][DEF_NSPAD-1:0] fire [NC];

  int checks = 0, failures = 0;
  int unsigned cycle = 0;

  always #(CLK_HALF) clk = ~clk;
  always @(posedge clk) cycle <= cycle + 1;

  initial begin
    for (int c = 0; c < NC; c++) fire[c] = '0;
    ser[0] = 1'b0;
  end

  for (genvar c = 0; c < NC; c++) begin : g_chip
    dsipm_chip u_chip (
      .clk       (clk),
      .cmd       (cmd),
      .ser_in    (ser[c]),
      .ser_out   (ser[c+1]),
      .spad_fire (fire[c])
    );
  end

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s (t=%0t)", what, $time);
    end
  endtask

  // ---------------------------------------------------------------- CMD
  time t_fall_edge;   // rising edge that first samples CMD low
  time t_zero;        // rising edge at which the time counter becomes 0

  task automatic send_cmd(input int w);
    @(negedge clk) cmd = 1'b1;
    repeat (w) @(negedge clk);
    cmd = 1'b0;
    @(posedge clk) t_fall_edge = $time;
    repeat (2) @(negedge clk);
  endtask

  // ------------------------------------------------------------- packets
  task automatic send_packet(input bit valid, input logic [DATA_W-1:0] d);
    @(negedge clk) ser[0] = 1'b1;
    @(negedge clk) ser[0] = valid;
    for (int i = 0; i < DATA_W; i++) begin
      @(negedge clk) ser[0] = d[i];
    end
    @(negedge clk) ser[0] = 1'b0;
  endtask

  // back-to-back empty packets, then wait until they have left the chain
  task automatic send_empty(input int n);
    @(negedge clk);
    for (int p = 0; p < n; p++) begin
      ser[0] = 1'b1;
      @(negedge clk) ser[0] = 1'b0;
      repeat (PKT_LEN - 1) @(negedge clk);
    end
    repeat (NC + 4) @(negedge clk);
  endtask

  typedef logic [DATA_W-1:0] test_q_t[$];
  logic [DATA_W-1:0] rx_q[$];
  int  rx_empty = 0;
  int  rx_run = 0, rx_run_max = 0;
  bit  rbusy = 0;
  int  rpos = 0;
  bit  rvalid;
  logic [DATA_W-1:0] rdata;

  always @(posedge clk) begin
    if (!rbusy) begin
      if (ser[NC] === 1'b1) begin
        rbusy = 1;
        rpos  = 1;
      end
    end else begin
      if (rpos == 1) rvalid = ser[NC];
      else rdata[rpos-2] = ser[NC];
      if (rpos == PKT_LEN - 1) begin
        rbusy = 0;
        if (rvalid) begin
          rx_q.push_back(rdata);
          rx_run++;
          if (rx_run > rx_run_max) rx_run_max = rx_run;
        end else begin
          rx_empty++;
          rx_run = 0;
        end
      end
      rpos++;
    end
  end

  function automatic logic [DATA_W-1:0] hit_data(int id, int x, int y, int t);
    hit_word_t h;
    h.x = X_W'(x);
    h.y = Y_W'(y);
    h.t = TS_W'(t);
    return {h, ID_W'(id)};
  endfunction

  function automatic logic [DATA_W-1:0] cfg_data(int id, int x, int y, logic [8:0] en);
    cfg_t c;
    c.x  = X_W'(x);
    c.y  = Y_W'(y);
    c.en = en;
    return {{(HIT_W - $bits(cfg_t)){1'b0}}, c, ID_W'(id)};
  endfunction

  function automatic test_q_t test_words();
    test_q_t q;
    for (int c = 0; c < NC; c++) q.push_back({TEST_WORD, ID_W'(5 + c)});
    return q;
  endfunction

  // Enable pattern programmed into each pixel.
  function automatic logic [8:0] en_of(int c, int x, int y);
    if (c == 0 && x == 3 && (y == 10 || y == 20)) return 9'h1FF;
    if (c == 0 && x == 5 && y == 0)  return 9'h010;
    if (c == 1 && x == 0 && y == 0)  return 9'h1FF;
    if (c == 1 && x == 15 && y == 59) return 9'h100;
    if (c == 1 && x == 9)            return 9'h1FF;
    if (c == 2 && x == 7 && y == 33) return 9'h0FF;
    return 9'h000;
  endfunction

  // Compare the received words with the expected ones, in any order.
  task automatic match(input logic [DATA_W-1:0] exp_q[$], input string what);
    int n_exp = exp_q.size();
    int n_rx  = rx_q.size();
    foreach (rx_q[i]) begin
      int k[$];
      k = exp_q.find_first_index(e) with (e == rx_q[i]);
      check(k.size() == 1, $sformatf("%s: unexpected word %h", what, rx_q[i]));
      if (k.size() == 1) exp_q.delete(k[0]);
    end
    check(exp_q.size() == 0, $sformatf("%s: %0d words missing (got %0d of %0d)",
                                      what, exp_q.size(), n_rx, n_exp));
    rx_q.delete();
  endtask

  // SPAD pulse at rising edge k after t_zero, +3 ns (even code) or +13 ns (odd)
  task automatic fire_at(int c, int x, int y, int s, int k, bit odd);
    time t = t_zero + time'(2 * CLK_HALF * k + (odd ? 13 : 3));
    if (t > $time) #(t - $time);
    fire[c][x][y][s] = 1'b1;
    #2 fire[c][x][y][s] = 1'b0;
  endtask

  // mechanism counters
  int n_write_id = 0, n_write_cfg = 0, n_read_cfg = 0, n_hit_ts = 0, n_masked = 0;
  int n_shared_ts = 0, n_inject_matrix = 0, n_fifo_full = 0, n_inject_fifo = 0;
  int n_inject_ser = 0, n_simple = 0, n_stop = 0, n_reset_matrix = 0, n_reset_all = 0;
  int n_fill_downstream = 0, n_link_rate = 0;

  initial begin : main
    logic [DATA_W-1:0] exp_q[$];
    repeat (4) @(negedge clk);

    // ResetAll brings every chip into a defined state
    send_cmd(CMD_RESET_ALL);
    n_reset_all++;
    repeat (3) @(negedge clk);

    // WriteID: one packet numbers the chain 5, 6, 7; 8 leaves the last chip
    send_cmd(CMD_WRITE_ID);
    send_packet(1'b1, DATA_W'(5));
    repeat (NC + 4) @(negedge clk);
    check(rx_q.size() == 1 && rx_q[0] == DATA_W'(8), "WriteID: forwarded ID is 8");
    rx_q.delete();
    n_write_id++;

    // WriteConfig for every pixel of every chip
    for (int c = 0; c < NC; c++)
      for (int x = 0; x < DEF_NCOL; x++)
        for (int y = 0; y < DEF_NROW; y++) begin
          send_cmd(CMD_WRITE_CONFIG);
          send_packet(1'b1, cfg_data(5 + c, x, y, en_of(c, x, y)));
        end
    repeat (NC + 4) @(negedge clk);
    rx_q.delete();   // config packets are forwarded along the chain
    n_write_cfg++;

    // ReadConfig: each chip fills one empty packet with its last config
    send_cmd(CMD_READ_CONFIG);
    send_empty(4);
    check(rx_q.size() == 3, "ReadConfig: three words");
    if (rx_q.size() == 3) begin
      check(rx_q[0] == cfg_data(5, 15, 59, 9'h000), "ReadConfig chip 5 first");
      check(rx_q[1] == cfg_data(6, 15, 59, 9'h100), "ReadConfig chip 6 second");
      check(rx_q[2] == cfg_data(7, 15, 59, 9'h000), "ReadConfig chip 7 third");
      n_read_cfg++;
      n_fill_downstream++;
    end
    rx_q.delete();

    // Time stamps of SPAD hits (readout stopped while firing)
    send_cmd(CMD_RESET_TIME);
    t_zero = t_fall_edge + 2 * CLK_HALF;
    fork
      fire_at(0, 3, 10, 2, 5, 0);    // T = 10
      fire_at(0, 3, 20, 7, 7, 0);    // same column before readout: T = 10
      fire_at(0, 5, 0, 0, 15, 0);    // disabled SPAD: no hit
      fire_at(0, 5, 0, 4, 20, 1);    // T = 41
      fire_at(2, 7, 33, 8, 12, 0);   // disabled SPAD: no hit
      fire_at(2, 7, 33, 0, 30, 1);   // T = 61
      fire_at(1, 0, 0, 3, 40, 0);    // T = 80
      fire_at(1, 15, 59, 8, 41, 1);  // T = 83
    join
    repeat (20) @(negedge clk);
    send_empty(2);
    check(rx_q.size() == 0, "no words before StartReadout");
    rx_q.delete();
    send_cmd(CMD_START_READOUT);
    send_empty(8);
    exp_q = {hit_data(5, 3, 10, 10), hit_data(5, 3, 20, 10), hit_data(5, 5, 0, 41),
             hit_data(7, 7, 33, 61), hit_data(6, 0, 0, 80), hit_data(6, 15, 59, 83)};
    if (rx_q.size() == 6) begin
      n_hit_ts++;
      n_masked += 2;
      n_shared_ts++;
    end
    match(exp_q, "SPAD hits");

    // InjectMatrix: every pixel with an enabled SPAD gets a hit; chip 6 has
    // 62 such pixels, more than its FIFO holds, so its sequencer must wait
    send_cmd(CMD_STOP_READOUT);
    n_stop++;
    send_cmd(CMD_RESET_TIME);
    t_zero = t_fall_edge + 2 * CLK_HALF;
    send_cmd(CMD_INJECT_MATRIX);
    begin
      int tinj;
      tinj = 2 * int'((t_fall_edge - t_zero) / (2 * CLK_HALF));
      exp_q = {};
      for (int c = 0; c < NC; c++)
        for (int x = 0; x < DEF_NCOL; x++)
          for (int y = 0; y < DEF_NROW; y++)
            // chip 6 column 15 is still in the matrix, behind the stalled
            // column 9, when ResetMatrix comes: it is cleared, not read
            if (en_of(c, x, y) != 0 && !(c == 1 && x == 15))
              exp_q.push_back(hit_data(5 + c, x, y, tinj));
    end
    repeat (100) @(negedge clk);
    // a hit that arrives while the sequencer waits stays in the matrix;
    // ResetMatrix clears it
    fire[1][0][0][0] = 1'b1;
    #2 fire[1][0][0][0] = 1'b0;
    repeat (4) @(negedge clk);
    send_cmd(CMD_RESET_MATRIX);
    n_reset_matrix++;
    send_cmd(CMD_START_READOUT);
    send_empty(80);
    check(rx_run_max >= 60, $sformatf("link carries a hit in every packet (run %0d)", rx_run_max));
    if (rx_run_max >= 60) n_link_rate++;
    if (rx_q.size() == exp_q.size()) n_inject_matrix++;
    // chip 6 held 61 hits while readout was stopped, more than its FIFO
    // holds: all of them arriving shows the sequencer waited on a full FIFO
    begin
      int n6;
      n6 = 0;
      foreach (rx_q[i]) if (rx_q[i][ID_W-1:0] == ID_W'(6)) n6++;
      n_fifo_full = (n6 > DEF_FIFO_DEPTH) ? n6 - DEF_FIFO_DEPTH : 0;
      check(n6 == 61, $sformatf("chip 6 sent all 61 injected hits (%0d)", n6));
    end
    match(exp_q, "InjectMatrix + FIFO full");

    // InjectFIFO twice, then ReadoutSimple: one word per chip
    send_cmd(CMD_STOP_READOUT);
    send_cmd(CMD_INJECT_FIFO);
    send_cmd(CMD_INJECT_FIFO);
    send_empty(2);
    check(rx_q.size() == 0, "InjectFIFO: nothing sent while stopped");
    rx_q.delete();
    send_cmd(CMD_READOUT_SIMPLE);
    send_empty(6);
    exp_q = test_words();
    if (rx_q.size() == 3) begin
      n_simple++;
      n_inject_fifo++;
    end
    match(exp_q, "ReadoutSimple");
    send_cmd(CMD_START_READOUT);
    send_empty(5);
    exp_q = test_words();
    match(exp_q, "second InjectFIFO words");

    // InjectSerializer: sent even with readout stopped
    send_cmd(CMD_STOP_READOUT);
    send_cmd(CMD_INJECT_SER);
    send_empty(5);
    exp_q = test_words();
    if (rx_q.size() == 3) n_inject_ser++;
    match(exp_q, "InjectSerializer");

    // ResetAll drops hits and FIFO contents
    send_cmd(CMD_INJECT_FIFO);
    send_cmd(CMD_INJECT_MATRIX);
    repeat (20) @(negedge clk);
    send_cmd(CMD_RESET_ALL);
    n_reset_all++;
    send_cmd(CMD_START_READOUT);
    send_empty(5);
    check(rx_q.size() == 0, "ResetAll cleared FIFO and matrix");
    rx_q.delete();

    // every mechanism happened at least once
    check(n_write_id > 0,        "mechanism WriteID");
    check(n_write_cfg > 0,       "mechanism WriteConfig");
    check(n_read_cfg > 0,        "mechanism ReadConfig");
    check(n_hit_ts > 0,          "mechanism SPAD hit with time stamp");
    check(n_masked > 0,          "mechanism masked SPAD");
    check(n_shared_ts > 0,       "mechanism shared column time stamp");
    check(n_inject_matrix > 0,   "mechanism InjectMatrix");
    check(n_fifo_full > 0,       "mechanism FIFO full stall");
    check(n_inject_fifo > 0,     "mechanism InjectFIFO");
    check(n_inject_ser > 0,      "mechanism InjectSerializer");
    check(n_simple > 0,          "mechanism ReadoutSimple");
    check(n_stop > 0,            "mechanism StopReadout");
    check(n_reset_matrix > 0,    "mechanism ResetMatrix");
    check(n_reset_all > 1,       "mechanism ResetAll");
    check(n_fill_downstream > 0, "mechanism downstream chip fills later packet");
    check(n_link_rate > 0,       "mechanism full link rate");
    $display("mechanisms: write_id=%0d write_cfg=%0d read_cfg=%0d hit_ts=%0d masked=%0d shared_ts=%0d inject_matrix=%0d hits_beyond_fifo=%0d inject_fifo=%0d inject_ser=%0d simple=%0d stop=%0d reset_matrix=%0d reset_all=%0d downstream_fill=%0d link_rate=%0d",
             n_write_id, n_write_cfg, n_read_cfg, n_hit_ts, n_masked, n_shared_ts, n_inject_matrix,
             n_fifo_full, n_inject_fifo, n_inject_ser, n_simple, n_stop, n_reset_matrix, n_reset_all,
             n_fill_downstream, n_link_rate);
    $display("cycles=%0d", cycle);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin : watchdog
    repeat (400000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
