// tb_dsipm_inject_rate: the hit-rate measurement run on one full-size chip.
// One pixel is left enabled; InjectMatrix is issued at a fixed period while
// the data acquisition sends empty packets back to back with continuous
// readout on. For injection rates of 50, 25 and 250 kHz at 50 MHz (periods of
// 1000, 2000 and 200 clock cycles) every injection must come out as exactly
// one hit of that pixel, and successive time stamps must differ by twice the
// period (double-edge time code, modulo 1024).
`timescale 1ns/1ps
module tb_dsipm_inject_rate;
  import dsipm_pkg::*;

  localparam int CLK_HALF = 10;
  localparam int PX = 11, PY = 42, ID = 17;

  logic clk = 1'b0, cmd = 1'b0, ser_in = 1'b0, ser_out;
  logic [DEF_NCOL-1:0][DEF_NROW-1:0][DEF_NSPAD-1:0] fire = '0;
  int checks = 0, failures = 0;

  always #(CLK_HALF) clk = ~clk;

  dsipm_chip u_chip (.clk (clk), .cmd (cmd), .ser_in (ser_in), .ser_out (ser_out), .spad_fire (fire));

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s (t=%0t)", what, $time); end
  endtask

  task automatic send_cmd(input int w);
    @(negedge clk) cmd = 1'b1;
    repeat (w) @(negedge clk);
    cmd = 1'b0;
    repeat (2) @(negedge clk);
  endtask

  task automatic send_packet(input bit valid, input logic [DATA_W-1:0] d);
    @(negedge clk) ser_in = 1'b1;
    @(negedge clk) ser_in = valid;
    for (int i = 0; i < DATA_W; i++) @(negedge clk) ser_in = d[i];
    @(negedge clk) ser_in = 1'b0;
  endtask

  // packet source: back-to-back empty packets while 'stream' is set
  bit stream = 0;
  always begin
    @(negedge clk);
    if (stream) begin
      ser_in = 1'b1;
      @(negedge clk) ser_in = 1'b0;
      repeat (PKT_LEN - 2) @(negedge clk);
    end
  end

  // packet sink
  logic [DATA_W-1:0] rx_q[$];
  bit rbusy = 0;
  int rpos;
  bit rvalid;
  logic [DATA_W-1:0] rdata;
  always @(posedge clk) begin
    if (!rbusy) begin
      if (ser_out) begin rbusy = 1; rpos = 1; end
    end else begin
      if (rpos == 1) rvalid = ser_out;
      else rdata[rpos-2] = ser_out;
      if (rpos == PKT_LEN - 1) begin
        rbusy = 0;
        if (rvalid) rx_q.push_back(rdata);
      end
      rpos++;
    end
  end

  initial begin : main
    int periods[3] = '{1000, 2000, 200};
    repeat (3) @(negedge clk);
    send_cmd(CMD_RESET_ALL);
    send_cmd(CMD_WRITE_ID);
    send_packet(1'b1, DATA_W'(ID));
    repeat (4) @(negedge clk);
    rx_q.delete();
    for (int x = 0; x < DEF_NCOL; x++)
      for (int y = 0; y < DEF_NROW; y++) begin
        cfg_t c;
        c.x = X_W'(x); c.y = Y_W'(y);
        c.en = (x == PX && y == PY) ? 9'h001 : 9'h000;
        send_cmd(CMD_WRITE_CONFIG);
        send_packet(1'b1, {{(HIT_W - $bits(cfg_t)){1'b0}}, c, ID_W'(ID)});
      end
    repeat (4) @(negedge clk);
    rx_q.delete();
    send_cmd(CMD_START_READOUT);
    foreach (periods[p]) begin
      int n_inj;
      n_inj = 8;
      stream = 1;
      for (int i = 0; i < n_inj; i++) begin
        fork
          send_cmd(CMD_INJECT_MATRIX);
          repeat (periods[p]) @(negedge clk);
        join
      end
      repeat (200) @(negedge clk);
      stream = 0;
      repeat (2 * PKT_LEN) @(negedge clk);
      check(rx_q.size() == n_inj, $sformatf("period %0d: %0d hits of %0d", periods[p], rx_q.size(), n_inj));
      foreach (rx_q[i]) begin
        hit_word_t h;
        h = hit_word_t'(rx_q[i][DATA_W-1:ID_W]);
        check(rx_q[i][ID_W-1:0] == ID_W'(ID) && h.x == X_W'(PX) && h.y == Y_W'(PY),
              $sformatf("period %0d: hit %0d address", periods[p], i));
        if (i > 0) begin
          hit_word_t g;
          g = hit_word_t'(rx_q[i-1][DATA_W-1:ID_W]);
          check(h.t - g.t == TS_W'(2 * periods[p]),
                $sformatf("period %0d: time step %0d", periods[p], int'(h.t - g.t)));
        end
      end
      rx_q.delete();
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
