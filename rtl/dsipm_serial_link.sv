// dsipm_serial_link: daisy-chained serial readout and configuration port.
//
// Chips are chained SerIn -> SerOut on a common clock. The data acquisition
// injects a '1' into the first chip to open a packet of PKT_LEN = 28 bits:
//   bit 0      marker '1'
//   bit 1      valid: 1 if the packet carries a word
//   bits 2..27 26 data bits, LSB first: {word[19:0], chip ID[5:0]}
// Every chip forwards SerIn to SerOut one clock later. When a packet with
// valid = 0 passes and the chip has something to send, it sets valid and
// replaces the 26 data bits with its own word, so each empty packet picks up
// one word along the chain. Words to send, in order of priority: its
// configuration register (after ReadConfig), the test word (after
// InjectSerializer), a hit from the FIFO (while continuous readout is on, or
// once after ReadoutSimple). Outside packets the line is 0; packets must be
// at least PKT_LEN cycles apart.
// Incoming packets also configure the chip. After WriteID the next valid
// packet's ID field becomes the chip ID and is forwarded incremented by one,
// so a single packet numbers a whole chain. After WriteConfig the next valid
// packet is taken into the configuration register (bits 6..24 of the data:
// pixel X, Y and its 9 SPAD enables) if its ID field equals the chip ID, and
// cfg_we pulses for one cycle so the matrix stores the enables.
// Latency: SerIn to SerOut is one cycle. Packet length, 6-bit ID, 10-bit time
// stamp, the daisy chain and the packet-marker scheme follow the document;
// the field order, the valid bit, the ID numbering scheme and the config
// layout are this design's choices. clr (ResetAll) stops readout, drops
// pending words and packet framing, and keeps chip ID and configuration.
module dsipm_serial_link
  import dsipm_pkg::*;
(
  input  logic                  clk,
  input  logic                  clr,
  input  logic                  ser_in,
  output logic                  ser_out,
  input  logic                  cmd_valid,
  input  cmd_e                  cmd_code,
  input  logic                  fifo_empty,
  input  hit_word_t             fifo_rdata,
  output logic                  fifo_pop,
  output cfg_t                  cfg,
  output logic                  cfg_we,
  output logic [ID_W-1:0]       chip_id
);

  localparam int unsigned POS_W = $clog2(PKT_LEN);

  logic              busy;
  logic [POS_W-1:0]  pos;
  logic              running, simple_pend, rdcfg_pend, test_pend;
  logic              arm_wcfg, arm_wid;
  logic              ins, incr, carry, rxv;
  logic [DATA_W-1:0] txd, rxd, rx_full;

  logic              have_hit, have_any;
  logic [DATA_W-1:0] word;
  logic              take;

  assign have_hit = !fifo_empty && (running || simple_pend);
  assign have_any = rdcfg_pend || test_pend || have_hit;

  always_comb begin
    if (rdcfg_pend)     word = {{(HIT_W - $bits(cfg_t)){1'b0}}, cfg, chip_id};
    else if (test_pend) word = {TEST_WORD, chip_id};
    else                word = {fifo_rdata, chip_id};
  end

  // An empty packet's valid bit is arriving and there is a word to send.
  assign take     = busy && (pos == POS_W'(1)) && !ser_in && have_any && !clr;
  assign fifo_pop = take && !rdcfg_pend && !test_pend;
  assign rx_full  = {ser_in, rxd[DATA_W-1:1]};

  always_ff @(posedge clk) begin
    cfg_we  <= 1'b0;
    ser_out <= ser_in;
    if (clr) begin
      busy        <= 1'b0;
      pos         <= '0;
      running     <= 1'b0;
      simple_pend <= 1'b0;
      rdcfg_pend  <= 1'b0;
      test_pend   <= 1'b0;
      arm_wcfg    <= 1'b0;
      arm_wid     <= 1'b0;
      ins         <= 1'b0;
      incr        <= 1'b0;
      ser_out     <= 1'b0;
    end else begin
      if (!busy) begin
        if (ser_in) begin
          busy <= 1'b1;
          pos  <= POS_W'(1);
        end
      end else if (pos == POS_W'(1)) begin
        pos   <= pos + 1'b1;
        rxv   <= ser_in;
        ins   <= take;
        incr  <= arm_wid && ser_in;
        carry <= 1'b1;
        if (take) begin
          ser_out <= 1'b1;
          txd     <= word;
          if (rdcfg_pend)     rdcfg_pend  <= 1'b0;
          else if (test_pend) test_pend   <= 1'b0;
          else                simple_pend <= 1'b0;
        end
      end else begin
        pos <= pos + 1'b1;
        rxd <= rx_full;
        if (ins) begin
          ser_out <= txd[0];
          txd     <= txd >> 1;
        end else if (incr && (pos < POS_W'(2 + ID_W))) begin
          ser_out <= ser_in ^ carry;
          carry   <= ser_in & carry;
        end
        if (pos == POS_W'(PKT_LEN - 1)) begin
          busy <= 1'b0;
          if (arm_wid && rxv) begin
            chip_id <= rx_full[ID_W-1:0];
            arm_wid <= 1'b0;
          end
          if (arm_wcfg && rxv) begin
            arm_wcfg <= 1'b0;
            if (rx_full[ID_W-1:0] == chip_id) begin
              cfg    <= rx_full[ID_W +: $bits(cfg_t)];
              cfg_we <= 1'b1;
            end
          end
        end
      end

      if (cmd_valid) begin
        unique case (cmd_code)
          CMD_READOUT_SIMPLE: simple_pend <= 1'b1;
          CMD_START_READOUT:  running     <= 1'b1;
          CMD_STOP_READOUT: begin
            running     <= 1'b0;
            simple_pend <= 1'b0;
          end
          CMD_WRITE_CONFIG:   arm_wcfg    <= 1'b1;
          CMD_READ_CONFIG:    rdcfg_pend  <= 1'b1;
          CMD_WRITE_ID:       arm_wid     <= 1'b1;
          CMD_INJECT_SER:     test_pend   <= 1'b1;
          default: ;
        endcase
      end
    end
  end

endmodule
