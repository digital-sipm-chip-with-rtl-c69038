// dsipm_chip: digital part of a digital SiPM chip with serial readout.
//
// A matrix of 960 pixels (32x30, read as 16 columns of 60), each with 9
// SPADs that can be switched off one by one, turns every detected photon
// into a stored hit. A hit flags its column; the column's latch keeps a
// 10-bit time stamp with 10 ns steps at 50 MHz. A sequencer picks hit
// columns, reads their hit rows, clears them and writes one {X, Y, T} word
// per hit into a 32-word FIFO, 7 clock cycles per hit. The serial link puts
// these words, tagged with the 6-bit chip ID, into empty 28-bit packets
// that travel along a daisy chain of chips (up to 64, one per ID).
// The chip has four logic pins: clk, cmd (pulse-width encoded commands,
// see dsipm_pkg::cmd_e), ser_in and ser_out. spad_fire[x][y][s] stands for
// the comparator output of SPAD s of pixel (x, y); the SPADs, quenching and
// comparators are analog and not part of this RTL.
// Command actions: ResetAll clears state machines, FIFO, time counter and
// hits (not chip ID, configuration or SPAD enables); ResetTime clears the
// time counter; ResetMatrix clears all hits; InjectMatrix pulses the inject
// line of every pixel that has an enabled SPAD; InjectFIFO writes the test
// word into the FIFO; the others act in the serial link. The block structure
// and the command set follow the document; how the blocks are sequenced is
// this design's.
module dsipm_chip
  import dsipm_pkg::*;
#(
  parameter int unsigned NCOL       = dsipm_pkg::DEF_NCOL,
  parameter int unsigned NROW       = dsipm_pkg::DEF_NROW,
  parameter int unsigned NSPAD      = dsipm_pkg::DEF_NSPAD,
  parameter int unsigned FIFO_DEPTH = dsipm_pkg::DEF_FIFO_DEPTH
) (
  input  logic                                 clk,
  input  logic                                 cmd,
  input  logic                                 ser_in,
  output logic                                 ser_out,
  input  logic [NCOL-1:0][NROW-1:0][NSPAD-1:0] spad_fire
);

  logic       cmd_valid;
  cmd_e       cmd_code;
  logic       rst_all, rst_time, rst_matrix, inj_matrix, inj_fifo;

  logic [TS_W-1:0]            ts;
  logic [NCOL-1:0]            col_hit, col_send, col_reset, seq_reset;
  logic [NROW-1:0]            row_hit;
  logic [NCOL-1:0][TS_W-1:0]  col_ts;

  logic                       seq_push, seq_busy;
  hit_word_t                  seq_word, fifo_wdata, fifo_rdata;
  logic                       fifo_push, fifo_pop, fifo_full, fifo_empty;
  logic [$clog2(FIFO_DEPTH):0] fifo_count;

  cfg_t                       cfg;
  logic                       cfg_we;
  logic [ID_W-1:0]            chip_id;

  dsipm_cmd_decoder u_cmd (
    .clk (clk), .cmd (cmd), .cmd_valid (cmd_valid), .cmd_code (cmd_code)
  );

  assign rst_all    = cmd_valid && (cmd_code == CMD_RESET_ALL);
  assign rst_time   = rst_all || (cmd_valid && (cmd_code == CMD_RESET_TIME));
  assign rst_matrix = rst_all || (cmd_valid && (cmd_code == CMD_RESET_MATRIX));
  assign inj_matrix = cmd_valid && (cmd_code == CMD_INJECT_MATRIX);
  assign inj_fifo   = cmd_valid && (cmd_code == CMD_INJECT_FIFO);

  dsipm_time_counter #(.TS_W(TS_W)) u_time (
    .clk (clk), .clr (rst_time), .ts (ts)
  );

  assign col_reset = seq_reset | {NCOL{rst_matrix}};

  dsipm_matrix #(.NCOL(NCOL), .NROW(NROW), .NSPAD(NSPAD), .X_W(X_W), .Y_W(Y_W)) u_matrix (
    .clk       (clk),
    .spad_fire (spad_fire),
    .inject    (inj_matrix),
    .cfg_we    (cfg_we),
    .cfg_x     (cfg.x),
    .cfg_y     (cfg.y),
    .cfg_en    (cfg.en),
    .col_reset (col_reset),
    .col_send  (col_send),
    .col_hit   (col_hit),
    .row_hit   (row_hit)
  );

  dsipm_col_tlatch #(.NCOL(NCOL), .TS_W(TS_W)) u_tl (
    .ts (ts), .col_hit (col_hit), .col_ts (col_ts)
  );

  dsipm_readout_seq #(.NCOL(NCOL), .NROW(NROW), .TS_W(TS_W), .X_W(X_W), .Y_W(Y_W)) u_seq (
    .clk        (clk),
    .clr        (rst_all),
    .col_hit    (col_hit),
    .row_hit    (row_hit),
    .col_ts     (col_ts),
    .fifo_full  (fifo_full || inj_fifo),
    .col_send   (col_send),
    .col_reset  (seq_reset),
    .fifo_push  (seq_push),
    .fifo_wdata (seq_word),
    .busy       (seq_busy)
  );

  // InjectFIFO takes the write port for one cycle; the sequencer waits.
  assign fifo_push  = seq_push || inj_fifo;
  assign fifo_wdata = inj_fifo ? TEST_WORD : seq_word;

  dsipm_fifo #(.DEPTH(FIFO_DEPTH), .W(HIT_W)) u_fifo (
    .clk   (clk),
    .clr   (rst_all),
    .push  (fifo_push && !fifo_full),
    .wdata (fifo_wdata),
    .pop   (fifo_pop),
    .rdata (fifo_rdata),
    .full  (fifo_full),
    .empty (fifo_empty),
    .count (fifo_count)
  );

  dsipm_serial_link u_link (
    .clk        (clk),
    .clr        (rst_all),
    .ser_in     (ser_in),
    .ser_out    (ser_out),
    .cmd_valid  (cmd_valid),
    .cmd_code   (cmd_code),
    .fifo_empty (fifo_empty),
    .fifo_rdata (fifo_rdata),
    .fifo_pop   (fifo_pop),
    .cfg        (cfg),
    .cfg_we     (cfg_we),
    .chip_id    (chip_id)
  );

endmodule
