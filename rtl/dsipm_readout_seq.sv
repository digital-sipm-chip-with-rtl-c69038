// dsipm_readout_seq: moves hits from the pixel matrix into the hit FIFO.
//
// The column hit lines are asynchronous; they pass a two-flop synchroniser.
// The global scanner (an X priority decoder) picks the lowest column with a
// hit and runs this sequence, one state per clock cycle:
//   SCAN  pick column X
//   SEND  raise SendRow of column X: its hit pixels drive their HitRow lines
//   CAPT  keep SendRow, capture the HitRow vector and the column time stamp
//   RST   pulse the column reset: all hit flip-flops of the column clear,
//         which also reopens the column's time-stamp latch
//   WAIT1, WAIT2  let the cleared hit flag pass the synchroniser
//   WRITE the Y priority decoder picks the lowest captured row; one word
//         {T, Y, X} goes into the FIFO per cycle until all captured rows
//         are written; then back to SCAN
// A column with one hit therefore takes exactly 7 clock cycles, the figure
// the document gives (7 Mhits/s at 50 MHz); each further hit in the same
// column adds one cycle. If the FIFO is full, WRITE waits, so no hit is
// dropped. clr (synchronous) returns to SCAN and forgets captured rows.
// The 7-cycle transfer, the priority decoders and the column select follow
// the document; the individual states and the synchroniser are this design's.
// col_send and col_reset are decoded from the state register, which holds
// them steady for whole cycles.
module dsipm_readout_seq
#(
  parameter int unsigned NCOL  = 16,
  parameter int unsigned NROW  = 60,
  parameter int unsigned TS_W  = 10,
  parameter int unsigned X_W   = 4,
  parameter int unsigned Y_W   = 6
) (
  input  logic                           clk,
  input  logic                           clr,
  input  logic [NCOL-1:0]                col_hit,
  input  logic [NROW-1:0]                row_hit,
  input  logic [NCOL-1:0][TS_W-1:0]      col_ts,
  input  logic                           fifo_full,
  output logic [NCOL-1:0]                col_send,
  output logic [NCOL-1:0]                col_reset,
  output logic                           fifo_push,
  output logic [TS_W+Y_W+X_W-1:0]        fifo_wdata,
  output logic                           busy
);

  typedef enum logic [2:0] {
    S_SCAN, S_SEND, S_CAPT, S_RST, S_WAIT1, S_WAIT2, S_WRITE
  } state_e;

  state_e          state;
  logic [NCOL-1:0] hit_s1, hit_s2;
  logic [X_W-1:0]  xsel;
  logic [NROW-1:0] rows_q;
  logic [TS_W-1:0] ts_q;

  logic [X_W-1:0]  x_idx;
  logic            x_valid;
  logic [Y_W-1:0]  y_idx;
  logic            y_valid;

  dsipm_prio_enc #(.N(NCOL), .IDX_W(X_W)) u_xdec (
    .req (hit_s2), .idx (x_idx), .valid (x_valid)
  );

  dsipm_prio_enc #(.N(NROW), .IDX_W(Y_W)) u_ydec (
    .req (rows_q), .idx (y_idx), .valid (y_valid)
  );

  always_ff @(posedge clk) begin
    hit_s1 <= col_hit;
    hit_s2 <= hit_s1;
  end

  always_ff @(posedge clk) begin
    if (clr) begin
      state  <= S_SCAN;
      rows_q <= '0;
      xsel   <= '0;
      ts_q   <= '0;
    end else begin
      unique case (state)
        S_SCAN: if (x_valid) begin
          xsel  <= x_idx;
          state <= S_SEND;
        end
        S_SEND:  state <= S_CAPT;
        S_CAPT: begin
          rows_q <= row_hit;
          ts_q   <= col_ts[xsel];
          state  <= S_RST;
        end
        S_RST:   state <= S_WAIT1;
        S_WAIT1: state <= S_WAIT2;
        S_WAIT2: state <= S_WRITE;
        S_WRITE: begin
          if (!y_valid) begin
            state <= S_SCAN;
          end else if (!fifo_full) begin
            rows_q[y_idx] <= 1'b0;
            if ((rows_q & (rows_q - 1'b1)) == '0) state <= S_SCAN;
          end
        end
        default: state <= S_SCAN;
      endcase
    end
  end

  always_comb begin
    col_send  = '0;
    col_reset = '0;
    if (state == S_SEND || state == S_CAPT) col_send[xsel]  = 1'b1;
    if (state == S_RST)                     col_reset[xsel] = 1'b1;
  end

  assign fifo_push  = (state == S_WRITE) && y_valid && !fifo_full && !clr;
  assign fifo_wdata = {ts_q, y_idx, xsel};
  assign busy       = (state != S_SCAN);

endmodule
