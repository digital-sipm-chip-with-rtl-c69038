// dsipm_matrix: the pixel matrix with its column and row lines.
//
// NCOL readout columns of NROW pixels. Per column: a hit line (OR of the
// column's pixels), a SendRow line and a reset line from the periphery. Per
// row: a HitRow line, the OR over all columns of the pixels that hold a hit
// and whose column is sending; only one column sends at a time. The enable
// storage of pixel (cfg_x, cfg_y) is written when cfg_we is high. The matrix
// is static and asynchronous apart from that write port.
//
// The published chip has 32x30 pixels read through 16 columns (4-bit X);
// this design folds them into 16 columns of 60 pixels (6-bit Y). Which
// physical pixel a row address stands for is not specified here.
module dsipm_matrix #(
  parameter int unsigned NCOL  = 16,
  parameter int unsigned NROW  = 60,
  parameter int unsigned NSPAD = 9,
  parameter int unsigned X_W   = 4,
  parameter int unsigned Y_W   = 6
) (
  input  logic                                  clk,
  input  logic [NCOL-1:0][NROW-1:0][NSPAD-1:0]  spad_fire,
  input  logic                                  inject,
  input  logic                                  cfg_we,
  input  logic [X_W-1:0]                        cfg_x,
  input  logic [Y_W-1:0]                        cfg_y,
  input  logic [NSPAD-1:0]                      cfg_en,
  input  logic [NCOL-1:0]                       col_reset,
  input  logic [NCOL-1:0]                       col_send,
  output logic [NCOL-1:0]                       col_hit,
  output logic [NROW-1:0]                       row_hit
);

  logic [NCOL-1:0][NROW-1:0] pix_hit;
  logic [NCOL-1:0][NROW-1:0] pix_row;

  for (genvar x = 0; x < NCOL; x++) begin : g_col
    for (genvar y = 0; y < NROW; y++) begin : g_row
      logic             we;
      logic [NSPAD-1:0] en_unused;
      assign we = cfg_we && (cfg_x == X_W'(x)) && (cfg_y == Y_W'(y));
      dsipm_pixel #(.NSPAD(NSPAD)) u_pix (
        .clk       (clk),
        .spad_fire (spad_fire[x][y]),
        .inject    (inject),
        .cfg_we    (we),
        .cfg_en    (cfg_en),
        .col_reset (col_reset[x]),
        .send_row  (col_send[x]),
        .hit       (pix_hit[x][y]),
        .hit_row   (pix_row[x][y]),
        .en        (en_unused)
      );
    end
    assign col_hit[x] = |pix_hit[x];
  end

  always_comb begin
    row_hit = '0;
    for (int x = 0; x < NCOL; x++) row_hit |= pix_row[x];
  end

endmodule
