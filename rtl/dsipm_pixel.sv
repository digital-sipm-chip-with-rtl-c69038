// dsipm_pixel: CMOS logic of one pixel of 9 SPADs.
//
// Each SPAD's comparator output (spad_fire) passes only when its enable bit
// is set. The enabled outputs and the global inject line (which reaches the
// pixel only if at least one of its SPADs is enabled) are OR-ed; the rising
// edge of that OR sets the hit flip-flop, so a hit is held until it has been
// read and cannot get lost. The flip-flop flags the column (hit), answers on
// its row line while the column's SendRow is high (hit_row) and is cleared
// asynchronously by the column reset. The pixel has no clock; clk only writes
// the 9-bit enable storage (cfg_we, cfg_en), which has no reset.
//
// Follows the published pixel: 9 SPADs, per-SPAD disable, OR of the hits,
// edge-triggered HitFF with reset, HitCol/HitRow/SendRow/reset lines. Own
// choices: active-high lines instead of the wired active-low ones, and the
// synchronous write port of the enable storage.
//
// The flip-flop is clocked by the OR of the SPAD signals; this is the
// asynchronous capture the pixel is built around, not a clocking mistake.
module dsipm_pixel #(
  parameter int unsigned NSPAD = 9
) (
  input  logic             clk,
  input  logic [NSPAD-1:0] spad_fire,
  input  logic             inject,
  input  logic             cfg_we,
  input  logic [NSPAD-1:0] cfg_en,
  input  logic             col_reset,
  input  logic             send_row,
  output logic             hit,
  output logic             hit_row,
  output logic [NSPAD-1:0] en
);

  logic [NSPAD-1:0] en_q;
  logic             any_fire;
  logic             hit_q;

  always_ff @(posedge clk) begin
    if (cfg_we) en_q <= cfg_en;
  end

  assign any_fire = (|(spad_fire & en_q)) | (inject & (|en_q));

  always_ff @(posedge any_fire or posedge col_reset) begin
    if (col_reset) hit_q <= 1'b0;
    else           hit_q <= 1'b1;
  end

  assign hit     = hit_q;
  assign hit_row = hit_q & send_row;
  assign en      = en_q;

endmodule
