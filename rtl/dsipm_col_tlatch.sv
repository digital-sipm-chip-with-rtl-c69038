// dsipm_col_tlatch: one time-stamp latch (TL) per readout column.
//
// Each latch is transparent while its column has no hit and closes as soon
// as the column hit line rises, so it keeps the time of the first hit in the
// column until the column has been read and cleared. Later hits in the same
// column before that get this same (wrong) time, as in the original chip.
// The value is read by the readout sequencer only after the hit flag has
// passed its synchroniser, when the latch is long closed.
//
// The latches are intentional: the column hit arrives at any moment, not on
// a clock edge, and a level-sensitive latch is what the chip uses (Fig. of
// the matrix readout). The per-column latch and its 10-bit bus follow the
// document; latch polarity is this design's choice.
module dsipm_col_tlatch #(
  parameter int unsigned NCOL = 16,
  parameter int unsigned TS_W = 10
) (
  input  logic [TS_W-1:0]            ts,
  input  logic [NCOL-1:0]            col_hit,
  output logic [NCOL-1:0][TS_W-1:0]  col_ts
);

  for (genvar x = 0; x < NCOL; x++) begin : g_tl
    always_latch begin
      if (!col_hit[x]) col_ts[x] = ts;
    end
  end

endmodule
