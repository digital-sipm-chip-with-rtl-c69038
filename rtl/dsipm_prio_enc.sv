// dsipm_prio_enc: priority decoder, lowest set bit wins.
//
// Used twice in the chip: as the X address decoder that picks the next
// column with a hit, and as the Y address decoder that turns the captured
// HitRow vector of the selected column into a row address. Purely
// combinational: idx is the index of the lowest set bit of req, valid is the
// OR of req (idx is 0 when nothing is set). The document names both decoders;
// the priority order (lowest index first) is this design's choice.
module dsipm_prio_enc #(
  parameter int unsigned N     = 16,
  parameter int unsigned IDX_W = (N > 1) ? $clog2(N) : 1
) (
  input  logic [N-1:0]     req,
  output logic [IDX_W-1:0] idx,
  output logic             valid
);

  always_comb begin
    idx   = '0;
    valid = 1'b0;
    for (int i = N - 1; i >= 0; i--) begin
      if (req[i]) begin
        idx   = IDX_W'(i);
        valid = 1'b1;
      end
    end
  end

endmodule
