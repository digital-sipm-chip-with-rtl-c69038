// dsipm_cmd_decoder: pulse-width decoder of the global CMD line.
//
// The chip is controlled by a single CMD input shared by all chips of a
// chain: the width of a high pulse, counted in clock cycles, selects one of
// 12 commands (1 = ResetAll ... 12 = InjectSerializer, see dsipm_pkg). CMD is
// sampled on the rising clock edge; the edge that first samples it low again
// ends the pulse, and one cycle later cmd_valid is high for exactly one cycle
// with cmd_code set. Pulses wider than 12 cycles are ignored. The command
// table follows the document; the timing of cmd_valid and the handling of
// over-long pulses are this design's choices. There is no reset: the
// decoder needs only one low sample of CMD to be in a defined state, and the
// first command a controller sends is ResetAll.
module dsipm_cmd_decoder
  import dsipm_pkg::*;
(
  input  logic clk,
  input  logic cmd,
  output logic cmd_valid,
  output cmd_e cmd_code
);

  logic       cmd_q;
  logic [3:0] width;

  always_ff @(posedge clk) begin
    cmd_q     <= cmd;
    cmd_valid <= 1'b0;
    if (cmd) begin
      width <= (cmd_q) ? ((width == 4'hF) ? width : width + 1'b1) : 4'd1;
    end else if (cmd_q) begin
      cmd_valid <= (width >= 4'd1) && (width <= 4'd12);
      cmd_code  <= cmd_e'(width);
    end
  end

endmodule
