// dsipm_time_counter: 10-bit time stamp with double-edge resolution.
//
// A counter of TS_W-1 bits advances on every rising clock edge; the clock
// phase is appended as the least significant bit (0 while the clock is high,
// 1 while it is low). The resulting code increases by one at every clock
// edge, so at 50 MHz one step is 10 ns while the logic runs on a single edge.
// clr (synchronous, one cycle) sets the code to 0 at the next rising edge.
// The 10-bit width and the 10 ns step at 50 MHz follow the document; using
// the clock phase as the LSB is this design's way of doing double-edge
// clocking. The clock is used as data here on purpose.
module dsipm_time_counter #(
  parameter int unsigned TS_W = 10
) (
  input  logic            clk,
  input  logic            clr,
  output logic [TS_W-1:0] ts
);

  logic [TS_W-2:0] cnt;

  always_ff @(posedge clk) begin
    if (clr) cnt <= '0;
    else     cnt <= cnt + 1'b1;
  end

  assign ts = {cnt, ~clk};

endmodule
