// dsipm_fifo: hit FIFO between matrix readout and serial readout.
//
// DEPTH words of W bits (32 x 20 by default: X 4, T 10, Y 6). Synchronous
// first-word-fall-through FIFO: rdata shows the oldest word whenever empty is
// low; push writes wdata, pop removes the oldest word, both in the same cycle
// if wanted. clr (synchronous) empties it. Pushing when full and popping when
// empty are not allowed and are checked by assertions; the writers look at
// full and the reader at empty. Depth and word width follow the document; the
// rest is a plain FIFO of this design.
module dsipm_fifo #(
  parameter int unsigned DEPTH = 32,
  parameter int unsigned W     = 20,
  parameter int unsigned AW    = $clog2(DEPTH)
) (
  input  logic         clk,
  input  logic         clr,
  input  logic         push,
  input  logic [W-1:0] wdata,
  input  logic         pop,
  output logic [W-1:0] rdata,
  output logic         full,
  output logic         empty,
  output logic [AW:0]  count
);

  logic [W-1:0]  mem [DEPTH];
  logic [AW-1:0] wptr, rptr;

  always_ff @(posedge clk) begin
    if (clr) begin
      wptr  <= '0;
      rptr  <= '0;
      count <= '0;
    end else begin
      if (push && !full) begin
        wptr <= (wptr == AW'(DEPTH - 1)) ? '0 : wptr + 1'b1;
      end
      if (pop && !empty) begin
        rptr <= (rptr == AW'(DEPTH - 1)) ? '0 : rptr + 1'b1;
      end
      count <= count + (AW+1)'(push && !full) - (AW+1)'(pop && !empty);
    end
  end

  always_ff @(posedge clk) begin
    if (push && !full && !clr) mem[wptr] <= wdata;
  end

  assign rdata = mem[rptr];
  assign full  = (count == (AW+1)'(DEPTH));
  assign empty = (count == '0);

  a_no_overflow:  assert property (@(posedge clk) disable iff (clr) !(push && full));
  a_no_underflow: assert property (@(posedge clk) disable iff (clr) !(pop && empty));

endmodule
