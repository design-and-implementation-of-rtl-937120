// wptr_full: write-side pointer logic of the dual-clock FIFO. Keeps an
// (AW+1)-bit binary pointer and its gray-code copy; the extra MSB tells a
// wrapped (full) pointer from an equal (empty) one. The FIFO is full when the
// next gray write pointer equals the synchronized read pointer with its two
// MSBs inverted. wfull is registered, so it rises on the write that fills
// the FIFO and falls two write clocks after the reader frees a slot.
// The gray-pointer scheme follows the design's dual-clock FIFO; the registered
// flag is this implementation's choice.
module wptr_full #(
  parameter int AW = 3
) (
  input  logic          wclk,
  input  logic          wrst,      // asynchronous, active high
  input  logic          winc,
  input  logic [AW:0]   wq2_rptr,
  output logic          wfull,
  output logic [AW-1:0] waddr,
  output logic [AW:0]   wptr       // gray
);
  logic [AW:0] wbin, wbinnext, wgraynext;
  logic        wfull_val;

  assign wbinnext  = (winc && !wfull) ? wbin + 1'b1 : wbin;
  assign wgraynext = (wbinnext >> 1) ^ wbinnext;
  assign wfull_val = (wgraynext == {~wq2_rptr[AW:AW-1], wq2_rptr[AW-2:0]});
  assign waddr     = wbin[AW-1:0];

  always_ff @(posedge wclk or posedge wrst)
    if (wrst) begin
      wbin  <= '0;
      wptr  <= '0;
      wfull <= 1'b0;
    end else begin
      wbin  <= wbinnext;
      wptr  <= wgraynext;
      wfull <= wfull_val;
    end
endmodule
