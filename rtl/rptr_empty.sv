// rptr_empty: read-side pointer logic of the dual-clock FIFO. Keeps an
// (AW+1)-bit binary pointer and its gray-code copy. The FIFO is empty when the
// next gray read pointer equals the synchronized write pointer. rempty is
// registered and set on reset, so after a first write it falls three read
// clocks later (two synchronizer flops plus this register).
// The gray-pointer scheme follows the design's dual-clock FIFO; the registered
// flag is this implementation's choice.
module rptr_empty #(
  parameter int AW = 3
) (
  input  logic          rclk,
  input  logic          rrst,      // asynchronous, active high
  input  logic          rinc,
  input  logic [AW:0]   rq2_wptr,
  output logic          rempty,
  output logic [AW-1:0] raddr,
  output logic [AW:0]   rptr       // gray
);
  logic [AW:0] rbin, rbinnext, rgraynext;

  assign rbinnext  = (rinc && !rempty) ? rbin + 1'b1 : rbin;
  assign rgraynext = (rbinnext >> 1) ^ rbinnext;
  assign raddr     = rbin[AW-1:0];

  always_ff @(posedge rclk or posedge rrst)
    if (rrst) begin
      rbin   <= '0;
      rptr   <= '0;
      rempty <= 1'b1;
    end else begin
      rbin   <= rbinnext;
      rptr   <= rgraynext;
      rempty <= (rgraynext == rq2_wptr);
    end
endmodule
