// async_fifo: dual-clock pointer FIFO that passes words between two mutually
// asynchronous clock domains. Built from a storage array (fifomem), gray-code
// pointer logic on each side (wptr_full, rptr_empty) and two-flop pointer
// synchronizers (sync_r2w, sync_w2r), as in the classic gray-pointer FIFO.
//
// Interface: a word is written on a wclk edge with winc high and wfull low; the
// head word is shown on rdata whenever rempty is low and is removed on an rclk
// edge with rinc high. Timing: a word written into an empty FIFO appears three
// read-clock edges later (two to synchronize the write pointer, one for the
// empty flag). Depth defaults to the design's 8 words (AW = 3).
module async_fifo #(
  parameter int DW = 82,
  parameter int AW = 3
) (
  input  logic          wclk,
  input  logic          wrst,
  input  logic          winc,
  input  logic [DW-1:0] wdata,
  output logic          wfull,
  input  logic          rclk,
  input  logic          rrst,
  input  logic          rinc,
  output logic [DW-1:0] rdata,
  output logic          rempty
);
  logic [AW-1:0] waddr, raddr;
  logic [AW:0]   wptr, rptr, wq2_rptr, rq2_wptr;

  sync_r2w #(.AW(AW)) u_sync_r2w (.wclk, .wrst, .rptr, .wq2_rptr);
  sync_w2r #(.AW(AW)) u_sync_w2r (.rclk, .rrst, .wptr, .rq2_wptr);

  fifomem #(.DW(DW), .AW(AW)) u_mem (
    .wclk, .wclken(winc & ~wfull), .waddr, .wdata, .raddr, .rdata
  );

  wptr_full  #(.AW(AW)) u_wptr_full  (.wclk, .wrst, .winc, .wq2_rptr, .wfull, .waddr, .wptr);
  rptr_empty #(.AW(AW)) u_rptr_empty (.rclk, .rrst, .rinc, .rq2_wptr, .rempty, .raddr, .rptr);
endmodule
