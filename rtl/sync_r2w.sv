// sync_r2w: two-flop synchronizer that carries the gray-coded read pointer
// into the write clock domain. Output is two write-clock edges behind.
// Two-flop synchronization follows the design's two-cycle synchronization
// stage; the gray pointer is (AW+1) bits wide. Reset is asynchronous, active high.
module sync_r2w #(
  parameter int AW = 3
) (
  input  logic        wclk,
  input  logic        wrst,       // asynchronous, active high
  input  logic [AW:0] rptr,
  output logic [AW:0] wq2_rptr
);
  logic [AW:0] wq1_rptr;

  always_ff @(posedge wclk or posedge wrst)
    if (wrst) {wq2_rptr, wq1_rptr} <= '0;
    else      {wq2_rptr, wq1_rptr} <= {wq1_rptr, rptr};
endmodule
