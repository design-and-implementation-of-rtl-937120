// sync_w2r: two-flop synchronizer that carries the gray-coded write pointer
// into the read clock domain. Output is two read-clock edges behind.
// Two-flop synchronization follows the design's two-cycle synchronization
// stage; the gray pointer is (AW+1) bits wide. Reset is asynchronous, active high.
module sync_w2r #(
  parameter int AW = 3
) (
  input  logic        rclk,
  input  logic        rrst,       // asynchronous, active high
  input  logic [AW:0] wptr,
  output logic [AW:0] rq2_wptr
);
  logic [AW:0] rq1_wptr;

  always_ff @(posedge rclk or posedge rrst)
    if (rrst) {rq2_wptr, rq1_wptr} <= '0;
    else      {rq2_wptr, rq1_wptr} <= {rq1_wptr, wptr};
endmodule
