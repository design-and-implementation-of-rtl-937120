// fifomem: storage array of the dual-clock FIFO. Written on the write clock
// when wclken is high; read combinationally at raddr, so the word at the head
// of the FIFO is always visible on rdata (show-ahead). Depth is 2**AW words;
// the design uses 8 words (AW = 3).
// The 8-word depth follows the design; the show-ahead read is this
// implementation's choice.
module fifomem #(
  parameter int DW = 82,
  parameter int AW = 3
) (
  input  logic          wclk,
  input  logic          wclken,
  input  logic [AW-1:0] waddr,
  input  logic [DW-1:0] wdata,
  input  logic [AW-1:0] raddr,
  output logic [DW-1:0] rdata
);
  logic [DW-1:0] mem [2**AW];

  always_ff @(posedge wclk)
    if (wclken) mem[waddr] <= wdata;

  assign rdata = mem[raddr];
endmodule
