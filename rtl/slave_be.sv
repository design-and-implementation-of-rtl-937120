// slave_be: back-end between the domain interface and the slave IP core, a
// synchronous memory with chip enable, write enable and byte enables.
//
// Request: a DI request is turned into one memory access, registered (one
// cycle): mem_ce for every request, mem_we for writes, byte enables, the
// 16-bit physical address (DI address bits [15:0]) and write data. The memory
// cannot stall, so a request is only taken while the number of accesses in
// flight plus responses waiting for the DI is below DEPTH; otherwise the DI
// sees stall.
// Response: the tag (and in-order flag) of each access waits in an in-order
// queue; when the memory acknowledges, the tag is paired with the read data
// and an OKAY (DVA) or error response and queued for the DI. The head of that
// queue drives the DI response (one cycle after mem_ack).
// Each beat of a burst carries its own address, so bursts need no address
// generation here. The enable signals and the passing of tags follow the
// design; the queue depth is this implementation's choice.
//
// Lint: the assertion is disabled while rst is high, hence verilator's
// SYNCASYNCNET note on rst. The burst fields of the DI request are not used
// (unused-bits warning) because every beat brings its own address.
module slave_be
  import ocp_pkg::*;
#(
  parameter int DEPTH = 4
) (
  input  logic               clk,
  input  logic               rst,
  // DI side
  input  logic               req_valid,
  input  di_req_t            req,
  output logic               req_stall,
  output logic               resp_valid,
  output di_resp_t           resp,
  input  logic               resp_stall,
  // memory (slave IP) side
  output logic               mem_ce,
  output logic               mem_we,
  output logic [BE_W-1:0]    mem_be,
  output logic [PADDR_W-1:0] mem_addr,
  output logic [DATA_W-1:0]  mem_wdata,
  input  logic               mem_ack,
  input  logic               mem_err,
  input  logic [DATA_W-1:0]  mem_rdata
);
  localparam int PW = $clog2(DEPTH);

  typedef struct packed {
    logic [TAG_W-1:0] tag;
    logic             inorder;
    logic             wr;
  } pend_t;

  pend_t            pq [DEPTH];
  di_resp_t         rq [DEPTH];
  logic [PW-1:0]    pq_wp, pq_rp, rq_wp, rq_rp;
  logic [PW:0]      pq_n, rq_n;
  logic             take, pop;

  assign req_stall  = (32'(pq_n) + 32'(rq_n)) >= DEPTH;
  assign take       = req_valid & ~req_stall;
  assign resp_valid = (rq_n != '0);
  assign resp       = rq[rq_rp];
  assign pop        = resp_valid & ~resp_stall;

  always_ff @(posedge clk or posedge rst)
    if (rst) begin
      mem_ce    <= 1'b0;
      mem_we    <= 1'b0;
      mem_be    <= '0;
      mem_addr  <= '0;
      mem_wdata <= '0;
    end else begin
      mem_ce <= take;
      mem_we <= take & (req.cmd == CMD_WR);
      if (take) begin
        mem_be    <= req.byteen;
        mem_addr  <= req.addr[PADDR_W-1:0];
        mem_wdata <= req.data;
      end
    end

  always_ff @(posedge clk or posedge rst)
    if (rst) begin
      pq_wp <= '0; pq_rp <= '0; pq_n <= '0;
      rq_wp <= '0; rq_rp <= '0; rq_n <= '0;
      for (int i = 0; i < DEPTH; i++) begin
        pq[i] <= '0;
        rq[i] <= '0;
      end
    end else begin
      if (take) begin
        pq[pq_wp] <= '{tag: req.tag, inorder: req.inorder, wr: req.cmd == CMD_WR};
        pq_wp     <= pq_wp + 1'b1;
      end
      if (mem_ack) begin
        rq[rq_wp] <= '{resp: mem_err ? RESP_ERR : RESP_DVA, tag: pq[pq_rp].tag,
                       inorder: pq[pq_rp].inorder,
                       data: pq[pq_rp].wr ? '0 : mem_rdata};
        rq_wp     <= rq_wp + 1'b1;
        pq_rp     <= pq_rp + 1'b1;
      end
      if (pop) rq_rp <= rq_rp + 1'b1;
      pq_n <= pq_n + (PW+1)'(take) - (PW+1)'(mem_ack);
      rq_n <= rq_n + (PW+1)'(mem_ack) - (PW+1)'(pop);
    end

  ack_expected: assert property (@(posedge clk) disable iff (rst) mem_ack |-> pq_n != '0);
endmodule
