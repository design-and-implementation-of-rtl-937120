// ocp_slave: OCP slave entity (front-end). Accepts OCP requests and write data
// from an OCP master and hands complete requests to a domain interface; takes
// responses from the DI and presents them on the OCP response group.
//
// Request path: an accepted request (SCmdAccept) is held in a pending register;
// for a write it leaves that register together with its data in the
// datahandshake phase (SDataAccept), for a read on the next cycle. It then sits
// in the DI output register until the DI takes it. SCmdAccept is high whenever
// the pending register is empty or is emptying this cycle, so requests stream
// at one per clock when the DI does not stall. Counted from the DI request
// entering the OCP master, a request reaches the DI here after three edges.
//
// Response path: a DI response is latched into the response register (one
// cycle), which drives SResp/STagID/STagInOrder/SData until MRespAccept. The
// DI sees stall while the register holds a response that is not accepted.
//
// Assertions check the OCP rules that a request, and write data, stay stable
// until accepted. The phase order follows the design; the register
// structure is this implementation's.
//
// Lint: the assertions are disabled while rst is high, so verilator reports
// rst as used both synchronously and asynchronously (SYNCASYNCNET); the
// flip-flops use rst only as an asynchronous reset.
module ocp_slave
  import ocp_pkg::*;
(
  input  logic       clk,
  input  logic       rst,
  // OCP side
  input  ocp_mreq_t  mreq,
  output logic       SCmdAccept,
  input  ocp_mdata_t mdata,
  output logic       SDataAccept,
  output ocp_sresp_t sresp,
  input  logic       MRespAccept,
  // DI side
  output logic       di_req_valid,
  output di_req_t    di_req,
  input  logic       di_req_stall,
  input  logic       di_resp_valid,
  input  di_resp_t   di_resp,
  output logic       di_resp_stall
);
  logic    p_v, q_free, p_go;
  di_req_t p;

  assign q_free      = ~di_req_valid | ~di_req_stall;
  assign p_go        = p_v & q_free & ((p.cmd != CMD_WR) | mdata.MDataValid);
  assign SDataAccept = p_v & (p.cmd == CMD_WR) & mdata.MDataValid & q_free;
  assign SCmdAccept  = ~p_v | p_go;

  always_ff @(posedge clk or posedge rst)
    if (rst) begin
      p_v <= 1'b0;
      p   <= '0;
    end else if (SCmdAccept) begin
      p_v <= (mreq.MCmd != CMD_IDLE);
      if (mreq.MCmd != CMD_IDLE) begin
        p.cmd      <= mreq.MCmd;
        p.addr     <= mreq.MAddr;
        p.data     <= '0;
        p.byteen   <= mreq.MByteEn;
        p.blen     <= mreq.MBurstLength;
        p.bprecise <= mreq.MBurstPrecise;
        p.bseq     <= mreq.MBurstSeq;
        p.tag      <= mreq.MTagID;
        p.inorder  <= mreq.MTagInOrder;
      end
    end

  always_ff @(posedge clk or posedge rst)
    if (rst) begin
      di_req_valid <= 1'b0;
      di_req       <= '0;
    end else if (q_free) begin
      di_req_valid <= p_go;
      if (p_go) begin
        di_req <= p;
        if (p.cmd == CMD_WR) begin
          di_req.data   <= mdata.MData;
          di_req.byteen <= mdata.MDataByteEn;
        end
      end
    end

  // response phase
  logic     r_v;
  di_resp_t r;

  assign di_resp_stall = r_v & ~MRespAccept;

  always_ff @(posedge clk or posedge rst)
    if (rst) begin
      r_v <= 1'b0;
      r   <= '0;
    end else if (!di_resp_stall) begin
      r_v <= di_resp_valid;
      if (di_resp_valid) r <= di_resp;
    end

  always_comb begin
    sresp.SResp       = r_v ? r.resp : RESP_NULL;
    sresp.STagID      = r.tag;
    sresp.STagInOrder = r.inorder;
    sresp.SData       = r.data;
  end

  req_stable: assert property (@(posedge clk) disable iff (rst)
    (mreq.MCmd != CMD_IDLE && !SCmdAccept) |=> $stable(mreq));
  data_stable: assert property (@(posedge clk) disable iff (rst)
    (mdata.MDataValid && !SDataAccept) |=> $stable(mdata));
endmodule
