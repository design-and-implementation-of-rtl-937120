// ocp_master: OCP master entity (front-end). Takes requests from a domain
// interface and presents them on an OCP point-to-point link; takes OCP
// responses and hands them back to the DI.
//
// Request path (3 cycles through master and slave together):
//   edge 1  the DI request is latched into the request register, which drives
//           the OCP request group (MCmd, MAddr, MByteEn, burst and tag fields)
//           directly; MCmd is IDLE while the register is empty;
//   edge 2  the request is taken when SCmdAccept is high; a write's data moves
//           into the datahandshake register;
//   edge 3  MDataValid/MData/MDataByteEn are held until SDataAccept.
// The DI sees stall while a request waits for SCmdAccept. A new request may be
// taken on every cycle, so split-mode traffic streams at one per clock.
//
// Response path: SResp != NULL is taken into a response register when
// MRespAccept is high (MRespAccept = register free or being drained); the
// register drives the DI response one cycle later.
//
// The phase order (request, datahandshake one cycle later, response with
// MRespAccept) follows the design; the register structure is this
// implementation's.
//
// Lint: the handshake assertion is disabled while rst is high, so verilator
// reports rst as used both synchronously and asynchronously (SYNCASYNCNET);
// the flip-flops themselves use rst only as an asynchronous reset.
module ocp_master
  import ocp_pkg::*;
(
  input  logic       clk,
  input  logic       rst,
  // DI side
  input  logic       di_req_valid,
  input  di_req_t    di_req,
  output logic       di_req_stall,
  output logic       di_resp_valid,
  output di_resp_t   di_resp,
  input  logic       di_resp_stall,
  // OCP side
  output ocp_mreq_t  mreq,
  input  logic       SCmdAccept,
  output ocp_mdata_t mdata,
  input  logic       SDataAccept,
  input  ocp_sresp_t sresp,
  output logic       MRespAccept
);
  logic    a_v;
  di_req_t a;

  assign di_req_stall = a_v & ~SCmdAccept;

  always_comb begin
    mreq.MCmd          = a_v ? a.cmd : CMD_IDLE;
    mreq.MAddr         = a.addr;
    mreq.MByteEn       = a.byteen;
    mreq.MBurstLength  = a.blen;
    mreq.MBurstPrecise = a.bprecise;
    mreq.MBurstSeq     = a.bseq;
    mreq.MTagID        = a.tag;
    mreq.MTagInOrder   = a.inorder;
  end

  always_ff @(posedge clk or posedge rst)
    if (rst) begin
      a_v <= 1'b0;
      a   <= '0;
    end else if (!di_req_stall) begin
      a_v <= di_req_valid;
      if (di_req_valid) a <= di_req;
    end

  // datahandshake phase
  always_ff @(posedge clk or posedge rst)
    if (rst) begin
      mdata <= '0;
    end else if (a_v && SCmdAccept && a.cmd == CMD_WR) begin
      mdata.MDataValid  <= 1'b1;
      mdata.MData       <= a.data;
      mdata.MDataByteEn <= a.byteen;
    end else if (SDataAccept) begin
      mdata.MDataValid  <= 1'b0;
    end

  // response phase
  assign MRespAccept = ~di_resp_valid | ~di_resp_stall;

  always_ff @(posedge clk or posedge rst)
    if (rst) begin
      di_resp_valid <= 1'b0;
      di_resp       <= '0;
    end else if (MRespAccept) begin
      di_resp_valid <= (sresp.SResp != RESP_NULL);
      if (sresp.SResp != RESP_NULL)
        di_resp <= '{resp: sresp.SResp, tag: sresp.STagID, inorder: sresp.STagInOrder,
                     data: sresp.SData};
    end

  // A new write may only be accepted when the previous write data is done.
  a_data_free: assert property (@(posedge clk) disable iff (rst)
    (a_v && SCmdAccept && a.cmd == CMD_WR) |-> (!mdata.MDataValid || SDataAccept));
endmodule
