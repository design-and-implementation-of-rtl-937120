// ocp_pkg: types, widths and field positions shared by every block of the
// OCP network-interface path (master IP back-end -> OCP link -> network
// back-end -> routers -> network back-end -> OCP link -> slave back-end).
//
// Widths follow the OCP subset used by the design: 32-bit MAddr/MData/SData,
// 4 byte enables, 2-bit SResp, 3-bit MCmd, 8 tags (3-bit tag IDs) and 3-bit
// burst length (bursts of up to 8 words). Flits are 72 bits: 6 source-routing
// bits, 18 control bits and a 48-bit payload. The bit layout of the 32-bit CPU
// logical address and of the request/response flits follows the design's
// published formats; the tag and burst-length widths follow the flit format
// (3 bits each), not the wider 8-bit fields of the subset table.
// Command and response codes use the OCP 2.2 encodings.
//
// Lint: constants and fields that a given module does not use are reported as
// unused when that module is linted alone.
package ocp_pkg;

  localparam int ADDR_W    = 32;  // OCP MAddr and CPU logical address
  localparam int DATA_W    = 32;  // MData / SData
  localparam int BE_W      = 4;   // MByteEn / MDataByteEn
  localparam int BLEN_W    = 3;   // MBurstLength (0 encodes 8 beats)
  localparam int BSEQ_W    = 3;   // MBurstSeq
  localparam int TAG_W     = 3;   // MTagID / STagID
  localparam int NTAGS     = 8;
  localparam int SRB_W     = 6;   // source routing bits
  localparam int CTRL_W    = 18;
  localparam int PAYLOAD_W = 48;
  localparam int FLIT_W    = SRB_W + CTRL_W + PAYLOAD_W;  // 72
  localparam int PADDR_W   = 16;  // physical address carried in the flit

  // Fields of the 32-bit CPU logical address.
  localparam int LA_ROUTE_HI = 31, LA_ROUTE_LO = 26;
  localparam int LA_RW       = 25;
  localparam int LA_MODE     = 24;   // 1: split, 0: nonsplit
  localparam int LA_BLEN_HI  = 22, LA_BLEN_LO = 20;
  localparam int LA_BP       = 19;
  localparam int LA_BSEQ_HI  = 18, LA_BSEQ_LO = 16;

  typedef enum logic [2:0] {
    CMD_IDLE = 3'b000,
    CMD_WR   = 3'b001,
    CMD_RD   = 3'b010
  } ocp_cmd_e;

  typedef enum logic [1:0] {
    RESP_NULL = 2'b00,
    RESP_DVA  = 2'b01,
    RESP_FAIL = 2'b10,
    RESP_ERR  = 2'b11
  } ocp_resp_e;

  // MBurstSeq codes used here.
  localparam logic [2:0] BSEQ_INCR  = 3'b000;
  localparam logic [2:0] BSEQ_DFLT1 = 3'b001;  // user defined
  localparam logic [2:0] BSEQ_WRAP  = 3'b010;

  // Request as carried on the domain-interface (DI) boundary.
  typedef struct packed {
    ocp_cmd_e              cmd;
    logic [ADDR_W-1:0]     addr;     // logical format, route field = source route
    logic [DATA_W-1:0]     data;
    logic [BE_W-1:0]       byteen;
    logic [BLEN_W-1:0]     blen;
    logic                  bprecise;
    logic [BSEQ_W-1:0]     bseq;
    logic [TAG_W-1:0]      tag;
    logic                  inorder;
  } di_req_t;

  // Response as carried on the DI boundary.
  typedef struct packed {
    ocp_resp_e             resp;
    logic [TAG_W-1:0]      tag;
    logic                  inorder;
    logic [DATA_W-1:0]     data;
  } di_resp_t;

  // OCP request group (master -> slave).
  typedef struct packed {
    ocp_cmd_e              MCmd;
    logic [ADDR_W-1:0]     MAddr;
    logic [BE_W-1:0]       MByteEn;
    logic [BLEN_W-1:0]     MBurstLength;
    logic                  MBurstPrecise;
    logic [BSEQ_W-1:0]     MBurstSeq;
    logic [TAG_W-1:0]      MTagID;
    logic                  MTagInOrder;
  } ocp_mreq_t;

  // OCP datahandshake group (master -> slave).
  typedef struct packed {
    logic                  MDataValid;
    logic [DATA_W-1:0]     MData;
    logic [BE_W-1:0]       MDataByteEn;
  } ocp_mdata_t;

  // OCP response group (slave -> master).
  typedef struct packed {
    ocp_resp_e             SResp;
    logic [TAG_W-1:0]      STagID;
    logic                  STagInOrder;
    logic [DATA_W-1:0]     SData;
  } ocp_sresp_t;

  // Number of beats encoded by a burst-length field (0 stands for 8).
  function automatic logic [3:0] blen_beats(logic [BLEN_W-1:0] f);
    return (f == '0) ? 4'd8 : {1'b0, f};
  endfunction

  // Request flit: [71:66] route, [65:64] R/W, [63] mode, [62:59] byte enables,
  // [58] data valid, [57:55] tag, [54:48] burst {len, precise, seq},
  // [47:32] address, [31:0] write data.
  function automatic logic [FLIT_W-1:0] pack_req(di_req_t r);
    logic [CTRL_W-1:0] ctrl;
    ctrl = {r.cmd[1:0], r.addr[LA_MODE], r.byteen, (r.cmd == CMD_WR), r.tag,
            r.blen, r.bprecise, r.bseq};
    return {r.addr[LA_ROUTE_HI:LA_ROUTE_LO], ctrl, r.addr[PADDR_W-1:0], r.data};
  endfunction

  // Response flit: [71:66] route, [65:53] zero, [52:51] response, [50:48] tag,
  // [47:16] read data, [15:0] zero.
  function automatic logic [FLIT_W-1:0] pack_resp(logic [SRB_W-1:0] route, di_resp_t r);
    return {route, 13'd0, r.resp, r.tag, r.data, 16'd0};
  endfunction

endpackage
