// nw_be2: network back-end at the slave end of the network. Depacketizes
// request flits into DI requests, remembers where each transaction came from,
// and packetizes DI responses into flits routed back to the requester.
//
// Request: a flit from the network (Dvalid_BE1) is registered (one cycle) as a
// DI request; the 32-bit address is rebuilt in the logical format from the
// flit's route, mode, burst and 16-bit address fields. When a flit carries a
// tag that has no entry yet, an entry of the 8-word routing table is filled
// with the received route, the tag, the transaction type and the burst length;
// further beats of the same burst share that entry. Stall_Req is raised while
// the output register is blocked or the table has no free entry.
//
// Response: the DI response's tag is compared with every valid entry; the
// matching entry gives the route back, and is cleared once the number of
// responses equals the burst length. The return route is the received routing
// field bit-reversed and inverted: routers rotate the field left at each hop
// and the reverse of a hop takes the opposite bit. The response is registered
// (one cycle) into a flit offered with Dvalid_BE2; a response with no matching
// entry is dropped (and flagged by an assertion).
//
// The table (8 entries, tag compare, clear after the last burst response)
// follows the design; the reverse-route rule and the handling of unmatched
// responses are this implementation's.
//
// Lint: the assertion is disabled while rst is high, hence verilator's
// SYNCASYNCNET note on rst; the flip-flops use it only asynchronously. About
// 30 outputs are constant by design: the unused control and payload bits of
// the response flit are zero.
module nw_be2
  import ocp_pkg::*;
#(
  parameter int ENTRIES = 8
) (
  input  logic              clk,
  input  logic              rst,
  // network side
  input  logic              dvalid_be1,
  input  logic [FLIT_W-1:0] in_flit,
  output logic              stall_req,
  output logic              dvalid_be2,
  output logic [FLIT_W-1:0] out_flit,
  input  logic              stall_resp,
  // DI side
  output logic              req_valid,
  output di_req_t           req,
  input  logic              req_stall,
  input  logic              resp_valid,
  input  di_resp_t          resp,
  output logic              resp_stall
);
  typedef struct packed {
    logic              valid;
    logic [TAG_W-1:0]  tag;
    logic [SRB_W-1:0]  route;
    ocp_cmd_e          cmd;
    logic [3:0]        beats;
    logic [3:0]        count;
  } entry_t;

  entry_t tbl [ENTRIES];

  // --- request side ---------------------------------------------------------
  logic [SRB_W-1:0]  f_route;
  logic [CTRL_W-1:0] f_ctrl;
  logic [TAG_W-1:0]  f_tag;
  logic              f_known, f_free_found, take;
  logic [$clog2(ENTRIES)-1:0] f_free;

  assign f_route = in_flit[FLIT_W-1 -: SRB_W];
  assign f_ctrl  = in_flit[PAYLOAD_W +: CTRL_W];
  assign f_tag   = f_ctrl[9:7];

  always_comb begin
    f_known      = 1'b0;
    f_free_found = 1'b0;
    f_free       = '0;
    for (int i = ENTRIES-1; i >= 0; i--) begin
      if (tbl[i].valid && tbl[i].tag == f_tag) f_known = 1'b1;
      if (!tbl[i].valid) begin
        f_free_found = 1'b1;
        f_free       = ($clog2(ENTRIES))'(i);
      end
    end
  end

  assign stall_req = (req_valid & req_stall) | (dvalid_be1 & ~f_known & ~f_free_found);
  assign take      = dvalid_be1 & ~stall_req;

  always_ff @(posedge clk or posedge rst)
    if (rst) begin
      req_valid <= 1'b0;
      req       <= '0;
    end else if (!(req_valid & req_stall)) begin
      req_valid <= take;
      if (take) begin
        req.cmd      <= ocp_cmd_e'({1'b0, f_ctrl[17:16]});
        req.addr     <= {f_route, f_ctrl[17:16] == 2'b01, f_ctrl[15], 1'b0, f_ctrl[6:0],
                         in_flit[47:32]};
        req.data     <= f_ctrl[10] ? in_flit[31:0] : '0;
        req.byteen   <= f_ctrl[14:11];
        req.blen     <= f_ctrl[6:4];
        req.bprecise <= f_ctrl[3];
        req.bseq     <= f_ctrl[2:0];
        req.tag      <= f_tag;
        req.inorder  <= ~f_ctrl[15];
      end
    end

  // --- response side ----------------------------------------------------------
  logic                       r_hit, r_take;
  logic [$clog2(ENTRIES)-1:0] r_idx;
  logic [SRB_W-1:0]           r_route;
  di_resp_t                   r_resp;

  always_comb begin
    r_hit = 1'b0;
    r_idx = '0;
    for (int i = 0; i < ENTRIES; i++)
      if (tbl[i].valid && tbl[i].tag == resp.tag && !r_hit) begin
        r_hit = 1'b1;
        r_idx = ($clog2(ENTRIES))'(i);
      end
    for (int b = 0; b < SRB_W; b++) r_route[b] = ~tbl[r_idx].route[SRB_W-1-b];
    r_resp = resp;
    if (tbl[r_idx].cmd == CMD_WR) r_resp.data = '0;   // writes carry no read data
  end

  assign resp_stall = dvalid_be2 & stall_resp;
  assign r_take     = resp_valid & ~resp_stall;

  always_ff @(posedge clk or posedge rst)
    if (rst) begin
      dvalid_be2 <= 1'b0;
      out_flit   <= '0;
    end else if (!resp_stall) begin
      dvalid_be2 <= resp_valid & r_hit;
      if (resp_valid & r_hit) out_flit <= pack_resp(r_route, r_resp);
    end

  // --- table update -------------------------------------------------------------
  always_ff @(posedge clk or posedge rst)
    if (rst) begin
      for (int i = 0; i < ENTRIES; i++) tbl[i] <= '0;
    end else begin
      if (r_take && r_hit) begin
        if (tbl[r_idx].count + 4'd1 == tbl[r_idx].beats) tbl[r_idx].valid <= 1'b0;
        else tbl[r_idx].count <= tbl[r_idx].count + 4'd1;
      end
      if (take && !f_known) begin
        tbl[f_free].valid <= 1'b1;
        tbl[f_free].tag   <= f_tag;
        tbl[f_free].route <= f_route;
        tbl[f_free].cmd   <= ocp_cmd_e'({1'b0, f_ctrl[17:16]});
        tbl[f_free].beats <= blen_beats(f_ctrl[6:4]);
        tbl[f_free].count <= '0;
      end
    end

  resp_matches: assert property (@(posedge clk) disable iff (rst) resp_valid |-> r_hit);
endmodule
