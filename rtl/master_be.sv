// master_be: back-end between the master IP core (a pipelined CPU with a
// cycle/strobe/write-enable bus) and the domain interface.
//
// Requests: a CPU request (cyc & stb) is taken on a clock edge where cpu_stall
// is low and is registered into the DI request (one cycle). The 32-bit logical
// address carries routing, R/W, mode, burst and a 16-bit physical address
// (route [31:26], R/W [25], mode [24], burst length [22:20], burst precise
// [19], burst sequence [18:16], physical address [15:0]). The route field is
// translated through a 64-entry table of memory-mapped route registers
// (written through cfg_*; reset contents are the identity) and the result is
// put back in the route field of the address sent on. The command comes from
// cpu_we, the byte enables from cpu_sel.
//
// Modes: address bit 24 = 1 is split mode, in which requests are pipelined and
// bursts of up to 8 beats are issued as one request per beat sharing one tag.
// Bit 24 = 0 is nonsplit mode: the request is a single transfer and cpu_stall
// stays high until its response has come back.
//
// Tags: each new transaction takes the next of 8 tags in turn; a tag stays
// busy until all responses of its burst are back, and the CPU is stalled while
// the next tag is busy.
//
// Responses: a DI response is registered (one cycle) and shown to the CPU as a
// one-cycle cpu_ack with data, response code and tag. The CPU always accepts,
// so resp_stall is never raised.
//
// The address format and the nonsplit blocking follow the design; the route
// table's size and reset contents, the encoding of the mode bit and the tag
// allocation order are this implementation's choices.
//
// Lint: the in-order flag of a response is not needed by the CPU (unused-bits
// warning), and resp_stall is a constant 0.
module master_be
  import ocp_pkg::*;
(
  input  logic              clk,
  input  logic              rst,
  // CPU (master IP) side
  input  logic              cpu_cyc,
  input  logic              cpu_stb,
  input  logic              cpu_we,
  input  logic [BE_W-1:0]   cpu_sel,
  input  logic [ADDR_W-1:0] cpu_adr,
  input  logic [DATA_W-1:0] cpu_dat_w,
  output logic              cpu_stall,
  output logic              cpu_ack,
  output logic [DATA_W-1:0] cpu_dat_r,
  output ocp_resp_e         cpu_resp,
  output logic [TAG_W-1:0]  cpu_tag,
  // route table programming
  input  logic              cfg_we,
  input  logic [SRB_W-1:0]  cfg_idx,
  input  logic [SRB_W-1:0]  cfg_route,
  // DI side
  output logic              req_valid,
  output di_req_t           req,
  input  logic              req_stall,
  input  logic              resp_valid,
  input  di_resp_t          resp,
  output logic              resp_stall
);
  logic [SRB_W-1:0] route_tbl [2**SRB_W];
  logic [NTAGS-1:0] tag_busy;
  logic [3:0]       tag_left [NTAGS];   // responses still due per tag
  logic [TAG_W-1:0] next_tag, cur_tag, nsp_tag;
  logic [3:0]       beats_left;         // beats still to issue in current burst
  logic             nsp_wait;

  logic             cpu_req, new_txn, split, accept;
  logic [3:0]       beats;
  logic [TAG_W-1:0] acc_tag;

  assign cpu_req = cpu_cyc & cpu_stb;
  assign split   = cpu_adr[LA_MODE];
  assign new_txn = (beats_left == 4'd0);
  assign acc_tag = new_txn ? next_tag : cur_tag;
  assign beats   = split ? blen_beats(cpu_adr[LA_BLEN_HI:LA_BLEN_LO]) : 4'd1;

  assign cpu_stall = (req_valid & req_stall) | nsp_wait | (new_txn & tag_busy[next_tag]);
  assign accept    = cpu_req & ~cpu_stall;
  assign resp_stall = 1'b0;

  always_ff @(posedge clk or posedge rst)
    if (rst) begin
      for (int i = 0; i < 2**SRB_W; i++) route_tbl[i] <= SRB_W'(i);
    end else if (cfg_we) begin
      route_tbl[cfg_idx] <= cfg_route;
    end

  always_ff @(posedge clk or posedge rst)
    if (rst) begin
      req_valid  <= 1'b0;
      req        <= '0;
      next_tag   <= '0;
      cur_tag    <= '0;
      nsp_tag    <= '0;
      beats_left <= '0;
      nsp_wait   <= 1'b0;
      tag_busy   <= '0;
      for (int i = 0; i < NTAGS; i++) tag_left[i] <= '0;
      cpu_ack    <= 1'b0;
      cpu_dat_r  <= '0;
      cpu_resp   <= RESP_NULL;
      cpu_tag    <= '0;
    end else begin
      // request register
      if (accept) begin
        req_valid    <= 1'b1;
        req.cmd      <= cpu_we ? CMD_WR : CMD_RD;
        req.addr     <= {route_tbl[cpu_adr[LA_ROUTE_HI:LA_ROUTE_LO]], cpu_adr[LA_RW:0]};
        req.data     <= cpu_dat_w;
        req.byteen   <= cpu_sel;
        req.blen     <= split ? cpu_adr[LA_BLEN_HI:LA_BLEN_LO] : BLEN_W'(1);
        req.bprecise <= cpu_adr[LA_BP];
        req.bseq     <= cpu_adr[LA_BSEQ_HI:LA_BSEQ_LO];
        req.tag      <= acc_tag;
        req.inorder  <= ~split;
        if (new_txn) begin
          next_tag   <= next_tag + 1'b1;
          cur_tag    <= next_tag;
          beats_left <= beats - 4'd1;
        end else begin
          beats_left <= beats_left - 4'd1;
        end
        if (!split) begin
          nsp_wait <= 1'b1;
          nsp_tag  <= acc_tag;
        end
      end else if (!req_stall) begin
        req_valid <= 1'b0;
      end

      // tag bookkeeping: allocate on a new transaction, release on last response
      for (int i = 0; i < NTAGS; i++) begin
        if (accept && new_txn && next_tag == TAG_W'(i)) begin
          tag_busy[i] <= 1'b1;
          tag_left[i] <= beats;
        end else if (resp_valid && resp.tag == TAG_W'(i) && tag_busy[i]) begin
          tag_left[i] <= tag_left[i] - 4'd1;
          if (tag_left[i] == 4'd1) tag_busy[i] <= 1'b0;
        end
      end
      if (resp_valid && nsp_wait && resp.tag == nsp_tag) nsp_wait <= 1'b0;

      // response register towards the CPU
      cpu_ack <= resp_valid;
      if (resp_valid) begin
        cpu_dat_r <= resp.data;
        cpu_resp  <= resp.resp;
        cpu_tag   <= resp.tag;
      end
    end
endmodule
