// nw_be1: network back-end at the master end of the network. Packetizes DI
// requests into 72-bit single-flit packets for the routers and depacketizes
// response flits back into DI responses.
//
// Request: a DI request is registered (one cycle) as a flit whose routing
// field is the route carried in address bits [31:26]; the flit is offered with
// Dvalid_BE1 and held while the network raises Stall_Req. Response: a flit
// from the network (Dvalid_BE2) is registered (one cycle) as a DI response
// (response code, tag and read data); Stall_Resp is raised while that register
// is full and the DI stalls. The network's flit format (route, 18 control bits,
// 48-bit payload) follows the design. STagInOrder is not carried by the
// response flit and is returned as 0.
//
// Lint: the route and the null bits of an incoming response flit are not
// used (unused-bits warning).
module nw_be1
  import ocp_pkg::*;
(
  input  logic              clk,
  input  logic              rst,
  // DI side
  input  logic              req_valid,
  input  di_req_t           req,
  output logic              req_stall,
  output logic              resp_valid,
  output di_resp_t          resp,
  input  logic              resp_stall,
  // network side
  output logic              dvalid_be1,
  output logic [FLIT_W-1:0] out_flit,
  input  logic              stall_req,
  input  logic              dvalid_be2,
  input  logic [FLIT_W-1:0] in_flit,
  output logic              stall_resp
);
  assign req_stall  = dvalid_be1 & stall_req;
  assign stall_resp = resp_valid & resp_stall;

  always_ff @(posedge clk or posedge rst)
    if (rst) begin
      dvalid_be1 <= 1'b0;
      out_flit   <= '0;
    end else if (!req_stall) begin
      dvalid_be1 <= req_valid;
      if (req_valid) out_flit <= pack_req(req);
    end

  always_ff @(posedge clk or posedge rst)
    if (rst) begin
      resp_valid <= 1'b0;
      resp       <= '0;
    end else if (!stall_resp) begin
      resp_valid <= dvalid_be2;
      if (dvalid_be2) begin
        resp.resp    <= ocp_resp_e'(in_flit[52:51]);
        resp.tag     <= in_flit[50:48];
        resp.inorder <= 1'b0;
        resp.data    <= in_flit[47:16];
      end
    end
endmodule
