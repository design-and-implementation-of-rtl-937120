// noc_chain: on-chip network of N_ROUTERS three-port routers connected back to
// back. The master-end network back-end attaches to port A of router 0, the
// slave-end back-end to port C of the last router, and router i's port C is
// wired to router i+1's port A. The B port of every router is brought out so
// further cores can be attached. A packet travelling from A to C takes routing
// bit 1 at every router; the way back (C to A) takes bit 0. Latency is one
// clock per router. Defaults to the two-router network of the multifrequency
// configuration; the single-clock configuration uses one router.
module noc_chain
  import ocp_pkg::*;
#(
  parameter int N_ROUTERS = 2
) (
  input  logic                            clk,
  input  logic                            rst,
  // master end (router 0, port A)
  input  logic                            m_in_valid,
  input  logic [FLIT_W-1:0]               m_in_flit,
  output logic                            m_in_stall,
  output logic                            m_out_valid,
  output logic [FLIT_W-1:0]               m_out_flit,
  input  logic                            m_out_stall,
  // slave end (last router, port C)
  input  logic                            s_in_valid,
  input  logic [FLIT_W-1:0]               s_in_flit,
  output logic                            s_in_stall,
  output logic                            s_out_valid,
  output logic [FLIT_W-1:0]               s_out_flit,
  input  logic                            s_out_stall,
  // B ports of all routers
  input  logic [N_ROUTERS-1:0]             b_in_valid,
  input  logic [N_ROUTERS-1:0][FLIT_W-1:0] b_in_flit,
  output logic [N_ROUTERS-1:0]             b_in_stall,
  output logic [N_ROUTERS-1:0]             b_out_valid,
  output logic [N_ROUTERS-1:0][FLIT_W-1:0] b_out_flit,
  input  logic [N_ROUTERS-1:0]             b_out_stall
);
  logic [N_ROUTERS-1:0][2:0]             iv, ist, ov, ost;
  logic [N_ROUTERS-1:0][2:0][FLIT_W-1:0] ifl, ofl;

  for (genvar r = 0; r < N_ROUTERS; r++) begin : g_r
    router3 u_router (
      .clk, .rst,
      .in_valid(iv[r]), .in_flit(ifl[r]), .in_stall(ist[r]),
      .out_valid(ov[r]), .out_flit(ofl[r]), .out_stall(ost[r])
    );
    // port B
    assign iv[r][1]      = b_in_valid[r];
    assign ifl[r][1]     = b_in_flit[r];
    assign b_in_stall[r] = ist[r][1];
    assign b_out_valid[r] = ov[r][1];
    assign b_out_flit[r]  = ofl[r][1];
    assign ost[r][1]      = b_out_stall[r];
    // port A: from master end or previous router's C
    if (r == 0) begin : g_first
      assign iv[r][0]    = m_in_valid;
      assign ifl[r][0]   = m_in_flit;
      assign m_in_stall  = ist[r][0];
      assign m_out_valid = ov[r][0];
      assign m_out_flit  = ofl[r][0];
      assign ost[r][0]   = m_out_stall;
    end else begin : g_link
      assign iv[r][0]    = ov[r-1][2];
      assign ifl[r][0]   = ofl[r-1][2];
      assign ost[r-1][2] = ist[r][0];
      assign iv[r-1][2]  = ov[r][0];
      assign ifl[r-1][2] = ofl[r][0];
      assign ost[r][0]   = ist[r-1][2];
    end
    // port C of the last router: slave end
    if (r == N_ROUTERS-1) begin : g_last
      assign iv[r][2]    = s_in_valid;
      assign ifl[r][2]   = s_in_flit;
      assign s_in_stall  = ist[r][2];
      assign s_out_valid = ov[r][2];
      assign s_out_flit  = ofl[r][2];
      assign ost[r][2]   = s_out_stall;
    end
  end
endmodule
