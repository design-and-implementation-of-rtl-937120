// ocp_noc_top: complete IP core - network - IP core path with clocked OCP
// network interfaces. A master IP core (a CPU bus brought out as ports) reaches
// a synchronous memory (instantiated here as the system target) through:
//
//   Top1 (clk_m):  master_be - DI1 - OCP master - OCP slave - DI2
//   NoC  (clk_n):  nw_be1 - N_ROUTERS routers - nw_be2
//   Top2 (clk_s):  DI3 - OCP master - OCP slave - DI4 - slave_be - slave_mem
//
// Responses return along the same chain. MFCD = 1 (default) is the
// multifrequency configuration: DI2 and DI3 contain dual-clock FIFOs, so the
// master side, the network and the slave side may run on three unrelated
// clocks. MFCD = 0 is the single-clock configuration: every DI is
// combinational and clk_m, clk_n and clk_s must be the same clock.
// DI1 and DI4 are always combinational, keeping each back-end and its OCP
// entities in one clock domain.
//
// Latency (single clock, one router): request path 4 + 3 + 4 cycles (Top1,
// network, Top2), memory 2, response path 3 + 3 + 3; each additional router
// adds one cycle each way, and each dual-clock DI adds about four cycles of
// its reader's clock. The reset is asynchronous and active high; it must be
// released away from all three clock edges.
//
// Lint: verilator's SYNCASYNCNET note on rst comes from the assertions inside
// the OCP entities and back-ends, which are disabled during reset.
module ocp_noc_top
  import ocp_pkg::*;
#(
  parameter bit MFCD      = 1'b1,
  parameter int N_ROUTERS = 2
) (
  input  logic              clk_m,
  input  logic              clk_n,
  input  logic              clk_s,
  input  logic              rst,
  // master IP core bus
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
  // route table of the master back-end
  input  logic              cfg_we,
  input  logic [SRB_W-1:0]  cfg_idx,
  input  logic [SRB_W-1:0]  cfg_route,
  // spare B ports of the routers (clk_n domain)
  input  logic [N_ROUTERS-1:0]             b_in_valid,
  input  logic [N_ROUTERS-1:0][FLIT_W-1:0] b_in_flit,
  output logic [N_ROUTERS-1:0]             b_in_stall,
  output logic [N_ROUTERS-1:0]             b_out_valid,
  output logic [N_ROUTERS-1:0][FLIT_W-1:0] b_out_flit,
  input  logic [N_ROUTERS-1:0]             b_out_stall
);
  // ---------------- Top1 (master side) ----------------
  logic     be_req_v, be_req_st, be_resp_v, be_resp_st;
  di_req_t  be_req;
  di_resp_t be_resp;
  logic     m1_req_v, m1_req_st, m1_resp_v, m1_resp_st;
  di_req_t  m1_req;
  di_resp_t m1_resp;
  ocp_mreq_t  l1_mreq;
  ocp_mdata_t l1_mdata;
  ocp_sresp_t l1_sresp;
  logic       l1_cmdacc, l1_dataacc, l1_respacc;
  logic     s1_req_v, s1_req_st, s1_resp_v, s1_resp_st;
  di_req_t  s1_req;
  di_resp_t s1_resp;

  master_be u_master_be (
    .clk(clk_m), .rst,
    .cpu_cyc, .cpu_stb, .cpu_we, .cpu_sel, .cpu_adr, .cpu_dat_w,
    .cpu_stall, .cpu_ack, .cpu_dat_r, .cpu_resp, .cpu_tag,
    .cfg_we, .cfg_idx, .cfg_route,
    .req_valid(be_req_v), .req(be_req), .req_stall(be_req_st),
    .resp_valid(be_resp_v), .resp(be_resp), .resp_stall(be_resp_st)
  );

  di #(.ASYNC(1'b0)) u_di1 (
    .up_clk(clk_m), .up_rst(rst), .dn_clk(clk_m), .dn_rst(rst),
    .up_req_valid(be_req_v), .up_req(be_req), .up_req_stall(be_req_st),
    .dn_req_valid(m1_req_v), .dn_req(m1_req), .dn_req_stall(m1_req_st),
    .dn_resp_valid(m1_resp_v), .dn_resp(m1_resp), .dn_resp_stall(m1_resp_st),
    .up_resp_valid(be_resp_v), .up_resp(be_resp), .up_resp_stall(be_resp_st)
  );

  ocp_master u_ocpm1 (
    .clk(clk_m), .rst,
    .di_req_valid(m1_req_v), .di_req(m1_req), .di_req_stall(m1_req_st),
    .di_resp_valid(m1_resp_v), .di_resp(m1_resp), .di_resp_stall(m1_resp_st),
    .mreq(l1_mreq), .SCmdAccept(l1_cmdacc), .mdata(l1_mdata), .SDataAccept(l1_dataacc),
    .sresp(l1_sresp), .MRespAccept(l1_respacc)
  );

  ocp_slave u_ocps1 (
    .clk(clk_m), .rst,
    .mreq(l1_mreq), .SCmdAccept(l1_cmdacc), .mdata(l1_mdata), .SDataAccept(l1_dataacc),
    .sresp(l1_sresp), .MRespAccept(l1_respacc),
    .di_req_valid(s1_req_v), .di_req(s1_req), .di_req_stall(s1_req_st),
    .di_resp_valid(s1_resp_v), .di_resp(s1_resp), .di_resp_stall(s1_resp_st)
  );

  // ---------------- DI2: Top1 -> network ----------------
  logic     n1_req_v, n1_req_st, n1_resp_v, n1_resp_st;
  di_req_t  n1_req;
  di_resp_t n1_resp;

  di #(.ASYNC(MFCD)) u_di2 (
    .up_clk(clk_m), .up_rst(rst), .dn_clk(clk_n), .dn_rst(rst),
    .up_req_valid(s1_req_v), .up_req(s1_req), .up_req_stall(s1_req_st),
    .dn_req_valid(n1_req_v), .dn_req(n1_req), .dn_req_stall(n1_req_st),
    .dn_resp_valid(n1_resp_v), .dn_resp(n1_resp), .dn_resp_stall(n1_resp_st),
    .up_resp_valid(s1_resp_v), .up_resp(s1_resp), .up_resp_stall(s1_resp_st)
  );

  // ---------------- NoC ----------------
  logic              f1_v, f1_st, f2_v, f2_st, g1_v, g1_st, g2_v, g2_st;
  logic [FLIT_W-1:0] f1, f2, g1, g2;

  nw_be1 u_nw_be1 (
    .clk(clk_n), .rst,
    .req_valid(n1_req_v), .req(n1_req), .req_stall(n1_req_st),
    .resp_valid(n1_resp_v), .resp(n1_resp), .resp_stall(n1_resp_st),
    .dvalid_be1(f1_v), .out_flit(f1), .stall_req(f1_st),
    .dvalid_be2(g1_v), .in_flit(g1), .stall_resp(g1_st)
  );

  noc_chain #(.N_ROUTERS(N_ROUTERS)) u_noc (
    .clk(clk_n), .rst,
    .m_in_valid(f1_v), .m_in_flit(f1), .m_in_stall(f1_st),
    .m_out_valid(g1_v), .m_out_flit(g1), .m_out_stall(g1_st),
    .s_in_valid(g2_v), .s_in_flit(g2), .s_in_stall(g2_st),
    .s_out_valid(f2_v), .s_out_flit(f2), .s_out_stall(f2_st),
    .b_in_valid, .b_in_flit, .b_in_stall, .b_out_valid, .b_out_flit, .b_out_stall
  );

  logic     n2_req_v, n2_req_st, n2_resp_v, n2_resp_st;
  di_req_t  n2_req;
  di_resp_t n2_resp;

  nw_be2 u_nw_be2 (
    .clk(clk_n), .rst,
    .dvalid_be1(f2_v), .in_flit(f2), .stall_req(f2_st),
    .dvalid_be2(g2_v), .out_flit(g2), .stall_resp(g2_st),
    .req_valid(n2_req_v), .req(n2_req), .req_stall(n2_req_st),
    .resp_valid(n2_resp_v), .resp(n2_resp), .resp_stall(n2_resp_st)
  );

  // ---------------- DI3: network -> Top2 ----------------
  logic     m2_req_v, m2_req_st, m2_resp_v, m2_resp_st;
  di_req_t  m2_req;
  di_resp_t m2_resp;

  di #(.ASYNC(MFCD)) u_di3 (
    .up_clk(clk_n), .up_rst(rst), .dn_clk(clk_s), .dn_rst(rst),
    .up_req_valid(n2_req_v), .up_req(n2_req), .up_req_stall(n2_req_st),
    .dn_req_valid(m2_req_v), .dn_req(m2_req), .dn_req_stall(m2_req_st),
    .dn_resp_valid(m2_resp_v), .dn_resp(m2_resp), .dn_resp_stall(m2_resp_st),
    .up_resp_valid(n2_resp_v), .up_resp(n2_resp), .up_resp_stall(n2_resp_st)
  );

  // ---------------- Top2 (slave side) ----------------
  ocp_mreq_t  l2_mreq;
  ocp_mdata_t l2_mdata;
  ocp_sresp_t l2_sresp;
  logic       l2_cmdacc, l2_dataacc, l2_respacc;
  logic     s2_req_v, s2_req_st, s2_resp_v, s2_resp_st;
  di_req_t  s2_req;
  di_resp_t s2_resp;
  logic     sb_req_v, sb_req_st, sb_resp_v, sb_resp_st;
  di_req_t  sb_req;
  di_resp_t sb_resp;

  ocp_master u_ocpm2 (
    .clk(clk_s), .rst,
    .di_req_valid(m2_req_v), .di_req(m2_req), .di_req_stall(m2_req_st),
    .di_resp_valid(m2_resp_v), .di_resp(m2_resp), .di_resp_stall(m2_resp_st),
    .mreq(l2_mreq), .SCmdAccept(l2_cmdacc), .mdata(l2_mdata), .SDataAccept(l2_dataacc),
    .sresp(l2_sresp), .MRespAccept(l2_respacc)
  );

  ocp_slave u_ocps2 (
    .clk(clk_s), .rst,
    .mreq(l2_mreq), .SCmdAccept(l2_cmdacc), .mdata(l2_mdata), .SDataAccept(l2_dataacc),
    .sresp(l2_sresp), .MRespAccept(l2_respacc),
    .di_req_valid(s2_req_v), .di_req(s2_req), .di_req_stall(s2_req_st),
    .di_resp_valid(s2_resp_v), .di_resp(s2_resp), .di_resp_stall(s2_resp_st)
  );

  di #(.ASYNC(1'b0)) u_di4 (
    .up_clk(clk_s), .up_rst(rst), .dn_clk(clk_s), .dn_rst(rst),
    .up_req_valid(s2_req_v), .up_req(s2_req), .up_req_stall(s2_req_st),
    .dn_req_valid(sb_req_v), .dn_req(sb_req), .dn_req_stall(sb_req_st),
    .dn_resp_valid(sb_resp_v), .dn_resp(sb_resp), .dn_resp_stall(sb_resp_st),
    .up_resp_valid(s2_resp_v), .up_resp(s2_resp), .up_resp_stall(s2_resp_st)
  );

  logic               mem_ce, mem_we, mem_ack, mem_err;
  logic [BE_W-1:0]    mem_be;
  logic [PADDR_W-1:0] mem_addr;
  logic [DATA_W-1:0]  mem_wdata, mem_rdata;

  slave_be u_slave_be (
    .clk(clk_s), .rst,
    .req_valid(sb_req_v), .req(sb_req), .req_stall(sb_req_st),
    .resp_valid(sb_resp_v), .resp(sb_resp), .resp_stall(sb_resp_st),
    .mem_ce, .mem_we, .mem_be, .mem_addr, .mem_wdata, .mem_ack, .mem_err, .mem_rdata
  );

  slave_mem u_slave_mem (
    .clk(clk_s), .rst,
    .ce(mem_ce), .we(mem_we), .be(mem_be), .addr(mem_addr), .wdata(mem_wdata),
    .ack(mem_ack), .err(mem_err), .rdata(mem_rdata)
  );
endmodule
