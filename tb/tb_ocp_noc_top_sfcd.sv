// tb_ocp_noc_top_sfcd: end-to-end test of the single-clock configuration
// (MFCD = 0: all domain interfaces combinational, one router), all three
// clock inputs driven by one 1.35 GHz clock. Runs the 36-token benchmark in
// nonsplit and in split mode, checks every response against the reference
// model and checks the cycle counts against the latency model:
//   request path 4 (master back-end 1, OCP entities 3) + 3 (network back-ends
//   and one router) + 4 (OCP entities 3, slave back-end 1), memory 2,
//   response path 3 + 3 + 3, and one cycle for the CPU to take the response.
// Counted from the edge where the back-end takes the request to the edge where
// the CPU takes the response, inclusive, this is 23 clock edges; the published
// model's 24 counts the CPU handing the request to the back-end as a cycle of
// its own, which here is the same edge as the back-end's input register.
// Nonsplit: the next request is taken one edge before the previous response
// is seen by the CPU, so 36 tokens take 35 x 22 + 23 cycles.
// Split: tokens are taken one per clock with one idle cycle after each burst,
// so 36 tokens take (36 + 8 - 1) + 23 cycles.
`timescale 1ns/1ps
module tb_ocp_noc_top_sfcd;
  import ocp_pkg::*;

  logic clk = 0, rst = 1;
  always #0.37 clk = ~clk;   // 1.35 GHz
  wire clk_m = clk;

  logic              cpu_cyc, cpu_stb, cpu_we, cpu_stall, cpu_ack;
  logic [3:0]        cpu_sel;
  logic [31:0]       cpu_adr, cpu_dat_w, cpu_dat_r;
  ocp_resp_e         cpu_resp;
  logic [2:0]        cpu_tag;
  logic              cfg_we;
  logic [5:0]        cfg_idx, cfg_route;
  logic [0:0]        b_in_valid, b_in_stall, b_out_valid, b_out_stall;
  logic [0:0][71:0]  b_in_flit, b_out_flit;

  ocp_noc_top #(.MFCD(1'b0), .N_ROUTERS(1)) dut (
    .clk_m(clk), .clk_n(clk), .clk_s(clk), .*
  );

  int checks = 0, failures = 0;
  task automatic check(bit c, string msg);
    checks++;
    if (!c) begin failures++; $display("FAIL %s", msg); end
  endtask

  `include "ocp_noc_traffic.svh"

  int nsp_total, nsp_lat, sp_total;

  initial begin
    cpu_cyc = 0; cpu_stb = 0; cpu_we = 0; cpu_sel = 0; cpu_adr = 0; cpu_dat_w = 0;
    cfg_we = 0; cfg_idx = 0; cfg_route = 0;
    b_in_valid = '0; b_in_flit = '0; b_out_stall = '0;
    #3.1 rst = 0;
    @(negedge clk); cfg_we = 1; cfg_idx = 6'd6; cfg_route = 6'b100000;   // A -> C
    @(negedge clk); cfg_we = 0;

    run_nsp(nsp_total, nsp_lat);
    $display("INFO nonsplit: latency %0d cycles, 36 tokens in %0d cycles", nsp_lat, nsp_total);
    check(nsp_lat == 23, $sformatf("nonsplit latency %0d, expected 23", nsp_lat));
    check(nsp_total == 35 * 22 + 23, $sformatf("nonsplit total %0d, expected %0d", nsp_total, 35 * 22 + 23));

    run_sp(sp_total);
    $display("INFO split: 36 tokens in %0d cycles", sp_total);
    check(sp_total == 43 + 23, $sformatf("split total %0d, expected %0d", sp_total, 43 + 23));
    check(n_resp == 72 && n_unchecked == 0, "all 72 responses checked");

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #20000;
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
