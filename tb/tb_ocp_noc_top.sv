// tb_ocp_noc_top: end-to-end test of the complete path at its default
// configuration (multifrequency, two routers) with three unrelated clocks:
// master side 1 GHz, network 1.11 GHz, slave side 0.925 GHz.
// Phases:
//   1. the 36-token benchmark in nonsplit mode (one transfer at a time);
//   2. the same tokens in split mode (nine pipelined 4-beat bursts);
//   3. stress: sixteen back-to-back 8-beat ROM read bursts (all tags in use,
//      dual-clock FIFOs fill up), writes to the ROM (error responses), and a
//      random mix of nonsplit and split reads and writes of 1 to 8 beats.
// Every response is checked against a reference memory model, and the test
// counts how often each mechanism of the design was exercised: nonsplit
// blocking, split pipelining, INCR and WRAP bursts, tag exhaustion stalls,
// full dual-clock FIFOs, OCP command back-pressure, slave back-end stalls,
// network back-pressure, error responses and routing-table use. Each count
// must be non-zero.
`timescale 1ns/1ps
module tb_ocp_noc_top;
  import ocp_pkg::*;

  logic clk_m = 0, clk_n = 0, clk_s = 0, rst = 1;
  always #0.5    clk_m = ~clk_m;   // 1 GHz
  always #0.4505 clk_n = ~clk_n;   // 1.11 GHz
  always #0.5405 clk_s = ~clk_s;   // 0.925 GHz

  logic              cpu_cyc, cpu_stb, cpu_we, cpu_stall, cpu_ack;
  logic [3:0]        cpu_sel;
  logic [31:0]       cpu_adr, cpu_dat_w, cpu_dat_r;
  ocp_resp_e         cpu_resp;
  logic [2:0]        cpu_tag;
  logic              cfg_we;
  logic [5:0]        cfg_idx, cfg_route;
  logic [1:0]        b_in_valid, b_in_stall, b_out_valid, b_out_stall;
  logic [1:0][71:0]  b_in_flit, b_out_flit;

  ocp_noc_top dut (.*);

  int checks = 0, failures = 0;
  task automatic check(bit c, string msg);
    checks++;
    if (!c) begin failures++; $display("FAIL %s", msg); end
  endtask

  `include "ocp_noc_traffic.svh"

  // ---- mechanism counters ----
  int n_nsp_block = 0, n_tag_stall = 0, n_req_fifo_full = 0, n_resp_fifo_full = 0;
  int n_cmd_stall = 0, n_sbe_stall = 0, n_noc_stall = 0, n_incr = 0, n_wrap = 0;
  int n_tbl_alloc = 0, n_flits = 0, n_b_out = 0;

  always @(posedge clk_m) if (!rst) begin
    if (cpu_cyc && cpu_stb && cpu_stall && dut.u_master_be.nsp_wait) n_nsp_block++;
    if (cpu_cyc && cpu_stb && cpu_stall && !dut.u_master_be.nsp_wait
        && dut.u_master_be.new_txn && dut.u_master_be.tag_busy[dut.u_master_be.next_tag])
      n_tag_stall++;
    if (dut.u_di2.g_async.req_full) n_req_fifo_full++;
    if (dut.l1_mreq.MCmd != CMD_IDLE && !dut.l1_cmdacc) n_cmd_stall++;
  end
  always @(posedge clk_m) if (!rst && cpu_cyc && cpu_stb && !cpu_stall && cpu_adr[24]
                              && cpu_adr[22:20] != 3'd1 && dut.u_master_be.new_txn) begin
    if (cpu_adr[18:16] == BSEQ_WRAP) n_wrap++;
    if (cpu_adr[18:16] == BSEQ_INCR) n_incr++;
  end
  always @(posedge clk_s) if (!rst) begin
    if (dut.u_di3.g_async.resp_full || dut.u_di3.g_async.req_full) n_resp_fifo_full++;
    if (dut.l2_mreq.MCmd != CMD_IDLE && !dut.l2_cmdacc) n_cmd_stall++;
    if (dut.sb_req_v && dut.sb_req_st) n_sbe_stall++;
  end
  always @(posedge clk_n) if (!rst) begin
    if ((dut.f1_v && dut.f1_st) || (dut.f2_v && dut.f2_st) || (dut.n2_req_v && dut.n2_req_st))
      n_noc_stall++;
    if (dut.f2_v && !dut.f2_st && !dut.u_nw_be2.f_known) n_tbl_alloc++;
    if (dut.g1_v && !dut.g1_st) n_flits++;
    if (b_out_valid != '0) n_b_out++;
  end

  int nsp_total, nsp_lat, sp_total;

  initial begin
    cpu_cyc = 0; cpu_stb = 0; cpu_we = 0; cpu_sel = 0; cpu_adr = 0; cpu_dat_w = 0;
    cfg_we = 0; cfg_idx = 0; cfg_route = 0;
    b_in_valid = '0; b_in_flit = '0; b_out_stall = '0;
    #10.2 rst = 0;
    // route for destination field 6: A -> C at both routers
    @(negedge clk_m); cfg_we = 1; cfg_idx = 6'd6; cfg_route = 6'b110000;
    @(negedge clk_m); cfg_we = 0;

    // 1. nonsplit benchmark
    run_nsp(nsp_total, nsp_lat);
    $display("INFO nonsplit: 36 tokens in %0d master cycles, last latency %0d cycles",
             nsp_total, nsp_lat);
    check(nsp_lat >= 30 && nsp_lat <= 55, "nonsplit latency within the expected range");

    // 2. split benchmark
    run_sp(sp_total);
    $display("INFO split: 36 tokens in %0d master cycles", sp_total);
    check(sp_total < nsp_total / 8, "split mode much faster than nonsplit");

    // 3a. sixteen back-to-back 8-beat ROM read bursts
    for (int b = 0; b < 16; b++)
      for (int k = 0; k < 8; k++)
        cpu_txn(0, 32'h1B080000 + 32'(256*b + 4*k), 0, !(b == 15 && k == 7));
    wait_all();
    // 3b. writes to the ROM (split, single)
    for (int i = 0; i < 4; i++) cpu_txn(1, 32'h1B180100 + 32'(4*i), 32'hDEAD0000 + 32'(i));
    wait_all();
    check(n_err == 4, $sformatf("four error responses (%0d)", n_err));
    // 3c. initialise a RAM window, then a random mix
    for (int b = 0; b < 8; b++)
      for (int k = 0; k < 8; k++)
        cpu_txn(1, 32'h1B08A000 + 32'(32*b + 4*k), $urandom, k != 7);
    wait_all();
    for (int i = 0; i < 150; i++) begin
      bit split, we, rom;
      int beats;
      logic [31:0] base;
      split = 1'($urandom);
      we    = 1'($urandom);
      rom   = ($urandom_range(3) == 0) && !we;
      beats = split ? $urandom_range(1, 8) : 1;
      base  = rom ? 32'h1B000000 + 32'(4 * $urandom_range(1000))
                  : 32'h1B00A000 + 32'(4 * $urandom_range(0, 63 - beats));
      base[24] = split;
      base[22:20] = 3'(beats);
      base[19] = 1'b1;
      base[18:16] = ($urandom_range(1) != 0) ? BSEQ_WRAP : BSEQ_INCR;
      for (int k = 0; k < beats; k++)
        cpu_txn(we, base + 32'(4*k), $urandom, k != beats - 1);
      if ($urandom_range(3) == 0) cpu_idle($urandom_range(1, 4));
    end
    wait_all();
    repeat (20) @(posedge clk_m);

    check(n_resp == n_acc && exp_q.size() == 0, "every request answered");
    check(n_unchecked == 0, "every read checked against the model");
    $display("INFO mechanisms: requests=%0d nonsplit_block_cycles=%0d pipelined_accepts=%0d incr_bursts=%0d wrap_bursts=%0d tag_stall_cycles=%0d",
             n_acc, n_nsp_block, n_pipelined, n_incr, n_wrap, n_tag_stall);
    $display("INFO mechanisms: di2_req_fifo_full=%0d di3_fifo_full=%0d ocp_cmd_stall=%0d slave_be_stall=%0d noc_stall=%0d table_alloc=%0d resp_flits=%0d err=%0d",
             n_req_fifo_full, n_resp_fifo_full, n_cmd_stall, n_sbe_stall, n_noc_stall,
             n_tbl_alloc, n_flits, n_err);
    check(n_nsp_block > 0, "nonsplit blocking seen");
    check(n_pipelined > 0, "split pipelining seen");
    check(n_incr > 0 && n_wrap > 0, "INCR and WRAP bursts seen");
    check(n_tag_stall > 0, "tag exhaustion stall seen");
    check(n_req_fifo_full > 0, "full request FIFO in DI2 seen");
    check(n_resp_fifo_full > 0, "full FIFO in DI3 seen");
    check(n_cmd_stall > 0, "OCP command back-pressure seen");
    check(n_noc_stall > 0, "network back-pressure seen");
    check(n_tbl_alloc > 0, "routing-table entries allocated");
    check(n_flits == n_resp, "one response flit per response");
    check(n_b_out == 0, "nothing left on the routers' free ports");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #200000;
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
