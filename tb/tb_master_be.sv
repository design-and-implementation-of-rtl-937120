// tb_master_be: self-checking test of the master back-end. A CPU model issues
// requests; a DI model records what leaves the back-end and returns responses.
// Checks: route-table translation of address bits [31:26]; command, byte
// enables, burst fields and tag of each DI request; one-cycle request latency;
// nonsplit blocking until the response; split bursts of four beats sharing one
// tag and issued on consecutive cycles; stall when all 8 tags are busy and
// release when the oldest completes; DI stall holding the request; and the
// one-cycle response path to the CPU (ack, data, tag, response code).
module tb_master_be;
  import ocp_pkg::*;

  logic clk = 0, rst = 1;
  always #5 clk = ~clk;

  logic              cpu_cyc, cpu_stb, cpu_we, cpu_stall, cpu_ack;
  logic [3:0]        cpu_sel;
  logic [31:0]       cpu_adr, cpu_dat_w, cpu_dat_r;
  ocp_resp_e         cpu_resp;
  logic [2:0]        cpu_tag;
  logic              cfg_we;
  logic [5:0]        cfg_idx, cfg_route;
  logic              req_valid, req_stall, resp_valid, resp_stall;
  di_req_t           req;
  di_resp_t          resp;

  master_be dut (.*);

  int checks = 0, failures = 0;
  task automatic check(bit c, string msg);
    checks++;
    if (!c) begin failures++; $display("FAIL %s", msg); end
  endtask

  di_req_t got[$];
  always @(posedge clk) if (!rst && req_valid && !req_stall) got.push_back(req);

  int cyc = 0;
  always @(posedge clk) cyc++;

  // issue one CPU request; returns the cycle it was accepted
  task automatic cpu_issue(bit we, logic [31:0] adr, logic [31:0] dat, output int at);
    @(negedge clk);
    cpu_cyc = 1; cpu_stb = 1; cpu_we = we; cpu_adr = adr; cpu_dat_w = dat; cpu_sel = 4'hF;
    @(posedge clk);
    while (cpu_stall) @(posedge clk);
    at = cyc;
    #1 cpu_cyc = 0; cpu_stb = 0;
  endtask

  task automatic di_respond(logic [2:0] tag, logic [31:0] data);
    @(negedge clk);
    resp_valid = 1; resp = '{resp: RESP_DVA, tag: tag, inorder: 1'b0, data: data};
    @(posedge clk); #1;
    resp_valid = 0;
    check(cpu_ack && cpu_dat_r == data && cpu_tag == tag && cpu_resp == RESP_DVA,
          $sformatf("CPU response for tag %0d", tag));
  endtask

  int t0, t1;
  di_req_t r;

  initial begin
    cpu_cyc = 0; cpu_stb = 0; cpu_we = 0; cpu_adr = 0; cpu_dat_w = 0; cpu_sel = 0;
    cfg_we = 0; cfg_idx = 0; cfg_route = 0; req_stall = 0; resp_valid = 0; resp = '0;
    #22 rst = 0;
    check(resp_stall == 1'b0, "back-end never stalls responses");
    // program route entry 6 -> 6'b110000
    @(negedge clk); cfg_we = 1; cfg_idx = 6; cfg_route = 6'b110000;
    @(negedge clk); cfg_we = 0;

    // 1. nonsplit write (mode bit 24 = 0)
    cpu_issue(1, 32'h1A48BF40, 32'h0002AABC, t0);
    @(posedge clk); #1;
    check(got.size() == 1, "nonsplit request reached the DI");
    r = got.pop_front();
    check(r.cmd == CMD_WR && r.addr == 32'hC248BF40 && r.data == 32'h0002AABC && r.tag == 0
          && r.blen == 1 && r.inorder && r.byteen == 4'hF,
          $sformatf("nonsplit request fields %p", r));
    repeat (5) begin
      @(posedge clk); #1 check(cpu_stall, "nonsplit blocks until response");
    end
    di_respond(0, 32'h0);
    #1 check(!cpu_stall, "nonsplit released after response");

    // 2. split burst of 4 reads, WRAP (bit 24 = 1, length 4, precise, seq 010)
    for (int i = 0; i < 4; i++) begin
      cpu_issue(0, 32'h1B4A001D - 32'(4*i), 0, t1);
      if (i == 0) t0 = t1;
    end
    check(t1 - t0 == 3, $sformatf("4 burst beats accepted on consecutive cycles (%0d)", t1 - t0));
    @(posedge clk); #1;
    check(got.size() == 4, "burst beats reached the DI");
    for (int i = 0; i < 4; i++) begin
      r = got.pop_front();
      check(r.cmd == CMD_RD && r.tag == 1 && r.blen == 4 && r.bseq == BSEQ_WRAP && r.bprecise
            && !r.inorder && r.addr[15:0] == 16'h001D - 16'(4*i),
            $sformatf("burst beat %0d fields %p", i, r));
    end

    // 3. fill the remaining tags with single split reads (length 1)
    for (int i = 0; i < 7; i++) cpu_issue(0, 32'h1B1A0100 + 32'(4*i), 0, t1);
    @(posedge clk); #1;
    check(got.size() == 7, "seven single requests issued");
    for (int i = 0; i < 7; i++) begin
      r = got.pop_front();
      check(r.tag == 3'(2 + i) && r.blen == 1, $sformatf("single %0d tag %0d", i, r.tag));
    end
    // tag 1 (burst) still busy: next request (tag 1 again after wrap) must stall
    @(negedge clk); cpu_cyc = 1; cpu_stb = 1; cpu_we = 0; cpu_adr = 32'h1B1A0200;
    repeat (4) begin @(posedge clk); #1 check(cpu_stall, "stall while all tags busy"); end
    // tag 0 is free; next_tag wrapped to 1? answer burst tag 1 four times
    for (int i = 0; i < 4; i++) begin
      @(negedge clk); resp_valid = 1; resp = '{resp: RESP_DVA, tag: 3'd1, inorder: 1'b0, data: 32'(i)};
      @(posedge clk);
      if (i < 3) #1 check(cpu_stall, "tag stays busy until the last burst response");
    end
    @(negedge clk); resp_valid = 0;
    #1 check(!cpu_stall, "stall released once the burst completed");
    @(posedge clk); #1 cpu_cyc = 0; cpu_stb = 0;
    @(posedge clk); #1;
    r = got.pop_front();
    check(r.tag == 1, "freed tag reused");
    // complete the outstanding single reads
    for (int i = 0; i < 7; i++) di_respond(3'(2 + i), 32'hA000 + 32'(i));
    for (int i = 0; i < 4; i++) begin
      @(negedge clk); resp_valid = 1; resp = '{resp: RESP_DVA, tag: 3'd1, inorder: 1'b0, data: 32'(i)};
    end
    @(negedge clk); resp_valid = 0;

    // 4. DI stall holds the request
    @(negedge clk); req_stall = 1;
    cpu_issue(1, 32'h1B58BF44, 32'h1234, t1);
    repeat (3) begin
      @(posedge clk); #1 check(req_valid && req.data == 32'h1234 && cpu_stall, "request held under DI stall");
    end
    @(negedge clk); req_stall = 0;
    @(posedge clk); #1;
    check(got.size() == 1, "held request delivered");

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
