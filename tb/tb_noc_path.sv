// tb_noc_path: self-checking test of the network part of the chain: master-end
// network back-end -> chain of routers -> slave-end network back-end, with a
// DI source/sink at each end. The slave-end model answers the pending
// transactions in a random order (different tags overtake each other, beats of
// one burst stay in order), so the back-end's routing table has to find the
// return route by tag compare.
// Checks: every request arrives with its command, mode, burst, tag, byte
// enables, 16-bit address and write data, and with the routing field rotated
// once per router; the request and the response each cross the network in
// N_ROUTERS + 2 clocks (two back-end registers plus one per router); every
// response returns to the master end with its code, tag and read data (writes
// carry no data); the table is empty after the last burst response; no flit
// leaves on the routers' free B ports. Run for one and for two routers.
module tb_noc_path;
  import ocp_pkg::*;

  logic clk = 0, rst = 1;
  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  task automatic check(bit c, string msg);
    checks++;
    if (!c) begin failures++; $display("FAIL %s", msg); end
  endtask

  int cyc = 0;
  always @(negedge clk) cyc++;

  int stall_pct = 0;
  int n_done [2];

  for (genvar g = 0; g < 2; g++) begin : g_net
    localparam int NR = g + 1;

    logic     m_req_valid, m_req_stall, m_resp_valid, m_resp_stall;
    di_req_t  m_req;
    di_resp_t m_resp;
    logic     s_req_valid, s_req_stall, s_resp_valid, s_resp_stall;
    di_req_t  s_req;
    di_resp_t s_resp;
    logic              d1, d2, st_req1, st_resp1, d1n, d2n, st_req2, st_resp2;
    logic [FLIT_W-1:0] f1, f2, f1n, f2n;
    logic [NR-1:0]             b_in_valid, b_in_stall, b_out_valid, b_out_stall;
    logic [NR-1:0][FLIT_W-1:0] b_in_flit, b_out_flit;

    assign b_in_valid  = '0;
    assign b_in_flit   = '0;
    assign b_out_stall = '0;

    nw_be1 u_be1 (
      .clk, .rst,
      .req_valid(m_req_valid), .req(m_req), .req_stall(m_req_stall),
      .resp_valid(m_resp_valid), .resp(m_resp), .resp_stall(m_resp_stall),
      .dvalid_be1(d1), .out_flit(f1), .stall_req(st_req1),
      .dvalid_be2(d2n), .in_flit(f2n), .stall_resp(st_resp1)
    );
    noc_chain #(.N_ROUTERS(NR)) u_noc (
      .clk, .rst,
      .m_in_valid(d1), .m_in_flit(f1), .m_in_stall(st_req1),
      .m_out_valid(d2n), .m_out_flit(f2n), .m_out_stall(st_resp1),
      .s_in_valid(d2), .s_in_flit(f2), .s_in_stall(st_resp2),
      .s_out_valid(d1n), .s_out_flit(f1n), .s_out_stall(st_req2),
      .b_in_valid, .b_in_flit, .b_in_stall, .b_out_valid, .b_out_flit, .b_out_stall
    );
    nw_be2 u_be2 (
      .clk, .rst,
      .dvalid_be1(d1n), .in_flit(f1n), .stall_req(st_req2),
      .dvalid_be2(d2), .out_flit(f2), .stall_resp(st_resp2),
      .req_valid(s_req_valid), .req(s_req), .req_stall(s_req_stall),
      .resp_valid(s_resp_valid), .resp(s_resp), .resp_stall(s_resp_stall)
    );

    function automatic logic [5:0] rotn(logic [5:0] r);
      for (int i = 0; i < NR; i++) r = {r[4:0], r[5]};
      return r;
    endfunction

    di_req_t  exp_req[$];
    di_resp_t exp_resp[8][$];
    di_req_t  pend[$];
    int t_req_in, t_req_out, t_resp_in, t_resp_out, n_req_got = 0, n_resp_got = 0;

    always @(posedge clk) if (!rst)
      check(b_out_valid == '0, "no flit on a free B port");

    // slave-end sink: check the request, keep it for the responder
    always @(negedge clk) s_req_stall = ($urandom_range(99) < stall_pct);
    always @(posedge clk) if (!rst && s_req_valid && !s_req_stall) begin
      di_req_t e;
      e = exp_req.pop_front();
      t_req_out = cyc;
      n_req_got++;
      check(s_req.cmd == e.cmd && s_req.addr[15:0] == e.addr[15:0]
            && s_req.addr[31:26] == rotn(e.addr[31:26]) && s_req.addr[24] == e.addr[24]
            && s_req.data == e.data && s_req.byteen == e.byteen && s_req.blen == e.blen
            && s_req.bprecise == e.bprecise && s_req.bseq == e.bseq && s_req.tag == e.tag,
            $sformatf("NR=%0d request intact: got %p exp %p", NR, s_req, e));
      pend.push_back(s_req);
    end

    // slave-end responder: answers a random pending request whose tag has no
    // older pending request
    initial begin
      s_resp_valid = 0; s_resp = '0;
      forever begin
        @(negedge clk);
        if (pend.size() > 0 && $urandom_range(99) >= stall_pct) begin
          int i;
          bit older;
          di_resp_t r;
          i = $urandom_range(pend.size() - 1);
          older = 0;
          for (int j = 0; j < i; j++) if (pend[j].tag == pend[i].tag) older = 1;
          if (!older) begin
            r.resp = (pend[i].cmd == CMD_WR) ? RESP_DVA : ocp_resp_e'($urandom_range(1, 3));
            r.tag = pend[i].tag; r.inorder = 1'b0;
            r.data = {pend[i].addr[15:0], 16'h0} ^ 32'h1357_9BDF;
            pend.delete(i);
            s_resp_valid = 1; s_resp = r;
            @(posedge clk);
            while (s_resp_stall) @(posedge clk);
            t_resp_in = cyc;
            #1 s_resp_valid = 0;
          end
        end
      end
    end

    // master-end response sink
    always @(negedge clk) m_resp_stall = ($urandom_range(99) < stall_pct);
    always @(posedge clk) if (!rst && m_resp_valid && !m_resp_stall) begin
      di_resp_t e;
      t_resp_out = cyc;
      n_resp_got++;
      e = exp_resp[m_resp.tag].pop_front();
      check(m_resp == e, $sformatf("NR=%0d response intact: got %p exp %p", NR, m_resp, e));
    end

    task automatic send(di_req_t r);
      di_resp_t e;
      @(negedge clk);
      m_req_valid = 1; m_req = r;
      @(posedge clk);
      while (m_req_stall) @(posedge clk);
      t_req_in = cyc;
      exp_req.push_back(r);
      e.resp = RESP_NULL; e.tag = r.tag; e.inorder = 1'b0;
      e.data = (r.cmd == CMD_WR) ? 32'h0 : ({r.addr[15:0], 16'h0} ^ 32'h1357_9BDF);
      exp_resp[r.tag].push_back(e);
      #1 m_req_valid = 0;
    endtask

    // expected response codes are only known when the responder picks them,
    // so compare codes through a second look-up: patch the queue on arrival
    always @(posedge clk) if (!rst && s_resp_valid && !s_resp_stall)
      foreach (exp_resp[s_resp.tag][k])
        if (exp_resp[s_resp.tag][k].resp == RESP_NULL) begin
          exp_resp[s_resp.tag][k].resp = s_resp.resp;
          break;
        end

    function automatic di_req_t mk(int tag, int beat, int beats, bit wr);
      di_req_t r;
      r.cmd      = wr ? CMD_WR : CMD_RD;
      r.addr     = {(NR == 1) ? 6'b100000 : 6'b110000, 1'b1, 1'b1, 1'b0, 3'(beats), 1'b1, BSEQ_INCR,
                    16'h8000 + 16'(tag * 64 + beat * 4)};
      r.data     = wr ? $urandom : 32'h0;
      r.byteen   = 4'hF;
      r.blen     = 3'(beats);
      r.bprecise = 1'b1;
      r.bseq     = BSEQ_INCR;
      r.tag      = 3'(tag);
      r.inorder  = 1'b0;
      return r;
    endfunction

    initial begin
      int n;
      m_req_valid = 0; m_req = '0;
      wait (!rst);
      // latency, no stalls: one read
      send(mk(0, 0, 1, 0));
      wait (n_req_got == 1);
      check(t_req_out - t_req_in == NR + 2, $sformatf("NR=%0d request crosses in %0d clocks", NR, t_req_out - t_req_in));
      wait (n_resp_got == 1);
      check(t_resp_out - t_resp_in == NR + 2, $sformatf("NR=%0d response crosses in %0d clocks", NR, t_resp_out - t_resp_in));
      n = 1;
      // rounds of 8 transactions (one per tag, bursts of 1..4 beats), answered out of order
      for (int round = 0; round < 12; round++) begin
        if (round == 4) stall_pct = 30;
        for (int t = 0; t < 8; t++) begin
          int beats;
          bit wr;
          beats = $urandom_range(1, 4);
          wr = 1'($urandom);
          for (int b = 0; b < beats; b++) begin
            send(mk(t, b, beats, wr));
            n++;
          end
        end
        wait (n_resp_got == n);
        repeat (3) @(posedge clk);
        begin
          int v;
          v = 0;
          for (int i = 0; i < 8; i++) v += int'(u_be2.tbl[i].valid);
          check(v == 0, $sformatf("NR=%0d table empty after round %0d", NR, round));
        end
      end
      n_done[g] = 1;
    end
  end

  initial begin
    #22 rst = 0;
    wait (n_done[0] == 1 && n_done[1] == 1);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #400000;
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
