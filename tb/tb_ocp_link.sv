// tb_ocp_link: self-checking test of an OCP master entity connected to an OCP
// slave entity, as in each half of the interface chain. A DI source feeds the
// master, a DI sink with a response generator sits behind the slave, and a
// response sink takes the master's responses.
// Phase 1 (no stalls) measures the request path (3 clocks from the DI edge
// into the master to the DI edge out of the slave) and the response path
// (2 clocks). Phase 2 sends random reads and writes with random valid gaps and
// random stalls on both DI sides and checks that every request (command,
// address, write data, byte enables, burst and tag fields) and every response
// arrives intact and in order, and that each write used one datahandshake.
module tb_ocp_link;
  import ocp_pkg::*;

  logic clk = 0, rst = 1;
  always #5 clk = ~clk;

  // master DI side
  logic     m_req_valid, m_req_stall, m_resp_valid, m_resp_stall;
  di_req_t  m_req;
  di_resp_t m_resp;
  // slave DI side
  logic     s_req_valid, s_req_stall, s_resp_valid, s_resp_stall;
  di_req_t  s_req;
  di_resp_t s_resp;
  // OCP
  ocp_mreq_t  mreq;
  ocp_mdata_t mdata;
  ocp_sresp_t sresp;
  logic       SCmdAccept, SDataAccept, MRespAccept;

  ocp_master u_m (
    .clk, .rst,
    .di_req_valid(m_req_valid), .di_req(m_req), .di_req_stall(m_req_stall),
    .di_resp_valid(m_resp_valid), .di_resp(m_resp), .di_resp_stall(m_resp_stall),
    .mreq, .SCmdAccept, .mdata, .SDataAccept, .sresp, .MRespAccept
  );
  ocp_slave u_s (
    .clk, .rst,
    .mreq, .SCmdAccept, .mdata, .SDataAccept, .sresp, .MRespAccept,
    .di_req_valid(s_req_valid), .di_req(s_req), .di_req_stall(s_req_stall),
    .di_resp_valid(s_resp_valid), .di_resp(s_resp), .di_resp_stall(s_resp_stall)
  );

  int checks = 0, failures = 0;
  task automatic check(bit c, string msg);
    checks++;
    if (!c) begin failures++; $display("FAIL %s", msg); end
  endtask

  int cyc = 0;
  always @(negedge clk) cyc++;

  int  stall_pct = 0, gap_pct = 0;
  int  n_sent = 0, n_got = 0, n_resp_sent = 0, n_resp_got = 0, n_wr = 0, n_dhs = 0;
  int  t_req_in, t_req_out, t_resp_in, t_resp_out;
  di_req_t  exp_req[$];
  di_resp_t exp_resp[$], pend_resp[$];

  function automatic di_req_t rand_req(int i);
    di_req_t r;
    r.cmd      = ($urandom_range(1) != 0) ? CMD_WR : CMD_RD;
    r.addr     = $urandom;
    r.data     = (r.cmd == CMD_WR) ? $urandom : 32'h0;
    r.byteen   = 4'($urandom);
    r.blen     = 3'($urandom);
    r.bprecise = 1'($urandom);
    r.bseq     = 3'($urandom_range(2));
    r.tag      = 3'(i);
    r.inorder  = 1'($urandom);
    return r;
  endfunction

  // DI request source into the master
  task automatic send_req(di_req_t r);
    @(negedge clk);
    while ($urandom_range(99) < gap_pct) begin m_req_valid = 0; @(negedge clk); end
    m_req_valid = 1; m_req = r;
    @(posedge clk);
    while (m_req_stall) @(posedge clk);
    t_req_in = cyc;
    exp_req.push_back(r);
    if (r.cmd == CMD_WR) n_wr++;
    n_sent++;
    #1 m_req_valid = 0;
  endtask

  // DI sink behind the slave; builds the response for each request
  always @(negedge clk) s_req_stall = ($urandom_range(99) < stall_pct);
  always @(posedge clk) if (!rst && s_req_valid && !s_req_stall) begin
    di_req_t e;
    di_resp_t rs;
    t_req_out = cyc;
    n_got++;
    e = exp_req.pop_front();
    check(s_req == e, $sformatf("request %0d intact: got %p exp %p", n_got, s_req, e));
    rs.resp = (s_req.cmd == CMD_WR) ? RESP_DVA : ocp_resp_e'($urandom_range(1, 3));
    rs.tag = s_req.tag; rs.inorder = s_req.inorder; rs.data = s_req.addr ^ 32'h5A5A_0F0F;
    pend_resp.push_back(rs);
  end

  // DI response source into the slave
  initial begin
    s_resp_valid = 0; s_resp = '0;
    forever begin
      @(negedge clk);
      if (pend_resp.size() > 0 && $urandom_range(99) >= gap_pct) begin
        s_resp_valid = 1; s_resp = pend_resp.pop_front();
        @(posedge clk);
        while (s_resp_stall) @(posedge clk);
        t_resp_in = cyc;
        exp_resp.push_back(s_resp);
        n_resp_sent++;
        #1 s_resp_valid = 0;
      end
    end
  end

  // DI response sink at the master
  always @(negedge clk) m_resp_stall = ($urandom_range(99) < stall_pct);
  always @(posedge clk) if (!rst && m_resp_valid && !m_resp_stall) begin
    di_resp_t e;
    t_resp_out = cyc;
    n_resp_got++;
    e = exp_resp.pop_front();
    check(m_resp == e, $sformatf("response %0d intact: got %p exp %p", n_resp_got, m_resp, e));
  end

  always @(posedge clk) if (!rst && mdata.MDataValid && SDataAccept) n_dhs++;

  initial begin
    m_req_valid = 0; m_req = '0;
    #22 rst = 0;
    // phase 1: latency with no stalls
    for (int i = 0; i < 2; i++) begin
      di_req_t r;
      r = rand_req(i);
      r.cmd = (i == 0) ? CMD_RD : CMD_WR;
      r.data = (i == 0) ? 32'h0 : 32'h0002AABC;
      send_req(r);
      wait (n_got == i + 1);
      check(t_req_out - t_req_in == 3, $sformatf("request path %0d clocks", t_req_out - t_req_in));
      wait (n_resp_got == i + 1);
      check(t_resp_out - t_resp_in == 2, $sformatf("response path %0d clocks", t_resp_out - t_resp_in));
    end
    // back-to-back streaming: 8 reads on consecutive clocks
    begin
      int t_first;
      for (int i = 0; i < 8; i++) begin
        di_req_t r;
        r = rand_req(i); r.cmd = CMD_RD; r.data = 0;
        send_req(r);
        if (i == 0) t_first = t_req_in;
      end
      check(t_req_in - t_first == 7, "split reads stream at one per clock");
    end
    wait (n_resp_got == 10);
    // phase 2: random traffic with stalls and gaps
    stall_pct = 30; gap_pct = 30;
    for (int i = 0; i < 300; i++) send_req(rand_req(i));
    wait (n_resp_got == n_sent);
    repeat (5) @(posedge clk);
    check(n_got == n_sent, "all requests delivered");
    check(n_dhs == n_wr, $sformatf("one datahandshake per write (%0d/%0d)", n_dhs, n_wr));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #100000;
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
