// tb_slave_side: self-checking test of the slave back-end driving the slave
// memory (8 KB ROM + 8 KB RAM), fed from a DI request source and drained by a
// DI response sink with random stalls.
// Checks: the ROM contents ({~i, 5'b10101, 5'b0, i} for word i); RAM writes
// with byte enables read back through a reference model; a write to the ROM is
// answered with ERR and changes nothing; responses come back in order with the
// request's tag and in-order flag; writes return no data; the request-to-
// response time through back-end and memory is 4 clocks when nothing stalls;
// and the back-end stalls the DI once DEPTH accesses are outstanding.
module tb_slave_side;
  import ocp_pkg::*;

  logic clk = 0, rst = 1;
  always #5 clk = ~clk;

  logic               req_valid, req_stall, resp_valid, resp_stall;
  di_req_t            req;
  di_resp_t           resp;
  logic               mem_ce, mem_we, mem_ack, mem_err;
  logic [BE_W-1:0]    mem_be;
  logic [PADDR_W-1:0] mem_addr;
  logic [DATA_W-1:0]  mem_wdata, mem_rdata;

  slave_be u_be (.*);
  slave_mem u_mem (
    .clk, .rst, .ce(mem_ce), .we(mem_we), .be(mem_be), .addr(mem_addr), .wdata(mem_wdata),
    .ack(mem_ack), .err(mem_err), .rdata(mem_rdata)
  );

  int checks = 0, failures = 0;
  task automatic check(bit c, string msg);
    checks++;
    if (!c) begin failures++; $display("FAIL %s", msg); end
  endtask

  int cyc = 0;
  always @(negedge clk) cyc++;

  logic [31:0] ram_ref [64];   // model of the first 64 RAM words
  di_resp_t    exp_q[$];
  int          stall_pct = 0, n_sent = 0, n_got = 0, n_err = 0, n_stalled = 0;
  int          t_in, t_out;

  function automatic logic [31:0] rom_ref(logic [10:0] i);
    return {~i, 5'b10101, 5'd0, i};
  endfunction

  always @(negedge clk) resp_stall = ($urandom_range(99) < stall_pct);
  always @(posedge clk) if (!rst && resp_valid && !resp_stall) begin
    di_resp_t e;
    t_out = cyc;
    n_got++;
    e = exp_q.pop_front();
    check(resp == e, $sformatf("response %0d: got %p exp %p", n_got, resp, e));
  end
  always @(posedge clk) if (!rst && req_valid && req_stall) n_stalled++;

  task automatic send(bit wr, logic [15:0] a, logic [31:0] d, logic [3:0] be);
    di_req_t  r;
    di_resp_t e;
    r = '0;
    r.cmd = wr ? CMD_WR : CMD_RD; r.addr = {16'h1B48, a}; r.data = d; r.byteen = be;
    r.blen = 3'd1; r.bprecise = 1'b1; r.tag = 3'(n_sent); r.inorder = 1'($urandom);
    e.tag = r.tag; e.inorder = r.inorder; e.data = '0; e.resp = RESP_DVA;
    if (!a[13]) begin
      if (wr) begin e.resp = RESP_ERR; n_err++; end
      else e.data = rom_ref(a[12:2]);
    end else begin
      if (wr) begin
        for (int b = 0; b < 4; b++) if (be[b]) ram_ref[a[7:2]][8*b +: 8] = d[8*b +: 8];
      end else e.data = ram_ref[a[7:2]];
    end
    @(negedge clk);
    req_valid = 1; req = r;
    @(posedge clk);
    while (req_stall) @(posedge clk);
    t_in = cyc;
    exp_q.push_back(e);
    n_sent++;
    #1 req_valid = 0;
  endtask

  initial begin
    req_valid = 0; req = '0;
    #22 rst = 0;
    // latency: one ROM read with no stalls
    send(0, 16'h001D, 0, 4'hF);
    wait (n_got == 1);
    check(t_out - t_in == 4, $sformatf("request to response %0d clocks", t_out - t_in));
    // initialise the modelled RAM words
    for (int i = 0; i < 64; i++) send(1, 16'h2000 + 16'(4 * i), $urandom, 4'hF);
    // random mix: RAM reads/writes with byte enables, ROM reads and writes
    stall_pct = 40;
    for (int i = 0; i < 600; i++) begin
      bit rom, wr;
      logic [15:0] a;
      rom = ($urandom_range(3) == 0);
      wr  = 1'($urandom);
      a   = rom ? 16'(4 * $urandom_range(2047)) : 16'h2000 + 16'(4 * $urandom_range(63));
      a[15:14] = 2'($urandom);   // not decoded
      send(wr, a, $urandom, 4'($urandom));
    end
    wait (n_got == n_sent);
    check(n_err > 0, "ROM writes answered with ERR");
    check(n_stalled > 0, "back-end stalled the DI when its queues were full");
    // ROM contents unchanged by the writes
    stall_pct = 0;
    for (int i = 0; i < 32; i++) send(0, 16'(4 * i), 0, 4'hF);
    wait (n_got == n_sent);
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
