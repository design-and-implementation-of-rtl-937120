// tb_di: self-checking test of the domain interface in both configurations.
// Instance c (ASYNC = 0) must pass requests down and responses up in the same
// cycle, with stall passed back combinationally. Instance a (ASYNC = 1) runs
// its up side on a 10 ns clock and its down side on an unrelated 13.1 ns clock;
// requests and responses streamed through it with random stalls must arrive
// complete and in order, and the up side must see stall once 8 requests are
// waiting in the request FIFO.
module tb_di;
  import ocp_pkg::*;

  logic uclk = 0, dclk = 0, rst = 1;
  always #5    uclk = ~uclk;
  always #6.55 dclk = ~dclk;

  int checks = 0, failures = 0;
  task automatic check(bit c, string msg);
    checks++;
    if (!c) begin failures++; $display("FAIL %s", msg); end
  endtask

  function automatic di_req_t mk_req(int i);
    di_req_t r;
    r = '0;
    r.cmd = (i % 2) ? CMD_WR : CMD_RD;
    r.addr = 32'h1B48_0000 + 32'(i * 4);
    r.data = 32'(i * 32'h01010101 + 5);
    r.byteen = 4'(i);
    r.tag = 3'(i);
    return r;
  endfunction
  function automatic di_resp_t mk_resp(int i);
    return '{resp: RESP_DVA, tag: 3'(i), inorder: i[0], data: 32'(i * 7 + 3)};
  endfunction

  // ---------------- combinational DI ----------------
  logic     c_uv, c_us, c_dv, c_ds, c_rv, c_rs, c_urv, c_urs;
  di_req_t  c_ureq, c_dreq;
  di_resp_t c_dresp, c_uresp;

  di #(.ASYNC(1'b0)) u_c (
    .up_clk(uclk), .up_rst(rst), .dn_clk(uclk), .dn_rst(rst),
    .up_req_valid(c_uv), .up_req(c_ureq), .up_req_stall(c_us),
    .dn_req_valid(c_dv), .dn_req(c_dreq), .dn_req_stall(c_ds),
    .dn_resp_valid(c_rv), .dn_resp(c_dresp), .dn_resp_stall(c_rs),
    .up_resp_valid(c_urv), .up_resp(c_uresp), .up_resp_stall(c_urs)
  );

  initial begin
    for (int i = 0; i < 20; i++) begin
      c_uv = i[0]; c_ureq = mk_req(i); c_ds = i[1];
      c_rv = i[2]; c_dresp = mk_resp(i); c_urs = i[0] ^ i[2];
      #1;
      check(c_dv == c_uv && c_dreq == c_ureq && c_us == c_ds, "combinational request path");
      check(c_urv == c_rv && c_uresp == c_dresp && c_rs == c_urs, "combinational response path");
    end
  end

  // ---------------- dual-clock DI ----------------
  localparam int N = 60;
  logic     a_uv, a_us, a_dv, a_ds, a_rv, a_rs, a_urv, a_urs;
  di_req_t  a_ureq, a_dreq;
  di_resp_t a_dresp, a_uresp;

  di #(.ASYNC(1'b1)) u_a (
    .up_clk(uclk), .up_rst(rst), .dn_clk(dclk), .dn_rst(rst),
    .up_req_valid(a_uv), .up_req(a_ureq), .up_req_stall(a_us),
    .dn_req_valid(a_dv), .dn_req(a_dreq), .dn_req_stall(a_ds),
    .dn_resp_valid(a_rv), .dn_resp(a_dresp), .dn_resp_stall(a_rs),
    .up_resp_valid(a_urv), .up_resp(a_uresp), .up_resp_stall(a_urs)
  );

  int req_sent = 0, req_got = 0, resp_sent = 0, resp_got = 0;
  bit hold_down = 1;
  int full_seen = 0;

  // up side: send requests, receive responses
  initial begin
    a_uv = 0; a_ureq = '0; a_urs = 1;
    #27 rst = 0;
    while (req_sent < N || resp_got < N) begin
      @(negedge uclk);
      a_uv = (req_sent < N) && ($urandom_range(0, 3) != 0);
      a_ureq = mk_req(req_sent);
      a_urs = ($urandom_range(0, 3) == 0);
      @(posedge uclk);
      if (a_us) full_seen++;
      if (a_uv && !a_us) req_sent++;
      if (a_urv && !a_urs) begin
        check(a_uresp == mk_resp(resp_got), $sformatf("response %0d", resp_got));
        resp_got++;
      end
      if (req_sent == 8 && hold_down) begin
        repeat (6) @(posedge uclk);
        check(a_us, "request FIFO full after 8 words");
        hold_down = 0;
      end
    end
    check(full_seen > 0, "stall seen on the up side");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // down side: receive requests, send responses
  initial begin
    a_ds = 1; a_rv = 0; a_dresp = '0;
    wait (!rst);
    forever begin
      @(negedge dclk);
      a_ds = hold_down || ($urandom_range(0, 3) == 0);
      a_rv = (resp_sent < req_got) && ($urandom_range(0, 2) != 0);
      a_dresp = mk_resp(resp_sent);
      @(posedge dclk);
      if (a_dv && !a_ds) begin
        check(a_dreq == mk_req(req_got), $sformatf("request %0d", req_got));
        req_got++;
      end
      if (a_rv && !a_rs) resp_sent++;
    end
  end

  initial begin
    #200000;
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
