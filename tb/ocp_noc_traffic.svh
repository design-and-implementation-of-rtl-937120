// ocp_noc_traffic.svh: CPU model, reference memory and traffic shared by the
// end-to-end testbenches of ocp_noc_top. Included inside a testbench module
// that declares clk_m, rst, the CPU bus signals, the dut instance and the
// counters checks/failures.
//
// The CPU model drives a request on the falling edge of clk_m, holds it while
// cpu_stall is high and counts it as taken on the rising edge where stall is
// low. Every response (cpu_ack) is compared in order with a reference model:
// ROM words {~i, 5'b10101, 5'b0, i}, RAM words as last written, ERR for a
// write to the ROM, no data for writes.
//
// Stimulus: the 36 data tokens of the nonsplit/split benchmark, i.e. nine
// 4-beat groups. Groups 0-3 are the published rows (INCR writes to
// 1B48BF40-4C, WRAP reads 1B4A001D down to 1B4A0011, INCR reads 1B4805D1-DD,
// INCR writes to 1B48BF60-6C); groups 4-8 continue in the same style (reads
// back of the written words, a second WRAP read group, one more write/read
// pair). In nonsplit runs the mode bit (address bit 24) is cleared, so every
// token is a single transfer; in split runs each group is one burst of four
// followed by one idle cycle.

  typedef struct {
    bit          we;
    logic [31:0] adr;
    logic [31:0] dat;
  } token_t;

  int cyc = 0;
  always @(negedge clk_m) cyc++;

  // ---- reference model ----
  logic [31:0] ram_ref [int];
  typedef struct {
    logic [31:0] data;
    ocp_resp_e   resp;
    bit          known;
    int          t_acc;
  } exp_t;
  exp_t exp_q[$];
  int   n_acc = 0, n_resp = 0, last_lat = 0, last_ack_cyc = 0, n_err = 0, n_unchecked = 0;

  function automatic exp_t model(bit we, logic [31:0] adr, logic [31:0] dat);
    exp_t e;
    int w;
    w = int'(adr[12:2]);
    e.known = 1; e.data = '0; e.resp = RESP_DVA; e.t_acc = 0;
    if (!adr[13]) begin
      if (we) e.resp = RESP_ERR;
      else e.data = {~adr[12:2], 5'b10101, 5'd0, adr[12:2]};
    end else if (we) begin
      ram_ref[w] = dat;
    end else if (ram_ref.exists(w)) begin
      e.data = ram_ref[w];
    end else begin
      e.known = 0;
    end
    return e;
  endfunction

  always @(posedge clk_m) if (!rst && cpu_ack) begin
    exp_t e;
    e = exp_q.pop_front();
    n_resp++;
    last_lat = cyc - e.t_acc + 1;
    last_ack_cyc = cyc;
    if (cpu_resp == RESP_ERR) n_err++;
    if (!e.known) n_unchecked++;
    check(cpu_resp == e.resp && (!e.known || cpu_dat_r == e.data),
          $sformatf("response %0d: got %h/%s exp %h/%s", n_resp, cpu_dat_r, cpu_resp.name(),
                    e.data, e.resp.name()));
  end

  // ---- CPU bus driver ----
  int t_last_acc = -10, n_pipelined = 0;

  task automatic cpu_txn(bit we, logic [31:0] adr, logic [31:0] dat, bit hold_after = 0);
    exp_t e;
    @(negedge clk_m);
    cpu_cyc = 1; cpu_stb = 1; cpu_we = we; cpu_adr = adr; cpu_dat_w = dat; cpu_sel = 4'hF;
    @(posedge clk_m);
    while (cpu_stall) @(posedge clk_m);
    e = model(we, adr, dat);
    e.t_acc = cyc;
    exp_q.push_back(e);
    if (cyc == t_last_acc + 1) n_pipelined++;
    t_last_acc = cyc;
    n_acc++;
    #0.01 if (!hold_after) begin cpu_cyc = 0; cpu_stb = 0; end
  endtask

  task automatic cpu_idle(int n);
    repeat (n) begin
      @(negedge clk_m);
      cpu_cyc = 0; cpu_stb = 0;
    end
  endtask

  task automatic wait_all();
    while (n_resp != n_acc) @(posedge clk_m);
    @(negedge clk_m);
  endtask

  // ---- benchmark tokens ----
  function automatic token_t token(int i);
    token_t t;
    int g, k;
    g = i / 4; k = i % 4;
    t.dat = 32'h0;
    case (g)
      0: begin t.we = 1; t.adr = 32'h1B48BF40 + 32'(4*k); t.dat = 32'h0002AABC + 32'(k); end
      1: begin t.we = 0; t.adr = 32'h1B4A001D - 32'(4*k); end
      2: begin t.we = 0; t.adr = 32'h1B4805D1 + 32'(4*k); end
      3: begin t.we = 1; t.adr = 32'h1B48BF60 + 32'(4*k); t.dat = 32'h0002AABC + 32'(k); end
      4: begin t.we = 0; t.adr = 32'h1B48BF40 + 32'(4*k); end
      5: begin t.we = 0; t.adr = 32'h1B4A002D - 32'(4*k); end
      6: begin t.we = 0; t.adr = 32'h1B48BF60 + 32'(4*k); end
      7: begin t.we = 1; t.adr = 32'h1B48BF70 + 32'(4*k); t.dat = 32'h0002AAC0 + 32'(k); end
      default: begin t.we = 0; t.adr = 32'h1B48BF70 + 32'(4*k); end
    endcase
    return t;
  endfunction

  // nonsplit run: returns clk_m cycles from the first request taken to the last
  // response seen, and the latency of the last transaction
  task automatic run_nsp(output int total, output int lat);
    int t0;
    for (int i = 0; i < 36; i++) begin
      token_t t;
      t = token(i);
      t.adr[24] = 1'b0;
      cpu_txn(t.we, t.adr, t.dat);
      if (i == 0) t0 = cyc;
    end
    wait_all();
    total = last_ack_cyc - t0 + 1;
    lat = last_lat;
  endtask

  // split run: nine bursts of four with one idle cycle between bursts
  task automatic run_sp(output int total);
    int t0;
    for (int i = 0; i < 36; i++) begin
      token_t t;
      t = token(i);
      cpu_txn(t.we, t.adr, t.dat, (i % 4) != 3);
      if (i == 0) t0 = cyc;
      if (i % 4 == 3 && i != 35) cpu_idle(1);
    end
    wait_all();
    total = last_ack_cyc - t0 + 1;
  endtask
