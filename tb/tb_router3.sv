// tb_router3: self-checking test of the three-port router.
// 1. Turn table: a flit entering each port with routing MSB 0 and 1 leaves on
//    the expected port one clock later with its routing bits rotated left.
// 2. Arbitration: two inputs that keep sending to the same output are served
//    alternately (round robin), and the loser is stalled meanwhile.
// 3. Random traffic on all three inputs with random output stalls: every flit
//    arrives exactly once, on the right port, rotated, and in order per
//    input/output pair.
module tb_router3;
  import ocp_pkg::*;

  logic clk = 0, rst = 1;
  always #5 clk = ~clk;

  logic [2:0]             in_valid, in_stall, out_valid, out_stall;
  logic [2:0][FLIT_W-1:0] in_flit, out_flit;

  router3 dut (.*);

  int checks = 0, failures = 0;
  task automatic check(bit c, string msg);
    checks++;
    if (!c) begin failures++; $display("FAIL %s", msg); end
  endtask

  // expected output port for (input port, routing bit)
  function automatic int dest(int from, bit b);
    case (from)
      0: return b ? 2 : 1;
      1: return b ? 0 : 2;
      default: return b ? 1 : 0;
    endcase
  endfunction

  function automatic logic [FLIT_W-1:0] rot(logic [FLIT_W-1:0] f);
    return {f[FLIT_W-2 -: SRB_W-1], f[FLIT_W-1], f[FLIT_W-SRB_W-1:0]};
  endfunction

  int cyc = 0;
  always @(negedge clk) cyc++;

  // expected flits per (from, to) pair
  logic [FLIT_W-1:0] expq[3][3][$];
  int got_from[3];   // last source seen on each output (for arbitration check)
  int n_in = 0, n_out = 0, stall_pct = 0;
  int last_out_cyc[3];
  logic [FLIT_W-1:0] last_out_flit[3];

  always @(negedge clk) for (int p = 0; p < 3; p++) out_stall[p] = ($urandom_range(99) < stall_pct);

  always @(posedge clk) if (!rst) for (int p = 0; p < 3; p++) begin
    if (out_valid[p] && !out_stall[p]) begin
      bit found;
      found = 0;
      last_out_cyc[p]  = cyc;
      last_out_flit[p] = out_flit[p];
      n_out++;
      for (int s = 0; s < 3; s++)
        if (!found && expq[s][p].size() > 0 && expq[s][p][0] == out_flit[p]) begin
          void'(expq[s][p].pop_front());
          got_from[p] = s;
          found = 1;
        end
      check(found, $sformatf("flit on port %0d expected: %h", p, out_flit[p]));
    end
  end

  // one driver per input port
  logic [FLIT_W-1:0] src_q[3][$];
  int in_cyc[3];
  for (genvar p = 0; p < 3; p++) begin : g_src
    initial begin
      in_valid[p] = 0; in_flit[p] = '0;
      forever begin
        @(negedge clk);
        if (src_q[p].size() > 0) begin
          logic [FLIT_W-1:0] f;
          f = src_q[p].pop_front();
          in_valid[p] = 1; in_flit[p] = f;
          @(posedge clk);
          while (in_stall[p]) @(posedge clk);
          in_cyc[p] = cyc;
          expq[p][dest(p, f[FLIT_W-1])].push_back(rot(f));
          n_in++;
          #1 in_valid[p] = 0;
        end
      end
    end
  end

  function automatic logic [FLIT_W-1:0] mk(bit msb, int id);
    logic [FLIT_W-1:0] f;
    f = {$urandom, $urandom, $urandom};
    f[FLIT_W-1] = msb;
    f[31:0] = 32'(id);
    return f;
  endfunction

  int id = 0;
  initial begin
    #22 rst = 0;
    // 1. turn table and one-clock latency
    for (int p = 0; p < 3; p++)
      for (int b = 0; b < 2; b++) begin
        logic [FLIT_W-1:0] f;
        int n0;
        f = mk(b[0], id++);
        n0 = n_out;
        src_q[p].push_back(f);
        wait (n_out == n0 + 1);
        check(last_out_flit[dest(p, b[0])] == rot(f) && last_out_cyc[dest(p, b[0])] == in_cyc[p] + 1,
              $sformatf("port %0d bit %0d -> port %0d in one clock", p, b, dest(p, b[0])));
      end
    // 2. arbitration: A (bit 1) and B (bit 0) both target C
    begin
      int seq[$];
      for (int i = 0; i < 6; i++) begin
        src_q[0].push_back(mk(1'b1, id++));
        src_q[1].push_back(mk(1'b0, id++));
      end
      while (n_out < 6 + 12) begin
        @(posedge clk);
        #1 if (out_valid[2]) ; 
        if (last_out_cyc[2] == cyc) seq.push_back(got_from[2]);
      end
      for (int i = 1; i < seq.size(); i++)
        check(seq[i] != seq[i-1], $sformatf("round robin at grant %0d", i));
    end
    // 3. random traffic with stalls
    stall_pct = 35;
    for (int i = 0; i < 900; i++) src_q[$urandom_range(2)].push_back(mk(1'($urandom), id++));
    wait (src_q[0].size() == 0 && src_q[1].size() == 0 && src_q[2].size() == 0);
    stall_pct = 0;
    repeat (20) @(posedge clk);
    check(n_out == n_in, $sformatf("all flits delivered (%0d/%0d)", n_out, n_in));
    for (int s = 0; s < 3; s++) for (int d = 0; d < 3; d++)
      check(expq[s][d].size() == 0, "no flit left behind");
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
