// tb_async_fifo: self-checking test of the 8-word dual-clock FIFO. Writes a
// stream of counter-derived words with a 10 ns write clock and reads them with
// an unrelated 7.3 ns read clock, with random pauses on both sides. Checks:
// words come out complete and in order; the FIFO reports full after 8 unread
// words and never holds more; a word written into an empty FIFO appears three
// read-clock edges later; and empty is set after reset.
module tb_async_fifo;
  localparam int DW = 16, AW = 3, N = 200;

  logic wclk = 0, rclk = 0, rst = 1;
  logic winc, rinc, wfull, rempty;
  logic [DW-1:0] wdata, rdata;
  int checks = 0, failures = 0;

  always #5    wclk = ~wclk;
  always #3.65 rclk = ~rclk;

  async_fifo #(.DW(DW), .AW(AW)) dut (.*, .wrst(rst), .rrst(rst));

  function automatic logic [DW-1:0] word(int i);
    return DW'(i * 40503 + 17);
  endfunction

  task automatic check(bit c, string msg);
    checks++;
    if (!c) begin
      failures++;
      $display("FAIL %s", msg);
    end
  endtask

  int wr_n = 0, rd_n = 0;
  bit rd_en = 0, fill_phase = 1;

  // writer
  initial begin
    winc = 0; wdata = '0;
    #23 rst = 0;
    repeat (3) @(posedge wclk);
    // latency: one word into an empty FIFO
    @(negedge wclk); winc = 1; wdata = word(0);
    @(posedge wclk); #0.1 winc = 0; wr_n = 1;
    begin
      int n = 0;
      while (rempty) begin @(posedge rclk); #0.1 n++; end
      check(n == 3, $sformatf("empty-to-valid latency %0d read clocks, expected 3", n));
    end
    // fill without reading: full after 8 words
    @(negedge wclk);
    while (!wfull) begin
      winc = 1; wdata = word(wr_n);
      @(posedge wclk); #0.1 wr_n++;
      @(negedge wclk);
    end
    winc = 0;
    check(wr_n == 8, $sformatf("full after %0d words, expected 8", wr_n));
    repeat (4) @(posedge wclk);
    check(wfull, "full stays while nothing is read");
    fill_phase = 0; rd_en = 1;
    // stream with random pauses
    while (wr_n < N) begin
      @(negedge wclk);
      winc = ($urandom_range(0, 3) != 0);
      wdata = word(wr_n);
      @(posedge wclk);
      if (winc && !wfull) wr_n++;
    end
    @(negedge wclk); winc = 0;
  end

  // reader
  initial begin
    rinc = 0;
    wait (!rst);
    check(rempty, "empty after reset");
    forever begin
      @(negedge rclk);
      rinc = rd_en && ($urandom_range(0, 2) != 0);
      @(posedge rclk);
      if (rinc && !rempty) begin
        check(rdata == word(rd_n), $sformatf("word %0d: got %h expected %h", rd_n, rdata, word(rd_n)));
        rd_n++;
        if (rd_n == N) begin
          #20;
          check(rempty, "empty after all words read");
          $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
          $finish;
        end
      end
    end
  end

  initial begin
    #100000;
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
