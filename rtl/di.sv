// di: domain interface, the generic bridge between a back-end and an OCP
// front-end (or between a front-end and a network back-end). It carries one
// request channel from the "up" side (towards the master IP) to the "down"
// side (towards the slave IP) and one response channel back. Each channel uses
// a valid/stall handshake: a word moves on a clock edge where valid is high
// and stall is low.
//
// ASYNC = 0 (single clock): the DI is pure wiring with no clock-cycle delay;
// valid goes forward and stall goes back combinationally, so its two clock
// inputs are unused.
// ASYNC = 1 (multifrequency): each channel goes through an 8-word dual-clock
// FIFO (async_fifo). Requests are written with up_clk and read with dn_clk;
// responses are written with dn_clk and read with up_clk. A full FIFO raises
// the writer's stall; a non-empty FIFO raises the reader's valid. Crossing
// costs about four cycles: one writer clock to store the word, two reader
// clocks of pointer synchronization and one reader clock for the empty flag.
// Both modes follow the design; the valid/stall naming is this implementation's.
//
// Lint: with ASYNC = 0 the clock and reset inputs are unused (verilator reports
// them); they stay so that both configurations share one port list.
module di
  import ocp_pkg::*;
#(
  parameter bit ASYNC = 1'b1,
  parameter int FIFO_AW = 3            // 8-word FIFOs
) (
  input  logic     up_clk,
  input  logic     up_rst,
  input  logic     dn_clk,
  input  logic     dn_rst,
  // request channel, up -> down
  input  logic     up_req_valid,
  input  di_req_t  up_req,
  output logic     up_req_stall,
  output logic     dn_req_valid,
  output di_req_t  dn_req,
  input  logic     dn_req_stall,
  // response channel, down -> up
  input  logic     dn_resp_valid,
  input  di_resp_t dn_resp,
  output logic     dn_resp_stall,
  output logic     up_resp_valid,
  output di_resp_t up_resp,
  input  logic     up_resp_stall
);
  if (ASYNC) begin : g_async
    logic req_full, req_empty, resp_full, resp_empty;

    async_fifo #(.DW($bits(di_req_t)), .AW(FIFO_AW)) u_req_fifo (
      .wclk(up_clk), .wrst(up_rst), .winc(up_req_valid), .wdata(up_req), .wfull(req_full),
      .rclk(dn_clk), .rrst(dn_rst), .rinc(~dn_req_stall), .rdata(dn_req), .rempty(req_empty)
    );
    async_fifo #(.DW($bits(di_resp_t)), .AW(FIFO_AW)) u_resp_fifo (
      .wclk(dn_clk), .wrst(dn_rst), .winc(dn_resp_valid), .wdata(dn_resp), .wfull(resp_full),
      .rclk(up_clk), .rrst(up_rst), .rinc(~up_resp_stall), .rdata(up_resp), .rempty(resp_empty)
    );

    assign up_req_stall  = req_full;
    assign dn_req_valid  = ~req_empty;
    assign dn_resp_stall = resp_full;
    assign up_resp_valid = ~resp_empty;
  end else begin : g_comb
    assign dn_req_valid  = up_req_valid;
    assign dn_req        = up_req;
    assign up_req_stall  = dn_req_stall;
    assign up_resp_valid = dn_resp_valid;
    assign up_resp       = dn_resp;
    assign dn_resp_stall = up_resp_stall;
  end
endmodule
