// router3: three-port synchronous router (ports A, B, C) for single-flit,
// source-routed packets. Each port has a switch (input) and a merge (output).
// The MSB of the flit's routing field picks one of the two other ports and the
// field is rotated for the next hop; each merge arbitrates its two inputs and
// registers the result, so a packet crosses a router in one clock.
//
// Turn table (routing bit -> output port):
//   from A: 1 -> C, 0 -> B     from B: 1 -> A, 0 -> C     from C: 1 -> B, 0 -> A
// so that a hop and its reverse always carry opposite bits. The switch/merge
// structure and the MSB-and-rotate routing follow the design; the exact bit
// assignment is this implementation's reading of the router's turn legend.
// Handshake on every port: valid forward, stall backward.
module router3
  import ocp_pkg::*;
(
  input  logic              clk,
  input  logic              rst,
  input  logic [2:0]              in_valid,   // [0]=A [1]=B [2]=C
  input  logic [2:0][FLIT_W-1:0]  in_flit,
  output logic [2:0]              in_stall,
  output logic [2:0]              out_valid,
  output logic [2:0][FLIT_W-1:0]  out_flit,
  input  logic [2:0]              out_stall
);
  localparam int A = 0, B = 1, C = 2;

  // switch outputs: s<from>_v<bit>
  logic [2:0]             sw_v0, sw_v1, sw_st0, sw_st1;
  logic [2:0][FLIT_W-1:0] sw_flit;

  for (genvar p = 0; p < 3; p++) begin : g_sw
    router_switch u_sw (
      .in_valid(in_valid[p]), .in_flit(in_flit[p]), .in_stall(in_stall[p]),
      .out0_valid(sw_v0[p]), .out1_valid(sw_v1[p]), .out_flit(sw_flit[p]),
      .out0_stall(sw_st0[p]), .out1_stall(sw_st1[p])
    );
  end

  // merge A <- B(bit 1), C(bit 0)
  router_merge u_merge_a (
    .clk, .rst,
    .in0_valid(sw_v1[B]), .in0_flit(sw_flit[B]), .in0_stall(sw_st1[B]),
    .in1_valid(sw_v0[C]), .in1_flit(sw_flit[C]), .in1_stall(sw_st0[C]),
    .out_valid(out_valid[A]), .out_flit(out_flit[A]), .out_stall(out_stall[A])
  );
  // merge B <- A(bit 0), C(bit 1)
  router_merge u_merge_b (
    .clk, .rst,
    .in0_valid(sw_v0[A]), .in0_flit(sw_flit[A]), .in0_stall(sw_st0[A]),
    .in1_valid(sw_v1[C]), .in1_flit(sw_flit[C]), .in1_stall(sw_st1[C]),
    .out_valid(out_valid[B]), .out_flit(out_flit[B]), .out_stall(out_stall[B])
  );
  // merge C <- A(bit 1), B(bit 0)
  router_merge u_merge_c (
    .clk, .rst,
    .in0_valid(sw_v1[A]), .in0_flit(sw_flit[A]), .in0_stall(sw_st1[A]),
    .in1_valid(sw_v0[B]), .in1_flit(sw_flit[B]), .in1_stall(sw_st0[B]),
    .out_valid(out_valid[C]), .out_flit(out_flit[C]), .out_stall(out_stall[C])
  );
endmodule
