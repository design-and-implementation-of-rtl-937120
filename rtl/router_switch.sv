// router_switch: input stage of a router port. Steers an incoming single-flit
// packet to one of two merges by the most significant source-routing bit
// (bit 1 -> out1, bit 0 -> out0) and rotates the six routing bits left by one,
// so the next router finds its own bit in the MSB. Purely combinational: the
// stall returned upstream is the stall of the chosen merge.
// MSB switching and rotation follow the design; which bit value picks which
// neighbouring port is set by the wiring in router3.
module router_switch
  import ocp_pkg::*;
(
  input  logic              in_valid,
  input  logic [FLIT_W-1:0] in_flit,
  output logic              in_stall,
  output logic              out0_valid,
  output logic              out1_valid,
  output logic [FLIT_W-1:0] out_flit,
  input  logic              out0_stall,
  input  logic              out1_stall
);
  logic sel;
  assign sel        = in_flit[FLIT_W-1];
  assign out_flit   = {in_flit[FLIT_W-2:FLIT_W-SRB_W], in_flit[FLIT_W-1],
                       in_flit[FLIT_W-SRB_W-1:0]};
  assign out0_valid = in_valid & ~sel;
  assign out1_valid = in_valid &  sel;
  assign in_stall   = sel ? out1_stall : out0_stall;
endmodule
