// router_merge: output stage of a router port. Arbitrates between two switch
// outputs competing for this port and stores the winner in a one-flit output
// register (the port's buffer), giving one clock of delay per router. When both
// inputs are valid the grant alternates (round robin); the loser sees stall.
// The register takes a new flit when it is empty or its content is leaving.
// Arbitration between two inputs and one clock per router follow the design;
// the round-robin policy and the single output register are this
// implementation's choices. Reset is asynchronous, active high.
module router_merge
  import ocp_pkg::*;
(
  input  logic              clk,
  input  logic              rst,
  input  logic              in0_valid,
  input  logic [FLIT_W-1:0] in0_flit,
  output logic              in0_stall,
  input  logic              in1_valid,
  input  logic [FLIT_W-1:0] in1_flit,
  output logic              in1_stall,
  output logic              out_valid,
  output logic [FLIT_W-1:0] out_flit,
  input  logic              out_stall
);
  logic load, g0, g1, prio1;

  assign load = ~out_valid | ~out_stall;
  assign g0   = in0_valid & (~in1_valid | ~prio1);
  assign g1   = in1_valid & (~in0_valid |  prio1);
  assign in0_stall = ~(load & g0);
  assign in1_stall = ~(load & g1);

  always_ff @(posedge clk or posedge rst)
    if (rst) begin
      out_valid <= 1'b0;
      out_flit  <= '0;
      prio1     <= 1'b0;
    end else if (load) begin
      out_valid <= g0 | g1;
      if (g0 | g1) out_flit <= g1 ? in1_flit : in0_flit;
      if (load & in0_valid & in1_valid) prio1 <= ~prio1;
    end
endmodule
