// output_port: merges the crosspoint columns of all input ports onto one output port.
//
// Each input port's output_port_select drives one active-low column of LANE_W
// crosspoints towards this output. Since the arbiters let at most one input hold an
// output, at most one column can be pulling any signal low, and lane signal s of
// the output is high exactly when some column pulls crosspoint s low. The block is
// thus the multiplexer of the output port, written as an AND-OR with the selection
// already folded into the crosspoints.
//
// Interface: xp_n[i][s] is input port i's crosspoint s for this output; lane is the
// output's {frame, strobe, data}. Timing: combinational, no clock.
//
// That the output port multiplexes the input port signals follows the fabric's
// description; the merge written as a reduction over active-low crosspoints is this
// design's.
module output_port
  import fabric_pkg::*;
#(
  parameter int unsigned N_PORTS = N_PORTS_DEF,
  parameter int unsigned DATA_W  = DATA_W_DEF,
  parameter int unsigned LANE_W  = lane_w(DATA_W)
) (
  input  logic [N_PORTS-1:0][LANE_W-1:0] xp_n,
  output logic [LANE_W-1:0]              lane
);

  always_comb begin
    for (int unsigned s = 0; s < LANE_W; s++) begin
      lane[s] = 1'b0;
      for (int unsigned i = 0; i < N_PORTS; i++) begin
        lane[s] = lane[s] | ~xp_n[i][s];
      end
    end
  end

endmodule
