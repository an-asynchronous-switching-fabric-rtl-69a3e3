// output_port_select: output port selection and crosspoint matrix of one input port.
//
// The port's destination number is decoded into one select line per output port.
// A matrix of N_PORTS x LANE_W crosspoints then gates the port's lane (frame, strobe
// and data) onto the column of the selected output. Crosspoint [o][s] is driven low
// (active-low, as a NAND would) exactly when all three hold: output o is selected,
// the port's arbiter has granted the request, and lane signal s is high. Every other
// crosspoint stays high, so a port that has not won puts nothing on any output.
//
// Interface: dest and lane come from the sender, win from the arbiter. xp_n[o][s] goes
// to output port o. Timing: combinational, no clock; a lane signal reaches xp_n one
// gate delay after it changes, which is what lets a held path pass a burst at the
// speed of the wires.
//
// The 4 x 6 matrix of three-input crosspoints and its three conditions follow the
// fabric's description; the binary destination code and which six signals form the
// lane are this design's choices.
module output_port_select
  import fabric_pkg::*;
#(
  parameter int unsigned N_PORTS = N_PORTS_DEF,
  parameter int unsigned DATA_W  = DATA_W_DEF,
  parameter int unsigned DEST_W  = dest_w(N_PORTS),
  parameter int unsigned LANE_W  = lane_w(DATA_W)
) (
  input  logic [DEST_W-1:0]              dest,
  input  logic                           win,
  input  logic [LANE_W-1:0]              lane,
  output logic [N_PORTS-1:0][LANE_W-1:0] xp_n
);

  logic [N_PORTS-1:0] sel;

  always_comb begin
    for (int unsigned o = 0; o < N_PORTS; o++) begin
      sel[o] = (dest == DEST_W'(o));
    end
  end

  always_comb begin
    for (int unsigned o = 0; o < N_PORTS; o++) begin
      for (int unsigned s = 0; s < LANE_W; s++) begin
        xp_n[o][s] = ~(sel[o] & win & lane[s]);
      end
    end
  end

endmodule
