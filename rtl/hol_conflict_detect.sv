// hol_conflict_detect: head-of-line conflict detection of the switching fabric.
//
// For every input port that requests a path, the block raises conflict[i] when at
// least one other input port is requesting (or already holding, since a holder keeps
// its request high) the same output port. The arbiter of port i then refuses a
// request that arrives while its conflict line is high. Pure combinational logic:
// conflict follows req and dest after a gate delay, with no clock and no state.
//
// Interface: req[i] is input port i's path request, dest[i] its destination output
// port (binary), both stable while req[i] is high. conflict[i] is meaningful only
// while req[i] is high and is held low otherwise.
//
// That the block compares the heads of the input queues and signals the arbiter
// follows the fabric's description; the binary destination code, the pairwise
// comparison and gating conflict with the port's own request are this design's.
module hol_conflict_detect
  import fabric_pkg::*;
#(
  parameter int unsigned N_PORTS = N_PORTS_DEF,
  parameter int unsigned DEST_W  = dest_w(N_PORTS)
) (
  input  logic [N_PORTS-1:0]             req,
  input  logic [N_PORTS-1:0][DEST_W-1:0] dest,
  output logic [N_PORTS-1:0]             conflict
);

  always_comb begin
    for (int unsigned i = 0; i < N_PORTS; i++) begin
      conflict[i] = 1'b0;
      for (int unsigned j = 0; j < N_PORTS; j++) begin
        if (j != i && req[j] && dest[j] == dest[i]) begin
          conflict[i] = req[i];
        end
      end
    end
  end

endmodule
