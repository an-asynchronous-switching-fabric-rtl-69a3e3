// async_switch_fabric: clockless 4x4 switching fabric with 4-bit bundled-data ports.
//
// Each input port asks for a path to one output port by raising in_req with the
// output's number on in_dest. The head-of-line conflict detection compares all
// requests; the port's arbiter accepts the request if it arrived while no other port
// wanted that output, and then keeps the path until the sender drops in_req. The
// handshake answers the sender on in_ack/in_nak: ack with nak low means the path is
// open, ack with nak high means the request was refused and must be released and
// retried. While the path is open, the port's data and strobe pass straight through
// one crosspoint of its output port selection and the output port's merge, with no
// storage on the way, so a burst runs at whatever rate the sender drives. out_frame
// of an output is high while some input holds it.
//
// Interface, per port p (N_PORTS ports, DATA_W data bits):
//   in_req[p], in_dest[p]     path request and destination; in_dest stable while in_req
//   in_strobe[p], in_data[p]  bundled data: the strobe qualifies the data, with any
//                             bundling protocol, as both pass the fabric side by side
//   in_ack[p], in_nak[p]      answer to the sender (see sender_handshake)
//   out_frame[p], out_strobe[p], out_data[p]   the output port's lane
// Timing: no clock and no reset. State lives only in the arbiters and is cleared by a
// released request, so a fabric whose in_req are all low is idle.
//
// The four parts (conflict detection, arbiter, output port selection, output port),
// the handshake towards the sender, the hold-until-release burst mode and the port
// count and width follow the fabric's description. The pin-level protocol (binary
// destination, ack/nak, frame output) is this design's choice.
module async_switch_fabric
  import fabric_pkg::*;
#(
  parameter int unsigned N_PORTS = N_PORTS_DEF,
  parameter int unsigned DATA_W  = DATA_W_DEF,
  parameter int unsigned DEST_W  = dest_w(N_PORTS)
) (
  input  logic [N_PORTS-1:0]              in_req,
  input  logic [N_PORTS-1:0][DEST_W-1:0]  in_dest,
  input  logic [N_PORTS-1:0]              in_strobe,
  input  logic [N_PORTS-1:0][DATA_W-1:0]  in_data,
  output logic [N_PORTS-1:0]              in_ack,
  output logic [N_PORTS-1:0]              in_nak,
  output logic [N_PORTS-1:0]              out_frame,
  output logic [N_PORTS-1:0]              out_strobe,
  output logic [N_PORTS-1:0][DATA_W-1:0]  out_data
);

  localparam int unsigned LANE_W = lane_w(DATA_W);
  localparam int unsigned STB    = strobe_bit(DATA_W);
  localparam int unsigned FRM    = frame_bit(DATA_W);

  logic [N_PORTS-1:0] conflict;
  logic [N_PORTS-1:0] win;
  logic [N_PORTS-1:0] refused;

  // xp_n[i][o] is input i's crosspoint column for output o; xp_col[o][i] the same
  // columns regrouped per output port.
  logic [N_PORTS-1:0][N_PORTS-1:0][LANE_W-1:0] xp_n;
  logic [N_PORTS-1:0][N_PORTS-1:0][LANE_W-1:0] xp_col;
  logic [N_PORTS-1:0][LANE_W-1:0]              out_lane;

  hol_conflict_detect #(
    .N_PORTS (N_PORTS),
    .DEST_W  (DEST_W)
  ) u_hol (
    .req      (in_req),
    .dest     (in_dest),
    .conflict (conflict)
  );

  for (genvar p = 0; p < N_PORTS; p++) begin : g_in
    async_arbiter u_arb (
      .req      (in_req[p]),
      .conflict (conflict[p]),
      .win      (win[p]),
      .refused  (refused[p])
    );

    sender_handshake u_hs (
      .req     (in_req[p]),
      .win     (win[p]),
      .refused (refused[p]),
      .ack     (in_ack[p]),
      .nak     (in_nak[p])
    );

    output_port_select #(
      .N_PORTS (N_PORTS),
      .DATA_W  (DATA_W),
      .DEST_W  (DEST_W)
    ) u_sel (
      .dest (in_dest[p]),
      .win  (win[p]),
      .lane ({in_req[p], in_strobe[p], in_data[p]}),
      .xp_n (xp_n[p])
    );
  end

  for (genvar o = 0; o < N_PORTS; o++) begin : g_out
    for (genvar i = 0; i < N_PORTS; i++) begin : g_col
      assign xp_col[o][i] = xp_n[i][o];
    end

    output_port #(
      .N_PORTS (N_PORTS),
      .DATA_W  (DATA_W)
    ) u_out (
      .xp_n (xp_col[o]),
      .lane (out_lane[o])
    );

    assign out_frame[o]  = out_lane[o][FRM];
    assign out_strobe[o] = out_lane[o][STB];
    assign out_data[o]   = out_lane[o][DATA_W-1:0];
  end

  // The arbitration rule of the crossbar: no output is ever held by two inputs.
  always_comb begin
    for (int unsigned o = 0; o < N_PORTS; o++) begin
      int unsigned holders;
      holders = 0;
      for (int unsigned i = 0; i < N_PORTS; i++) begin
        if (win[i] && in_dest[i] == DEST_W'(o)) holders++;
      end
      assert final (holders <= 1)
        else $error("output %0d held by %0d inputs", o, holders);
    end
  end

endmodule
