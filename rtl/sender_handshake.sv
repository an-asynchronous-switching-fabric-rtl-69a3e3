// sender_handshake: answers the sender of one input port.
//
// ack rises once the request has been decided, whichever way, and falls after the
// sender has released the request (a four-phase req/ack cycle). nak is valid while ack
// is high: low means the path was granted and the burst may start, high means the
// request met a conflict and the sender must release it and try again later.
//
// Interface: req, win and refused from the port and its arbiter; ack and nak go back to
// the sender. Timing: combinational, no clock; ack and nak fall with win and refused,
// which the arbiter clears as soon as req falls.
//
// That the fabric reports a conflict back to the sender follows the fabric's
// description; the ack/nak pair and its four-phase protocol are this design's choice.
module sender_handshake (
  input  logic req,
  input  logic win,
  input  logic refused,
  output logic ack,
  output logic nak
);

  assign ack = req & (win | refused);
  assign nak = req & refused & ~win;

endmodule
