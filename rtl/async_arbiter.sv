// async_arbiter: clockless first-come arbiter of one input port.
//
// The arbiter has two stages, each a hold element that can only be set while the
// port's request is high and is cleared as soon as the request is released:
//   blocked  is set when the head-of-line conflict line is high while the request
//            is high; once set it stays set until the request falls.
//   win      is set when the request is high and blocked is low; it too holds until
//            the request falls. win is the grant: it is high from the moment the
//            request is accepted until the sender releases it.
// A request that arrives when no other port wants its output therefore wins and keeps
// the path for a whole burst; a conflict that appears later (another port asking for
// the same output) only sets blocked, which no longer affects a win already held.
// A request that arrives while another port holds or requests the same output is
// refused (blocked without win) until the sender releases it and tries again, and two
// requests that arrive together both see the conflict and are both refused. There is
// no fairness logic: the first request to arrive takes the output.
//
// Interface: req is the port's path request, conflict the line from the head-of-line
// conflict detection. win is the grant to the output port selection; refused is
// blocked and not won, the refusal reported back to the sender.
// Timing: no clock. In silicon a delay element on the request input makes the request
// reach the second stage only after the first stage has seen the conflict line; here
// the blocked stage is written before the win stage in the same latch process, which
// gives the same order. All state is cleared while req is low, so no reset is needed:
// an idle port (req low) is in its initial state.
//
// The two stages, their hold behaviour and the matched delay follow the fabric's
// arbiter; writing the stages as level-sensitive latches is this design's choice.
// The tools report both outputs as latches: they are the intended storage of this
// clockless circuit, not a coding mistake.
module async_arbiter (
  input  logic req,
  input  logic conflict,
  output logic win,
  output logic refused
);

  logic blocked;

  always_latch begin
    if (!req) begin
      blocked = 1'b0;
      win     = 1'b0;
    end else begin
      if (conflict) blocked = 1'b1;
      if (!blocked) win = 1'b1;
    end
  end

  assign refused = blocked & ~win;

endmodule
