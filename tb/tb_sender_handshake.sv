// tb_sender_handshake: exhaustive check of the answer to the sender.
//
// All eight combinations of req, win and refused are applied. ack must be high only
// while a raised request has been decided, nak only while it was refused.
module tb_sender_handshake;
  logic req, win, refused, ack, nak;
  int checks = 0;
  int failures = 0;

  sender_handshake dut (.req(req), .win(win), .refused(refused), .ack(ack), .nak(nak));

  initial begin
    #10000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int v = 0; v < 8; v++) begin
      logic exp_ack, exp_nak;
      {req, win, refused} = 3'(v);
      #1;
      exp_ack = (v == 5 || v == 6 || v == 7);  // req with win or refused
      exp_nak = (v == 5);                       // req, refused, not won
      checks++;
      if (ack !== exp_ack || nak !== exp_nak) begin
        failures++;
        $display("FAIL req=%b win=%b refused=%b ack=%b nak=%b", req, win, refused, ack, nak);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
