// tb_async_arbiter: directed check of the two-stage hold arbiter of one port.
//
// The sequences cover: a request without conflict is won and held; a conflict that
// appears while the path is held changes nothing; release clears everything; a request
// that meets a conflict is refused and stays refused after the conflict goes away,
// until it is released; a request and a conflict arriving together are refused; a
// retry after the conflict is gone is won.
module tb_async_arbiter;
  logic req, conflict, win, refused;
  int checks = 0;
  int failures = 0;

  async_arbiter dut (.req(req), .conflict(conflict), .win(win), .refused(refused));

  task automatic step(input logic r, input logic c, input logic exp_win, input logic exp_ref,
                      input string what);
    req = r;
    conflict = c;
    #1;
    checks++;
    if (win !== exp_win || refused !== exp_ref) begin
      failures++;
      $display("FAIL %s: req=%b conflict=%b win=%b refused=%b expected win=%b refused=%b",
               what, r, c, win, refused, exp_win, exp_ref);
    end
  endtask

  initial begin
    #10000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    step(0, 0, 0, 0, "idle");
    step(0, 1, 0, 0, "conflict without request");
    step(0, 0, 0, 0, "idle again");
    step(1, 0, 1, 0, "request accepted");
    step(1, 0, 1, 0, "path held");
    step(1, 1, 1, 0, "late conflict while held");
    step(1, 0, 1, 0, "late conflict gone");
    step(1, 1, 1, 0, "late conflict again");
    step(0, 1, 0, 0, "release while conflict");
    step(1, 1, 0, 1, "request meets conflict");
    step(1, 0, 0, 1, "refusal held after conflict ends");
    step(1, 1, 0, 1, "still refused");
    step(0, 0, 0, 0, "release after refusal");
    step(1, 0, 1, 0, "retry accepted");
    step(0, 0, 0, 0, "release");
    for (int k = 0; k < 20; k++) begin
      logic c;
      c = 1'($urandom);
      step(1, c, !c, c, "random first arrival");
      step(1, 1'($urandom), !c, c, "random hold");
      step(0, 1'($urandom), 0, 0, "random release");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
