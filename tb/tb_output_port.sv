// tb_output_port: check of the output port merge.
//
// First each input column alone drives every six-bit pattern while the others are
// idle (all high), as happens when one input holds the output; the output must show
// that pattern. Then random active-low columns are applied and each output bit must
// be high exactly when at least one column holds that bit low.
module tb_output_port;
  localparam int unsigned N = 4;
  localparam int unsigned DW = 4;
  localparam int unsigned LW = DW + 2;

  logic [N-1:0][LW-1:0] xp_n;
  logic [LW-1:0]        lane;
  int checks = 0;
  int failures = 0;

  output_port #(.N_PORTS(N), .DATA_W(DW)) dut (.xp_n(xp_n), .lane(lane));

  task automatic check(input logic [LW-1:0] exp);
    checks++;
    if (lane !== exp) begin
      failures++;
      if (failures < 10) $display("FAIL xp_n=%h lane=%b expected %b", xp_n, lane, exp);
    end
  endtask

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    xp_n = '1;
    #1;
    check('0);
    for (int i = 0; i < N; i++) begin
      for (int l = 0; l < (1 << LW); l++) begin
        xp_n    = '1;
        xp_n[i] = ~LW'(l);
        #1;
        check(LW'(l));
      end
    end
    for (int t = 0; t < 2000; t++) begin
      logic [LW-1:0] exp;
      xp_n = (N*LW)'({$urandom, $urandom});
      #1;
      for (int s = 0; s < LW; s++) begin
        exp[s] = 1'b0;
        for (int i = 0; i < N; i++) if (xp_n[i][s] == 1'b0) exp[s] = 1'b1;
      end
      check(exp);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
