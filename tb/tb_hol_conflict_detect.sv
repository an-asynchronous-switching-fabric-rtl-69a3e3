// tb_hol_conflict_detect: exhaustive check of the head-of-line conflict detection.
//
// Every combination of the four request lines and the four 2-bit destinations is
// applied. The expected conflict vector is worked out by counting, for each port,
// how many requesting ports name the same destination: a conflict exists when the
// port itself requests and that count is two or more.
module tb_hol_conflict_detect;
  localparam int unsigned N = 4;
  localparam int unsigned DW = 2;

  logic [N-1:0]         req;
  logic [N-1:0][DW-1:0] dest;
  logic [N-1:0]         conflict;
  int checks = 0;
  int failures = 0;

  hol_conflict_detect #(.N_PORTS(N), .DEST_W(DW)) dut (.req(req), .dest(dest), .conflict(conflict));

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int r = 0; r < (1 << N); r++) begin
      for (int d = 0; d < (1 << (N * DW)); d++) begin
        logic [N-1:0] exp;
        int cnt [4];
        req  = N'(r);
        dest = (N*DW)'(d);
        #1;
        cnt = '{default: 0};
        for (int k = 0; k < N; k++) if (req[k]) cnt[dest[k]]++;
        for (int k = 0; k < N; k++) exp[k] = req[k] && (cnt[dest[k]] >= 2);
        checks++;
        if (conflict !== exp) begin
          failures++;
          if (failures < 10)
            $display("FAIL req=%b dest=%h conflict=%b expected=%b", req, dest, conflict, exp);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
