// tb_output_port_select: exhaustive check of one input port's crosspoint matrix.
//
// For every destination, grant and six-bit lane value, exactly the column of the
// destination must carry the inverted lane when granted; every other crosspoint must
// stay high.
module tb_output_port_select;
  localparam int unsigned N = 4;
  localparam int unsigned DW = 4;
  localparam int unsigned LW = DW + 2;

  logic [1:0]          dest;
  logic                win;
  logic [LW-1:0]       lane;
  logic [N-1:0][LW-1:0] xp_n;
  int checks = 0;
  int failures = 0;

  output_port_select #(.N_PORTS(N), .DATA_W(DW)) dut (.dest(dest), .win(win), .lane(lane), .xp_n(xp_n));

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int d = 0; d < N; d++) begin
      for (int w = 0; w < 2; w++) begin
        for (int l = 0; l < (1 << LW); l++) begin
          dest = 2'(d);
          win  = w[0];
          lane = LW'(l);
          #1;
          for (int o = 0; o < N; o++) begin
            logic [LW-1:0] exp;
            exp = (o == d && w == 1) ? ~LW'(l) : '1;
            checks++;
            if (xp_n[o] !== exp) begin
              failures++;
              if (failures < 10)
                $display("FAIL dest=%0d win=%0d lane=%b col %0d = %b expected %b", d, w, lane, o, xp_n[o], exp);
            end
          end
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
