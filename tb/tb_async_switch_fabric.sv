// tb_async_switch_fabric: end-to-end test of the 4x4 asynchronous switching fabric.
//
// The fabric is used at its default size (four ports of four data bits). The test
// plays four senders: each raises a path request to an output, waits for the answer,
// and on a grant streams a burst of words (data changes, then the strobe toggles)
// before releasing the path; on a refusal it releases and retries later. Between
// steps every input is left alone for 1 ns so the clockless logic settles.
//
// A reference model kept in the testbench decides every answer on its own: a request
// that rises while another port requests or holds the same output, including one that
// rises in the same step, is refused; otherwise it is granted and held until release.
// After every step the answers (ack/nak) of all ports and the full lane of every
// output (frame, strobe, data, all zero when the output is free) are compared with
// the model.
//
// Mechanisms that must each be seen at least once: a path granted; a request refused
// because another port holds the output; two requests to one output arriving
// together and both refused; a late request leaving an established path undisturbed;
// an output passed to another port after release; a word passed through a held path;
// all four outputs held at once (full-rate parallel burst).
module tb_async_switch_fabric;
  localparam int unsigned N  = 4;
  localparam int unsigned DW = 4;

  logic [N-1:0]          in_req;
  logic [N-1:0][1:0]     in_dest;
  logic [N-1:0]          in_strobe;
  logic [N-1:0][DW-1:0]  in_data;
  logic [N-1:0]          in_ack, in_nak;
  logic [N-1:0]          out_frame, out_strobe;
  logic [N-1:0][DW-1:0]  out_data;

  async_switch_fabric dut (
    .in_req, .in_dest, .in_strobe, .in_data, .in_ack, .in_nak,
    .out_frame, .out_strobe, .out_data
  );

  int checks = 0;
  int failures = 0;

  // Reference model state.
  logic [N-1:0] m_won, m_ref;
  int           last_holder [N];   // last input that held each output, -1 if none

  // Mechanism counters.
  int n_grant, n_refuse_held, n_refuse_simul, n_late_req, n_handover, n_words, n_all_four;

  initial begin
    #2_000_000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // Apply a set of new requests (rise) and releases (fall) in the same step and
  // update the model the way the fabric must decide.
  task automatic apply(input logic [N-1:0] rise, input logic [N-1:0][1:0] rdest,
                       input logic [N-1:0] fall);
    logic [N-1:0] nreq;
    nreq = (in_req | rise) & ~fall;
    for (int i = 0; i < N; i++) if (rise[i]) in_dest[i] = rdest[i];
    for (int i = 0; i < N; i++) begin
      if (fall[i]) begin
        m_won[i] = 1'b0;
        m_ref[i] = 1'b0;
      end
    end
    for (int i = 0; i < N; i++) begin
      if (rise[i] && !in_req[i]) begin
        bit conf, held, simul;
        conf = 0; held = 0; simul = 0;
        for (int j = 0; j < N; j++) begin
          if (j != i && nreq[j] && in_dest[j] == in_dest[i]) begin
            conf = 1;
            if (m_won[j]) held = 1;
            if (rise[j] && !in_req[j]) simul = 1;
          end
        end
        if (conf) begin
          m_ref[i] = 1'b1;
          if (held) n_refuse_held++;
          if (simul) n_refuse_simul++;
        end else begin
          m_won[i] = 1'b1;
          n_grant++;
          if (last_holder[in_dest[i]] >= 0 && last_holder[in_dest[i]] != i) n_handover++;
          last_holder[in_dest[i]] = i;
        end
      end
    end
    in_req = nreq;
    #1;
    check_all();
  endtask

  task automatic check_all();
    for (int i = 0; i < N; i++) begin
      logic ea, en;
      ea = m_won[i] | m_ref[i];
      en = m_ref[i];
      checks++;
      if (in_ack[i] !== ea || in_nak[i] !== en) begin
        failures++;
        if (failures < 20)
          $display("FAIL t=%0t port %0d ack=%b nak=%b expected ack=%b nak=%b",
                   $time, i, in_ack[i], in_nak[i], ea, en);
      end
    end
    for (int o = 0; o < N; o++) begin
      logic ef, es;
      logic [DW-1:0] ed;
      ef = 0; es = 0; ed = '0;
      for (int i = 0; i < N; i++) begin
        if (m_won[i] && in_dest[i] == 2'(o)) begin
          ef = 1; es = in_strobe[i]; ed = in_data[i];
        end
      end
      checks++;
      if (out_frame[o] !== ef || out_strobe[o] !== es || out_data[o] !== ed) begin
        failures++;
        if (failures < 20)
          $display("FAIL t=%0t output %0d frame=%b strobe=%b data=%h expected %b %b %h",
                   $time, o, out_frame[o], out_strobe[o], out_data[o], ef, es, ed);
      end
    end
  endtask

  // One burst word on every port that holds a path: new data, then a strobe toggle.
  task automatic burst_word(input logic [N-1:0] ports);
    for (int i = 0; i < N; i++) if (ports[i]) in_data[i] = DW'($urandom);
    #1;
    check_all();
    for (int i = 0; i < N; i++) if (ports[i]) in_strobe[i] = ~in_strobe[i];
    #1;
    check_all();
    for (int i = 0; i < N; i++) if (ports[i] && m_won[i]) n_words++;
  endtask

  function automatic logic [N-1:0][1:0] dests(input int a, input int b, input int c, input int d);
    return {2'(d), 2'(c), 2'(b), 2'(a)};
  endfunction

  initial begin
    in_req = '0; in_dest = '0; in_strobe = '0; in_data = '0;
    m_won = '0; m_ref = '0;
    for (int o = 0; o < N; o++) last_holder[o] = -1;
    n_grant = 0; n_refuse_held = 0; n_refuse_simul = 0; n_late_req = 0;
    n_handover = 0; n_words = 0; n_all_four = 0;
    #1;
    check_all();

    // Port 0 takes output 2 and bursts; port 1 asks for output 2 and is refused.
    apply(4'b0001, dests(2, 0, 0, 0), 4'b0000);
    repeat (4) burst_word(4'b0001);
    apply(4'b0010, dests(0, 2, 0, 0), 4'b0000);
    if (m_won[0]) n_late_req++;
    repeat (4) burst_word(4'b0011);
    // Port 1 releases and retries while port 0 still holds: refused again.
    apply(4'b0000, '0, 4'b0010);
    apply(4'b0010, dests(0, 2, 0, 0), 4'b0000);
    // Port 0 releases; port 1 must release and retry to get the output.
    apply(4'b0000, '0, 4'b0011);
    apply(4'b0010, dests(0, 2, 0, 0), 4'b0000);
    repeat (3) burst_word(4'b0010);
    apply(4'b0000, '0, 4'b0010);

    // Ports 2 and 3 ask for output 1 in the same step: both refused.
    apply(4'b1100, dests(0, 0, 1, 1), 4'b0000);
    apply(4'b0000, '0, 4'b1100);

    // A full permutation: all four outputs held at once, bursting in parallel.
    apply(4'b1111, dests(3, 0, 1, 2), 4'b0000);
    if (&m_won) n_all_four++;
    repeat (8) burst_word(4'b1111);
    apply(4'b0000, '0, 4'b1111);

    // Random traffic: each step raises and releases random sets of ports.
    for (int t = 0; t < 3000; t++) begin
      logic [N-1:0] rise, fall;
      logic [N-1:0][1:0] rd;
      rd   = 8'($urandom);
      rise = 4'($urandom) & ~in_req & 4'($urandom);
      fall = in_req & (m_ref | (4'($urandom) & 4'($urandom)));
      apply(rise, rd, fall);
      if (&m_won) n_all_four++;
      burst_word(m_won);
    end
    apply(4'b0000, '0, in_req);

    $display("grants=%0d refused_by_holder=%0d refused_simultaneous=%0d late_request_kept_path=%0d handovers=%0d words=%0d all_four_held=%0d",
             n_grant, n_refuse_held, n_refuse_simul, n_late_req, n_handover, n_words, n_all_four);
    checks++; if (n_grant == 0) begin failures++; $display("FAIL no grant"); end
    checks++; if (n_refuse_held == 0) begin failures++; $display("FAIL no refusal by a holder"); end
    checks++; if (n_refuse_simul == 0) begin failures++; $display("FAIL no simultaneous refusal"); end
    checks++; if (n_late_req == 0) begin failures++; $display("FAIL no late request on a held path"); end
    checks++; if (n_handover == 0) begin failures++; $display("FAIL no handover after release"); end
    checks++; if (n_words == 0) begin failures++; $display("FAIL no burst word"); end
    checks++; if (n_all_four == 0) begin failures++; $display("FAIL never all four outputs held"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
