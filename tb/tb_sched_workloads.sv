// tb_sched_workloads: the scheduler under the traffic the architecture is
// meant for, and its two worked examples.
//
//  1. Expected mix (default sizes): a network event every cycle, application
//     events on 25 % and timer events on 15 % of the cycles, 256 flows. Must
//     run with no overflow, every event out, and the output rate equal to
//     the input rate.
//  2. Full line rate (default sizes): one event of every type every cycle.
//     The sustained output rate is measured and must stay at or above 2.9
//     events per cycle; every event that comes out must have been sent and
//     not reported as overflow.
//  3. Timer tracking (5 queue boxes, pipeline 10): box 1 holds flow 1 and
//     sends it; events of flows 6, 6 and 1 follow. Flow 6 replaces flow 1
//     while flow 1 is still in the pipeline; when flow 1 returns its timer
//     must be restored so its next dispatch is at least 10 cycles after the
//     first.
//  4. Matching (5 queue boxes): all five boxes hold network events, boxes 1
//     and 4 timer events, box 1 an application event; one cycle must send
//     one event of every type from three different boxes.
//
// Cases 3 and 4 and the shape of loads 1 and 2 follow the architecture's
// own examples and goals. The load fractions, the flow count, the 2.9
// events/cycle bound and the run lengths are this testbench's choices.
module tb_sched_workloads;
  import mtp_pkg::*;

  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;
  longint cycle = 0;
  always @(posedge clk) cycle <= cycle + 1;

  task automatic check(input logic ok, input string msg);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20) $display("FAIL @%0d: %s", cycle, msg);
    end
  endtask

  initial begin
    #3_000_000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // ---------------- default-size scheduler
  logic   [NUM_TYPES-1:0] a_in_valid, a_out_valid, a_ovf;
  event_t [NUM_TYPES-1:0] a_in_event, a_out_event;
  sched_status_t a_status;
  mtp_scheduler u_a (.clk, .rst_n, .in_valid(a_in_valid), .in_event(a_in_event),
                     .out_valid(a_out_valid), .out_event(a_out_event), .overflow(a_ovf),
                     .status(a_status));

  // ---------------- five-box scheduler for the worked example
  logic   [NUM_TYPES-1:0] b_in_valid, b_out_valid, b_ovf;
  event_t [NUM_TYPES-1:0] b_in_event, b_out_event;
  sched_status_t b_status;
  mtp_scheduler #(.NUM_BOXES(5), .PIPE_CYCLES(10)) u_b (
    .clk, .rst_n, .in_valid(b_in_valid), .in_event(b_in_event),
    .out_valid(b_out_valid), .out_event(b_out_event), .overflow(b_ovf), .status(b_status));

  // ---------------- five-box multiplexer for the matching example
  logic [4:0][NUM_TYPES-1:0] m_req, m_match;
  logic [NUM_TYPES-1:0]      m_gv;
  logic [NUM_TYPES-1:0][2:0] m_gb;
  islip_mux #(.NUM_BOXES(5)) u_m (.clk, .rst_n, .req(m_req), .gnt_valid(m_gv),
                                  .gnt_box(m_gb), .match(m_match));

  // outstanding payloads of scheduler A, and what was sent/received
  bit     pending [int];
  int     a_sent, a_out, a_ovf_n;
  logic [NUM_TYPES-1:0] a_prev_valid;
  event_t [NUM_TYPES-1:0] a_prev_event;
  int seq = 1;

  always @(negedge clk) if (rst_n) begin
    for (int k = 0; k < NUM_TYPES; k++) begin
      if (a_out_valid[k]) begin
        a_out++;
        check(pending.exists(int'(a_out_event[k].data)), "scheduler A sent an unknown event");
        pending.delete(int'(a_out_event[k].data));
      end
      if (a_ovf[k]) begin
        a_ovf_n++;
        pending.delete(int'(a_prev_event[k].data));
      end
    end
  end

  task automatic a_drive(input logic [NUM_TYPES-1:0] v);
    @(negedge clk);
    a_prev_valid = a_in_valid;
    a_prev_event = a_in_event;
    a_in_valid   = v;
    for (int k = 0; k < NUM_TYPES; k++) begin
      a_in_event[k].flow = flow_id_t'($urandom_range(255));
      a_in_event[k].data = payload_t'(seq);
      if (v[k]) begin pending[seq] = 1'b1; a_sent++; end
      seq++;
    end
  endtask

  // example 3 monitor
  longint f1_disp [$];
  int     b_restore, b_out_n;
  always @(negedge clk) if (rst_n) begin
    b_restore += $countones(b_status.bank_restore);
    for (int k = 0; k < NUM_TYPES; k++)
      if (b_out_valid[k]) begin
        b_out_n++;
        if (b_out_event[k].flow == 8'd1) f1_disp.push_back(cycle);
      end
  end

  task automatic b_net(input flow_id_t f);
    @(negedge clk);
    b_in_valid = 3'b001;
    b_in_event[0] = '{flow: f, data: payload_t'(f)};
    @(negedge clk);
    b_in_valid = '0;
  endtask

  initial begin
    int base_out, n;
    real rate;
    a_in_valid = '0; a_in_event = '0; b_in_valid = '0; b_in_event = '0; m_req = '0;
    a_prev_valid = '0; a_prev_event = '0;
    repeat (3) @(posedge clk);
    rst_n = 1'b1;

    // 4. matching example (Figure-style request pattern)
    @(negedge clk);
    for (int b = 0; b < 5; b++) m_req[b] = 3'b001;
    m_req[1] = 3'b111;
    m_req[4] = 3'b101;
    #1;
    check(m_gv == 3'b111, "matching: one event of every type");
    check(m_gb[0] != m_gb[1] && m_gb[1] != m_gb[2] && m_gb[0] != m_gb[2], "matching: three different boxes");
    check(m_gb[1] == 3'd1, "matching: application event from box 1");
    check(m_gb[2] == 3'd1 || m_gb[2] == 3'd4, "matching: timer event from box 1 or 4");
    @(negedge clk);
    m_req = '0;

    // 3. timer tracking example on scheduler B
    b_net(8'd1);                 // flow 1 enters box 1 and is sent
    b_net(8'd1);                 // a second event of flow 1 waits
    repeat (2) @(negedge clk);
    b_net(8'd6);                 // flow 6 replaces blocked flow 1
    b_net(8'd6);
    b_net(8'd1);                 // flow 1 comes back while still blocked
    repeat (80) @(negedge clk);
    check(f1_disp.size() == 3, $sformatf("example: flow 1 sent %0d times", f1_disp.size()));
    for (int i = 1; i < f1_disp.size(); i++)
      check(f1_disp[i] - f1_disp[i-1] >= 10,
            $sformatf("example: flow 1 sent again after %0d cycles", f1_disp[i] - f1_disp[i-1]));
    check(b_restore > 0, "example: flow 1's timer restored from the bank");
    check(b_out_n == 5, $sformatf("example: %0d of 5 events sent", b_out_n));

    // 1. expected mix
    a_sent = 0; a_out = 0; a_ovf_n = 0;
    for (int i = 0; i < 10000; i++)
      a_drive({($urandom_range(99) < 15), ($urandom_range(99) < 25), 1'b1});
    a_drive('0);
    repeat (400) a_drive('0);
    $display("expected mix: sent %0d out %0d overflow %0d", a_sent, a_out, a_ovf_n);
    check(a_ovf_n == 0, "expected mix: overflow");
    check(a_out == a_sent && pending.size() == 0, "expected mix: not all events out");

    // 2. full line rate
    a_sent = 0; a_out = 0; a_ovf_n = 0;
    for (int i = 0; i < 2000; i++) a_drive('1);
    base_out = a_out;
    n = 10000;
    for (int i = 0; i < n; i++) a_drive('1);
    rate = real'(a_out - base_out) / real'(n);
    repeat (3000) a_drive('0);
    $display("full line rate: sent %0d out %0d overflow %0d, sustained %0.2f events/cycle",
             a_sent, a_out, a_ovf_n, rate);
    check(rate >= 2.9, "full line rate: sustained rate below 2.9 events per cycle");
    check(a_out + a_ovf_n == a_sent && pending.size() == 0, "full line rate: events lost");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
