// tb_mtp_scheduler: self-checking test of the event scheduler.
//
// Drives random events on the three lanes and checks, against a reference
// model kept in the testbench:
//  * every event that is not reported as overflow comes out exactly once,
//    on the lane of its type, in arrival order per flow and type;
//  * a flow is never dispatched twice within PIPE_CYCLES cycles (no two
//    events of one flow in the event processors);
//  * a lone event leaves exactly 3 cycles after it arrives;
//  * after the inputs stop, everything drains (no flow starves).
// It also counts how often each mechanism happened (cache hit, parking in
// the queue memory, new-arrival swap, independent swap, eviction, timer bank
// store and restore, forwarding, blocked box, overflow) and fails if one
// never did.
module tb_mtp_scheduler;
  import mtp_pkg::*;

  localparam int NUM_FLOWS = 256;
  localparam int P         = 10;

  logic clk = 1'b0, rst_n = 1'b0;
  logic   [NUM_TYPES-1:0] in_valid, out_valid, overflow;
  event_t [NUM_TYPES-1:0] in_event, out_event;
  sched_status_t status;

  mtp_scheduler dut (.clk, .rst_n, .in_valid, .in_event, .out_valid, .out_event,
                     .overflow, .status);

  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  longint cycle = 0;
  payload_t expq [NUM_FLOWS][NUM_TYPES][$];
  longint   last_disp [NUM_FLOWS];
  logic   [NUM_TYPES-1:0] prev_valid;
  event_t [NUM_TYPES-1:0] prev_event;
  int seq = 0;
  int n_hit, n_park, n_na, n_ind, n_evict, n_bst, n_brs, n_fwd, n_blk, n_ovf, n_out;

  task automatic check(input logic ok, input string msg);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20) $display("FAIL @%0d: %s", cycle, msg);
    end
  endtask

  initial begin
    #2_000_000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always @(posedge clk) if (rst_n) cycle <= cycle + 1;

  // monitor: overflow and outputs, sampled before the edge updates them
  always @(negedge clk) if (rst_n) begin
    for (int k = 0; k < NUM_TYPES; k++) begin
      if (overflow[k]) begin
        automatic int idx = -1;
        n_ovf++;
        if (prev_valid[k])
          foreach (expq[prev_event[k].flow][k][i])
            if (expq[prev_event[k].flow][k][i] == prev_event[k].data) idx = i;
        check(idx >= 0, "overflow reported for an event not in flight");
        if (idx >= 0) expq[prev_event[k].flow][k].delete(idx);
      end
    end
    for (int k = 0; k < NUM_TYPES; k++) begin
      if (out_valid[k]) begin
        automatic flow_id_t f = out_event[k].flow;
        n_out++;
        check(expq[f][k].size() > 0 && expq[f][k][0] == out_event[k].data,
              $sformatf("lane %0d flow %0d: got %h exp %h n=%0d", k, f, out_event[k].data, expq[f][k].size() ? expq[f][k][0] : 0, expq[f][k].size()));
        if (expq[f][k].size() > 0) void'(expq[f][k].pop_front());
        check(last_disp[f] < 0 || cycle - last_disp[f] >= P,
              $sformatf("flow %0d dispatched %0d cycles after previous", f, cycle - last_disp[f]));
        for (int j = 0; j < k; j++)
          check(!(out_valid[j] && out_event[j].flow == f), "two events of one flow together");
        last_disp[f] = cycle;
      end
    end
    n_hit   += $countones(status.hit);
    n_park  += $countones(status.park);
    n_na    += $countones(status.new_arrival_swap);
    n_ind   += $countones(status.indep_swap);
    n_evict += $countones(status.evict);
    n_bst   += $countones(status.bank_store);
    n_brs   += $countones(status.bank_restore);
    n_fwd   += int'(status.forward);
    n_blk   += int'(status.blocked);
  end

  task automatic drive(input logic [NUM_TYPES-1:0] v, input flow_id_t f0, f1, f2);
    flow_id_t fl [NUM_TYPES];
    fl[0] = f0; fl[1] = f1; fl[2] = f2;
    @(posedge clk);
    #1;
    prev_valid = in_valid;
    prev_event = in_event;
    // what is applied now is registered at the next edge
    in_valid = v;
    for (int k = 0; k < NUM_TYPES; k++) begin
      in_event[k].flow = fl[k];
      in_event[k].data = {4'(k), 28'(seq)};
      seq++;
      if (v[k]) expq[fl[k]][k].push_back(in_event[k].data);
    end
  endtask

  // keep prev_* aligned for the overflow check when idle
  task automatic idle(input int n);
    repeat (n) drive('0, '0, '0, '0);
  endtask

  int lat;
  initial begin
    for (int f = 0; f < NUM_FLOWS; f++) last_disp[f] = -1000;
    in_valid = '0;
    in_event = '0;
    prev_valid = '0;
    prev_event = '0;
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    idle(2);
    // 1. latency of a lone event
    drive(3'b001, 8'd5, 8'd0, 8'd0);
    lat = 0;
    @(posedge clk); #1; in_valid = '0; prev_valid = 3'b001; prev_event = in_event;
    while (!out_valid[0] && lat < 20) begin @(posedge clk); #1; lat++; end
    // in arrives at edge E0, out_valid is seen after edge E0+3
    check(lat == 2, $sformatf("latency: out_valid %0d cycles after the input cycle (+1)", lat));
    idle(20);
    // 2. overflow: one flow hammered on the network lane
    for (int i = 0; i < 12; i++) drive(3'b001, 8'd7, 8'd0, 8'd0);
    idle(80);
    // 3. random traffic, a hot set of flows with collisions on boxes
    for (int i = 0; i < 6000; i++) begin
      logic [NUM_TYPES-1:0] v;
      flow_id_t a, b, c;
      v[0] = ($urandom_range(99) < 60);
      v[1] = ($urandom_range(99) < 25);
      v[2] = ($urandom_range(99) < 15);
      a = ($urandom_range(3) == 0) ? flow_id_t'($urandom_range(NUM_FLOWS-1)) : flow_id_t'($urandom_range(47));
      b = flow_id_t'($urandom_range(47));
      c = flow_id_t'($urandom_range(NUM_FLOWS-1));
      drive(v, a, b, c);
      if (i % 500 == 499) idle(30);
    end
    // 4. drain
    idle(6000);
    begin
      int left = 0;
      for (int f = 0; f < NUM_FLOWS; f++)
        for (int k = 0; k < NUM_TYPES; k++) left += expq[f][k].size();
      check(left == 0, $sformatf("%0d events never came out", left));
    end
    $display("outputs=%0d hit=%0d park=%0d new_arrival_swap=%0d indep_swap=%0d evict=%0d bank_store=%0d bank_restore=%0d forward=%0d blocked=%0d overflow=%0d",
             n_out, n_hit, n_park, n_na, n_ind, n_evict, n_bst, n_brs, n_fwd, n_blk, n_ovf);
    check(n_hit > 0, "no cache hit");
    check(n_park > 0, "no parked event");
    check(n_na > 0, "no new-arrival swap");
    check(n_ind > 0, "no independent swap");
    check(n_evict > 0, "no eviction");
    check(n_bst > 0, "no timer bank store");
    check(n_brs > 0, "no timer bank restore");
    check(n_fwd > 0, "no forwarding");
    check(n_blk > 0, "no blocked box");
    check(n_ovf > 0, "no overflow");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
