// tb_mtp_top: end-to-end test of the transport backend at its default sizes.
//
// The testbench plays the network parser, the application parser and the
// event processors. The event-processor model keeps, in each flow's context,
// the number of events processed for that flow: on every dispatched event it
// checks that the context it received equals its own count (so the previous
// event of the flow had written back: no collision), and writes back count+1
// PIPE_CYCLES-2 cycles later. Network events with some payload bits arm or
// cancel a timer for their flow; expired timers come back through the timer
// lane and are checked against the armed deadline. At the end every event
// that was not reported as overflow must have been processed.
// Each mechanism (cache hit, parking, both kinds of swap, eviction, timer
// bank store/restore, forwarding, blocked box, overflow, timer fire, timer
// re-arm, timer cancel) is counted and must occur at least once.
module tb_mtp_top;
  import mtp_pkg::*;

  localparam int NUM_FLOWS = 256;
  localparam int P         = 10;
  localparam int CTX_W     = 128;

  logic clk = 1'b0, rst_n = 1'b0;
  logic net_valid, app_valid;
  event_t net_event, app_event;
  logic   [NUM_TYPES-1:0] ep_valid, ctx_wr_en, overflow;
  event_t [NUM_TYPES-1:0] ep_event;
  logic   [NUM_TYPES-1:0][CTX_W-1:0] ep_ctx, ctx_wr_data;
  flow_id_t [NUM_TYPES-1:0] ctx_wr_flow;
  logic tmr_start_en, tmr_cancel_en, tmr_start_drop;
  flow_id_t tmr_start_flow, tmr_cancel_flow;
  logic [15:0] tmr_start_delay;
  payload_t tmr_start_data;
  sched_status_t status;

  mtp_top dut (.*);

  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  longint cycle = 0;
  int ctx_cnt [NUM_FLOWS];
  int sent [NUM_TYPES], done [NUM_TYPES], ovf [NUM_TYPES];
  longint tmr_deadline [NUM_FLOWS];
  logic   tmr_armed [NUM_FLOWS];
  int n_hit, n_park, n_na, n_ind, n_evict, n_bst, n_brs, n_fwd, n_blk, n_fire, n_rearm, n_cancel;
  // pending context write-backs: due cycle, flow
  longint wb_due [NUM_TYPES][$];
  flow_id_t wb_flow [NUM_TYPES][$];
  int seq = 0;
  bit traffic_on = 1'b0;
  int burst = 0;

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

  always @(negedge clk) begin
    if (rst_n) begin
      cycle++;
      // --- event processors: consume dispatched events
      for (int k = 0; k < NUM_TYPES; k++) begin
        if (ep_valid[k]) begin
          automatic flow_id_t f = ep_event[k].flow;
          done[k]++;
          check(ep_ctx[k][31:0] == 32'(ctx_cnt[f]),
                $sformatf("flow %0d: context %0d, expected %0d", f, ep_ctx[k][31:0], ctx_cnt[f]));
          ctx_cnt[f]++;
          wb_due[k].push_back(cycle + P - 2);
          wb_flow[k].push_back(f);
          if (k == int'(EV_TIMER)) begin
            n_fire++;
            check(tmr_armed[f] && cycle >= tmr_deadline[f],
                  $sformatf("timer event of flow %0d at %0d, deadline %0d", f, cycle, tmr_deadline[f]));
            tmr_armed[f] = 1'b0;
          end
        end
      end
      for (int k = 0; k < NUM_TYPES; k++) begin
        if (overflow[k]) ovf[k]++;
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
      // --- context write-backs due now (take effect at the next edge)
      ctx_wr_en = '0;
      for (int k = 0; k < NUM_TYPES; k++) begin
        if (wb_due[k].size() > 0 && wb_due[k][0] == cycle) begin
          ctx_wr_en[k]   = 1'b1;
          ctx_wr_flow[k] = wb_flow[k][0];
          ctx_wr_data[k] = CTX_W'(ctx_cnt[wb_flow[k][0]]);
          void'(wb_due[k].pop_front());
          void'(wb_flow[k].pop_front());
        end
      end
      // --- timer instructions
      tmr_start_en  = 1'b0;
      tmr_cancel_en = 1'b0;
      if (traffic_on && $urandom_range(99) < 3) begin
        automatic flow_id_t f = flow_id_t'($urandom_range(NUM_FLOWS-1));
        if (tmr_armed[f] && $urandom_range(2) == 0) begin
          tmr_cancel_en   = 1'b1;
          tmr_cancel_flow = f;
          tmr_armed[f]    = 1'b0;
          n_cancel++;
        end else begin
          // the timer table holds 16 entries; keep the number armed below it
          automatic int armed = 0;
          foreach (tmr_armed[i]) armed += int'(tmr_armed[i]);
          if (armed < 12 || tmr_armed[f]) begin
            if (tmr_armed[f]) n_rearm++;
            tmr_start_en    = 1'b1;
            tmr_start_flow  = f;
            tmr_start_delay = 16'($urandom_range(200, 40));
            tmr_start_data  = 32'hC000_0000 | 32'(seq++);
            tmr_armed[f]    = 1'b1;
            tmr_deadline[f] = cycle + 1 + longint'(tmr_start_delay);
            sent[EV_TIMER]++;
          end
        end
      end
      // --- parsers
      net_valid = traffic_on && ($urandom_range(99) < 60);
      app_valid = traffic_on && ($urandom_range(99) < 25);
      net_event.flow = ($urandom_range(3) == 0) ? flow_id_t'($urandom_range(NUM_FLOWS-1))
                                               : flow_id_t'($urandom_range(47));
      if (burst > 0) begin
        // a burst on one flow overfills its network mini-queue
        net_valid      = 1'b1;
        net_event.flow = 8'd7;
        burst--;
      end
      net_event.data = 32'(seq++);
      app_event.flow = flow_id_t'($urandom_range(47));
      app_event.data = 32'h4000_0000 | 32'(seq++);
      if (net_valid) sent[EV_NET]++;
      if (app_valid) sent[EV_APP]++;
    end
  end

  initial begin
    net_valid = 1'b0; app_valid = 1'b0; net_event = '0; app_event = '0;
    ctx_wr_en = '0; ctx_wr_flow = '0; ctx_wr_data = '0;
    tmr_start_en = 1'b0; tmr_cancel_en = 1'b0; tmr_start_flow = '0; tmr_cancel_flow = '0;
    tmr_start_delay = '0; tmr_start_data = '0;
    foreach (ctx_cnt[i]) begin ctx_cnt[i] = 0; tmr_armed[i] = 1'b0; tmr_deadline[i] = 0; end
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    repeat (5) @(posedge clk);
    traffic_on = 1'b1;
    repeat (100) @(posedge clk);
    burst = 12;
    repeat (7900) @(posedge clk);
    traffic_on = 1'b0;
    repeat (8000) @(posedge clk);
    begin
      automatic int armed = 0;
      foreach (tmr_armed[i]) armed += int'(tmr_armed[i]);
      check(armed == 0, $sformatf("%0d timers never fired", armed));
    end
    // timer events: each start either fired, was cancelled or re-armed
    check(done[EV_TIMER] + n_cancel + n_rearm == sent[EV_TIMER] - ovf[EV_TIMER],
          $sformatf("timer events: %0d fired, %0d cancelled, %0d re-armed, %0d started",
                    done[EV_TIMER], n_cancel, n_rearm, sent[EV_TIMER]));
    check(done[EV_NET] == sent[EV_NET] - ovf[EV_NET], $sformatf("network: %0d of %0d-%0d", done[EV_NET], sent[EV_NET], ovf[EV_NET]));
    check(done[EV_APP] == sent[EV_APP] - ovf[EV_APP], $sformatf("application: %0d of %0d-%0d", done[EV_APP], sent[EV_APP], ovf[EV_APP]));
    $display("net %0d/%0d app %0d/%0d timer %0d fired, %0d cancelled, %0d re-armed; overflow %0d/%0d/%0d",
             done[0], sent[0], done[1], sent[1], n_fire, n_cancel, n_rearm, ovf[0], ovf[1], ovf[2]);
    $display("hit=%0d park=%0d new_arrival_swap=%0d indep_swap=%0d evict=%0d bank_store=%0d bank_restore=%0d forward=%0d blocked=%0d",
             n_hit, n_park, n_na, n_ind, n_evict, n_bst, n_brs, n_fwd, n_blk);
    check(n_hit > 0, "no cache hit");
    check(n_park > 0, "no parked event");
    check(n_na > 0, "no new-arrival swap");
    check(n_ind > 0, "no independent swap");
    check(n_evict > 0, "no eviction");
    check(n_bst > 0, "no timer bank store");
    check(n_brs > 0, "no timer bank restore");
    check(n_fwd > 0, "no forwarding");
    check(n_blk > 0, "no blocked box");
    check(ovf[0] + ovf[1] + ovf[2] > 0, "no overflow");
    check(n_fire > 0, "no timer event fired");
    check(n_rearm > 0, "no timer re-armed");
    check(n_cancel > 0, "no timer cancelled");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
