// tb_event_timer: arms, re-arms and cancels timers for random flows; checks
// that each armed timer fires once, not before its deadline and at most
// SLOTS cycles after it, that cancelled timers never fire, and that a start
// is dropped when the table is full.
module tb_event_timer;
  import mtp_pkg::*;
  localparam int SL = 8;
  logic clk = 1'b0, rst_n = 1'b0;
  logic start_en, cancel_en, start_drop, out_valid;
  flow_id_t start_flow, cancel_flow;
  logic [15:0] start_delay;
  payload_t start_data;
  event_t out_event;
  event_timer #(.SLOTS(SL), .TIME_W(16)) dut (.*);
  always #5 clk = ~clk;
  int checks = 0, failures = 0;
  longint cycle = 0;
  longint deadline [256];
  bit armed [256];
  payload_t pay [256];
  int fired = 0, drops = 0, rearms = 0, cancels = 0;
  task automatic check(input logic ok, input string msg);
    checks++;
    if (!ok) begin failures++; if (failures < 10) $display("FAIL @%0d: %s", cycle, msg); end
  endtask
  initial begin
    repeat (50000) @(posedge clk);
    failures++; $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
  initial begin
    foreach (armed[i]) armed[i] = 0;
    start_en = 0; cancel_en = 0; start_flow = '0; cancel_flow = '0; start_delay = '0; start_data = '0;
    repeat (2) @(posedge clk); rst_n = 1'b1;
    for (int i = 0; i < 6000; i++) begin
      @(negedge clk);
      cycle++;
      if (out_valid) begin
        automatic int f = int'(out_event.flow);
        fired++;
        check(armed[f] && out_event.data == pay[f], $sformatf("unexpected timer event for flow %0d", f));
        check(cycle >= deadline[f] && cycle <= deadline[f] + SL + 1,
              $sformatf("flow %0d fired at %0d, deadline %0d", f, cycle, deadline[f]));
        armed[f] = 0;
      end
      start_en = 0; cancel_en = 0;
      if (i < 5000 && $urandom_range(99) < 12) begin
        automatic int f = $urandom_range(15);
        automatic int n = 0;
        foreach (armed[j]) n += armed[j];
        if (armed[f] && $urandom_range(3) == 0) begin
          cancel_en = 1; cancel_flow = flow_id_t'(f); armed[f] = 0; cancels++;
        end else begin
          start_en = 1; start_flow = flow_id_t'(f);
          start_delay = 16'($urandom_range(60, 5));
          start_data = $urandom;
          #1;
          if (!armed[f] && n >= SL) begin
            check(start_drop, "start dropped when full");
            drops++;
          end else begin
            check(!start_drop, "start accepted");
            if (armed[f]) rearms++;
            armed[f] = 1; pay[f] = start_data; deadline[f] = cycle + 1 + longint'(start_delay);
          end
        end
      end
    end
    begin
      automatic int n = 0;
      foreach (armed[j]) n += armed[j];
      check(n == 0, $sformatf("%0d timers never fired", n));
    end
    check(fired > 0 && drops > 0 && rearms > 0 && cancels > 0, "fire, drop, re-arm and cancel exercised");
    $display("fired=%0d drops=%0d rearms=%0d cancels=%0d", fired, drops, rearms, cancels);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
