// tb_queue_box: pushes on all types, dequeues, checks validity masking by the
// flow timer, front values, swap-in of a new flow and timer, and overflow.
module tb_queue_box;
  import mtp_pkg::*;
  localparam int P = 10;
  logic clk = 1'b0, rst_n = 1'b0;
  logic [NUM_TYPES-1:0] push, deq, valid, overflow;
  payload_t [NUM_TYPES-1:0] push_data, front;
  logic swap_in, occupied, timer_active, empty;
  flow_id_t swap_flow, flow;
  qrow_t swap_row, row;
  logic [TIMER_W-1:0] swap_timer, timer_count, timer_next;
  queue_box #(.PIPE_CYCLES(P)) dut (.*);
  always #5 clk = ~clk;
  int checks = 0, failures = 0;
  task automatic check(input logic ok, input string msg);
    checks++;
    if (!ok) begin failures++; if (failures < 10) $display("FAIL: %s", msg); end
  endtask
  initial begin
    repeat (2000) @(posedge clk);
    failures++; $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
  initial begin
    int n;
    push = 0; deq = 0; push_data = '0; swap_in = 0; swap_flow = '0; swap_row = '0; swap_timer = '0;
    repeat (2) @(posedge clk); rst_n = 1'b1;
    @(negedge clk);
    check(!occupied && empty && valid == 0, "empty after reset");
    // swap in flow 9 with one network event, timer 3
    swap_in = 1; swap_flow = 8'd9; swap_row = '0;
    swap_row[0].count = 1; swap_row[0].slot[0] = 32'hA0; swap_timer = 8'd3;
    @(negedge clk); swap_in = 0;
    check(occupied && flow == 9 && timer_active && valid == 0, "swapped in, timer masks validity");
    repeat (3) @(negedge clk);
    check(!timer_active && valid == 3'b001 && front[0] == 32'hA0, "valid after restored timer ran out");
    // push app and timer events
    push = 3'b110; push_data[1] = 32'hB1; push_data[2] = 32'hC2; @(negedge clk); push = 0;
    check(valid == 3'b111 && front[1] == 32'hB1 && front[2] == 32'hC2, "three valid types");
    // dequeue the app event: timer starts, all invalid for P-1 cycles
    deq = 3'b010; @(negedge clk); deq = 0;
    check(valid == 0 && row[1].count == 0, "dequeued and blocked");
    n = 1;
    while (valid == 0 && n < 40) begin @(negedge clk); n++; end
    check(n == P, $sformatf("blocked for %0d cycles", n));
    check(valid == 3'b101, "valid again");
    // fill network queue to overflow
    for (int i = 0; i < QDEPTH; i++) begin
      push = 3'b001; push_data[0] = 32'(i); #1;
      check(overflow[0] == (i >= QDEPTH - 1), "overflow only when full");
      @(negedge clk);
    end
    push = 0;
    check(row[0].count == QDEPTH && row[0].slot[0] == 32'hA0, "network queue full, order kept");
    check(!empty, "not empty");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
