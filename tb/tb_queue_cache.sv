// tb_queue_cache: checks swap into an empty box, hits, the multiplexer
// dequeue blocking a box, a new-arrival swap into a waiting box with the
// evicted flow's row and its timer stored in the bank, the restore of that
// timer when the flow comes back, the one-lane-per-box rule, and an
// independent swap that is refused for a flow with no events, and two swaps
// by two lanes in one cycle.
module tb_queue_cache;
  import mtp_pkg::*;
  localparam int NB = 4, P = 10;
  logic clk = 1'b0, rst_n = 1'b0;
  lane_req_t [NUM_TYPES-1:0] req;
  qrow_t [NUM_TYPES-1:0] row1;
  logic [NB-1:0][NUM_TYPES-1:0] deq, valid;
  logic [NUM_TYPES-1:0] hit, swap_lane, hit_ovf, evict_valid, bank_store, bank_restore;
  flow_id_t [NUM_TYPES-1:0] evict_flow;
  qrow_t [NUM_TYPES-1:0] evict_row;
  payload_t [NB-1:0][NUM_TYPES-1:0] front;
  flow_id_t [NB-1:0] box_flow;
  logic [NB-1:0] replaceable, waiting;
  queue_cache #(.NUM_BOXES(NB), .PIPE_CYCLES(P), .BANK_SLOTS(4)) dut (.*);
  always #5 clk = ~clk;
  int checks = 0, failures = 0;
  task automatic check(input logic ok, input string msg);
    checks++;
    if (!ok) begin failures++; if (failures < 10) $display("FAIL: %s", msg); end
  endtask
  initial begin
    repeat (500) @(posedge clk);
    failures++; $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
  function automatic qrow_t one(input int t, input payload_t d);
    qrow_t r = '0;
    r[t].count = 1; r[t].slot[0] = d;
    return r;
  endfunction
  initial begin
    req = '0; row1 = '0; deq = '0;
    repeat (2) @(posedge clk); rst_n = 1'b1;
    // flow 1 (box 1) arrives on the network lane: empty box -> swap in
    @(negedge clk);
    req[0] = '{valid: 1'b1, indep: 1'b0, flow: 8'd1, data: 32'hA};
    row1[0] = one(0, 32'hA);
    #1;
    check(!hit[0] && swap_lane == 3'b001 && evict_valid == 0, "swap into empty box");
    @(negedge clk);
    req = '0;
    check(box_flow[1] == 8'd1 && valid[1] == 3'b001 && front[1][0] == 32'hA, "flow 1 in box 1");
    // app event of flow 1: hit
    req[1] = '{valid: 1'b1, indep: 1'b0, flow: 8'd1, data: 32'hB};
    #1;
    check(hit[1] && swap_lane == 0, "hit");
    // multiplexer dequeues the network event in the same cycle
    deq[1] = 3'b001;
    @(negedge clk);
    req = '0; deq = '0;
    check(valid[1] == 0 && waiting[1] && replaceable[1], "box waits on its timer");
    // flow 5 (box 1) arrives: new-arrival swap evicts flow 1 with timer
    req[0] = '{valid: 1'b1, indep: 1'b0, flow: 8'd5, data: 32'hC};
    row1[0] = one(0, 32'hC);
    #1;
    check(swap_lane == 3'b001 && evict_valid == 3'b001 && evict_flow[0] == 8'd1 && evict_row[0][1].count == 1 &&
          evict_row[0][1].slot[0] == 32'hB && bank_store == 3'b001, "new-arrival swap evicts flow 1");
    @(negedge clk);
    req = '0;
    check(box_flow[1] == 8'd5 && valid[1] == 3'b001, "flow 5 valid at once");
    // two lanes aim at box 1 with different flows: no swap, no hit
    deq[1] = 3'b001;
    @(negedge clk);
    deq = '0;
    req[0] = '{valid: 1'b1, indep: 1'b0, flow: 8'd1, data: 32'hD};
    req[2] = '{valid: 1'b1, indep: 1'b0, flow: 8'd9, data: 32'hE};
    row1[0] = one(0, 32'hD); row1[2] = one(2, 32'hE);
    #1;
    check(swap_lane == 0 && hit == 0, "two lanes on one box: no swap");
    @(negedge clk);
    // flow 1 comes back alone: its timer is restored from the bank
    req = '0;
    req[1] = '{valid: 1'b1, indep: 1'b0, flow: 8'd1, data: 32'hF};
    row1[1] = one(1, 32'hF);
    #1;
    check(swap_lane == 3'b010 && bank_restore == 3'b010, "flow 1 swapped back with its timer");
    @(negedge clk);
    req = '0;
    check(box_flow[1] == 8'd1 && valid[1] == 0, "flow 1 still blocked by restored timer");
    // independent swap of a flow with nothing queued is refused
    req[2] = '{valid: 1'b1, indep: 1'b1, flow: 8'd13, data: '0};
    row1[2] = '0;
    #1;
    check(swap_lane == 0, "independent swap needs events");
    row1[2] = one(0, 32'h1);
    #1;
    check(swap_lane == 3'b100, "independent swap of a waiting flow");
    @(negedge clk);
    req = '0;
    // two lanes swap two different boxes in one cycle (boxes 2 and 3 empty)
    req[0] = '{valid: 1'b1, indep: 1'b0, flow: 8'd2, data: 32'h2};
    req[1] = '{valid: 1'b1, indep: 1'b0, flow: 8'd7, data: 32'h7};
    row1[0] = one(0, 32'h2); row1[1] = one(1, 32'h7);
    #1;
    check(swap_lane == 3'b011, "two swaps in one cycle");
    @(negedge clk);
    req = '0;
    check(box_flow[2] == 8'd2 && box_flow[3] == 8'd7 && valid[2] == 3'b001 && valid[3] == 3'b010,
          "both flows cached");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
