// tb_swap_timer_bank: stores counts of swapped-out flows, checks that they
// keep counting down, that a lookup returns the next count, that release
// frees a slot, that two inserts in one cycle take two slots, and that
// free_count drops to zero when all slots are busy.
module tb_swap_timer_bank;
  import mtp_pkg::*;
  localparam int SL = 4;
  logic clk = 1'b0, rst_n = 1'b0;
  logic [NUM_TYPES-1:0] ins_en, rel_en;
  flow_id_t [NUM_TYPES-1:0] ins_flow, rel_flow;
  logic [NUM_TYPES-1:0][TIMER_W-1:0] ins_count;
  logic [1:0] free_count;
  flow_id_t [NUM_TYPES-1:0] lk_flow;
  logic [NUM_TYPES-1:0] lk_hit;
  logic [NUM_TYPES-1:0][TIMER_W-1:0] lk_next;
  swap_timer_bank #(.SLOTS(SL)) dut (.*);
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
  task automatic ins(input flow_id_t f, input int c);
    ins_en = 3'b001; ins_flow[0] = f; ins_count[0] = TIMER_W'(c);
    @(negedge clk); ins_en = '0;
  endtask
  initial begin
    ins_en = '0; rel_en = '0; ins_flow = '0; rel_flow = '0; ins_count = '0; lk_flow = '0;
    repeat (2) @(posedge clk); rst_n = 1'b1;
    @(negedge clk);
    check(free_count == 3, "free after reset");
    ins(8'd1, 9);
    // two inserts in one cycle take two slots
    ins_en = 3'b110; ins_flow[1] = 8'd2; ins_flow[2] = 8'd3; ins_count[1] = 8'd8; ins_count[2] = 8'd8;
    @(negedge clk); ins_en = '0;
    check(free_count == 1, "one slot left");
    ins(8'd4, 20);
    check(free_count == 0, "full");
    lk_flow[0] = 8'd1; lk_flow[1] = 8'd4; lk_flow[2] = 8'd77; #1;
    // flow 1 stored 9 three edges ago: now 7, next 6
    check(lk_hit[0] && lk_next[0] == 6, $sformatf("flow 1 next %0d", lk_next[0]));
    check(lk_hit[1] && lk_next[1] == 19, $sformatf("flow 4 next %0d", lk_next[1]));
    check(!lk_hit[2], "unknown flow misses");
    rel_en = 3'b100; rel_flow[2] = 8'd4; @(negedge clk); rel_en = '0;
    check(free_count == 1, "released slot free");
    lk_flow[1] = 8'd4; #1;
    check(!lk_hit[1], "released flow gone");
    repeat (6) @(negedge clk);
    lk_flow[0] = 8'd2; #1;
    check(!lk_hit[0], "expired count no longer hits");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
