// tb_temp_holding_area: checks row 1 (memory data plus the new event), the
// forwarding of a pending row-2 write into row 1, the write-back of one
// segment on a miss, the full-row write of an evicted flow on a swap, no
// write on a hit, and the overflow flag of a full mini-queue.
module tb_temp_holding_area;
  import mtp_pkg::*;
  logic clk = 1'b0, rst_n = 1'b0;
  lane_req_t [NUM_TYPES-1:0] req;
  qrow_t [NUM_TYPES-1:0] mem_rd, row1, wr_data;
  logic [NUM_TYPES-1:0] hit, swap_lane, row1_ovf, fwd_used, wr_en;
  logic [NUM_TYPES-1:0] evict_valid;
  flow_id_t [NUM_TYPES-1:0] evict_flow;
  qrow_t [NUM_TYPES-1:0] evict_row;
  flow_id_t [NUM_TYPES-1:0] wr_addr;
  logic [NUM_TYPES-1:0][NUM_TYPES-1:0] wr_mask;
  temp_holding_area dut (.*);
  always #5 clk = ~clk;
  int checks = 0, failures = 0;
  task automatic check(input logic ok, input string msg);
    checks++;
    if (!ok) begin failures++; if (failures < 10) $display("FAIL: %s", msg); end
  endtask
  initial begin
    repeat (200) @(posedge clk);
    failures++; $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
  initial begin
    qrow_t r;
    req = '0; mem_rd = '0; hit = '0; swap_lane = '0; evict_valid = '0; evict_flow = '0; evict_row = '0;
    repeat (2) @(posedge clk); rst_n = 1'b1;
    // cycle A: app event (lane 1) for flow 5 misses; memory has one app entry
    @(negedge clk);
    r = '0; r[1].count = 1; r[1].slot[0] = 32'h11;
    mem_rd[1] = r;
    req[1] = '{valid: 1'b1, indep: 1'b0, flow: 8'd5, data: 32'h22};
    #1;
    check(row1[1][1].count == 2 && row1[1][1].slot[1] == 32'h22 && row1[1][1].slot[0] == 32'h11, "row 1 has event appended");
    check(!row1_ovf[1] && !fwd_used[1], "no overflow, no forwarding");
    // cycle B: lane 0 swaps in flow 5 while memory is still stale
    @(negedge clk);
    check(wr_en == 3'b010 && wr_addr[1] == 8'd5 && wr_mask[1] == 3'b010 && wr_data[1][1].count == 2,
          "row 2 writes only the app segment");
    req = '0;
    mem_rd[0] = r;          // stale: one app entry
    req[0] = '{valid: 1'b1, indep: 1'b0, flow: 8'd5, data: 32'h33};
    swap_lane = 3'b001; evict_valid = 3'b001; evict_flow[0] = 8'd13;
    evict_row = '0; evict_row[0][2].count = 1; evict_row[0][2].slot[0] = 32'h44;
    #1;
    check(fwd_used[0] && row1[0][1].count == 2 && row1[0][1].slot[1] == 32'h22, "pending write forwarded");
    check(row1[0][0].count == 1 && row1[0][0].slot[0] == 32'h33, "network event appended");
    @(negedge clk);
    check(wr_en == 3'b001 && wr_addr[0] == 8'd13 && wr_mask[0] == 3'b111 && wr_data[0][2].slot[0] == 32'h44,
          "evicted flow written back as a whole row");
    // cycle C: a hit writes nothing; a full queue overflows
    req = '0; swap_lane = '0; evict_valid = '0;
    req[2] = '{valid: 1'b1, indep: 1'b0, flow: 8'd9, data: 32'h55};
    hit = 3'b100;
    r = '0; r[2].count = CNT_W'(QDEPTH);
    mem_rd[2] = r;
    #1;
    check(row1_ovf[2], "overflow of a full mini-queue");
    @(negedge clk);
    check(wr_en == 3'b000, "hit: no write-back");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
