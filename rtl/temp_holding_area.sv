// temp_holding_area: the two-row pipeline that moves queues between the
// queue memory and the queue cache, one copy per lane (event type).
//
// Row 1 (combinational, the cycle after an event arrived): the flow's
// mini-queues as read from the queue memory, corrected by any row-2 write to
// the same flow still pending in any lane, with the lane's new event appended
// to the mini-queue of its type. The queue cache either takes row 1 into a
// queue box (swap) or leaves it.
// Row 2 (register, one cycle later): what is written to the queue memory.
//  * swap on this lane: the swapped queue box's previous flow and all its queues
//    (all segments written), if the box held a flow;
//  * no swap and no cache hit: row 1, writing back only this lane's segment;
//  * otherwise nothing.
// The two rows follow the design; taking pending row-2 data into row 1
// (forwarding) is this implementation's addition to keep the copies
// consistent, since a read sees only writes already done.
module temp_holding_area
  import mtp_pkg::*;
(
  input  logic                              clk,
  input  logic                              rst_n,
  input  lane_req_t [NUM_TYPES-1:0]         req,
  input  qrow_t     [NUM_TYPES-1:0]         mem_rd,
  input  logic      [NUM_TYPES-1:0]         hit,
  input  logic      [NUM_TYPES-1:0]         swap_lane,
  input  logic      [NUM_TYPES-1:0]         evict_valid,
  input  flow_id_t  [NUM_TYPES-1:0]         evict_flow,
  input  qrow_t     [NUM_TYPES-1:0]         evict_row,
  output qrow_t     [NUM_TYPES-1:0]         row1,
  output logic      [NUM_TYPES-1:0]         row1_ovf,
  output logic      [NUM_TYPES-1:0]         fwd_used,
  output logic      [NUM_TYPES-1:0]         wr_en,
  output flow_id_t  [NUM_TYPES-1:0]         wr_addr,
  output logic      [NUM_TYPES-1:0][NUM_TYPES-1:0] wr_mask,
  output qrow_t     [NUM_TYPES-1:0]         wr_data
);

  // row 2 registers drive the memory write ports directly
  logic     [NUM_TYPES-1:0]                r2_v;
  flow_id_t [NUM_TYPES-1:0]                r2_a;
  logic     [NUM_TYPES-1:0][NUM_TYPES-1:0] r2_m;
  qrow_t    [NUM_TYPES-1:0]                r2_d;

  assign wr_en   = r2_v;
  assign wr_addr = r2_a;
  assign wr_mask = r2_m;
  assign wr_data = r2_d;

  always_comb begin
    qrow_t base;
    for (int k = 0; k < NUM_TYPES; k++) begin
      base        = mem_rd[k];
      fwd_used[k] = 1'b0;
      for (int j = 0; j < NUM_TYPES; j++) begin
        for (int s = 0; s < NUM_TYPES; s++) begin
          if (r2_v[j] && r2_a[j] == req[k].flow && r2_m[j][s]) begin
            base[s]     = r2_d[j][s];
            fwd_used[k] = req[k].valid;
          end
        end
      end
      row1[k]     = base;
      row1_ovf[k] = 1'b0;
      if (req[k].valid && !req[k].indep) begin
        row1[k][k]  = mq_push(base[k], req[k].data);
        row1_ovf[k] = mq_full(base[k]);
      end
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      r2_v <= '0;
      r2_a <= '0;
      r2_m <= '0;
      r2_d <= '0;
    end else begin
      for (int k = 0; k < NUM_TYPES; k++) begin
        r2_v[k] <= 1'b0;
        r2_m[k] <= '0;
        if (swap_lane[k]) begin
          r2_v[k] <= evict_valid[k];
          r2_a[k] <= evict_flow[k];
          r2_m[k] <= '1;
          r2_d[k] <= evict_row[k];
        end else if (req[k].valid && !req[k].indep && !hit[k]) begin
          r2_v[k]    <= 1'b1;
          r2_a[k]    <= req[k].flow;
          r2_m[k][k] <= 1'b1;
          r2_d[k]    <= row1[k];
        end
      end
    end
  end

endmodule
