// mtp_scheduler: the event scheduler of the MTP transport-layer backend.
//
// Takes up to one event of each type (network, application, timer) per
// cycle, stores it in the queue of its flow, and each cycle sends out up to
// one event per type to the event-processor chain of that type, such that a
// flow never has two events in the event processors at once (a flow is
// blocked for PIPE_CYCLES cycles after each dispatch) and boxes are served
// fairly.
//
// Pipeline (cycle of arrival = t):
//   t    inputs registered by the mapper (stage 0).
//   t+1  queue memory read for the flow, holding-area row 1 formed; the queue
//        cache either appends the event to the flow's box (hit), swaps the row
//        in, or leaves it for write-back.
//   t+2  holding-area row 2 writes the queue memory. A hit event is visible in
//        its box; the multiplexer (iSLIP) matches boxes to event types.
//   t+3  the chosen events appear on out_valid/out_event (registered).
// Flows outside the cache return through swaps (up to one per lane per
// cycle): new-arrival swaps into a waiting box, and independent swaps on
// idle lanes driven by the swap history. Events that find their mini-queue
// full are dropped and flagged on `overflow` (no back-pressure: own choice).
// `status` reports per-cycle events of the mechanisms for monitoring.
// The structure follows the architecture; the sizes are this design's own:
// 64 boxes and 32 bank slots let all three lanes run every cycle with random
// traffic over 256 flows (about 30 flows are blocked at any time).
module mtp_scheduler
  import mtp_pkg::*;
#(
  parameter int NUM_FLOWS   = 256,
  parameter int NUM_BOXES   = 64,
  parameter int PIPE_CYCLES = 10,
  parameter int BANK_SLOTS  = 32,
  parameter int HIST_DEPTH  = (NUM_FLOWS + NUM_BOXES - 1) / NUM_BOXES,
  parameter int ISLIP_ITERS = 3,
  localparam int BOX_W      = (NUM_BOXES > 1) ? $clog2(NUM_BOXES) : 1
) (
  input  logic                     clk,
  input  logic                     rst_n,
  input  logic   [NUM_TYPES-1:0]   in_valid,
  input  event_t [NUM_TYPES-1:0]   in_event,
  output logic   [NUM_TYPES-1:0]   out_valid,
  output event_t [NUM_TYPES-1:0]   out_event,
  output logic   [NUM_TYPES-1:0]   overflow,
  output sched_status_t            status
);

  lane_req_t [NUM_TYPES-1:0]            req;
  qrow_t     [NUM_TYPES-1:0]            mem_rd, row1, wr_data;
  flow_id_t  [NUM_TYPES-1:0]            rd_addr, wr_addr, push_flow;
  logic      [NUM_TYPES-1:0]            wr_en, hit, swap_lane, row1_ovf, hit_ovf, push_en, fwd_used;
  logic      [NUM_TYPES-1:0]            evict_valid, bank_store, bank_restore;
  flow_id_t  [NUM_TYPES-1:0]            evict_flow;
  qrow_t     [NUM_TYPES-1:0]            evict_row;
  logic      [NUM_TYPES-1:0][NUM_TYPES-1:0] wr_mask;
  logic                                 pop_en;
  flow_id_t                             hist_flow;
  logic [NUM_BOXES-1:0][NUM_TYPES-1:0]  valid, match;
  payload_t [NUM_BOXES-1:0][NUM_TYPES-1:0] front;
  flow_id_t [NUM_BOXES-1:0]             box_flow;
  logic [NUM_BOXES-1:0]                 replaceable, waiting, hist_nonempty;
  logic [BOX_W-1:0]                     pop_box;
  logic [NUM_TYPES-1:0]                 gnt_valid;
  logic [NUM_TYPES-1:0][BOX_W-1:0]      gnt_box;

  event_mapper #(.NUM_BOXES(NUM_BOXES)) u_mapper (
    .clk, .rst_n, .in_valid, .in_event, .replaceable, .hist_nonempty,
    .hist_flow, .pop_en, .pop_box, .req
  );

  for (genvar k = 0; k < NUM_TYPES; k++) begin : g_rd
    assign rd_addr[k] = req[k].flow;
  end

  queue_memory #(.NUM_FLOWS(NUM_FLOWS)) u_qmem (
    .clk, .rst_n, .rd_addr, .rd_data(mem_rd), .wr_en, .wr_addr, .wr_mask, .wr_data
  );

  temp_holding_area u_tha (
    .clk, .rst_n, .req, .mem_rd, .hit, .swap_lane, .evict_valid, .evict_flow,
    .evict_row, .row1, .row1_ovf, .fwd_used, .wr_en, .wr_addr, .wr_mask, .wr_data
  );

  queue_cache #(.NUM_BOXES(NUM_BOXES), .PIPE_CYCLES(PIPE_CYCLES), .BANK_SLOTS(BANK_SLOTS)) u_cache (
    .clk, .rst_n, .req, .row1, .deq(match), .hit, .swap_lane, .evict_valid,
    .evict_flow, .evict_row, .hit_ovf, .bank_store, .bank_restore, .valid,
    .front, .box_flow, .replaceable, .waiting
  );

  islip_mux #(.NUM_BOXES(NUM_BOXES), .ITERS(ISLIP_ITERS)) u_mux (
    .clk, .rst_n, .req(valid), .gnt_valid, .gnt_box, .match
  );

  // flows that end up (or stay) in the queue memory with events are listed
  always_comb begin
    for (int k = 0; k < NUM_TYPES; k++) begin
      push_en[k]   = 1'b0;
      push_flow[k] = req[k].flow;
      if (swap_lane[k]) begin
        push_en[k]   = evict_valid[k] && row_nonempty(evict_row[k]);
        push_flow[k] = evict_flow[k];
      end else if (req[k].valid && !hit[k]) begin
        push_en[k]   = !req[k].indep || row_nonempty(row1[k]);
      end
    end
  end

  swap_history #(.NUM_FLOWS(NUM_FLOWS), .NUM_BOXES(NUM_BOXES), .HIST_DEPTH(HIST_DEPTH)) u_hist (
    .clk, .rst_n, .push_en, .push_flow, .pop_en, .pop_box, .pop_flow(hist_flow),
    .nonempty(hist_nonempty)
  );

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      out_valid <= '0;
      out_event <= '0;
    end else begin
      for (int k = 0; k < NUM_TYPES; k++) begin
        out_valid[k]      <= gnt_valid[k];
        out_event[k].flow <= box_flow[gnt_box[k]];
        out_event[k].data <= front[gnt_box[k]][k];
      end
    end
  end

  always_comb begin
    logic [NUM_TYPES-1:0] ev;
    for (int k = 0; k < NUM_TYPES; k++) ev[k] = req[k].valid && !req[k].indep;
    overflow            = ev & ((hit & hit_ovf) | (~hit & row1_ovf));
    status.hit          = ev & hit;
    status.park         = ev & ~hit & ~swap_lane;
    status.new_arrival_swap = swap_lane & ev;
    status.indep_swap   = swap_lane & ~ev;
    status.evict        = evict_valid;
    status.bank_store   = bank_store;
    status.bank_restore = bank_restore;
    status.forward      = |fwd_used;
    status.blocked      = |waiting;
  end

endmodule
