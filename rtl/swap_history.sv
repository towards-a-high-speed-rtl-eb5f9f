// swap_history: per-queue-box lists of flows waiting in the queue memory.
//
// Each queue box serves a fixed set of flows (those whose flow id modulo
// NUM_BOXES equals the box index). For every box this block keeps a FIFO of the flow ids
// that left the box, or whose new events had to be parked in the queue
// memory, so that an independent swap can bring back the flow that has waited
// longest. A `listed` bit per flow keeps every flow in its list at most once.
//
// Per cycle, at the rising edge:
//  * pop_en/pop_box: remove the front of one box's list (its flow id is on
//    pop_flow during the cycle) and clear its listed bit;
//  * push_en[p]/push_flow[p], p = 0..NUM_TYPES-1, applied in port order after
//    the pop: append the flow to its box's list unless it is already listed or
//    the list is full (then the push is dropped; with HIST_DEPTH at least the
//    number of flows per box that never happens).
// `nonempty[b]` tells which lists have an entry. Listing parked flows as
// well as evicted ones, and the listed bits, are this implementation's
// additions.
module swap_history
  import mtp_pkg::*;
#(
  parameter int NUM_FLOWS  = 256,
  parameter int NUM_BOXES  = 64,
  parameter int HIST_DEPTH = (NUM_FLOWS + NUM_BOXES - 1) / NUM_BOXES,
  localparam int BOX_W     = (NUM_BOXES > 1) ? $clog2(NUM_BOXES) : 1,
  localparam int PTR_W     = $clog2(HIST_DEPTH),
  localparam int HCNT_W    = $clog2(HIST_DEPTH + 1)
) (
  input  logic                           clk,
  input  logic                           rst_n,
  input  logic     [NUM_TYPES-1:0]       push_en,
  input  flow_id_t [NUM_TYPES-1:0]       push_flow,
  input  logic                           pop_en,
  input  logic [BOX_W-1:0]               pop_box,
  output flow_id_t                       pop_flow,
  output logic [NUM_BOXES-1:0]           nonempty
);

  flow_id_t            fifo [NUM_BOXES][HIST_DEPTH];
  logic [PTR_W-1:0]    head [NUM_BOXES];
  logic [HCNT_W-1:0]   cnt  [NUM_BOXES];
  logic [NUM_FLOWS-1:0] listed;

  // next state
  logic [PTR_W-1:0]     head_n [NUM_BOXES];
  logic [HCNT_W-1:0]    cnt_n  [NUM_BOXES];
  logic [NUM_FLOWS-1:0] listed_n;
  logic [NUM_TYPES-1:0] wr_en;
  logic [NUM_TYPES-1:0][PTR_W-1:0] wr_idx;

  function automatic logic [PTR_W-1:0] wrap(int v);
    return PTR_W'(v % HIST_DEPTH);
  endfunction

  function automatic logic [BOX_W-1:0] box_of(flow_id_t f);
    return BOX_W'(f % NUM_BOXES);
  endfunction

  assign pop_flow = fifo[pop_box][head[pop_box]];

  always_comb begin
    for (int b = 0; b < NUM_BOXES; b++) begin
      head_n[b]   = head[b];
      cnt_n[b]    = cnt[b];
      nonempty[b] = (cnt[b] != '0);
    end
    listed_n = listed;
    wr_en    = '0;
    wr_idx   = '0;
    if (pop_en && cnt[pop_box] != '0) begin
      head_n[pop_box] = wrap(int'(head[pop_box]) + 1);
      cnt_n[pop_box]  = cnt[pop_box] - 1'b1;
      listed_n[pop_flow] = 1'b0;
    end
    for (int p = 0; p < NUM_TYPES; p++) begin
      if (push_en[p] && !listed_n[push_flow[p]] &&
          cnt_n[box_of(push_flow[p])] != HCNT_W'(HIST_DEPTH)) begin
        wr_en[p]  = 1'b1;
        wr_idx[p] = wrap(int'(head_n[box_of(push_flow[p])]) + int'(cnt_n[box_of(push_flow[p])]));
        cnt_n[box_of(push_flow[p])] = cnt_n[box_of(push_flow[p])] + 1'b1;
        listed_n[push_flow[p]] = 1'b1;
      end
    end
  end

  always_ff @(posedge clk) begin
    for (int p = 0; p < NUM_TYPES; p++) begin
      if (wr_en[p]) fifo[box_of(push_flow[p])][wr_idx[p]] <= push_flow[p];
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      listed <= '0;
      for (int b = 0; b < NUM_BOXES; b++) begin
        head[b] <= '0;
        cnt[b]  <= '0;
      end
    end else begin
      listed <= listed_n;
      for (int b = 0; b < NUM_BOXES; b++) begin
        head[b] <= head_n[b];
        cnt[b]  <= cnt_n[b];
      end
    end
  end

endmodule
