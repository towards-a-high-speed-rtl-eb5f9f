// queue_cache: the queue boxes, flow-to-box mapping and swap decisions.
//
// NUM_BOXES queue boxes each hold the mini-queues of one flow; flow f may
// only live in box (f mod NUM_BOXES). All other flows keep their queues in
// the queue memory. Each cycle, for the lane requests of the mapper stage:
//  * hit: the flow is in its box -> the event is appended to the box's
//    mini-queue of that lane's type;
//  * miss: the holding area has the flow's row (row1, event already appended).
//    The box is replaceable when it is empty after reset, its flow timer is
//    running (the flow is waiting for the event processors: the "new arrival"
//    policy of the design) or it has nothing queued (own addition). If the
//    lane is the only one aiming at that box this cycle, the row is swapped
//    in; the previous flow and queues go out on evict_*[lane] to be written
//    back, and a still-running timer goes to the swap timer bank, from which
//    a returning flow's timer is restored. Each lane can swap one box per
//    cycle; a swap that needs a bank slot when none is left waits.
//  * independent swap requests (req.indep) swap in the same way but only if
//    the waiting flow has events.
// Every box reports validity and front event per type to the multiplexer;
// `deq` (from the multiplexer) pops a front event and starts the box timer.
// All state changes at the rising edge.
module queue_cache
  import mtp_pkg::*;
#(
  parameter int NUM_BOXES   = 64,
  parameter int PIPE_CYCLES = 10,
  parameter int BANK_SLOTS  = 32,
  localparam int BOX_W      = (NUM_BOXES > 1) ? $clog2(NUM_BOXES) : 1
) (
  input  logic                                 clk,
  input  logic                                 rst_n,
  input  lane_req_t [NUM_TYPES-1:0]            req,
  input  qrow_t     [NUM_TYPES-1:0]            row1,
  input  logic [NUM_BOXES-1:0][NUM_TYPES-1:0]  deq,
  output logic      [NUM_TYPES-1:0]            hit,
  output logic      [NUM_TYPES-1:0]            swap_lane,
  output logic      [NUM_TYPES-1:0]            evict_valid,
  output flow_id_t  [NUM_TYPES-1:0]            evict_flow,
  output qrow_t     [NUM_TYPES-1:0]            evict_row,
  output logic      [NUM_TYPES-1:0]            hit_ovf,
  output logic      [NUM_TYPES-1:0]            bank_store,
  output logic      [NUM_TYPES-1:0]            bank_restore,
  output logic [NUM_BOXES-1:0][NUM_TYPES-1:0]  valid,
  output payload_t [NUM_BOXES-1:0][NUM_TYPES-1:0] front,
  output flow_id_t [NUM_BOXES-1:0]             box_flow,
  output logic [NUM_BOXES-1:0]                 replaceable,
  output logic [NUM_BOXES-1:0]                 waiting
);

  logic     [NUM_BOXES-1:0]                 occ, tact, empty, swap_in;
  qrow_t    [NUM_BOXES-1:0]                 brow, srow;
  flow_id_t [NUM_BOXES-1:0]                 sflow;
  logic     [NUM_BOXES-1:0][TIMER_W-1:0]    tnext, stimer;
  logic     [NUM_BOXES-1:0][NUM_TYPES-1:0]  push, bovf;
  logic     [NUM_TYPES-1:0][BOX_W-1:0]      lbox;
  logic     [NUM_TYPES-1:0]                 cand, need, lk_hit;
  logic     [NUM_TYPES-1:0][TIMER_W-1:0]    lk_next, ins_count;
  logic [$clog2(NUM_TYPES+1)-1:0]           free_count;
  flow_id_t [NUM_TYPES-1:0]                 lk_flow;
  payload_t [NUM_TYPES-1:0]                 lane_data;

  for (genvar k = 0; k < NUM_TYPES; k++) begin : g_lane
    assign lane_data[k] = req[k].data;
    assign lk_flow[k]   = req[k].flow;
    assign lbox[k]      = BOX_W'(req[k].flow % NUM_BOXES);
  end

  for (genvar b = 0; b < NUM_BOXES; b++) begin : g_box
    queue_box #(.PIPE_CYCLES(PIPE_CYCLES)) u_box (
      .clk, .rst_n,
      .push         (push[b]),
      .push_data    (lane_data),
      .deq          (deq[b]),
      .swap_in      (swap_in[b]),
      .swap_flow    (sflow[b]),
      .swap_row     (srow[b]),
      .swap_timer   (stimer[b]),
      .occupied     (occ[b]),
      .flow         (box_flow[b]),
      .row          (brow[b]),
      .timer_active (tact[b]),
      .timer_count  (),
      .timer_next   (tnext[b]),
      .empty        (empty[b]),
      .valid        (valid[b]),
      .front        (front[b]),
      .overflow     (bovf[b])
    );
    assign replaceable[b] = !occ[b] || tact[b] || empty[b];
    assign waiting[b]     = occ[b] && tact[b] && !empty[b];
  end

  swap_timer_bank #(.SLOTS(BANK_SLOTS)) u_bank (
    .clk, .rst_n,
    .ins_en     (bank_store),
    .ins_flow   (evict_flow),
    .ins_count  (ins_count),
    .lk_flow    (lk_flow),
    .lk_hit     (lk_hit),
    .lk_next    (lk_next),
    .rel_en     (swap_lane),
    .rel_flow   (lk_flow),
    .free_count (free_count)
  );

  // lane decisions
  always_comb begin
    logic sole;
    int   avail;
    avail = int'(free_count);
    for (int k = 0; k < NUM_TYPES; k++) begin
      hit[k]  = req[k].valid && occ[lbox[k]] && box_flow[lbox[k]] == req[k].flow;
      sole    = 1'b1;
      for (int j = 0; j < NUM_TYPES; j++) begin
        if (j != k && req[j].valid && lbox[j] == lbox[k]) sole = 1'b0;
      end
      need[k] = occ[lbox[k]] && tnext[lbox[k]] != '0;
      cand[k] = req[k].valid && !hit[k] && sole && replaceable[lbox[k]] &&
                (!req[k].indep || row_nonempty(row1[k]));
    end
    // bank slots go to the lanes in order
    for (int k = 0; k < NUM_TYPES; k++) begin
      swap_lane[k] = cand[k] && (!need[k] || avail > 0);
      if (swap_lane[k] && need[k]) avail--;
      evict_valid[k]  = swap_lane[k] && occ[lbox[k]];
      evict_flow[k]   = box_flow[lbox[k]];
      evict_row[k]    = brow[lbox[k]];
      ins_count[k]    = tnext[lbox[k]];
      bank_store[k]   = evict_valid[k] && need[k];
      bank_restore[k] = swap_lane[k] && lk_hit[k];
    end
  end

  // box controls: a box is the target of at most one lane (sole rule)
  always_comb begin
    push    = '0;
    swap_in = '0;
    sflow   = '0;
    for (int b = 0; b < NUM_BOXES; b++) srow[b] = '0;
    stimer  = '0;
    for (int k = 0; k < NUM_TYPES; k++) begin
      if (hit[k] && !req[k].indep) push[lbox[k]][k] = 1'b1;
      if (swap_lane[k]) begin
        swap_in[lbox[k]] = 1'b1;
        sflow[lbox[k]]   = req[k].flow;
        srow[lbox[k]]    = row1[k];
        stimer[lbox[k]]  = lk_hit[k] ? lk_next[k] : '0;
      end
    end
  end

  always_comb begin
    for (int k = 0; k < NUM_TYPES; k++) hit_ovf[k] = bovf[lbox[k]][k];
  end

endmodule
