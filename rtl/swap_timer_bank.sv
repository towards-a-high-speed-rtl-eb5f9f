// swap_timer_bank: timers of flows that left the queue cache while inactive.
//
// A flow swapped out of a queue box may still have an event in the event
// processors. The bank keeps its remaining count running so that, if the
// flow is swapped back in soon, its box timer resumes from the right value
// and the flow cannot be dispatched too early.
//
// SLOTS counters, each {flow, count}; a slot is free when its count is zero
// and every busy slot counts down once per cycle. One port of each kind per
// lane, since each lane can swap one box per cycle:
//  * ins_en/ins_flow/ins_count: store a swapped-out flow; ins_count is the
//    value its box timer would have had after this edge. Inserts take the
//    lowest free slots in port order; `free_count` (saturated at NUM_TYPES)
//    says how many inserts can be taken this cycle - the caller must not
//    swap out more active flows than that.
//  * lk_flow/lk_hit/lk_next: lookup; lk_next is the count the flow's timer
//    will hold after this edge, to be loaded straight into the box timer.
//  * rel_en/rel_flow: the flow was swapped in; its slot is freed.
// All updates at the rising edge. The number of slots is this
// implementation's choice.
module swap_timer_bank
  import mtp_pkg::*;
#(
  parameter int SLOTS = 32,
  localparam int FC_W = $clog2(NUM_TYPES + 1)
) (
  input  logic                                  clk,
  input  logic                                  rst_n,
  input  logic     [NUM_TYPES-1:0]              ins_en,
  input  flow_id_t [NUM_TYPES-1:0]              ins_flow,
  input  logic     [NUM_TYPES-1:0][TIMER_W-1:0] ins_count,
  input  flow_id_t [NUM_TYPES-1:0]              lk_flow,
  output logic     [NUM_TYPES-1:0]              lk_hit,
  output logic     [NUM_TYPES-1:0][TIMER_W-1:0] lk_next,
  input  logic     [NUM_TYPES-1:0]              rel_en,
  input  flow_id_t [NUM_TYPES-1:0]              rel_flow,
  output logic     [FC_W-1:0]                   free_count
);

  flow_id_t           flow  [SLOTS];
  logic [TIMER_W-1:0] count [SLOTS];

  logic [NUM_TYPES-1:0]  alloc_ok;
  int                    alloc_idx [NUM_TYPES];
  logic [SLOTS-1:0]      taken;
  int                    nfree;

  always_comb begin
    taken = '0;
    nfree = 0;
    for (int i = 0; i < SLOTS; i++) if (count[i] == '0) nfree++;
    free_count = FC_W'((nfree >= NUM_TYPES) ? NUM_TYPES : nfree);
    for (int p = 0; p < NUM_TYPES; p++) begin
      alloc_ok[p]  = 1'b0;
      alloc_idx[p] = 0;
      if (ins_en[p] && ins_count[p] != '0) begin
        for (int i = SLOTS - 1; i >= 0; i--) begin
          if (count[i] == '0 && !taken[i]) begin
            alloc_ok[p]  = 1'b1;
            alloc_idx[p] = i;
          end
        end
        if (alloc_ok[p]) taken[alloc_idx[p]] = 1'b1;
      end
    end
    for (int p = 0; p < NUM_TYPES; p++) begin
      lk_hit[p]  = 1'b0;
      lk_next[p] = '0;
      for (int i = 0; i < SLOTS; i++) begin
        if (count[i] > TIMER_W'(1) && flow[i] == lk_flow[p]) begin
          lk_hit[p]  = 1'b1;
          lk_next[p] = count[i] - 1'b1;
        end
      end
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int i = 0; i < SLOTS; i++) begin
        count[i] <= '0;
        flow[i]  <= '0;
      end
    end else begin
      for (int i = 0; i < SLOTS; i++) begin
        logic rel;
        rel = 1'b0;
        for (int p = 0; p < NUM_TYPES; p++) rel |= rel_en[p] && flow[i] == rel_flow[p];
        if (rel)                 count[i] <= '0;
        else if (count[i] != '0) count[i] <= count[i] - 1'b1;
      end
      for (int p = 0; p < NUM_TYPES; p++) begin
        if (alloc_ok[p]) begin
          flow[alloc_idx[p]]  <= ins_flow[p];
          count[alloc_idx[p]] <= ins_count[p];
        end
      end
    end
  end

endmodule
