// event_mapper: input stage of the event scheduler.
//
// Registers the event arriving on each lane (one per event type per cycle)
// so that, in the next cycle, the queue memory can be read for its flow and
// the queue cache can look the flow up. When a lane carries no event, its
// memory port is free; the mapper then uses the lowest idle lane for an
// independent swap: it picks, round robin, a queue box that is replaceable
// (waiting on its timer, or holding nothing) and has flows listed in the swap
// history, pops the longest-waiting flow of that box and sends a swap-only
// request (indep = 1) down the idle lane. At most one such request per cycle.
// Requests appear on `req` one cycle after the inputs.
// Using idle lanes and round robin follows the design; the lowest idle lane
// and one request per cycle are this implementation's choices.
module event_mapper
  import mtp_pkg::*;
#(
  parameter int NUM_BOXES = 64,
  localparam int BOX_W    = (NUM_BOXES > 1) ? $clog2(NUM_BOXES) : 1
) (
  input  logic                          clk,
  input  logic                          rst_n,
  input  logic      [NUM_TYPES-1:0]     in_valid,
  input  event_t    [NUM_TYPES-1:0]     in_event,
  input  logic      [NUM_BOXES-1:0]     replaceable,
  input  logic      [NUM_BOXES-1:0]     hist_nonempty,
  input  flow_id_t                      hist_flow,
  output logic                          pop_en,
  output logic      [BOX_W-1:0]         pop_box,
  output lane_req_t [NUM_TYPES-1:0]     req
);

  logic [BOX_W-1:0]     rr;
  logic [NUM_BOXES-1:0] elig;
  logic                 idle_any;
  int                   idle_lane;

  always_comb begin
    elig      = replaceable & hist_nonempty;
    idle_any  = 1'b0;
    idle_lane = 0;
    for (int k = NUM_TYPES - 1; k >= 0; k--) begin
      if (!in_valid[k]) begin
        idle_any  = 1'b1;
        idle_lane = k;
      end
    end
    pop_en  = 1'b0;
    pop_box = '0;
    if (idle_any) begin
      for (int i = NUM_BOXES - 1; i >= 0; i--) begin
        if (elig[(int'(rr) + i) % NUM_BOXES]) begin
          pop_en  = 1'b1;
          pop_box = BOX_W'((int'(rr) + i) % NUM_BOXES);
        end
      end
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      req <= '0;
      rr  <= '0;
    end else begin
      for (int k = 0; k < NUM_TYPES; k++) begin
        req[k].valid <= in_valid[k];
        req[k].indep <= 1'b0;
        req[k].flow  <= in_event[k].flow;
        req[k].data  <= in_event[k].data;
      end
      if (pop_en) begin
        req[idle_lane].valid <= 1'b1;
        req[idle_lane].indep <= 1'b1;
        req[idle_lane].flow  <= hist_flow;
        req[idle_lane].data  <= '0;
        rr <= BOX_W'((int'(pop_box) + 1) % NUM_BOXES);
      end
    end
  end

endmodule
