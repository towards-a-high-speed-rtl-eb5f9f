// mtp_top: hardware backend for MTP transport programs.
//
// Events enter from three sources: the network parser (one network event per
// cycle), the application parser (application requests) and the timer
// module. The event scheduler queues them per flow and, each cycle, sends out
// at most one event per type, never two events of one flow within
// PIPE_CYCLES cycles. For each sent event the context row of its flow is
// fetched from the context memory, and the event plus context are handed to
// the event-processor chain of its type (ep_*). The event processors, which
// are generated per protocol, are outside this module: they return the updated
// context (ctx_wr_*) and may arm or cancel a timer (tmr_*), whose expiry
// feeds the scheduler's timer lane. The two parsers are also outside; their
// events arrive on net_*/app_*.
//
// Timing: ep_valid/ep_event/ep_ctx appear 4 cycles after an event that hits
// the queue cache arrives (3 cycles scheduler, 1 cycle context read). The
// event processors must write the context back no later than PIPE_CYCLES-2
// cycles after ep_valid, so the next event of the flow reads the new value.
module mtp_top
  import mtp_pkg::*;
#(
  parameter int NUM_FLOWS   = 256,
  parameter int NUM_BOXES   = 64,
  parameter int PIPE_CYCLES = 10,
  parameter int BANK_SLOTS  = 32,
  parameter int HIST_DEPTH  = (NUM_FLOWS + NUM_BOXES - 1) / NUM_BOXES,
  parameter int ISLIP_ITERS = 3,
  parameter int CTX_W       = 128,
  parameter int TMR_SLOTS   = 16,
  parameter int TIME_W      = 16
) (
  input  logic                                clk,
  input  logic                                rst_n,
  // network parser side
  input  logic                                net_valid,
  input  event_t                              net_event,
  // application parser side
  input  logic                                app_valid,
  input  event_t                              app_event,
  // event processors: dispatched events with their flow context
  output logic     [NUM_TYPES-1:0]            ep_valid,
  output event_t   [NUM_TYPES-1:0]            ep_event,
  output logic     [NUM_TYPES-1:0][CTX_W-1:0] ep_ctx,
  // event processors: context write-back
  input  logic     [NUM_TYPES-1:0]            ctx_wr_en,
  input  flow_id_t [NUM_TYPES-1:0]            ctx_wr_flow,
  input  logic     [NUM_TYPES-1:0][CTX_W-1:0] ctx_wr_data,
  // event processors: timer instructions
  input  logic                                tmr_start_en,
  input  flow_id_t                            tmr_start_flow,
  input  logic [TIME_W-1:0]                   tmr_start_delay,
  input  payload_t                            tmr_start_data,
  input  logic                                tmr_cancel_en,
  input  flow_id_t                            tmr_cancel_flow,
  output logic                                tmr_start_drop,
  // monitoring
  output logic     [NUM_TYPES-1:0]            overflow,
  output sched_status_t                       status
);

  logic                   tmr_valid;
  event_t                 tmr_event;
  logic   [NUM_TYPES-1:0] in_valid, s_valid;
  event_t [NUM_TYPES-1:0] in_event, s_event;
  flow_id_t [NUM_TYPES-1:0] rd_addr;

  always_comb begin
    in_valid           = '0;
    in_valid[EV_NET]   = net_valid;
    in_valid[EV_APP]   = app_valid;
    in_valid[EV_TIMER] = tmr_valid;
    in_event           = '0;
    in_event[EV_NET]   = net_event;
    in_event[EV_APP]   = app_event;
    in_event[EV_TIMER] = tmr_event;
  end

  event_timer #(.SLOTS(TMR_SLOTS), .TIME_W(TIME_W)) u_timer (
    .clk, .rst_n,
    .start_en (tmr_start_en), .start_flow(tmr_start_flow), .start_delay(tmr_start_delay),
    .start_data(tmr_start_data), .cancel_en(tmr_cancel_en), .cancel_flow(tmr_cancel_flow),
    .start_drop(tmr_start_drop), .out_valid(tmr_valid), .out_event(tmr_event)
  );

  mtp_scheduler #(
    .NUM_FLOWS(NUM_FLOWS), .NUM_BOXES(NUM_BOXES), .PIPE_CYCLES(PIPE_CYCLES),
    .BANK_SLOTS(BANK_SLOTS), .HIST_DEPTH(HIST_DEPTH), .ISLIP_ITERS(ISLIP_ITERS)
  ) u_sched (
    .clk, .rst_n, .in_valid, .in_event, .out_valid(s_valid), .out_event(s_event),
    .overflow, .status
  );

  for (genvar k = 0; k < NUM_TYPES; k++) begin : g_ctx
    assign rd_addr[k] = s_event[k].flow;
  end

  context_memory #(.NUM_FLOWS(NUM_FLOWS), .CTX_W(CTX_W)) u_ctx (
    .clk, .rst_n, .rd_en(s_valid), .rd_addr, .rd_data(ep_ctx),
    .wr_en(ctx_wr_en), .wr_addr(ctx_wr_flow), .wr_data(ctx_wr_data)
  );

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      ep_valid <= '0;
      ep_event <= '0;
    end else begin
      ep_valid <= s_valid;
      ep_event <= s_event;
    end
  end

endmodule
