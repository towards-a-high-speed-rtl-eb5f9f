// queue_box: one row of the queue cache.
//
// A queue box holds the events of one flow: a flow-id register, one
// mini-queue per event type and a flow timer. For each type it reports a
// validity bit, the AND of "the mini-queue has a front element" and "the
// flow timer is not running", together with the front element; the
// multiplexer uses these to pick events.
//
// Per cycle:
//  * push[t]   appends push_data[t] to mini-queue t (an event for this flow).
//  * deq[t]    removes the front of mini-queue t and starts the flow timer
//              (at most one deq bit is set, by the multiplexer).
//  * swap_in   replaces flow id, all mini-queues and the timer with a flow
//              brought in from the queue memory; the old contents are visible
//              on flow/row/timer_count during the cycle so the caller can
//              write them back.
// `occupied` is low after reset until the first swap_in (an empty box).
// All updates take effect at the next rising edge.
module queue_box
  import mtp_pkg::*;
#(
  parameter int PIPE_CYCLES = 10
) (
  input  logic                     clk,
  input  logic                     rst_n,
  input  logic [NUM_TYPES-1:0]     push,
  input  payload_t [NUM_TYPES-1:0] push_data,
  input  logic [NUM_TYPES-1:0]     deq,
  input  logic                     swap_in,
  input  flow_id_t                 swap_flow,
  input  qrow_t                    swap_row,
  input  logic [TIMER_W-1:0]       swap_timer,
  output logic                     occupied,
  output flow_id_t                 flow,
  output qrow_t                    row,
  output logic                     timer_active,
  output logic [TIMER_W-1:0]       timer_count,
  output logic [TIMER_W-1:0]       timer_next,
  output logic                     empty,
  output logic [NUM_TYPES-1:0]     valid,
  output payload_t [NUM_TYPES-1:0] front,
  output logic [NUM_TYPES-1:0]     overflow
);

  logic [NUM_TYPES-1:0] front_valid;

  for (genvar t = 0; t < NUM_TYPES; t++) begin : g_mq
    mini_queue u_mq (
      .clk, .rst_n,
      .push        (push[t] && !swap_in),
      .push_data   (push_data[t]),
      .pop         (deq[t] && !swap_in),
      .load        (swap_in),
      .load_q      (swap_row[t]),
      .q           (row[t]),
      .front_valid (front_valid[t]),
      .front       (front[t]),
      .overflow    (overflow[t])
    );
  end

  flow_timer #(.PIPE_CYCLES(PIPE_CYCLES)) u_timer (
    .clk, .rst_n,
    .start      ((|deq) && !swap_in),
    .load       (swap_in),
    .load_val   (swap_timer),
    .active     (timer_active),
    .count      (timer_count),
    .next_count (timer_next)
  );

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      occupied <= 1'b0;
      flow     <= '0;
    end else if (swap_in) begin
      occupied <= 1'b1;
      flow     <= swap_flow;
    end
  end

  assign valid = timer_active ? '0 : front_valid;
  assign empty = ~|front_valid;

  a_one_deq: assert property (@(posedge clk) disable iff (!rst_n) $onehot0(deq));
  a_deq_valid: assert property (@(posedge clk) disable iff (!rst_n) (deq & ~valid) == '0);

endmodule
