// mini_queue: the FIFO of one event type inside a queue box.
//
// A queue box keeps one mini-queue per event type. Because a whole queue box
// is swapped to and from the queue memory in one step, the mini-queue is a
// shift register (front in slot 0) whose complete contents are visible on
// `q` and can be replaced in one cycle through `load`/`load_q`.
//
// Per cycle: `load` replaces the contents; otherwise a `pop` removes the
// front and then a `push` appends `push_data` (so push and pop together work
// on a full queue). A push that finds the queue full is dropped and raises
// `overflow` for that cycle; dropping is this implementation's choice.
// Updates take effect at the next rising clock edge; reset empties the queue.
module mini_queue
  import mtp_pkg::*;
(
  input  logic     clk,
  input  logic     rst_n,
  input  logic     push,
  input  payload_t push_data,
  input  logic     pop,
  input  logic     load,
  input  mq_t      load_q,
  output mq_t      q,
  output logic     front_valid,
  output payload_t front,
  output logic     overflow
);

  mq_t after_pop, nxt;

  always_comb begin
    after_pop = pop ? mq_pop(q) : q;
    nxt       = push ? mq_push(after_pop, push_data) : after_pop;
    overflow  = push && !load && mq_full(after_pop);
    if (load) nxt = load_q;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) q <= MQ_EMPTY;
    else        q <= nxt;
  end

  assign front_valid = (q.count != '0);
  assign front       = q.slot[0];

endmodule
