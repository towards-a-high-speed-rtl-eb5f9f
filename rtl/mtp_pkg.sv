// mtp_pkg: types and constants shared by the event scheduler of the MTP
// transport-layer backend.
//
// The scheduler handles three event types (network, application, timer),
// each carried on its own lane. Every flow owns one mini-queue per event type;
// the mini-queues of one flow form a "row" that is kept either in a queue box
// of the queue cache or in one wide word of the queue memory.
//
// Sizes: the three event types follow the design; queue depth, payload width
// and flow-id width are this implementation's choices.
package mtp_pkg;

  localparam int NUM_TYPES = 3;   // network, application, timer
  localparam int QDEPTH    = 4;   // entries per mini-queue
  localparam int DATA_W    = 32;  // event payload bits
  localparam int FLOW_W    = 8;   // flow id bits (up to 256 flows)
  localparam int CNT_W     = $clog2(QDEPTH + 1);
  localparam int TIMER_W   = 8;   // width of flow timers (>= PIPE_CYCLES)

  typedef enum logic [1:0] {
    EV_NET   = 2'd0,
    EV_APP   = 2'd1,
    EV_TIMER = 2'd2
  } ev_type_e;

  typedef logic [FLOW_W-1:0] flow_id_t;
  typedef logic [DATA_W-1:0] payload_t;

  // An event as it enters or leaves the scheduler; its type is its lane.
  typedef struct packed {
    flow_id_t flow;
    payload_t data;
  } event_t;

  // One mini-queue: slot[0] is the front, count entries are valid.
  typedef struct packed {
    logic [CNT_W-1:0]               count;
    logic [QDEPTH-1:0][DATA_W-1:0]  slot;
  } mq_t;

  // All mini-queues of one flow (one queue memory word / one queue box).
  typedef mq_t [NUM_TYPES-1:0] qrow_t;

  // Work carried by one lane from the mapper stage to the holding area.
  // indep = 1: an independent swap request (no event, data unused).
  typedef struct packed {
    logic     valid;
    logic     indep;
    flow_id_t flow;
    payload_t data;
  } lane_req_t;

  // Per-cycle activity of the scheduler's mechanisms (for monitoring).
  typedef struct packed {
    logic [NUM_TYPES-1:0] hit;              // event appended to a cached flow
    logic [NUM_TYPES-1:0] park;             // event written to queue memory
    logic [NUM_TYPES-1:0] new_arrival_swap; // flow swapped in by its new event
    logic [NUM_TYPES-1:0] indep_swap;       // flow swapped in on an idle lane
    logic [NUM_TYPES-1:0] evict;            // a flow was written back from a box
    logic [NUM_TYPES-1:0] bank_store;       // evicted flow's timer kept running
    logic [NUM_TYPES-1:0] bank_restore;     // swapped-in flow's timer restored
    logic                 forward;          // row 1 took a pending write-back
    logic                 blocked;          // a box with events waits on its timer
  } sched_status_t;

  localparam mq_t MQ_EMPTY = '0;

  function automatic logic mq_full(mq_t q);
    return q.count == CNT_W'(QDEPTH);
  endfunction

  // Append d at the back; a full queue is returned unchanged.
  function automatic mq_t mq_push(mq_t q, payload_t d);
    mq_t r = q;
    if (!mq_full(q)) begin
      r.slot[q.count] = d;
      r.count         = q.count + 1'b1;
    end
    return r;
  endfunction

  // Remove the front entry; an empty queue is returned unchanged.
  function automatic mq_t mq_pop(mq_t q);
    mq_t r = q;
    if (q.count != '0) begin
      for (int i = 0; i < QDEPTH - 1; i++) r.slot[i] = q.slot[i+1];
      r.slot[QDEPTH-1] = '0;
      r.count          = q.count - 1'b1;
    end
    return r;
  endfunction

  function automatic logic row_nonempty(qrow_t r);
    logic ne = 1'b0;
    for (int t = 0; t < NUM_TYPES; t++) ne |= (r[t].count != '0);
    return ne;
  endfunction

endpackage
