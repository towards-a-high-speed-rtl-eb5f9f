// event_timer: the timer module of the transport backend.
//
// The event processors ask for a timer event (for example a retransmission
// timeout) by giving a flow, a delay and the event payload. The module keeps
// these pending timer events in a small table and scans it, one slot per
// cycle, against a free-running time counter, as Tonic's periodic-update
// scan does; an entry whose deadline has passed is removed and emitted as a
// timer event to the scheduler. Because a slot is visited every SLOTS cycles,
// an event fires at most SLOTS-1 cycles late, which is small next to transport
// timeouts.
//  * start: arms the timer of a flow; a flow has at most one timer, so an
//    existing entry of the flow is re-armed, otherwise the lowest free slot is
//    used; with no free slot the request is dropped (start_drop).
//  * cancel: removes the flow's entry.
// A start or cancel takes precedence over an expiry of the same slot in the
// same cycle. out_valid/out_event are registered. Deadlines compare with
// wrap-around, so delays must stay below 2**(TIME_W-1) cycles.
// The table-and-scan structure follows the design; table size, time width
// and the one-timer-per-flow rule are this implementation's choices.
module event_timer
  import mtp_pkg::*;
#(
  parameter int SLOTS  = 16,
  parameter int TIME_W = 16,
  localparam int IDX_W = $clog2(SLOTS)
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              start_en,
  input  flow_id_t          start_flow,
  input  logic [TIME_W-1:0] start_delay,
  input  payload_t          start_data,
  input  logic              cancel_en,
  input  flow_id_t          cancel_flow,
  output logic              start_drop,
  output logic              out_valid,
  output event_t            out_event
);

  typedef struct packed {
    logic              valid;
    flow_id_t          flow;
    logic [TIME_W-1:0] deadline;
    payload_t          data;
  } tslot_t;

  tslot_t            tab [SLOTS];
  logic [TIME_W-1:0] now;
  logic [IDX_W-1:0]  scan;
  logic              s_found, f_found, c_found, expire;
  int                s_idx, f_idx, c_idx;
  logic [TIME_W-1:0] age;

  always_comb begin
    s_found = 1'b0; s_idx = 0;
    f_found = 1'b0; f_idx = 0;
    c_found = 1'b0; c_idx = 0;
    for (int i = SLOTS - 1; i >= 0; i--) begin
      if (tab[i].valid && tab[i].flow == start_flow)  begin s_found = 1'b1; s_idx = i; end
      if (!tab[i].valid)                               begin f_found = 1'b1; f_idx = i; end
      if (tab[i].valid && tab[i].flow == cancel_flow) begin c_found = 1'b1; c_idx = i; end
    end
    age    = now - tab[scan].deadline;
    expire = tab[scan].valid && !age[TIME_W-1]
             && !(start_en && (s_found ? s_idx == int'(scan) : f_found && f_idx == int'(scan)))
             && !(cancel_en && c_found && c_idx == int'(scan));
    start_drop = start_en && !s_found && !f_found;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int i = 0; i < SLOTS; i++) tab[i] <= '0;
      now       <= '0;
      scan      <= '0;
      out_valid <= 1'b0;
      out_event <= '0;
    end else begin
      now       <= now + 1'b1;
      scan      <= (int'(scan) == SLOTS - 1) ? '0 : scan + 1'b1;
      out_valid <= expire;
      out_event <= '{flow: tab[scan].flow, data: tab[scan].data};
      if (expire) tab[scan].valid <= 1'b0;
      if (cancel_en && c_found) tab[c_idx].valid <= 1'b0;
      if (start_en && (s_found || f_found)) begin
        tab[s_found ? s_idx : f_idx] <= '{valid: 1'b1, flow: start_flow,
                                          deadline: now + start_delay, data: start_data};
      end
    end
  end

endmodule
