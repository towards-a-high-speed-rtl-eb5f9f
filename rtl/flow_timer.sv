// flow_timer: the count-down timer of one queue box.
//
// When the box sends an event to the event processors, `start` loads the
// counter so that the flow stays inactive for the time the event needs to
// travel through the event-processor pipeline and update the context memory.
// While the count is non-zero `active` is high and all mini-queues of the box
// are reported invalid. `start` loads PIPE_CYCLES-1, which makes two dispatches
// of one flow at least PIPE_CYCLES cycles apart. `load` sets an arbitrary
// remaining count, used when a flow whose timer is still running is swapped
// back into a box. The count decrements once per cycle down to zero.
// `next_count` is the value the counter will hold after this clock edge if
// nothing is loaded.
module flow_timer
  import mtp_pkg::*;
#(
  parameter int PIPE_CYCLES = 10
) (
  input  logic               clk,
  input  logic               rst_n,
  input  logic               start,
  input  logic               load,
  input  logic [TIMER_W-1:0] load_val,
  output logic               active,
  output logic [TIMER_W-1:0] count,
  output logic [TIMER_W-1:0] next_count
);

  localparam logic [TIMER_W-1:0] START_VAL =
      (PIPE_CYCLES > 0) ? TIMER_W'(PIPE_CYCLES - 1) : '0;

  assign next_count = (count != '0) ? count - 1'b1 : '0;
  assign active     = (count != '0);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)     count <= '0;
    else if (load)  count <= load_val;
    else if (start) count <= START_VAL;
    else            count <= next_count;
  end

endmodule
