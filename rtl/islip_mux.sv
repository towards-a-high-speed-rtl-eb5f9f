// islip_mux: the multiplexer of the event scheduler.
//
// Every queue box requests the event types whose mini-queue is valid; the
// multiplexer must give each event type (one event-processor chain) at most
// one queue box, and each queue box at most one event type, so that no two
// events of one flow enter the event processors together. This is bipartite
// matching as in crossbar scheduling, solved with iSLIP:
//  * grant:  each unmatched event type offers itself to the first requesting
//            unmatched box at or after its grant pointer;
//  * accept: each box takes the first offering type at or after its accept
//            pointer.
// ITERS rounds run in the same cycle (combinational); only accepts of the
// first round move the pointers (grant pointer to one past the box, accept
// pointer to one past the type), which gives each box a fair turn and keeps
// the pointers from starving anyone. The grant outputs are combinational
// from `req`; the pointers update at the rising edge.
// The choice of iSLIP follows the design; the iteration count is this
// implementation's choice.
module islip_mux
  import mtp_pkg::*;
#(
  parameter int NUM_BOXES = 64,
  parameter int ITERS     = 3,
  localparam int BOX_W    = (NUM_BOXES > 1) ? $clog2(NUM_BOXES) : 1
) (
  input  logic                                clk,
  input  logic                                rst_n,
  input  logic [NUM_BOXES-1:0][NUM_TYPES-1:0] req,
  output logic [NUM_TYPES-1:0]                gnt_valid,
  output logic [NUM_TYPES-1:0][BOX_W-1:0]     gnt_box,
  output logic [NUM_BOXES-1:0][NUM_TYPES-1:0] match
);

  logic [NUM_TYPES-1:0][BOX_W-1:0] gptr, gptr_nxt;
  logic [NUM_BOXES-1:0][1:0]       aptr, aptr_nxt;

  always_comb begin
    logic [NUM_BOXES-1:0]            in_m;
    logic [NUM_TYPES-1:0]            out_m;
    logic [NUM_TYPES-1:0]            g_v;
    logic [NUM_TYPES-1:0][BOX_W-1:0] g_b;
    int                              b, t, sel;
    logic                            found;
    b         = 0;
    t         = 0;
    sel       = 0;
    found     = 1'b0;
    in_m      = '0;
    out_m     = '0;
    match     = '0;
    gnt_valid = '0;
    gnt_box   = '0;
    gptr_nxt  = gptr;
    aptr_nxt  = aptr;
    for (int it = 0; it < ITERS; it++) begin
      // grant phase
      g_v = '0;
      g_b = '0;
      for (int o = 0; o < NUM_TYPES; o++) begin
        if (!out_m[o]) begin
          for (int k = NUM_BOXES - 1; k >= 0; k--) begin
            b = (int'(gptr[o]) + k) % NUM_BOXES;
            if (req[b][o] && !in_m[b]) begin
              g_v[o] = 1'b1;
              g_b[o] = BOX_W'(b);
            end
          end
        end
      end
      // accept phase
      for (int i = 0; i < NUM_BOXES; i++) begin
        if (!in_m[i]) begin
          found = 1'b0;
          sel   = 0;
          for (int k = NUM_TYPES - 1; k >= 0; k--) begin
            t = (int'(aptr[i]) + k) % NUM_TYPES;
            if (g_v[t] && g_b[t] == BOX_W'(i)) begin
              found = 1'b1;
              sel   = t;
            end
          end
          if (found) begin
            in_m[i]       = 1'b1;
            out_m[sel]    = 1'b1;
            match[i][sel] = 1'b1;
            gnt_valid[sel] = 1'b1;
            gnt_box[sel]   = BOX_W'(i);
            if (it == 0) begin
              gptr_nxt[sel] = BOX_W'((i + 1) % NUM_BOXES);
              aptr_nxt[i]   = 2'((sel + 1) % NUM_TYPES);
            end
          end
        end
      end
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      gptr <= '0;
      aptr <= '0;
    end else begin
      gptr <= gptr_nxt;
      aptr <= aptr_nxt;
    end
  end

  for (genvar o = 0; o < NUM_TYPES; o++) begin : g_chk
    a_grant_req: assert property (@(posedge clk) disable iff (!rst_n)
      gnt_valid[o] |-> req[gnt_box[o]][o]);
  end

endmodule
