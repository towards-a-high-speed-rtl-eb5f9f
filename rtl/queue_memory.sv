// queue_memory: the per-flow queue storage behind the queue cache.
//
// One wide word per flow holds all mini-queues of that flow (a qrow_t), so
// a whole queue box can be read or written in one access. Flows that are not
// in the queue cache keep their events here.
//
// Ports: one read port and one write port per event type (lane). Reads are
// combinational (rd_data follows rd_addr in the same cycle). A write stores
// the segments of wr_data selected by wr_mask (one bit per event type) at the
// rising edge, so two lanes may update different mini-queues of one flow in
// the same cycle. A per-row, per-segment valid bit is cleared by reset; a
// segment never written reads as an empty mini-queue, so the array itself
// needs no reset. Combinational reads and the segment mask are this
// implementation's choices; the single wide row per flow follows the design.
module queue_memory
  import mtp_pkg::*;
#(
  parameter int NUM_FLOWS = 256
) (
  input  logic                                 clk,
  input  logic                                 rst_n,
  input  flow_id_t [NUM_TYPES-1:0]             rd_addr,
  output qrow_t    [NUM_TYPES-1:0]             rd_data,
  input  logic     [NUM_TYPES-1:0]             wr_en,
  input  flow_id_t [NUM_TYPES-1:0]             wr_addr,
  input  logic     [NUM_TYPES-1:0][NUM_TYPES-1:0] wr_mask,
  input  qrow_t    [NUM_TYPES-1:0]             wr_data
);

  qrow_t                                mem [NUM_FLOWS];
  logic [NUM_FLOWS-1:0][NUM_TYPES-1:0]  seg_valid, seg_valid_n;

  always_comb begin
    for (int p = 0; p < NUM_TYPES; p++) begin
      for (int s = 0; s < NUM_TYPES; s++) begin
        rd_data[p][s] = seg_valid[rd_addr[p]][s] ? mem[rd_addr[p]][s] : MQ_EMPTY;
      end
    end
  end

  always_ff @(posedge clk) begin
    for (int p = 0; p < NUM_TYPES; p++) begin
      for (int s = 0; s < NUM_TYPES; s++) begin
        if (wr_en[p] && wr_mask[p][s]) mem[wr_addr[p]][s] <= wr_data[p][s];
      end
    end
  end

  // several ports may mark segments of one row in the same cycle
  always_comb begin
    seg_valid_n = seg_valid;
    for (int p = 0; p < NUM_TYPES; p++) begin
      if (wr_en[p]) seg_valid_n[wr_addr[p]] = seg_valid_n[wr_addr[p]] | wr_mask[p];
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) seg_valid <= '0;
    else        seg_valid <= seg_valid_n;
  end

  for (genvar p = 0; p < NUM_TYPES; p++) begin : g_chk
    for (genvar q = p + 1; q < NUM_TYPES; q++) begin : g_pair
      a_no_overlap: assert property (@(posedge clk) disable iff (!rst_n)
        (wr_en[p] && wr_en[q] && wr_addr[p] == wr_addr[q]) |-> (wr_mask[p] & wr_mask[q]) == '0);
    end
  end

endmodule
