// context_memory: the per-flow context table (flow state such as sequence
// numbers and windows).
//
// When the scheduler dispatches an event, the context row of its flow is
// fetched for the event processors; when they finish, they write the updated
// row back. One read port and one write port per event type, since one event
// of each type can be dispatched per cycle. Reads are synchronous: rd_data is
// valid the cycle after rd_en/rd_addr (block-RAM style). Writes happen at the
// rising edge; a read of a row written at the same edge returns the old
// value. A row never written reads as zero (valid bits cleared by reset).
// The context width and the port arrangement are this implementation's
// choices; the document gives only the table's role.
module context_memory
  import mtp_pkg::*;
#(
  parameter int NUM_FLOWS = 256,
  parameter int CTX_W     = 128
) (
  input  logic                                clk,
  input  logic                                rst_n,
  input  logic     [NUM_TYPES-1:0]            rd_en,
  input  flow_id_t [NUM_TYPES-1:0]            rd_addr,
  output logic     [NUM_TYPES-1:0][CTX_W-1:0] rd_data,
  input  logic     [NUM_TYPES-1:0]            wr_en,
  input  flow_id_t [NUM_TYPES-1:0]            wr_addr,
  input  logic     [NUM_TYPES-1:0][CTX_W-1:0] wr_data
);

  logic [CTX_W-1:0]     mem [NUM_FLOWS];
  logic [NUM_FLOWS-1:0] row_valid;

  always_ff @(posedge clk) begin
    for (int p = 0; p < NUM_TYPES; p++) begin
      if (rd_en[p]) rd_data[p] <= row_valid[rd_addr[p]] ? mem[rd_addr[p]] : '0;
      if (wr_en[p]) mem[wr_addr[p]] <= wr_data[p];
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) row_valid <= '0;
    else begin
      for (int p = 0; p < NUM_TYPES; p++) begin
        if (wr_en[p]) row_valid[wr_addr[p]] <= 1'b1;
      end
    end
  end

  for (genvar p = 0; p < NUM_TYPES; p++) begin : g_chk
    for (genvar q = p + 1; q < NUM_TYPES; q++) begin : g_pair
      a_one_writer: assert property (@(posedge clk) disable iff (!rst_n)
        (wr_en[p] && wr_en[q]) |-> wr_addr[p] != wr_addr[q]);
    end
  end

endmodule
