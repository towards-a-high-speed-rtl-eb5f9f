// tb_context_memory: random reads and writes on all ports against a model;
// checks the one-cycle read latency and that unwritten rows read as zero.
module tb_context_memory;
  import mtp_pkg::*;
  localparam int NF = 256, W = 128;
  logic clk = 1'b0, rst_n = 1'b0;
  logic [NUM_TYPES-1:0] rd_en, wr_en;
  flow_id_t [NUM_TYPES-1:0] rd_addr, wr_addr;
  logic [NUM_TYPES-1:0][W-1:0] rd_data, wr_data;
  context_memory #(.NUM_FLOWS(NF), .CTX_W(W)) dut (.*);
  always #5 clk = ~clk;
  int checks = 0, failures = 0;
  logic [W-1:0] model [NF];
  task automatic check(input logic ok, input string msg);
    checks++;
    if (!ok) begin failures++; if (failures < 10) $display("FAIL: %s", msg); end
  endtask
  initial begin
    repeat (20000) @(posedge clk);
    failures++; $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
  initial begin
    logic [NUM_TYPES-1:0][W-1:0] exp_d;
    logic [NUM_TYPES-1:0] exp_v;
    foreach (model[i]) model[i] = '0;
    rd_en = '0; wr_en = '0; rd_addr = '0; wr_addr = '0; wr_data = '0;
    exp_v = '0; exp_d = '0;
    repeat (2) @(posedge clk); rst_n = 1'b1;
    for (int i = 0; i < 3000; i++) begin
      @(negedge clk);
      for (int p = 0; p < NUM_TYPES; p++)
        if (exp_v[p]) check(rd_data[p] == exp_d[p], $sformatf("read port %0d", p));
      for (int p = 0; p < NUM_TYPES; p++) begin
        rd_en[p] = ($urandom_range(99) < 60);
        rd_addr[p] = flow_id_t'($urandom_range(40));
        wr_en[p] = ($urandom_range(99) < 40);
        wr_addr[p] = flow_id_t'(p * 13 + $urandom_range(12));
        wr_data[p] = {$urandom, $urandom, $urandom, $urandom};
      end
      for (int p = 0; p < NUM_TYPES; p++) begin
        exp_v[p] = rd_en[p];
        exp_d[p] = model[rd_addr[p]];
      end
      for (int p = 0; p < NUM_TYPES; p++) if (wr_en[p]) model[wr_addr[p]] = wr_data[p];
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
