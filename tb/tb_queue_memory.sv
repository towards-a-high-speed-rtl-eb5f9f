// tb_queue_memory: random masked writes on all ports and reads against a
// model; rows never written read as empty.
module tb_queue_memory;
  import mtp_pkg::*;
  localparam int NF = 256;
  logic clk = 1'b0, rst_n = 1'b0;
  flow_id_t [NUM_TYPES-1:0] rd_addr, wr_addr;
  qrow_t [NUM_TYPES-1:0] rd_data, wr_data;
  logic [NUM_TYPES-1:0] wr_en;
  logic [NUM_TYPES-1:0][NUM_TYPES-1:0] wr_mask;
  queue_memory #(.NUM_FLOWS(NF)) dut (.*);
  always #5 clk = ~clk;
  int checks = 0, failures = 0;
  qrow_t model [NF];
  task automatic check(input logic ok, input string msg);
    checks++;
    if (!ok) begin failures++; if (failures < 10) $display("FAIL: %s", msg); end
  endtask
  initial begin
    repeat (20000) @(posedge clk);
    failures++; $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
  function automatic qrow_t rnd_row();
    qrow_t r;
    for (int s = 0; s < NUM_TYPES; s++) begin
      r[s].count = CNT_W'($urandom_range(QDEPTH));
      for (int i = 0; i < QDEPTH; i++) r[s].slot[i] = $urandom;
    end
    return r;
  endfunction
  initial begin
    foreach (model[i]) model[i] = '0;
    wr_en = '0; wr_addr = '0; wr_mask = '0; wr_data = '0; rd_addr = '0;
    repeat (2) @(posedge clk); rst_n = 1'b1;
    for (int i = 0; i < 4000; i++) begin
      @(negedge clk);
      for (int p = 0; p < NUM_TYPES; p++) begin
        wr_en[p]   = ($urandom_range(99) < 50);
        wr_addr[p] = flow_id_t'($urandom_range(31));
        wr_mask[p] = '0;
        wr_mask[p][p] = 1'b1;
        if ($urandom_range(9) == 0 && p == 0) wr_mask[p] = '1;
        wr_data[p] = rnd_row();
        rd_addr[p] = flow_id_t'($urandom_range(40));
      end
      // keep masks of one row disjoint
      for (int p = 1; p < NUM_TYPES; p++)
        for (int q = 0; q < p; q++)
          if (wr_en[q] && wr_en[p] && wr_addr[p] == wr_addr[q] && (wr_mask[p] & wr_mask[q]) != 0) wr_en[p] = 1'b0;
      #1;
      for (int p = 0; p < NUM_TYPES; p++)
        check(rd_data[p] == model[rd_addr[p]], $sformatf("read port %0d row %0d", p, rd_addr[p]));
      @(posedge clk);
      for (int p = 0; p < NUM_TYPES; p++)
        if (wr_en[p])
          for (int s = 0; s < NUM_TYPES; s++)
            if (wr_mask[p][s]) model[wr_addr[p]][s] = wr_data[p][s];
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
