// tb_swap_history: pushes flows of several boxes from several ports, pops
// them back in order per box; checks de-duplication, per-box FIFO order,
// re-listing after a pop and dropping when a list is full.
module tb_swap_history;
  import mtp_pkg::*;
  localparam int NB = 4, HD = 4, NF = 64;
  logic clk = 1'b0, rst_n = 1'b0;
  logic [NUM_TYPES-1:0] push_en;
  flow_id_t [NUM_TYPES-1:0] push_flow;
  logic pop_en;
  logic [1:0] pop_box;
  flow_id_t pop_flow;
  logic [NB-1:0] nonempty;
  swap_history #(.NUM_FLOWS(NF), .NUM_BOXES(NB), .HIST_DEPTH(HD)) dut (.*);
  always #5 clk = ~clk;
  int checks = 0, failures = 0;
  flow_id_t model [NB][$];
  bit listed [NF];
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
    int drops = 0, dups = 0;
    push_en = '0; push_flow = '0; pop_en = 0; pop_box = '0;
    foreach (listed[i]) listed[i] = 0;
    repeat (2) @(posedge clk); rst_n = 1'b1;
    for (int i = 0; i < 3000; i++) begin
      @(negedge clk);
      pop_box = 2'($urandom_range(NB-1));
      pop_en  = ($urandom_range(99) < 35);
      for (int p = 0; p < NUM_TYPES; p++) begin
        push_en[p]   = ($urandom_range(99) < 30);
        push_flow[p] = flow_id_t'($urandom_range(NF-1));
      end
      #1;
      for (int b = 0; b < NB; b++) check(nonempty[b] == (model[b].size() > 0), "nonempty");
      if (pop_en && model[pop_box].size() > 0) check(pop_flow == model[pop_box][0], "pop order");
      @(posedge clk);
      if (pop_en && model[pop_box].size() > 0) begin
        listed[model[pop_box][0]] = 0;
        void'(model[pop_box].pop_front());
      end
      for (int p = 0; p < NUM_TYPES; p++) begin
        if (push_en[p]) begin
          automatic int b = int'(push_flow[p]) % NB;
          if (listed[push_flow[p]]) dups++;
          else if (model[b].size() == HD) drops++;
          else begin model[b].push_back(push_flow[p]); listed[push_flow[p]] = 1; end
        end
      end
    end
    check(dups > 0 && drops > 0, "duplicates and full lists were exercised");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
