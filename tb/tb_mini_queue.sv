// tb_mini_queue: random push/pop/load against a queue model; checks count,
// front element, full contents and the overflow flag every cycle.
module tb_mini_queue;
  import mtp_pkg::*;
  logic clk = 1'b0, rst_n = 1'b0;
  logic push, pop, load, front_valid, overflow;
  payload_t push_data, front;
  mq_t load_q, q;
  mini_queue dut (.*);
  always #5 clk = ~clk;
  int checks = 0, failures = 0;
  payload_t model [$];
  task automatic check(input logic ok, input string msg);
    checks++;
    if (!ok) begin failures++; if (failures < 10) $display("FAIL: %s", msg); end
  endtask
  initial begin
    repeat (10000) @(posedge clk);
    failures++; $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
  initial begin
    push = 0; pop = 0; load = 0; push_data = '0; load_q = '0;
    repeat (2) @(posedge clk); rst_n = 1'b1;
    for (int i = 0; i < 3000; i++) begin
      logic exp_ovf;
      @(negedge clk);
      push = ($urandom_range(99) < 55);
      pop  = ($urandom_range(99) < 40) && model.size() > 0;
      load = ($urandom_range(99) < 3);
      push_data = $urandom;
      load_q = '0;
      load_q.count = CNT_W'($urandom_range(QDEPTH));
      for (int s = 0; s < QDEPTH; s++) load_q.slot[s] = (s < int'(load_q.count)) ? $urandom : '0;
      #1;
      exp_ovf = push && !load && (model.size() - int'(pop) == QDEPTH);
      check(overflow == exp_ovf, "overflow flag");
      @(posedge clk);
      if (load) begin
        model.delete();
        for (int s = 0; s < int'(load_q.count); s++) model.push_back(load_q.slot[s]);
      end else begin
        if (pop) void'(model.pop_front());
        if (push && model.size() < QDEPTH) model.push_back(push_data);
      end
      #1;
      check(int'(q.count) == model.size(), $sformatf("count %0d vs %0d", q.count, model.size()));
      check(front_valid == (model.size() > 0), "front_valid");
      if (model.size() > 0) check(front == model[0], "front");
      for (int s = 0; s < model.size(); s++) check(q.slot[s] == model[s], "slot contents");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
