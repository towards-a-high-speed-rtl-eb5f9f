// tb_flow_timer: checks that a start keeps the timer active for exactly
// PIPE_CYCLES-1 cycles, that load sets an arbitrary count, and next_count.
module tb_flow_timer;
  import mtp_pkg::*;
  localparam int P = 10;
  logic clk = 1'b0, rst_n = 1'b0;
  logic start, load, active;
  logic [TIMER_W-1:0] load_val, count, next_count;
  flow_timer #(.PIPE_CYCLES(P)) dut (.*);
  always #5 clk = ~clk;
  int checks = 0, failures = 0;
  task automatic check(input logic ok, input string msg);
    checks++;
    if (!ok) begin failures++; if (failures < 10) $display("FAIL: %s", msg); end
  endtask
  initial begin
    repeat (2000) @(posedge clk);
    failures++; $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
  initial begin
    int n;
    start = 0; load = 0; load_val = '0;
    repeat (2) @(posedge clk); rst_n = 1'b1;
    @(negedge clk);
    check(!active && count == 0, "idle after reset");
    for (int r = 0; r < 5; r++) begin
      start = 1; @(negedge clk); start = 0;
      n = 0;
      while (active && n < 50) begin
        check(next_count == count - 1'b1, "next_count");
        @(negedge clk); n++;
      end
      // dispatch at cycle d, next dispatch allowed at d+P
      check(n == P - 1, $sformatf("active for %0d cycles", n));
      repeat ($urandom_range(3)) @(negedge clk);
    end
    load = 1; load_val = 8'd4; @(negedge clk); load = 0;
    n = 0;
    while (active && n < 50) begin @(negedge clk); n++; end
    check(n == 4, $sformatf("after load 4: active %0d cycles", n));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
