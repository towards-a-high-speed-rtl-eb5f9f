// tb_event_mapper: checks that lane inputs are registered unchanged, that an
// independent swap request goes out on the lowest idle lane with the popped
// history flow, that boxes are chosen round robin among eligible ones, and
// that no request is made when every lane is busy.
module tb_event_mapper;
  import mtp_pkg::*;
  localparam int NB = 8;
  logic clk = 1'b0, rst_n = 1'b0;
  logic [NUM_TYPES-1:0] in_valid;
  event_t [NUM_TYPES-1:0] in_event;
  logic [NB-1:0] replaceable, hist_nonempty;
  flow_id_t hist_flow;
  logic pop_en;
  logic [2:0] pop_box;
  lane_req_t [NUM_TYPES-1:0] req;
  event_mapper #(.NUM_BOXES(NB)) dut (.*);
  always #5 clk = ~clk;
  int checks = 0, failures = 0;
  task automatic check(input logic ok, input string msg);
    checks++;
    if (!ok) begin failures++; if (failures < 10) $display("FAIL: %s", msg); end
  endtask
  initial begin
    repeat (500) @(posedge clk);
    failures++; $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
  initial begin
    int seen [NB];
    in_valid = '0; in_event = '0; replaceable = '0; hist_nonempty = '0; hist_flow = '0;
    repeat (2) @(posedge clk); rst_n = 1'b1;
    @(negedge clk);
    // all lanes busy: events pass, no independent swap
    in_valid = 3'b111;
    for (int k = 0; k < NUM_TYPES; k++) in_event[k] = '{flow: flow_id_t'(10 + k), data: 32'(100 + k)};
    replaceable = '1; hist_nonempty = '1; hist_flow = 8'd77;
    #1;
    check(!pop_en, "no pop with every lane busy");
    @(negedge clk);
    for (int k = 0; k < NUM_TYPES; k++)
      check(req[k].valid && !req[k].indep && req[k].flow == flow_id_t'(10 + k) && req[k].data == 32'(100 + k),
            "event registered");
    // lane 0 busy, lanes 1 and 2 idle: request on lane 1
    in_valid = 3'b001;
    #1;
    check(pop_en, "pop with an idle lane");
    @(negedge clk);
    check(req[1].valid && req[1].indep && req[1].flow == 8'd77 && !req[2].valid, "swap request on lowest idle lane");
    // round robin over eligible boxes 1, 4, 6
    in_valid = '0;
    replaceable = 8'b0101_0010; hist_nonempty = '1;
    foreach (seen[b]) seen[b] = 0;
    for (int i = 0; i < 9; i++) begin
      #1;
      check(pop_en && replaceable[pop_box], "pops an eligible box");
      seen[pop_box]++;
      @(negedge clk);
      check(req[0].indep, "request on lane 0");
    end
    check(seen[1] == 3 && seen[4] == 3 && seen[6] == 3, "round robin over eligible boxes");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
