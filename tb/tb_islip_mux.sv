// tb_islip_mux: random request matrices; checks that every grant is
// requested, no box gets two types, the match is maximal (no free type with
// a free requesting box), and that under constant requests the grants rotate
// over all boxes (fairness).
module tb_islip_mux;
  import mtp_pkg::*;
  localparam int NB = 16;
  localparam int BW = 4;
  logic clk = 1'b0, rst_n = 1'b0;
  logic [NB-1:0][NUM_TYPES-1:0] req, match;
  logic [NUM_TYPES-1:0] gnt_valid;
  logic [NUM_TYPES-1:0][BW-1:0] gnt_box;
  islip_mux #(.NUM_BOXES(NB), .ITERS(3)) dut (.*);
  always #5 clk = ~clk;
  int checks = 0, failures = 0;
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
    int served [NB];
    req = '0;
    repeat (2) @(posedge clk); rst_n = 1'b1;
    for (int i = 0; i < 3000; i++) begin
      logic [NB-1:0] used;
      @(negedge clk);
      for (int b = 0; b < NB; b++)
        for (int t = 0; t < NUM_TYPES; t++) req[b][t] = ($urandom_range(99) < 15);
      #1;
      used = '0;
      for (int t = 0; t < NUM_TYPES; t++) begin
        if (gnt_valid[t]) begin
          check(req[gnt_box[t]][t], "grant without request");
          check(!used[gnt_box[t]], "box granted twice");
          check(match[gnt_box[t]][t], "match matrix");
          used[gnt_box[t]] = 1'b1;
        end
      end
      for (int t = 0; t < NUM_TYPES; t++)
        if (!gnt_valid[t])
          for (int b = 0; b < NB; b++) check(!(req[b][t] && !used[b]), "match not maximal");
    end
    // fairness: all boxes request the network type
    foreach (served[b]) served[b] = 0;
    @(negedge clk);
    for (int b = 0; b < NB; b++) req[b] = 3'b001;
    for (int i = 0; i < 4 * NB; i++) begin
      #1;
      check(gnt_valid[0], "network type idle");
      served[gnt_box[0]]++;
      @(negedge clk);
    end
    foreach (served[b]) check(served[b] == 4, $sformatf("box %0d served %0d times", b, served[b]));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
