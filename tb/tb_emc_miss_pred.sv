// tb_emc_miss_pred: self-checking test of the EMC miss predictor. A reference
// model of the 3-bit counters (same hash) is trained alongside the block with
// random hit/miss outcomes; every prediction is compared, and a directed
// sequence checks saturation and the threshold.
module tb_emc_miss_pred;
  import emc_pkg::*;
  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic [1:0] pd_core = 0, tr_core = 0;
  logic [PCH_W-1:0] pd_pc = 0, tr_pc = 0;
  logic pd_miss, tr_valid = 0, tr_miss = 0;
  int ref_ctr [4][256];

  emc_miss_pred dut (.clk, .rst_n, .pd_core, .pd_pc, .pd_miss, .tr_valid, .tr_core, .tr_pc, .tr_miss);

  function automatic int h(logic [PCH_W-1:0] pc);
    logic [7:0] x = pc[7:0] ^ {6'd0, pc[9:8]};
    return int'(x);
  endfunction

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic train(int c, logic [PCH_W-1:0] pc, logic m);
    @(negedge clk); tr_valid = 1; tr_core = 2'(c); tr_pc = pc; tr_miss = m;
    if (m && ref_ctr[c][h(pc)] < 7) ref_ctr[c][h(pc)]++;
    if (!m && ref_ctr[c][h(pc)] > 0) ref_ctr[c][h(pc)]--;
    @(negedge clk); tr_valid = 0;
  endtask

  task automatic pred(int c, logic [PCH_W-1:0] pc);
    @(negedge clk); pd_core = 2'(c); pd_pc = pc; #1;
    checks++;
    if (pd_miss !== (ref_ctr[c][h(pc)] > 3)) begin
      failures++;
      $display("FAIL core %0d pc %h pred %b ctr %0d", c, pc, pd_miss, ref_ctr[c][h(pc)]);
    end
  endtask

  initial begin
    foreach (ref_ctr[c, i]) ref_ctr[c][i] = 0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    // directed: 4 misses cross the threshold, 10 saturate, 4 hits go back to 3
    for (int i = 0; i < 3; i++) train(1, 10'h2a5, 1);
    pred(1, 10'h2a5);
    train(1, 10'h2a5, 1);
    pred(1, 10'h2a5);
    pred(0, 10'h2a5);
    for (int i = 0; i < 10; i++) train(1, 10'h2a5, 1);
    for (int i = 0; i < 4; i++) train(1, 10'h2a5, 0);
    pred(1, 10'h2a5);
    checks++;
    if (pd_miss !== 1'b0) begin failures++; $display("FAIL saturation"); end
    // random
    for (int i = 0; i < 600; i++) begin
      automatic logic [PCH_W-1:0] pc = PCH_W'($urandom % 24);
      automatic int c = $urandom % 4;
      train(c, pc, ($urandom % 3) != 0);
      pred(c, pc);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
