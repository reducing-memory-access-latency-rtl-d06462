// tb_emc_lsq: self-checking test of the EMC load/store queue. Stores are
// written at chain positions of two contexts; loads must forward the data of
// the youngest older store to the same 8-byte word of their own context and
// must not see younger stores, other words or the other context. Clearing a
// context empties only that context.
module tb_emc_lsq;
  import emc_pkg::*;
  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic clr_valid = 0, wr_valid = 0;
  logic [0:0] clr_ctx = 0, wr_ctx = 0, ld_ctx = 0;
  logic [3:0] wr_slot = 0, ld_slot = 0;
  logic [PA_W-1:0] wr_addr = 0, ld_addr = 0;
  logic [XLEN-1:0] wr_data = 0, fwd_data;
  logic fwd_hit;
  logic [1:0][15:0] st_valid;
  logic [1:0][15:0][PA_W-1:0] st_addr;
  logic [1:0][15:0][XLEN-1:0] st_data;

  emc_lsq dut (.clk, .rst_n, .clr_valid, .clr_ctx, .wr_valid, .wr_ctx, .wr_slot, .wr_addr,
               .wr_data, .ld_ctx, .ld_slot, .ld_addr, .fwd_hit, .fwd_data,
               .st_valid, .st_addr, .st_data);

  initial begin
    repeat (2000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic st(int c, int s, logic [PA_W-1:0] a, logic [XLEN-1:0] d);
    @(negedge clk); wr_valid = 1; wr_ctx = 1'(c); wr_slot = 4'(s); wr_addr = a; wr_data = d;
    @(negedge clk); wr_valid = 0;
  endtask

  task automatic ld(int c, int s, logic [PA_W-1:0] a, logic exp_hit, logic [XLEN-1:0] exp_d);
    @(negedge clk); ld_ctx = 1'(c); ld_slot = 4'(s); ld_addr = a; #1;
    checks++;
    if (fwd_hit !== exp_hit || (exp_hit && fwd_data !== exp_d)) begin
      failures++;
      $display("FAIL ld ctx %0d slot %0d addr %h hit %b data %h", c, s, a, fwd_hit, fwd_data);
    end
  endtask

  initial begin
    repeat (2) @(posedge clk);
    rst_n = 1;
    st(0, 2, 40'h1000, 64'hAAAA);
    st(0, 5, 40'h1000, 64'hBBBB);
    st(0, 9, 40'h1000, 64'hCCCC);
    st(1, 1, 40'h1000, 64'hDDDD);
    ld(0, 1, 40'h1000, 0, 0);          // older than every store
    ld(0, 3, 40'h1004, 1, 64'hAAAA);   // same word, other byte
    ld(0, 7, 40'h1000, 1, 64'hBBBB);   // youngest older store
    ld(0, 12, 40'h1000, 1, 64'hCCCC);
    ld(0, 12, 40'h1008, 0, 0);         // other word
    ld(1, 4, 40'h1000, 1, 64'hDDDD);
    ld(1, 0, 40'h1000, 0, 0);
    checks++;
    if (st_valid[0] !== 16'h0224 || st_data[0][5] !== 64'hBBBB || st_addr[0][9] !== 40'h1000) begin
      failures++; $display("FAIL store list %h", st_valid[0]);
    end
    @(negedge clk); clr_valid = 1; clr_ctx = 0;
    @(negedge clk); clr_valid = 0;
    ld(0, 12, 40'h1000, 0, 0);
    ld(1, 4, 40'h1000, 1, 64'hDDDD);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
