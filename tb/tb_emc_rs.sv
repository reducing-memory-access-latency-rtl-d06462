// tb_emc_rs: self-checking test of the EMC reservation station. Directed
// cases check out-of-order issue (a ready younger uop passes a waiting older
// one), wakeup and value capture from either result bus, wakeup of a uop in
// its dispatch cycle, two uops issued in one cycle, the port rules for memory
// uops (port 0 only, only with mem_ok) and port 1 (only with p1_ok), the
// full condition after eight entries, flushing one context, and a flush in
// the same cycle as a dispatch of the other context.
module tb_emc_rs;
  import emc_pkg::*;
  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic disp_valid = 0, disp_ready, mem_ok = 1, p1_ok = 1, iss0_valid, iss1_valid;
  emc_disp_t disp = '0, iss0, iss1;
  emc_cdb_t [1:0] cdb = '0;
  logic [1:0] flush = 0;
  logic [1:0][15:0] st_pend = 0;
  logic [3:0] occ;

  emc_rs dut (.clk, .rst_n, .disp_valid, .disp_ready, .disp, .cdb, .mem_ok, .p1_ok,
              .iss0_valid, .iss0, .iss1_valid, .iss1, .flush, .st_pend, .occupancy(occ));

  initial begin
    repeat (2000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic emc_disp_t mk(int c, int s, emc_op_e op, int t1, logic [XLEN-1:0] v1,
                                   int t2, logic [XLEN-1:0] v2);
    emc_disp_t d = '0;
    d.ctx = 1'(c); d.slot = 4'(s); d.uop.op = op;
    d.uop.src1.valid = 1; d.uop.src2.valid = 1;
    d.uop.src1.idx = 4'(t1 < 0 ? 0 : t1); d.s1_rdy = t1 < 0; d.s1_val = v1;
    d.uop.src2.idx = 4'(t2 < 0 ? 0 : t2); d.s2_rdy = t2 < 0; d.s2_val = v2;
    return d;
  endfunction

  task automatic put(emc_disp_t d);
    @(negedge clk); disp_valid = 1; disp = d;
    @(negedge clk); disp_valid = 0;
  endtask

  // check issue outputs at the current negedge (before the next posedge)
  task automatic expect_iss(logic v0, int s0, logic v1, int s1, logic [XLEN-1:0] a0 = '0, logic [XLEN-1:0] b0 = '0);
    #1;
    checks++;
    if (iss0_valid !== v0 || (v0 && (iss0.slot !== 4'(s0) || (a0 != 0 && (iss0.s1_val !== a0 || iss0.s2_val !== b0)))) ||
        iss1_valid !== v1 || (v1 && iss1.slot !== 4'(s1))) begin
      failures++;
      $display("FAIL t=%0t iss0 %b/%0d (%h,%h) iss1 %b/%0d exp %b/%0d %b/%0d", $time, iss0_valid, iss0.slot,
               iss0.s1_val, iss0.s2_val, iss1_valid, iss1.slot, v0, s0, v1, s1);
    end
  endtask

  initial begin
    repeat (2) @(posedge clk);
    rst_n = 1;
    // B waits for slot 1; C is ready and passes it
    @(negedge clk); disp_valid = 1; disp = mk(0, 2, OP_ADD, 1, 0, -1, 64'd5);
    @(negedge clk); disp = mk(0, 3, OP_SUB, -1, 64'd7, -1, 64'd9);
    expect_iss(0, 0, 0, 0);
    @(negedge clk); disp_valid = 0;
    expect_iss(1, 3, 0, 0, 64'd7, 64'd9);
    @(negedge clk);
    expect_iss(0, 0, 0, 0);
    // broadcast slot 1 on bus 1; B issues the cycle after with the value
    cdb[1] = '{valid: 1, ctx: 0, slot: 1, data: 64'h77};
    @(negedge clk); cdb = '0;
    expect_iss(1, 2, 0, 0, 64'h77, 64'd5);
    @(negedge clk);
    // wakeup in the dispatch cycle, from bus 0
    disp_valid = 1; disp = mk(1, 4, OP_AND, 6, 0, 7, 0);
    cdb[0] = '{valid: 1, ctx: 1, slot: 6, data: 64'h66};
    cdb[1] = '{valid: 1, ctx: 1, slot: 7, data: 64'h67};
    @(negedge clk); disp_valid = 0; cdb = '0;
    expect_iss(1, 4, 0, 0, 64'h66, 64'h67);
    // a tag of the other context does not wake
    @(negedge clk); disp_valid = 1; disp = mk(1, 5, OP_OR, 2, 0, -1, 1);
    cdb[0] = '{valid: 1, ctx: 0, slot: 2, data: 64'h1};
    @(negedge clk); disp_valid = 0; cdb = '0;
    expect_iss(0, 0, 0, 0);
    flush = 2'b10;
    @(negedge clk); flush = 0;
    #1; checks++;
    if (occ != 0) begin failures++; $display("FAIL flush occ %0d", occ); end
    // two ready ALU uops issue together; a load waits for mem_ok and uses port 0
    mem_ok = 0;
    @(negedge clk); disp_valid = 1; disp = mk(0, 8, OP_LD, -1, 64'h100, -1, 0);
    @(negedge clk); disp = mk(0, 9, OP_ADD, 13, 0, -1, 2);
    @(negedge clk); disp = mk(0, 10, OP_XOR, 13, 0, -1, 4);
    @(negedge clk); disp_valid = 0;
    expect_iss(0, 0, 0, 0);
    cdb[0] = '{valid: 1, ctx: 0, slot: 13, data: 64'h3};
    @(negedge clk); cdb = '0;
    expect_iss(1, 9, 1, 10);
    @(negedge clk);
    expect_iss(0, 0, 0, 0);
    mem_ok = 1;
    expect_iss(1, 8, 0, 0);
    @(negedge clk);
    // p1_ok low: only port 0
    p1_ok = 0;
    @(negedge clk); disp_valid = 1; disp = mk(0, 11, OP_ADD, 14, 0, -1, 2);
    @(negedge clk); disp = mk(0, 12, OP_ADD, 14, 0, -1, 2);
    @(negedge clk); disp_valid = 0;
    cdb[1] = '{valid: 1, ctx: 0, slot: 14, data: 64'h3};
    @(negedge clk); cdb = '0;
    expect_iss(1, 11, 0, 0);
    @(negedge clk);
    expect_iss(1, 12, 0, 0);
    p1_ok = 1;
    @(negedge clk);
    // full after eight waiting entries
    for (int i = 0; i < 8; i++) begin
      @(negedge clk); disp_valid = 1; disp = mk(0, i, OP_ADD, 15, 0, -1, 0);
    end
    @(negedge clk); disp_valid = 0; #1;
    checks++;
    if (disp_ready !== 1'b0 || occ != 8) begin failures++; $display("FAIL full %b %0d", disp_ready, occ); end
    flush = 2'b01;
    @(negedge clk); flush = 0; #1;
    checks++;
    if (disp_ready !== 1'b1 || occ != 0) begin failures++; $display("FAIL after flush"); end
    // a flush of context 0 in the cycle a context-1 uop is written into an
    // entry last used by context 0 must not drop the new uop
    @(negedge clk); disp_valid = 1; disp = mk(1, 3, OP_ADD, 9, 0, -1, 0); flush = 2'b01;
    @(negedge clk); disp_valid = 0; flush = 0; #1;
    checks++;
    if (occ != 1) begin failures++; $display("FAIL flush during dispatch occ %0d", occ); end
    cdb[0] = '{valid: 1, ctx: 1, slot: 9, data: 64'h5};
    @(negedge clk); cdb = '0;
    expect_iss(1, 3, 0, 0, 64'h5, 64'h0);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
