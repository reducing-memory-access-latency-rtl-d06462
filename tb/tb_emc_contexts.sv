// tb_emc_contexts: self-checking test of the EMC front end. Two chains are
// loaded into the two contexts; dispatch must alternate between them
// (round-robin) and follow program order within each; a live-in operand is
// read ready with its value, a register operand is a pending tag until a
// result bus has written it, after which it is read ready. Completing every
// uop makes the chain done with its live-out registers; a halted context
// waits for mem_busy to drop before it can take a new chain.
module tb_emc_contexts;
  import emc_pkg::*;
  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic ld_valid = 0, ld_ready, disp_valid, disp_ready = 0, done_valid, done_ready = 0;
  logic [1:0] ld_core = 0, done_core;
  logic [4:0] ld_len = 0;
  emc_uop_t [15:0] ld_uops = '0;
  logic [15:0][63:0] ld_livein = '0;
  logic [0:0] ld_ctx, done_ctx;
  emc_disp_t disp;
  emc_cdb_t [1:0] cdb = '0;
  logic [2:0] cmp_valid = 0;
  logic [2:0][0:0] cmp_ctx = '0;
  logic [2:0][3:0] cmp_slot = '0;
  logic [1:0] halt = 0, mem_busy = 0, ctx_run;
  logic [1:0][1:0] ctx_core;
  logic [1:0][15:0] st_pend;
  logic [15:0][63:0] done_regs;
  logic [15:0] done_regmask;

  emc_contexts dut (.clk, .rst_n, .ld_valid, .ld_ready, .ld_core, .ld_len, .ld_uops, .ld_livein,
    .ld_ctx, .disp_valid, .disp_ready, .disp, .cdb, .cmp_valid, .cmp_ctx, .cmp_slot, .halt,
    .mem_busy, .ctx_run, .ctx_core, .st_pend, .done_valid, .done_ready, .done_ctx, .done_core,
    .done_regs, .done_regmask);

  initial begin
    repeat (2000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic chk(logic cond, string msg);
    checks++;
    if (!cond) begin failures++; $display("FAIL %s t=%0t", msg, $time); end
  endtask

  // chain: uop0 = LD L0, uop1 = ADD E0 L1, uop2 = ST E1 -> store, uop3 = MOV imm
  task automatic load(int core, int n, logic [63:0] base);
    ld_uops = '0;
    ld_uops[0].op = OP_LD;  ld_uops[0].src1 = '{1, 1, 0};
    ld_uops[1].op = OP_ADD; ld_uops[1].src1 = '{1, 0, 0}; ld_uops[1].src2 = '{1, 1, 1};
    ld_uops[2].op = OP_ST;  ld_uops[2].src1 = '{1, 0, 1};
    ld_uops[3].op = OP_MOV; ld_uops[3].imm = 20'h5;
    ld_livein = '0; ld_livein[0] = base; ld_livein[1] = base + 1;
    @(negedge clk); ld_valid = 1; ld_core = 2'(core); ld_len = 5'(n);
    @(negedge clk); ld_valid = 0;
  endtask

  initial begin
    int seq_ctx[$], seq_slot[$];
    repeat (2) @(posedge clk);
    rst_n = 1;
    load(2, 4, 64'h1000);
    load(3, 2, 64'h2000);
    #1; chk(!ld_ready, "both contexts busy");
    chk(ctx_run == 2'b11 && ctx_core[0] == 2 && ctx_core[1] == 3, "context cores");
    // first dispatch: ctx1 (round-robin pointer starts after ctx0), live-in ready
    #1; chk(disp_valid && disp.ctx == 1 && disp.s1_rdy && disp.s1_val == 64'h2000, "live-in operand");
    disp_ready = 1;
    for (int i = 0; i < 6; i++) begin
      @(negedge clk); #1;
      if (disp_valid) begin seq_ctx.push_back(int'(disp.ctx)); seq_slot.push_back(int'(disp.slot)); end
      if (disp_valid && disp.ctx == 0 && disp.slot == 1)
        chk(!disp.s1_rdy && disp.s2_rdy && disp.s2_val == 64'h1001, "register operand pending");
    end
    disp_ready = 0;
    // dispatched order after the first: ctx0 s0, ctx1 s1, ctx0 s1, ctx0 s2, ctx0 s3
    chk(seq_ctx.size() == 5 && seq_ctx[0] == 0 && seq_slot[0] == 0 && seq_ctx[1] == 1 &&
        seq_slot[1] == 1 && seq_ctx[2] == 0 && seq_slot[2] == 1 && seq_ctx[3] == 0 &&
        seq_slot[3] == 2 && seq_ctx[4] == 0 && seq_slot[4] == 3, "round-robin order");
    // results for ctx0
    @(negedge clk);
    cdb[0] = '{1, 0, 0, 64'hAB}; cdb[1] = '{1, 0, 1, 64'hCD};
    cmp_valid = 3'b111; cmp_ctx = '0; cmp_slot[0] = 0; cmp_slot[1] = 1; cmp_slot[2] = 2;
    @(negedge clk); cdb = '0; cmp_valid = 0;
    #1; chk(!done_valid, "not done before the last uop");
    @(negedge clk); cdb[0] = '{1, 0, 3, 64'h5}; cmp_valid = 3'b001; cmp_slot[0] = 3;
    @(negedge clk); cdb = '0; cmp_valid = 0;
    @(negedge clk); #1;
    chk(done_valid && done_ctx == 0 && done_core == 2, "chain done");
    chk(done_regs[0] == 64'hAB && done_regs[1] == 64'hCD && done_regs[3] == 64'h5, "live-out values");
    chk(done_regmask == 16'b1011, "live-out mask excludes the store");
    done_ready = 1;
    @(negedge clk); done_ready = 0; #1;
    chk(ld_ready && ld_ctx == 0, "context 0 free again");
    // halt ctx1 while memory is busy
    halt = 2'b10; mem_busy = 2'b10;
    @(negedge clk); halt = 0;
    @(negedge clk); #1;
    chk(!ctx_run[1], "halted context stops");
    cdb[0] = '{1, 1, 0, 64'h99}; cmp_valid = 3'b001; cmp_ctx[0] = 1; cmp_slot[0] = 0;
    @(negedge clk); cdb = '0; cmp_valid = 0;
    load(1, 1, 64'h3000);   // takes ctx 0
    load(1, 1, 64'h3000);   // no free context yet
    #1; chk(!ld_ready, "draining context not reusable");
    mem_busy = 0;
    @(negedge clk); @(negedge clk); #1;
    chk(ld_ready && ld_ctx == 1 && !done_valid, "drained context free, no live-outs");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
