// tb_emc_chain_gen: self-checking test of the chain generation unit.
// Scenario 1 is the pointer-chasing example: a source load, a move, two loads
// off the moved pointer, an add with a ready core register (which becomes a
// live-in), a final load, plus a floating-point uop and its dependent (both
// must be left out) and an independent uop (never woken). The renamed chain,
// the live-in vector and the generation time are compared with values worked
// out by hand. Scenario 2 checks the per-cycle width limit (six uops woken at
// once, four per cycle), scenario 3 the 16-uop chain limit, and the 3-bit
// dependent-miss counter gates the start.
module tb_emc_chain_gen;
  import emc_pkg::*;
  localparam int ROB_N = 32;
  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic train_valid = 0, train_dep = 0, start = 0, busy, predict_dep, chain_valid, chain_ready = 0;
  rob_uop_t [ROB_N-1:0] rob = '0;
  logic [4:0] chain_len;
  emc_uop_t [15:0] u;
  logic [15:0][63:0] live;
  logic [15:0][7:0] cpr;
  logic [15:0][4:0] robi;

  emc_chain_gen #(.ROB_N(ROB_N), .WIDTH(4)) dut (.clk, .rst_n, .train_valid, .train_dep, .start,
    .rob, .busy, .predict_dep, .chain_valid, .chain_ready, .chain_len, .chain_uops(u),
    .chain_livein(live), .chain_cpr(cpr), .chain_rob(robi));

  initial begin
    repeat (3000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic chk(logic cond, string msg);
    checks++;
    if (!cond) begin failures++; $display("FAIL %s t=%0t", msg, $time); end
  endtask

  function automatic rob_uop_t r(emc_op_e op, int s1, logic s1r, int s2, logic s2r, int d,
                                 logic [63:0] v1 = 0, logic [63:0] v2 = 0, int imm = 0);
    rob_uop_t x = '0;
    x.valid = 1; x.op = op;
    x.src_v[0] = s1 >= 0; x.src_cpr[0] = 8'(s1 < 0 ? 0 : s1); x.src_rdy[0] = s1r; x.src_val[0] = v1;
    x.src_v[1] = s2 >= 0; x.src_cpr[1] = 8'(s2 < 0 ? 0 : s2); x.src_rdy[1] = s2r; x.src_val[1] = v2;
    x.dst_v = d >= 0; x.dst_cpr = 8'(d < 0 ? 0 : d); x.imm = 20'(imm); x.pc = 10'(d);
    return x;
  endfunction

  function automatic logic src_is(emc_src_t s, logic li, int idx);
    return s.valid && s.livein == li && s.idx == 4'(idx);
  endfunction

  task automatic run(output int cycles);
    @(negedge clk); start = 1;
    @(negedge clk); start = 0;
    cycles = 1;
    while (!chain_valid && cycles < 100) begin @(negedge clk); cycles++; end
  endtask

  task automatic accept();
    chain_ready = 1; @(negedge clk); chain_ready = 0;
  endtask

  initial begin
    int cyc;
    repeat (2) @(posedge clk);
    rst_n = 1;
    // scenario 1
    rob[0] = r(OP_LD, 1, 1, -1, 0, 10, 64'h100);
    rob[1] = r(OP_MOV, 10, 0, -1, 0, 7);
    rob[2] = r(OP_OTHER, 10, 0, -1, 0, 30);
    rob[3] = r(OP_LD, 7, 0, -1, 0, 5, 0, 0, 'h18);
    rob[4] = r(OP_LD, 7, 0, -1, 0, 13, 0, 0, 'h20);
    rob[5] = r(OP_ADD, 13, 0, 18, 1, 20, 0, 64'h55);
    rob[6] = r(OP_LD, 20, 0, -1, 0, 21);
    rob[7] = r(OP_ADD, 30, 0, 1, 1, 31, 0, 64'h100);
    rob[8] = r(OP_ADD, 2, 1, 3, 1, 40, 1, 2);
    // counter at 0: no generation
    @(negedge clk); start = 1;
    @(negedge clk); start = 0; #1;
    chk(!busy && !predict_dep, "counter gates generation");
    for (int i = 0; i < 2; i++) begin
      @(negedge clk); train_valid = 1; train_dep = 1;
    end
    @(negedge clk); train_valid = 0; #1;
    chk(predict_dep, "counter enables after two dependent misses");
    run(cyc);
    chk(cyc == 6, $sformatf("start + 4 wakeup levels + end detect (%0d)", cyc));
    chk(chain_len == 6, $sformatf("chain length %0d", chain_len));
    chk(u[0].op == OP_LD && src_is(u[0].src1, 1, 0) && live[0] == 64'h100 && cpr[0] == 10, "source miss E0");
    chk(u[1].op == OP_MOV && src_is(u[1].src1, 0, 0) && cpr[1] == 7 && robi[1] == 1, "MOV E0 -> E1");
    chk(u[2].op == OP_LD && src_is(u[2].src1, 0, 1) && u[2].imm == 20'h18 && cpr[2] == 5, "LD E1 -> E2");
    chk(u[3].op == OP_LD && src_is(u[3].src1, 0, 1) && u[3].imm == 20'h20 && cpr[3] == 13, "LD E1 -> E3");
    chk(u[4].op == OP_ADD && src_is(u[4].src1, 0, 3) && src_is(u[4].src2, 1, 1) && live[1] == 64'h55 &&
        cpr[4] == 20 && robi[4] == 5, "ADD E3 L1 -> E4");
    chk(u[5].op == OP_LD && src_is(u[5].src1, 0, 4) && cpr[5] == 21 && robi[5] == 6, "LD E4 -> E5");
    accept();
    #1; chk(!busy, "idle after handshake");
    // scenario 2: six uops woken at once, four per cycle
    rob = '0;
    rob[0] = r(OP_LD, 1, 1, -1, 0, 10, 64'h200);
    for (int i = 1; i <= 6; i++) rob[i] = r(OP_ADD, 10, 0, -1, 0, 40 + i, 0, 0, i);
    run(cyc);
    chk(chain_len == 7 && cyc == 4, $sformatf("width limit len %0d cycles %0d", chain_len, cyc));
    for (int i = 1; i <= 6; i++) chk(robi[i] == 5'(i) && src_is(u[i].src1, 0, 0), "width order");
    accept();
    // scenario 3: serial chain of 20, capped at 16
    rob = '0;
    rob[0] = r(OP_LD, 1, 1, -1, 0, 10, 64'h300);
    for (int i = 1; i < 20; i++) rob[i] = r(OP_LD, 9 + i, 0, -1, 0, 10 + i);
    run(cyc);
    chk(chain_len == 16 && cyc == 16, $sformatf("length cap len %0d cycles %0d", chain_len, cyc));
    chk(src_is(u[15].src1, 0, 14) && cpr[15] == 25, "last renamed uop");
    accept();
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
