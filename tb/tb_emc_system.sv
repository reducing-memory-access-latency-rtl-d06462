// tb_emc_system: end-to-end test of the quad-core chain offload at the
// design's default sizes (4 cores, 256-entry ROB windows, 2 EMC contexts).
// Every core's ROB holds the same kind of pointer-chasing window behind an
// LLC miss: a source load, a move, two loads, an add with a ready register,
// a dependent load and a branch, plus uops that must stay at the core (a
// floating-point uop, its dependent, an independent add). A memory model
// answers line requests after MEM_LAT cycles with pointer contents computed
// from the address and reports LLC misses. A reference model executes the
// expected chain by core register and the returned live-outs (value, core
// register and ROB index) must match it.
// Mechanisms made to happen and counted: chain generation on all cores,
// arbitration wait for a free EMC context, start ignored while a core's chain
// is in flight, TLB-miss halt and re-run after the page is supplied,
// wrong-path halt, data cache hits on a repeated chain, and requests sent
// directly to DRAM by the miss predictor.
module tb_emc_system;
  import emc_pkg::*;
  localparam int CORES = 4, ROB_N = 256, MEM_LAT = 20;
  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic [CORES-1:0] train_valid = 0, train_dep = 0, start = 0, chain_inflight;
  rob_uop_t [CORES-1:0][ROB_N-1:0] rob;
  logic pte_valid = 0, shoot_valid = 0;
  logic [1:0] pte_core = 0, shoot_core = 0;
  logic [VPN_W-1:0] pte_vpn = 0, shoot_vpn = 0;
  logic [PPN_W-1:0] pte_ppn = 0;
  logic mreq_valid, mreq_ready, mreq_dram, mfill_valid = 0, mfill_llc_miss = 1;
  logic [LADDR_W-1:0] mreq_laddr;
  logic [1:0] mreq_tag, mreq_core, mfill_tag = 0;
  logic [LINE_W-1:0] mfill_data = 0;
  logic dline_valid = 0, dinv_valid = 0;
  logic [LADDR_W-1:0] dline_laddr = 0, dinv_laddr = 0;
  logic [LINE_W-1:0] dline_data = 0;
  logic note_valid, note_store;
  logic [1:0] note_core;
  logic [3:0] note_slot;
  logic [PA_W-1:0] note_addr;
  logic [63:0] note_data;
  logic [1:0] abort_valid, abort_tlb;
  logic [1:0][1:0] abort_core;
  logic done_valid, done_ready = 0;
  logic [1:0] done_core;
  logic [15:0][63:0] done_regs, done_stdata;
  logic [15:0] done_regmask, done_stmask;
  logic [15:0][7:0] done_cpr;
  logic [15:0][7:0] done_rob;
  logic [15:0][PA_W-1:0] done_staddr;

  emc_system dut (.*);

  // ------------------------------------------------------------ memory model
  function automatic logic [PA_W-1:0] v2p(logic [63:0] va);
    return {PPN_W'(va[VA_W-1:12] + 36'h1000), va[11:0]};
  endfunction
  function automatic logic [63:0] mval(logic [PA_W-1:0] pa);
    logic [63:0] h = {24'd0, pa[PA_W-1:3], 3'b0} * 64'h9E3779B1;
    return 64'h400000 + {44'd0, h[19:3], 3'b000} % 64'h1E000;
  endfunction
  function automatic logic [LINE_W-1:0] mline(logic [LADDR_W-1:0] la);
    logic [LINE_W-1:0] l;
    for (int w = 0; w < 8; w++) l[w*64 +: 64] = mval({la, 3'(w), 3'b0});
    return l;
  endfunction

  typedef struct { int due; logic [1:0] tag; logic [LADDR_W-1:0] la; } pend_t;
  pend_t pend[$];
  int cyc = 0, n_req = 0, n_req_dram = 0;
  always @(posedge clk) begin
    cyc <= cyc + 1;
    if (rst_n && mreq_valid) begin
      pend.push_back('{cyc + MEM_LAT, mreq_tag, mreq_laddr});
      n_req++;
      if (mreq_dram) n_req_dram++;
    end
  end
  assign mreq_ready = 1'b1;
  always @(negedge clk) begin
    mfill_valid = 0;
    if (pend.size() > 0 && pend[0].due <= cyc) begin
      mfill_valid = 1; mfill_tag = pend[0].tag; mfill_data = mline(pend[0].la);
      void'(pend.pop_front());
    end
  end

  initial begin
    repeat (30000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic chk(logic cond, string msg);
    checks++;
    if (!cond) begin failures++; $display("FAIL %s t=%0t", msg, $time); end
  endtask

  // ------------------------------------------------------------ ROB windows
  function automatic rob_uop_t r(emc_op_e op, int s1, logic s1r, int s2, logic s2r, int d,
                                 logic [63:0] v1 = 0, logic [63:0] v2 = 0, int imm = 0,
                                 logic pt = 0);
    rob_uop_t x = '0;
    x.valid = 1; x.op = op;
    x.src_v[0] = s1 >= 0; x.src_cpr[0] = 8'(s1 < 0 ? 0 : s1); x.src_rdy[0] = s1r; x.src_val[0] = v1;
    x.src_v[1] = s2 >= 0; x.src_cpr[1] = 8'(s2 < 0 ? 0 : s2); x.src_rdy[1] = s2r; x.src_val[1] = v2;
    x.dst_v = d >= 0; x.dst_cpr = 8'(d < 0 ? 0 : d); x.imm = 20'(imm); x.pc = 10'(d < 0 ? 99 : d);
    x.pred_taken = pt;
    return x;
  endfunction

  logic [CORES-1:0] in_chain_ref [ROB_N];
  task automatic mk_window(int c, logic [63:0] base, logic pred);
    for (int i = 0; i < ROB_N; i++) rob[c][i] = '0;
    rob[c][0] = r(OP_LD, 1, 1, -1, 0, 10, base);
    rob[c][1] = r(OP_MOV, 10, 0, -1, 0, 7);
    rob[c][2] = r(OP_OTHER, 10, 0, -1, 0, 30);
    rob[c][3] = r(OP_LD, 7, 0, -1, 0, 5, 0, 0, 'h18);
    rob[c][4] = r(OP_LD, 7, 0, -1, 0, 13, 0, 0, 'h20);
    rob[c][5] = r(OP_ADD, 13, 0, 18, 1, 20, 0, 64'h8);
    rob[c][6] = r(OP_LD, 20, 0, -1, 0, 21);
    rob[c][7] = r(OP_ADD, 30, 0, 1, 1, 31, 0, base);
    rob[c][8] = r(OP_ADD, 2, 1, 3, 1, 40, 1, 2);
    rob[c][9] = r(OP_BEQ, 21, 0, 21, 0, -1, 0, 0, 0, pred);
    for (int i = 10; i < ROB_N; i++) rob[c][i] = r(OP_ADD, 50, 1, 51, 1, 60 + (i % 150), 3, 4);
  endtask

  // reference: run ROB entries 0..9 that belong to the chain, by core register
  task automatic check_done(int c, logic [63:0] base);
    logic [63:0] cr [256];
    int pos = 0;
    int in_chain [7] = '{0, 1, 3, 4, 5, 6, 9};
    cr[10] = mval(v2p(base));
    cr[7]  = cr[10];
    cr[5]  = mval(v2p(cr[7] + 'h18));
    cr[13] = mval(v2p(cr[7] + 'h20));
    cr[20] = cr[13] + 8;
    cr[21] = mval(v2p(cr[20]));
    chk(done_regmask == 16'b0011_1111, $sformatf("core %0d mask %h", c, done_regmask));
    for (int k = 0; k < 7; k++) begin
      automatic int e = in_chain[k];
      chk(done_rob[k] == 8'(e), $sformatf("core %0d position %0d rob %0d exp %0d", c, k, done_rob[k], e));
      if (k < 6)
        chk(done_regs[k] == cr[done_cpr[k]] && done_cpr[k] == rob[c][e].dst_cpr,
            $sformatf("core %0d C%0d = %h exp %h", c, done_cpr[k], done_regs[k], cr[done_cpr[k]]));
    end
  endtask

  task automatic pte(int core, int vpn);
    @(negedge clk); pte_valid = 1; pte_core = 2'(core); pte_vpn = VPN_W'(vpn);
    pte_ppn = PPN_W'(vpn + 'h1000);
    @(negedge clk); pte_valid = 0;
  endtask

  // counters of the mechanisms
  int n_done = 0, n_tlb_abort = 0, n_wp_abort = 0, n_arb_wait = 0, n_inflight_block = 0;
  int n_dc_hit = 0, n_gen = 0;
  logic [CORES-1:0] busy_q = 0;
  always @(posedge clk) busy_q <= dut.cg_busy;
  always @(posedge clk) if (rst_n) begin
    for (int x = 0; x < 2; x++)
      if (abort_valid[x]) begin if (abort_tlb[x]) n_tlb_abort++; else n_wp_abort++; end
    for (int c = 0; c < CORES; c++) begin
      if (dut.cg_valid[c] && !dut.cg_ready[c]) n_arb_wait++;
      if (start[c] && chain_inflight[c]) n_inflight_block++;
      if (dut.cg_busy[c] && !busy_q[c]) n_gen++;
    end
    if (dut.u_emc.dc_hit_push) n_dc_hit++;
  end

  logic [63:0] base [CORES];
  logic [CORES-1:0] finished;

  // wait for each core to end with done or abort; check done results
  task automatic serve(logic [CORES-1:0] expect_core, int limit);
    finished = '0;
    for (int t = 0; t < limit && (finished & expect_core) != expect_core; t++) begin
      @(negedge clk);
      if (done_valid) begin
        check_done(int'(done_core), base[done_core]);
        finished[done_core] = 1;
        n_done++;
        done_ready = 1;
      end else done_ready = 0;
      for (int x = 0; x < 2; x++) if (abort_valid[x]) finished[abort_core[x]] = 1;
    end
    @(negedge clk); done_ready = 0;
  endtask

  initial begin
    for (int c = 0; c < CORES; c++) for (int i = 0; i < ROB_N; i++) rob[c][i] = '0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int v = 'h400; v < 'h420; v++) begin pte(0, v); pte(1, v); pte(3, v); end
    // dependent-miss counters
    for (int k = 0; k < 2; k++) begin
      @(negedge clk); train_valid = '1; train_dep = '1;
    end
    @(negedge clk); train_valid = 0;
    for (int c = 0; c < CORES; c++) begin
      base[c] = 64'h400100 + 64'(c) * 64'h2340;
      mk_window(c, base[c], c != 3);     // core 3: branch predicted not taken, is taken
    end
    @(negedge clk); start = '1;
    @(negedge clk); start = 0;
    serve(4'b1111, 3000);
    chk(finished == 4'b1111, $sformatf("all cores resolved %b", finished));
    chk(n_tlb_abort == 1 && n_wp_abort == 1, $sformatf("aborts tlb %0d wp %0d", n_tlb_abort, n_wp_abort));
    chk(n_done == 2, $sformatf("two chains completed (%0d)", n_done));
    // core 2: supply the missing pages, run again; core 1 start while in flight is ignored
    for (int v = 'h400; v < 'h420; v++) pte(2, v);
    @(negedge clk); start[2] = 1;
    @(negedge clk); start[2] = 0;
    repeat (8) @(negedge clk);
    start[2] = 1;                 // chain of core 2 is in flight: ignored
    @(negedge clk); start[2] = 0;
    serve(4'b0100, 3000);
    chk(n_done == 3, "core 2 completes after the page is supplied");
    // repeated chain of core 0: data cache hits
    @(negedge clk); start[0] = 1;
    @(negedge clk); start[0] = 0;
    serve(4'b0001, 3000);
    chk(n_dc_hit > 0, $sformatf("data cache hits %0d", n_dc_hit));
    // new windows: the miss predictor sends requests straight to DRAM
    for (int round = 0; round < 4; round++) begin
      for (int c = 0; c < 2; c++) begin
        base[c] = 64'h408000 + 64'(round) * 64'h3000 + 64'(c) * 64'h1100;
        mk_window(c, base[c], 1);
      end
      @(negedge clk); start[1:0] = 2'b11;
      @(negedge clk); start = 0;
      serve(4'b0011, 3000);
    end
    chk(n_req_dram > 0, $sformatf("requests sent directly to DRAM %0d", n_req_dram));
    chk(n_gen > 0 && n_arb_wait > 0 && n_inflight_block > 0,
        $sformatf("generated %0d arbitration waits %0d in-flight blocks %0d", n_gen, n_arb_wait, n_inflight_block));
    $display("tb_emc_system: chains generated %0d done %0d aborts tlb %0d wp %0d, arb waits %0d, in-flight blocks %0d, dcache hits %0d, requests %0d (to DRAM %0d)",
             n_gen, n_done, n_tlb_abort, n_wp_abort, n_arb_wait, n_inflight_block, n_dc_hit, n_req, n_req_dram);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
