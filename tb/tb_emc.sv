// tb_emc: self-checking test of the EMC compute engine with a memory model.
// The model answers each line request after MEM_LAT cycles with line contents
// computed from the address (every word is a pointer into the mapped region,
// so chains can chase pointers) and reports an LLC miss for every line.
// Chains are built here and executed by an in-order reference model of the
// same uop semantics (including store-to-load forwarding); the live-out
// registers and stores the engine returns must match it. Covered: data cache
// misses and hits, a line installed from the DRAM return path, store-to-load
// forwarding, a correct and a wrong-path branch, a TLB miss, both contexts in
// use with a third chain waiting, the miss predictor switching requests to
// DRAM, and the latency of a chain whose loads all hit.
module tb_emc;
  import emc_pkg::*;
  localparam int MEM_LAT = 20;
  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic chain_valid = 0, chain_ready;
  logic [1:0] chain_core = 0;
  logic [4:0] chain_len = 0;
  emc_uop_t [15:0] chain_uops = '0;
  logic [15:0][63:0] chain_livein = '0;
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
  logic [15:0][PA_W-1:0] done_staddr;

  emc dut (.*);

  // ------------------------------------------------------------ memory model
  function automatic logic [PA_W-1:0] v2p(logic [63:0] va);
    return {PPN_W'(va[VA_W-1:12] + 36'h1000), va[11:0]};
  endfunction
  function automatic logic [63:0] mval(logic [PA_W-1:0] pa);
    logic [63:0] h = {24'd0, pa[PA_W-1:3], 3'b0} * 64'h9E3779B1;
    return 64'h400000 + {44'd0, h[19:3], 3'b000} % 64'h20000;
  endfunction
  function automatic logic [LINE_W-1:0] mline(logic [LADDR_W-1:0] la);
    logic [LINE_W-1:0] l;
    for (int w = 0; w < 8; w++) l[w*64 +: 64] = mval({la, 3'(w), 3'b0});
    return l;
  endfunction

  typedef struct { int due; logic [1:0] tag; logic [LADDR_W-1:0] la; } pend_t;
  pend_t pend[$];
  int cyc = 0, n_req = 0, n_req_dram = 0, n_note = 0, n_store_note = 0;
  always @(posedge clk) begin
    cyc <= cyc + 1;
    if (mreq_valid) begin
      pend.push_back('{cyc + MEM_LAT, mreq_tag, mreq_laddr});
      n_req++;
      if (mreq_dram) n_req_dram++;
    end
    if (note_valid) begin n_note++; if (note_store) n_store_note++; end
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
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic chk(logic cond, string msg);
    checks++;
    if (!cond) begin failures++; $display("FAIL %s t=%0t", msg, $time); end
  endtask

  // ------------------------------------------------------------ chains
  typedef struct {
    emc_uop_t [15:0] u;
    logic [15:0][63:0] li;
    int n;
  } chain_t;

  function automatic emc_src_t E(int i); return '{1'b1, 1'b0, 4'(i)}; endfunction
  function automatic emc_src_t L(int i); return '{1'b1, 1'b1, 4'(i)}; endfunction
  function automatic emc_uop_t U(emc_op_e op, emc_src_t a, emc_src_t b, int imm = 0,
                                 logic pt = 0, int pc = 0);
    emc_uop_t x = '0;
    x.op = op; x.src1 = a; x.src2 = b; x.imm = 20'(imm); x.pred_taken = pt; x.pc = 10'(pc);
    return x;
  endfunction

  // reference execution
  task automatic ref_exec(chain_t c, output logic [15:0][63:0] regs, output logic [15:0] rmask,
                          output logic [15:0] smask, output logic [15:0][PA_W-1:0] sa,
                          output logic [15:0][63:0] sd);
    regs = '0; rmask = '0; smask = '0; sa = '0; sd = '0;
    for (int i = 0; i < c.n; i++) begin
      logic [63:0] a, b, imm;
      a = c.u[i].src1.livein ? c.li[c.u[i].src1.idx] : regs[c.u[i].src1.idx];
      b = c.u[i].src2.livein ? c.li[c.u[i].src2.idx] : regs[c.u[i].src2.idx];
      imm = 64'($signed(c.u[i].imm));
      case (c.u[i].op)
        OP_ADD: regs[i] = a + (c.u[i].src2.valid ? b : imm);
        OP_XOR: regs[i] = a ^ (c.u[i].src2.valid ? b : imm);
        OP_AND: regs[i] = a & (c.u[i].src2.valid ? b : imm);
        OP_SHL: regs[i] = a << (c.u[i].src2.valid ? b[5:0] : imm[5:0]);
        OP_SEXT: regs[i] = 64'($signed(a[15:0]));
        OP_LD: begin
          logic [PA_W-1:0] pa = v2p(a + (c.u[i].src2.valid ? b : 0) + imm);
          regs[i] = mval(pa);
          for (int j = 0; j < i; j++)
            if (smask[j] && sa[j][PA_W-1:3] == pa[PA_W-1:3]) regs[i] = sd[j];
        end
        OP_ST: begin smask[i] = 1; sa[i] = v2p(a + imm); sd[i] = b; end
        default: ;
      endcase
      rmask[i] = writes_reg(c.u[i].op);
    end
  endtask

  task automatic send(chain_t c, int core);
    @(negedge clk);
    chain_valid = 1; chain_core = 2'(core); chain_len = 5'(c.n);
    chain_uops = c.u; chain_livein = c.li;
    #1;
    while (!chain_ready) begin @(negedge clk); #1; end
    @(negedge clk); chain_valid = 0;
  endtask

  // wait for the chain of 'core' to finish; check it against the reference
  task automatic collect(chain_t c, int core, output int lat);
    logic [15:0][63:0] regs, sd;
    logic [15:0] rmask, smask;
    logic [15:0][PA_W-1:0] sa;
    lat = 0;
    ref_exec(c, regs, rmask, smask, sa, sd);
    while (!(done_valid && done_core == 2'(core)) && lat < 2000) begin @(negedge clk); lat++; end
    chk(done_valid, $sformatf("chain of core %0d completes", core));
    chk(done_regmask == rmask, $sformatf("core %0d live-out mask %h exp %h", core, done_regmask, rmask));
    for (int i = 0; i < c.n; i++)
      if (rmask[i]) chk(done_regs[i] == regs[i],
                        $sformatf("core %0d E%0d = %h exp %h", core, i, done_regs[i], regs[i]));
    chk(done_stmask == smask, "store mask");
    for (int i = 0; i < c.n; i++)
      if (smask[i]) chk(done_staddr[i] == sa[i] && done_stdata[i] == sd[i], "store addr/data");
    done_ready = 1; @(negedge clk); done_ready = 0;
  endtask

  task automatic pte(int core, int vpn);
    @(negedge clk); pte_valid = 1; pte_core = 2'(core); pte_vpn = VPN_W'(vpn);
    pte_ppn = PPN_W'(vpn + 'h1000);
    @(negedge clk); pte_valid = 0;
  endtask

  int n_tlb_abort = 0, n_wp_abort = 0, ctx_full = 0, n_dc_hit = 0, n_fwd = 0;
  always @(posedge clk) begin
    for (int x = 0; x < 2; x++)
      if (rst_n && abort_valid[x]) begin
        if (abort_tlb[x]) n_tlb_abort++; else n_wp_abort++;

      end
    if (chain_valid && !chain_ready) ctx_full++;
    if (dut.dc_hit_push) n_dc_hit++;
    if (dut.m0_ld_fwd) n_fwd++;
  end

  initial begin
    chain_t a, b, w, t, h;
    int lat, req0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int v = 'h400; v < 'h420; v++) begin pte(1, v); pte(2, v); end

    // chain A: pointer chase with store forwarding and a correct branch
    a.u = '0; a.li = '0; a.n = 9;
    a.li[0] = 64'h400100; a.li[1] = 64'h30;
    a.u[0] = U(OP_LD, L(0), '0, 0, 0, 5);
    a.u[1] = U(OP_LD, E(0), '0, 8, 0, 6);
    a.u[2] = U(OP_ADD, E(1), L(1));
    a.u[3] = U(OP_ST, E(0), E(2), 16);
    a.u[4] = U(OP_LD, E(0), '0, 16, 0, 7);
    a.u[5] = U(OP_BEQ, E(4), E(2), 0, 1);
    a.u[6] = U(OP_XOR, E(1), '0, 'h7);
    a.u[7] = U(OP_LD, E(1), '0, 0, 0, 8);
    a.u[8] = U(OP_SEXT, E(7), '0, 1);
    // chain W: wrong-path branch (predicted taken, is not)
    w = a; w.n = 6; w.li[0] = 64'h400800;
    w.u[5] = U(OP_BNE, E(4), E(2), 0, 1);
    // chain T: page not in the TLB
    t = a; t.n = 3; t.li[0] = 64'h900000;

    send(a, 1);
    send(w, 2);
    send(t, 3);             // waits for a free context
    collect(a, 1, lat);
    repeat (60) @(negedge clk);
    chk(n_wp_abort == 1 && n_tlb_abort == 1, $sformatf("aborts wp %0d tlb %0d", n_wp_abort, n_tlb_abort));
    chk(ctx_full > 0, "third chain waited for a context");
    chk(n_fwd >= 1, "store-to-load forwarding");
    chk(n_store_note >= 1 && n_note >= 6, $sformatf("notices to core %0d", n_note));

    // chain A again: its lines are now in the data cache, no memory request
    req0 = n_req;
    send(a, 1);
    collect(a, 1, lat);
    chk(n_req == req0, $sformatf("repeat chain served from the data cache (%0d requests)", n_req - req0));
    chk(n_dc_hit >= 3, $sformatf("data cache hits %0d", n_dc_hit));
    // four dependent all-hit loads and forward: bounded latency
    chk(lat < 40, $sformatf("all-hit chain latency %0d cycles", lat));

    // line installed from the DRAM return path before it is needed
    h.u = '0; h.li = '0; h.n = 1; h.li[0] = 64'h40A040;
    h.u[0] = U(OP_LD, L(0), '0, 0, 0, 9);
    @(negedge clk); dline_valid = 1; dline_laddr = v2p(64'h40A040)[PA_W-1:6];
    dline_data = mline(dline_laddr);
    @(negedge clk); dline_valid = 0;
    req0 = n_req;
    send(h, 2);
    collect(h, 2, lat);
    chk(n_req == req0, "observed DRAM line hit");

    // miss predictor: repeated LLC misses from one PC go straight to DRAM
    for (int k = 0; k < 6; k++) begin
      h.li[0] = 64'h410000 + 64'(k) * 64'h1000 + 64'h40;
      h.u[0] = U(OP_LD, L(0), '0, 0, 0, 77);
      send(h, 1);
      collect(h, 1, lat);
    end
    chk(n_req_dram >= 1, $sformatf("requests sent directly to DRAM: %0d", n_req_dram));
    $display("tb_emc: requests %0d (dram %0d) hits %0d fwd %0d aborts wp %0d tlb %0d",
             n_req, n_req_dram, n_dc_hit, n_fwd, n_wp_abort, n_tlb_abort);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
