// emc: the compute engine of the enhanced memory controller (EMC).
//
// The home cores ship short chains of integer uops that depend on an
// outstanding cache miss; the EMC executes them next to DRAM, so a dependent
// miss is issued without the source data first travelling back to the core.
// Structure (all submodules are separate blocks):
//   emc_contexts  uop buffers, live-in vectors and private PRFs; round-robin
//                 dispatch of one uop per cycle
//   emc_rs        8-entry reservation station, wakeup from two result buses
//   emc_alu x2    two-wide integer back end; port 0 also computes addresses
//   memory unit   (here) TLB translation, LSQ, data cache, miss handling
//   emc_tlb, emc_lsq, emc_dcache, emc_miss_pred
// Timing: an integer uop issued in cycle t broadcasts its result on CDB 0/1 in
// t+1. A load issued in t is translated and checked against the LSQ in t+1
// (stage M0), reads the data cache in t+1..t+3, and on a hit broadcasts in
// t+4 or later through a small result queue that owns CDB 1 whenever it is not
// empty (port 1 then issues nothing). A data cache miss takes a miss status
// holding register (MSHR) and sends a line request: straight to DRAM if the
// miss predictor says the load will miss in the last level cache, otherwise to
// the LLC. The returned line is installed and the load completes.
// A store writes the LSQ. Every load and store also sends a notice to the home
// core (note_*) so the core can fill its own LSQ entry and check ordering.
// A wrong-path branch or a TLB miss halts the chain (abort_*); the core then
// re-executes it. A chain whose uops have all completed returns its live-out
// registers and its stores to the core (done_*).
// Counts (2 contexts, 8 RS entries, 2 ALUs, 32-entry TLB per core, 64-line
// 4-way 2-cycle cache, 3-bit miss counters) follow the document. One memory
// access issued per cycle, MSHRS outstanding misses, the result queue and the
// port and bus assignment are this design's choices.
// Assertions at the end check that the result queue never overflows and that
// mreq_valid and done_valid stay up until taken.
// Their disable-iff on rst_n makes lint report rst_n as used both
// synchronously and asynchronously (SYNCASYNCNET); that use is the
// assertions' enable only, no flop is reset synchronously.
module emc
  import emc_pkg::*;
#(
  parameter int unsigned CORES      = 4,
  parameter int unsigned RS_ENTRIES = 8,
  parameter int unsigned TLB_ENTRIES = 32,
  parameter int unsigned DC_LINES   = 64,
  parameter int unsigned DC_WAYS    = 4,
  parameter int unsigned MP_ENTRIES = 256,
  parameter int unsigned MSHRS      = 4,
  localparam int unsigned CW        = $clog2(CORES),
  localparam int unsigned MW        = $clog2(MSHRS)
) (
  input  logic                          clk,
  input  logic                          rst_n,
  // chain from a core
  input  logic                          chain_valid,
  output logic                          chain_ready,
  input  logic [CW-1:0]                 chain_core,
  input  logic [SLOT_W:0]               chain_len,
  input  emc_uop_t [CHAIN_LEN-1:0]      chain_uops,
  input  logic [LIVEIN_N-1:0][XLEN-1:0] chain_livein,
  // page table entries and shootdowns from the cores
  input  logic                          pte_valid,
  input  logic [CW-1:0]                 pte_core,
  input  logic [VPN_W-1:0]              pte_vpn,
  input  logic [PPN_W-1:0]              pte_ppn,
  input  logic                          shoot_valid,
  input  logic [CW-1:0]                 shoot_core,
  input  logic [VPN_W-1:0]              shoot_vpn,
  // line requests of EMC misses, to the LLC or directly to DRAM
  output logic                          mreq_valid,
  input  logic                          mreq_ready,
  output logic [LADDR_W-1:0]            mreq_laddr,
  output logic [MW-1:0]                 mreq_tag,
  output logic                          mreq_dram,
  output logic [CW-1:0]                 mreq_core,
  input  logic                          mfill_valid,
  input  logic [MW-1:0]                 mfill_tag,
  input  logic [LINE_W-1:0]             mfill_data,
  input  logic                          mfill_llc_miss,
  // every line the memory controller receives from DRAM
  input  logic                          dline_valid,
  input  logic [LADDR_W-1:0]            dline_laddr,
  input  logic [LINE_W-1:0]             dline_data,
  // coherence: the LLC takes a line back
  input  logic                          dinv_valid,
  input  logic [LADDR_W-1:0]            dinv_laddr,
  // notice of each EMC load/store to its home core
  output logic                          note_valid,
  output logic [CW-1:0]                 note_core,
  output logic [SLOT_W-1:0]             note_slot,
  output logic                          note_store,
  output logic [PA_W-1:0]               note_addr,
  output logic [XLEN-1:0]               note_data,
  // halted chains
  output logic [NUM_CTX-1:0]            abort_valid,
  output logic [NUM_CTX-1:0]            abort_tlb,   // 1: TLB miss, 0: wrong path
  output logic [NUM_CTX-1:0][CW-1:0]    abort_core,
  // completed chains: live-out registers and stores
  output logic                          done_valid,
  input  logic                          done_ready,
  output logic [CW-1:0]                 done_core,
  output logic [CHAIN_LEN-1:0][XLEN-1:0] done_regs,
  output logic [CHAIN_LEN-1:0]          done_regmask,
  output logic [CHAIN_LEN-1:0]          done_stmask,
  output logic [CHAIN_LEN-1:0][PA_W-1:0] done_staddr,
  output logic [CHAIN_LEN-1:0][XLEN-1:0] done_stdata
);
  localparam int unsigned RQ_DEPTH = 8;
  localparam int unsigned RQW      = $clog2(RQ_DEPTH);

  // ---------------------------------------------------------------- front end
  emc_cdb_t [1:0]              cdb;
  logic [2:0]                  cmp_valid;
  logic [2:0][CTX_W-1:0]       cmp_ctx;
  logic [2:0][SLOT_W-1:0]      cmp_slot;
  logic [NUM_CTX-1:0]          halt, mem_busy, ctx_run;
  logic [NUM_CTX-1:0][CW-1:0]  ctx_core;
  logic [NUM_CTX-1:0][CHAIN_LEN-1:0] st_pend;
  logic                        disp_valid, disp_ready;
  emc_disp_t                   disp;
  logic [CTX_W-1:0]            ld_ctx, done_ctx;

  emc_contexts #(.CORES(CORES)) u_ctx (
    .clk, .rst_n,
    .ld_valid(chain_valid), .ld_ready(chain_ready), .ld_core(chain_core),
    .ld_len(chain_len), .ld_uops(chain_uops), .ld_livein(chain_livein), .ld_ctx,
    .disp_valid, .disp_ready, .disp,
    .cdb, .cmp_valid, .cmp_ctx, .cmp_slot,
    .halt, .mem_busy, .ctx_run, .ctx_core, .st_pend,
    .done_valid, .done_ready, .done_ctx, .done_core, .done_regs, .done_regmask
  );

  // ---------------------------------------------------------------- issue
  logic       mem_ok, p1_ok;
  logic       iss0_valid, iss1_valid;
  emc_disp_t  iss0, iss1;

  emc_rs #(.ENTRIES(RS_ENTRIES)) u_rs (
    .clk, .rst_n, .disp_valid, .disp_ready, .disp, .cdb,
    .mem_ok, .p1_ok, .iss0_valid, .iss0, .iss1_valid, .iss1,
    .flush(halt), .st_pend, .occupancy()
  );

  logic [XLEN-1:0] res0, res1;
  logic            tk0, tk1, mp0, mp1;
  emc_alu u_alu0 (.uop(iss0.uop), .a(iss0.s1_val), .b(iss0.s2_val),
                  .result(res0), .taken(tk0), .mispredict(mp0));
  emc_alu u_alu1 (.uop(iss1.uop), .a(iss1.s1_val), .b(iss1.s2_val),
                  .result(res1), .taken(tk1), .mispredict(mp1));

  // ---------------------------------------------------------------- execute stage registers
  typedef struct packed {
    logic             valid;
    logic [CTX_W-1:0] ctx;
    logic [SLOT_W-1:0] slot;
    logic             wreg;
    logic             br;
    logic             misp;
    logic [XLEN-1:0]  data;
  } ex_t;

  typedef struct packed {
    logic              valid;
    logic [CTX_W-1:0]  ctx;
    logic [SLOT_W-1:0] slot;
    logic              store;
    logic [PCH_W-1:0]  pc;
    logic [VA_W-1:0]   va;
    logic [XLEN-1:0]   stdata;
  } m0_t;

  typedef struct packed {
    logic              valid;
    logic [CTX_W-1:0]  ctx;
    logic [SLOT_W-1:0] slot;
    logic [XLEN-1:0]   data;
  } rq_t;

  ex_t ex0, ex1;
  m0_t m0;
  rq_t rq_head_pop;          // result popped from the queue for CDB 1

  // ---------------------------------------------------------------- memory unit, stage M0
  logic            tlb_hit;
  logic [PPN_W-1:0] tlb_ppn;
  logic [PA_W-1:0] m0_pa;
  logic            fwd_hit;
  logic [XLEN-1:0] fwd_data;
  logic            dc_rd_ready;
  logic            m0_go, m0_stall, m0_tlbmiss;

  emc_tlb #(.CORES(CORES), .ENTRIES(TLB_ENTRIES)) u_tlb (
    .clk, .rst_n,
    .fill_valid(pte_valid), .fill_core(pte_core), .fill_vpn(pte_vpn), .fill_ppn(pte_ppn),
    .inv_valid(shoot_valid), .inv_core(shoot_core), .inv_vpn(shoot_vpn),
    .lk_core(ctx_core[m0.ctx]), .lk_vpn(m0.va[VA_W-1:PAGE_W]),
    .lk_hit(tlb_hit), .lk_ppn(tlb_ppn)
  );
  assign m0_pa = {tlb_ppn, m0.va[PAGE_W-1:0]};

  logic [NUM_CTX-1:0][CHAIN_LEN-1:0]            lsq_v;
  logic [NUM_CTX-1:0][CHAIN_LEN-1:0][PA_W-1:0]  lsq_a;
  logic [NUM_CTX-1:0][CHAIN_LEN-1:0][XLEN-1:0]  lsq_d;

  emc_lsq u_lsq (
    .clk, .rst_n,
    .clr_valid(chain_valid && chain_ready), .clr_ctx(ld_ctx),
    .wr_valid(m0.valid && m0.store && tlb_hit && ctx_run[m0.ctx]),
    .wr_ctx(m0.ctx), .wr_slot(m0.slot), .wr_addr(m0_pa), .wr_data(m0.stdata),
    .ld_ctx(m0.ctx), .ld_slot(m0.slot), .ld_addr(m0_pa),
    .fwd_hit, .fwd_data,
    .st_valid(lsq_v), .st_addr(lsq_a), .st_data(lsq_d)
  );

  assign m0_tlbmiss = m0.valid && !tlb_hit;
  // a load that reaches the cache needs its port
  assign m0_stall = m0.valid && tlb_hit && !m0.store && !fwd_hit && !dc_rd_ready;
  assign m0_go    = m0.valid && !m0_stall;

  // ---------------------------------------------------------------- data cache
  logic             dc_rsp_valid, dc_rsp_hit;
  logic [XLEN-1:0]  dc_rsp_data;
  logic [PA_W-1:0]  dc_rsp_addr;
  logic [CTX_W+SLOT_W+PCH_W-1:0] dc_rsp_tag;
  logic             dc_fill_valid;
  logic [LADDR_W-1:0] dc_fill_laddr;
  logic [LINE_W-1:0]  dc_fill_data;

  emc_dcache #(.LINES(DC_LINES), .WAYS(DC_WAYS), .TAGW(CTX_W+SLOT_W+PCH_W)) u_dc (
    .clk, .rst_n,
    .rd_valid(m0.valid && tlb_hit && !m0.store && !fwd_hit && ctx_run[m0.ctx]),
    .rd_ready(dc_rd_ready), .rd_addr(m0_pa), .rd_tag({m0.ctx, m0.slot, m0.pc}),
    .rsp_valid(dc_rsp_valid), .rsp_hit(dc_rsp_hit), .rsp_data(dc_rsp_data),
    .rsp_tag(dc_rsp_tag), .rsp_addr(dc_rsp_addr),
    .fill_valid(dc_fill_valid), .fill_laddr(dc_fill_laddr), .fill_data(dc_fill_data),
    .inv_valid(dinv_valid), .inv_laddr(dinv_laddr)
  );

  // loads between M0 and the cache response
  logic [1:0]       dpipe_v;
  logic [1:0][CTX_W-1:0] dpipe_ctx;

  // ---------------------------------------------------------------- MSHRs
  typedef struct packed {
    logic              valid;
    logic              sent;
    logic [CTX_W-1:0]  ctx;
    logic [SLOT_W-1:0] slot;
    logic [PCH_W-1:0]  pc;
    logic [CW-1:0]     core;
    logic [PA_W-1:0]   addr;
  } mshr_t;

  mshr_t [MSHRS-1:0] mshr;
  logic              ms_free_found, ms_send_found;
  logic [MW-1:0]     ms_free, ms_send;
  always_comb begin
    ms_free_found = 1'b0; ms_free = '0;
    ms_send_found = 1'b0; ms_send = '0;
    for (int i = 0; i < MSHRS; i++) begin
      if (!ms_free_found && !mshr[i].valid) begin ms_free_found = 1'b1; ms_free = MW'(i); end
      if (!ms_send_found && mshr[i].valid && !mshr[i].sent) begin
        ms_send_found = 1'b1; ms_send = MW'(i);
      end
    end
  end

  logic pred_miss;
  emc_miss_pred #(.CORES(CORES), .ENTRIES(MP_ENTRIES)) u_mp (
    .clk, .rst_n,
    .pd_core(mshr[ms_send].core), .pd_pc(mshr[ms_send].pc), .pd_miss(pred_miss),
    .tr_valid(mfill_valid && mshr[mfill_tag].valid),
    .tr_core(mshr[mfill_tag].core), .tr_pc(mshr[mfill_tag].pc), .tr_miss(mfill_llc_miss)
  );

  assign mreq_valid = ms_send_found;
  assign mreq_laddr = mshr[ms_send].addr[PA_W-1:OFF_W];
  assign mreq_tag   = ms_send;
  assign mreq_dram  = pred_miss;
  assign mreq_core  = mshr[ms_send].core;

  // data cache installs: EMC fills first, then lines observed from DRAM
  assign dc_fill_valid = mfill_valid || dline_valid;
  assign dc_fill_laddr = mfill_valid ? mshr[mfill_tag].addr[PA_W-1:OFF_W] : dline_laddr;
  assign dc_fill_data  = mfill_valid ? mfill_data : dline_data;

  logic [XLEN-1:0] fill_word;
  assign fill_word = mfill_data[mshr[mfill_tag].addr[OFF_W-1:3]*XLEN +: XLEN];

  // ---------------------------------------------------------------- result queue
  rq_t [RQ_DEPTH-1:0] rq;
  logic [RQW:0]       rq_cnt;
  logic [RQW-1:0]     rq_rd, rq_wr;

  logic m0_ld_fwd, dc_hit_push, fill_push;
  assign m0_ld_fwd   = m0_go && tlb_hit && !m0.store && fwd_hit;
  assign dc_hit_push = dc_rsp_valid && dc_rsp_hit;
  assign fill_push   = mfill_valid && mshr[mfill_tag].valid;

  // Credit: every load that may still need a queue slot or an MSHR.
  int unsigned loads_in_flight, mshr_used;
  always_comb begin
    loads_in_flight = int'(m0.valid) + int'(dpipe_v[0]) + int'(dpipe_v[1]);
    mshr_used = 0;
    for (int i = 0; i < MSHRS; i++) mshr_used += int'(mshr[i].valid);
  end
  assign mem_ok = !m0_stall &&
                  (int'(rq_cnt) + loads_in_flight + mshr_used + 2 <= RQ_DEPTH) &&
                  (mshr_used + loads_in_flight + 1 <= MSHRS);
  assign p1_ok  = rq_cnt == 0;

  // ---------------------------------------------------------------- busy / halt
  always_comb begin
    for (int c = 0; c < NUM_CTX; c++) begin
      mem_busy[c] = (m0.valid && m0.ctx == CTX_W'(c)) ||
                    (ex0.valid && ex0.ctx == CTX_W'(c)) ||
                    (ex1.valid && ex1.ctx == CTX_W'(c)) ||
                    (rq_head_pop.valid && rq_head_pop.ctx == CTX_W'(c));
      for (int k = 0; k < 2; k++)
        if (dpipe_v[k] && dpipe_ctx[k] == CTX_W'(c)) mem_busy[c] = 1'b1;
      for (int i = 0; i < MSHRS; i++)
        if (mshr[i].valid && mshr[i].ctx == CTX_W'(c)) mem_busy[c] = 1'b1;
      for (int i = 0; i < RQ_DEPTH; i++)
        if ({1'b0, RQW'(RQW'(i) - rq_rd)} < rq_cnt)
          if (rq[i].ctx == CTX_W'(c)) mem_busy[c] = 1'b1;
    end
  end

  always_comb begin
    halt      = '0;
    abort_tlb = '0;
    if (ex0.valid && ex0.br && ex0.misp && ctx_run[ex0.ctx]) halt[ex0.ctx] = 1'b1;
    if (ex1.valid && ex1.br && ex1.misp && ctx_run[ex1.ctx]) halt[ex1.ctx] = 1'b1;
    if (m0_tlbmiss && ctx_run[m0.ctx]) begin
      halt[m0.ctx]      = 1'b1;
      abort_tlb[m0.ctx] = 1'b1;
    end
  end
  assign abort_valid = halt;
  assign abort_core = ctx_core;

  // ---------------------------------------------------------------- result buses and completion
  always_comb begin
    cdb[0] = '{valid: ex0.valid && ex0.wreg, ctx: ex0.ctx, slot: ex0.slot, data: ex0.data};
    if (ex1.valid)
      cdb[1] = '{valid: ex1.wreg, ctx: ex1.ctx, slot: ex1.slot, data: ex1.data};
    else
      cdb[1] = '{valid: rq_head_pop.valid, ctx: rq_head_pop.ctx, slot: rq_head_pop.slot,
                 data: rq_head_pop.data};
    cmp_valid[0] = ex0.valid && !(ex0.br && ex0.misp);
    cmp_ctx[0]   = ex0.ctx;  cmp_slot[0] = ex0.slot;
    cmp_valid[1] = ex1.valid ? !(ex1.br && ex1.misp) : rq_head_pop.valid;
    cmp_ctx[1]   = ex1.valid ? ex1.ctx  : rq_head_pop.ctx;
    cmp_slot[1]  = ex1.valid ? ex1.slot : rq_head_pop.slot;
    cmp_valid[2] = m0_go && m0.store && tlb_hit;
    cmp_ctx[2]   = m0.ctx;   cmp_slot[2] = m0.slot;
  end

  // notice to the home core
  assign note_valid = m0_go && tlb_hit && ctx_run[m0.ctx];
  assign note_core  = ctx_core[m0.ctx];
  assign note_slot  = m0.slot;
  assign note_store = m0.store;
  assign note_addr  = m0_pa;
  assign note_data  = m0.stdata;

  // live-outs
  always_comb begin
    for (int i = 0; i < CHAIN_LEN; i++) begin
      done_stmask[i] = lsq_v[done_ctx][i];
      done_staddr[i] = lsq_a[done_ctx][i];
      done_stdata[i] = lsq_d[done_ctx][i];
    end
  end

  // ---------------------------------------------------------------- sequential
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      ex0 <= '0; ex1 <= '0; m0 <= '0; rq_head_pop <= '0;
      dpipe_v <= '0; dpipe_ctx <= '0;
      mshr <= '0; rq <= '0; rq_cnt <= '0; rq_rd <= '0; rq_wr <= '0;
    end else begin
      // ALU port 0: integer uops and branches; memory uops go to M0
      ex0 <= '0;
      if (iss0_valid && !is_mem(iss0.uop.op))
        ex0 <= '{valid: 1'b1, ctx: iss0.ctx, slot: iss0.slot, wreg: writes_reg(iss0.uop.op),
                 br: is_branch(iss0.uop.op), misp: mp0, data: res0};
      ex1 <= '0;
      if (iss1_valid)
        ex1 <= '{valid: 1'b1, ctx: iss1.ctx, slot: iss1.slot, wreg: writes_reg(iss1.uop.op),
                 br: is_branch(iss1.uop.op), misp: mp1, data: res1};

      // M0
      if (m0_go || m0_tlbmiss) m0 <= '0;
      if (iss0_valid && is_mem(iss0.uop.op))
        m0 <= '{valid: 1'b1, ctx: iss0.ctx, slot: iss0.slot, store: iss0.uop.op == OP_ST,
                pc: iss0.uop.pc, va: res0[VA_W-1:0], stdata: iss0.s2_val};

      // cache pipe tracking
      dpipe_v[0]   <= m0_go && tlb_hit && !m0.store && !fwd_hit && ctx_run[m0.ctx];
      dpipe_ctx[0] <= m0.ctx;
      dpipe_v[1]   <= dpipe_v[0];
      dpipe_ctx[1] <= dpipe_ctx[0];

      // MSHR allocate on a cache miss, send, and release on fill
      if (dc_rsp_valid && !dc_rsp_hit)
        mshr[ms_free] <= '{valid: 1'b1, sent: 1'b0,
                           ctx: dc_rsp_tag[SLOT_W+PCH_W +: CTX_W],
                           slot: dc_rsp_tag[PCH_W +: SLOT_W], pc: dc_rsp_tag[PCH_W-1:0],
                           core: ctx_core[dc_rsp_tag[SLOT_W+PCH_W +: CTX_W]],
                           addr: dc_rsp_addr};
      if (mreq_valid && mreq_ready) mshr[ms_send].sent <= 1'b1;
      if (fill_push) mshr[mfill_tag].valid <= 1'b0;

      // result queue: up to three pushes (forward, cache hit, fill), one pop
      begin
        automatic logic [RQW-1:0] wp = rq_wr;
        automatic logic [RQW:0]   cnt = rq_cnt;
        if (m0_ld_fwd) begin
          rq[wp] <= '{valid: 1'b1, ctx: m0.ctx, slot: m0.slot, data: fwd_data};
          wp++; cnt++;
        end
        if (dc_hit_push) begin
          rq[wp] <= '{valid: 1'b1, ctx: dc_rsp_tag[SLOT_W+PCH_W +: CTX_W],
                      slot: dc_rsp_tag[PCH_W +: SLOT_W], data: dc_rsp_data};
          wp++; cnt++;
        end
        if (fill_push) begin
          rq[wp] <= '{valid: 1'b1, ctx: mshr[mfill_tag].ctx, slot: mshr[mfill_tag].slot,
                      data: fill_word};
          wp++; cnt++;
        end
        rq_head_pop <= '0;
        if (rq_cnt != 0) begin
          rq_head_pop <= rq[rq_rd];
          rq_rd <= rq_rd + 1'b1;
          cnt--;
        end
        rq_wr  <= wp;
        rq_cnt <= cnt;
      end
    end
  end

  // Bookkeeping and handshake rules, checked in simulation.
  a_rq_bound:  assert property (@(posedge clk) disable iff (!rst_n) rq_cnt <= (RQW+1)'(RQ_DEPTH));
  a_mreq_hold: assert property (@(posedge clk) disable iff (!rst_n) mreq_valid && !mreq_ready |=> mreq_valid);
  a_done_hold: assert property (@(posedge clk) disable iff (!rst_n) done_valid && !done_ready |=> done_valid);

endmodule
