// emc_system: a quad-core chip's dependence chain offload to an enhanced,
// compute capable memory controller.
//
// Each core has a chain generation unit (emc_chain_gen). When a core's ROB is
// full behind a last level cache miss and its predictor expects a dependent
// miss, the unit extracts the uops that depend on that miss and ships them,
// with their live-in values, to the EMC compute engine (emc) that sits at the
// memory controller. A round-robin arbiter picks among the cores that have a
// chain ready whenever the engine has a free context. Each core keeps at most
// one chain in flight: its unit does not start a new one until the engine has
// returned the previous chain's live-outs or halted it.
// Live-outs return with the core registers they belong to (done_cpr) and the
// ROB entries to mark complete (done_rob). The core pipelines, the on-chip
// ring, the last level cache and the DRAM scheduler are outside this module:
// their connections are the ports below (rob windows and training in, memory
// requests and fills, page table entries, notices, halts and live-outs).
// Four cores, two contexts, one chain generator per core follow the document;
// the arbiter and the one-chain-per-core rule are this design's choices.
module emc_system
  import emc_pkg::*;
#(
  parameter int unsigned CORES = 4,
  parameter int unsigned ROB_N = 256,
  parameter int unsigned WIDTH = 4,
  localparam int unsigned CW   = $clog2(CORES),
  localparam int unsigned RW   = $clog2(ROB_N)
) (
  input  logic                           clk,
  input  logic                           rst_n,
  // core side
  input  logic [CORES-1:0]               train_valid,
  input  logic [CORES-1:0]               train_dep,
  input  logic [CORES-1:0]               start,
  input  rob_uop_t [CORES-1:0][ROB_N-1:0] rob,
  output logic [CORES-1:0]               chain_inflight,
  input  logic                           pte_valid,
  input  logic [CW-1:0]                  pte_core,
  input  logic [VPN_W-1:0]               pte_vpn,
  input  logic [PPN_W-1:0]               pte_ppn,
  input  logic                           shoot_valid,
  input  logic [CW-1:0]                  shoot_core,
  input  logic [VPN_W-1:0]               shoot_vpn,
  // memory side
  output logic                           mreq_valid,
  input  logic                           mreq_ready,
  output logic [LADDR_W-1:0]             mreq_laddr,
  output logic [1:0]                     mreq_tag,
  output logic                           mreq_dram,
  output logic [CW-1:0]                  mreq_core,
  input  logic                           mfill_valid,
  input  logic [1:0]                     mfill_tag,
  input  logic [LINE_W-1:0]              mfill_data,
  input  logic                           mfill_llc_miss,
  input  logic                           dline_valid,
  input  logic [LADDR_W-1:0]             dline_laddr,
  input  logic [LINE_W-1:0]              dline_data,
  input  logic                           dinv_valid,
  input  logic [LADDR_W-1:0]             dinv_laddr,
  // results to the cores
  output logic                           note_valid,
  output logic [CW-1:0]                  note_core,
  output logic [SLOT_W-1:0]              note_slot,
  output logic                           note_store,
  output logic [PA_W-1:0]                note_addr,
  output logic [XLEN-1:0]                note_data,
  output logic [NUM_CTX-1:0]             abort_valid,
  output logic [NUM_CTX-1:0]             abort_tlb,
  output logic [NUM_CTX-1:0][CW-1:0]     abort_core,
  output logic                           done_valid,
  input  logic                           done_ready,
  output logic [CW-1:0]                  done_core,
  output logic [CHAIN_LEN-1:0][XLEN-1:0] done_regs,
  output logic [CHAIN_LEN-1:0]           done_regmask,
  output logic [CHAIN_LEN-1:0][CPR_W-1:0] done_cpr,
  output logic [CHAIN_LEN-1:0][RW-1:0]   done_rob,
  output logic [CHAIN_LEN-1:0]           done_stmask,
  output logic [CHAIN_LEN-1:0][PA_W-1:0] done_staddr,
  output logic [CHAIN_LEN-1:0][XLEN-1:0] done_stdata
);
  logic [CORES-1:0]                          cg_valid, cg_ready, cg_busy, cg_start;
  logic [CORES-1:0][SLOT_W:0]                cg_len;
  emc_uop_t [CORES-1:0][CHAIN_LEN-1:0]       cg_uops;
  logic [CORES-1:0][LIVEIN_N-1:0][XLEN-1:0]  cg_live;
  logic [CORES-1:0][CHAIN_LEN-1:0][CPR_W-1:0] cg_cpr;
  logic [CORES-1:0][CHAIN_LEN-1:0][RW-1:0]   cg_rob;

  for (genvar c = 0; c < CORES; c++) begin : g_core
    assign cg_start[c] = start[c] && !chain_inflight[c];
    emc_chain_gen #(.ROB_N(ROB_N), .WIDTH(WIDTH)) u_cg (
      .clk, .rst_n,
      .train_valid(train_valid[c]), .train_dep(train_dep[c]),
      .start(cg_start[c]), .rob(rob[c]), .busy(cg_busy[c]), .predict_dep(),
      .chain_valid(cg_valid[c]), .chain_ready(cg_ready[c]),
      .chain_len(cg_len[c]), .chain_uops(cg_uops[c]), .chain_livein(cg_live[c]),
      .chain_cpr(cg_cpr[c]), .chain_rob(cg_rob[c])
    );
  end

  // round-robin choice among cores offering a chain
  logic [CW-1:0] rr, pick;
  logic          pick_v;
  always_comb begin
    pick_v = 1'b0;
    pick   = '0;
    for (int k = 1; k <= CORES; k++) begin
      automatic int c = (int'(rr) + k) % CORES;
      if (!pick_v && cg_valid[c]) begin
        pick_v = 1'b1;
        pick   = CW'(c);
      end
    end
  end

  logic emc_ready;
  always_comb begin
    cg_ready = '0;
    cg_ready[pick] = pick_v && emc_ready;
  end

  logic [NUM_CTX-1:0] abort_int;
  emc #(.CORES(CORES)) u_emc (
    .clk, .rst_n,
    .chain_valid(pick_v), .chain_ready(emc_ready), .chain_core(pick),
    .chain_len(cg_len[pick]), .chain_uops(cg_uops[pick]), .chain_livein(cg_live[pick]),
    .pte_valid, .pte_core, .pte_vpn, .pte_ppn, .shoot_valid, .shoot_core, .shoot_vpn,
    .mreq_valid, .mreq_ready, .mreq_laddr, .mreq_tag, .mreq_dram, .mreq_core,
    .mfill_valid, .mfill_tag, .mfill_data, .mfill_llc_miss,
    .dline_valid, .dline_laddr, .dline_data, .dinv_valid, .dinv_laddr,
    .note_valid, .note_core, .note_slot, .note_store, .note_addr, .note_data,
    .abort_valid(abort_int), .abort_tlb, .abort_core,
    .done_valid, .done_ready, .done_core, .done_regs, .done_regmask,
    .done_stmask, .done_staddr, .done_stdata
  );
  assign abort_valid = abort_int;
  assign done_cpr    = cg_cpr[done_core];
  assign done_rob    = cg_rob[done_core];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      rr <= '0;
      chain_inflight <= '0;
    end else begin
      if (pick_v && emc_ready) begin
        rr <= pick;
        chain_inflight[pick] <= 1'b1;
      end
      if (done_valid && done_ready) chain_inflight[done_core] <= 1'b0;
      for (int x = 0; x < NUM_CTX; x++)
        if (abort_int[x]) chain_inflight[abort_core[x]] <= 1'b0;
    end
  end
endmodule
