// emc_contexts: the EMC front end, one issue context per chain in flight.
//
// The EMC has no fetch, decode or rename hardware. Each context holds one
// dependence chain shipped by a core: a uop buffer of CHAIN_LEN uops, the
// chain's live-in source vector, and a private physical register file (PRF) of
// CHAIN_LEN registers with ready bits (uop i writes register i). Every cycle
// one uop is dispatched, in program order within its chain, from the running
// contexts in round-robin order, into the reservation station when it has a
// free entry. At dispatch the operands are read: a live-in is always ready, a
// register is taken from the PRF if ready, otherwise it stays a tag that the
// reservation station wakes up from the common data buses (CDB).
// Context life cycle: IDLE -> RUN (chain loaded) -> DONE once every uop has
// completed -> IDLE when the core accepts the live-outs (done_ready). A halt
// (wrong-path branch, TLB miss) moves a running context to DRAIN; it returns
// to IDLE once the engine reports no memory access of it is still in flight.
// Interface: ld_* chain load (valid/ready), disp_* (valid/ready), cdb[2]
// results, cmp[3] completion of any uop, halt (one bit per context), done_* (valid/ready).
// Uop buffers of 16, private 16-entry PRF and live-in vector per context and
// round-robin issue follow the document; one dispatch per cycle, in-order
// dispatch within a chain and the state machine are this design's choices.
module emc_contexts
  import emc_pkg::*;
#(
  parameter int unsigned CORES = 4
) (
  input  logic                             clk,
  input  logic                             rst_n,
  // chain load from the cores
  input  logic                             ld_valid,
  output logic                             ld_ready,
  input  logic [$clog2(CORES)-1:0]         ld_core,
  input  logic [SLOT_W:0]                  ld_len,
  input  emc_uop_t [CHAIN_LEN-1:0]         ld_uops,
  input  logic [LIVEIN_N-1:0][XLEN-1:0]    ld_livein,
  output logic [CTX_W-1:0]                 ld_ctx,
  // dispatch to the reservation station
  output logic                             disp_valid,
  input  logic                             disp_ready,
  output emc_disp_t                        disp,
  // results and completions
  input  emc_cdb_t [1:0]                   cdb,
  input  logic [2:0]                       cmp_valid,
  input  logic [2:0][CTX_W-1:0]            cmp_ctx,
  input  logic [2:0][SLOT_W-1:0]           cmp_slot,
  // halt of a chain
  input  logic [NUM_CTX-1:0]               halt,
  input  logic [NUM_CTX-1:0]               mem_busy,
  // state seen by the engine
  output logic [NUM_CTX-1:0]               ctx_run,
  output logic [NUM_CTX-1:0][$clog2(CORES)-1:0] ctx_core,
  output logic [NUM_CTX-1:0][CHAIN_LEN-1:0] st_pend,  // stores not yet executed
  // live-outs back to the core
  output logic                             done_valid,
  input  logic                             done_ready,
  output logic [CTX_W-1:0]                 done_ctx,
  output logic [$clog2(CORES)-1:0]         done_core,
  output logic [CHAIN_LEN-1:0][XLEN-1:0]   done_regs,
  output logic [CHAIN_LEN-1:0]             done_regmask
);
  typedef enum logic [1:0] {C_IDLE, C_RUN, C_DONE, C_DRAIN} ctx_state_e;

  ctx_state_e [NUM_CTX-1:0]                         st;
  emc_uop_t   [NUM_CTX-1:0][CHAIN_LEN-1:0]          ubuf;
  logic       [NUM_CTX-1:0][LIVEIN_N-1:0][XLEN-1:0] livein;
  logic       [NUM_CTX-1:0][CHAIN_LEN-1:0][XLEN-1:0] prf;
  logic       [NUM_CTX-1:0][CHAIN_LEN-1:0]          prf_rdy;
  logic       [NUM_CTX-1:0][CHAIN_LEN-1:0]          cmpl;
  logic       [NUM_CTX-1:0][CHAIN_LEN-1:0]          inchain;
  logic       [NUM_CTX-1:0][SLOT_W:0]               len;
  logic       [NUM_CTX-1:0][SLOT_W:0]               next;
  logic       [NUM_CTX-1:0][$clog2(CORES)-1:0]      core;
  logic       [CTX_W-1:0]                           rr;

  // free context for a load
  always_comb begin
    ld_ready = 1'b0;
    ld_ctx   = '0;
    for (int c = NUM_CTX-1; c >= 0; c--)
      if (st[c] == C_IDLE) begin
        ld_ready = 1'b1;
        ld_ctx   = CTX_W'(c);
      end
  end

  // round-robin choice of the dispatching context
  logic            sel_found;
  logic [CTX_W-1:0] sel;
  always_comb begin
    sel_found = 1'b0;
    sel       = '0;
    for (int k = 1; k <= NUM_CTX; k++) begin
      automatic int c = (int'(rr) + k) % NUM_CTX;
      if (!sel_found && st[c] == C_RUN && next[c] < len[c]) begin
        sel_found = 1'b1;
        sel       = CTX_W'(c);
      end
    end
  end

  // operand read
  function automatic void rd_src(input emc_src_t s, input logic [CTX_W-1:0] c,
                                 output logic rdy, output logic [XLEN-1:0] val);
    rdy = 1'b1;
    val = '0;
    if (s.valid) begin
      if (s.livein) val = livein[c][s.idx];
      else begin
        rdy = prf_rdy[c][s.idx];
        val = prf[c][s.idx];
      end
    end
  endfunction

  always_comb begin
    disp      = '0;
    disp.ctx  = sel;
    disp.slot = next[sel][SLOT_W-1:0];
    disp.uop  = ubuf[sel][next[sel][SLOT_W-1:0]];
    rd_src(disp.uop.src1, sel, disp.s1_rdy, disp.s1_val);
    rd_src(disp.uop.src2, sel, disp.s2_rdy, disp.s2_val);
  end
  assign disp_valid = sel_found;

  // completion
  always_comb begin
    done_valid   = 1'b0;
    done_ctx     = '0;
    for (int c = NUM_CTX-1; c >= 0; c--)
      if (st[c] == C_DONE) begin
        done_valid = 1'b1;
        done_ctx   = CTX_W'(c);
      end
    done_core = core[done_ctx];
    done_regs = prf[done_ctx];
    for (int i = 0; i < CHAIN_LEN; i++)
      done_regmask[i] = inchain[done_ctx][i] && writes_reg(ubuf[done_ctx][i].op);
  end

  always_comb
    for (int c = 0; c < NUM_CTX; c++) begin
      ctx_run[c]  = st[c] == C_RUN;
      ctx_core[c] = core[c];
      for (int i = 0; i < CHAIN_LEN; i++)
        st_pend[c][i] = inchain[c][i] && ubuf[c][i].op == OP_ST && !cmpl[c][i];
    end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      st <= '{default: C_IDLE};
      ubuf <= '0; livein <= '0; prf <= '0; prf_rdy <= '0; cmpl <= '0;
      inchain <= '0; len <= '0; next <= '0; core <= '0; rr <= '0;
    end else begin
      if (disp_valid && disp_ready) begin
        next[sel] <= next[sel] + 1'b1;
        rr        <= sel;
      end
      for (int k = 0; k < 2; k++)
        if (cdb[k].valid && st[cdb[k].ctx] == C_RUN) begin
          prf[cdb[k].ctx][cdb[k].slot]     <= cdb[k].data;
          prf_rdy[cdb[k].ctx][cdb[k].slot] <= 1'b1;
        end
      for (int k = 0; k < 3; k++)
        if (cmp_valid[k] && st[cmp_ctx[k]] == C_RUN)
          cmpl[cmp_ctx[k]][cmp_slot[k]] <= 1'b1;
      for (int c = 0; c < NUM_CTX; c++) begin
        unique case (st[c])
          C_RUN:   if (halt[c])                              st[c] <= C_DRAIN;
                   else if (cmpl[c] == inchain[c])         st[c] <= C_DONE;
          C_DONE:  if (done_ready && done_ctx == CTX_W'(c)) st[c] <= C_IDLE;
          C_DRAIN: if (!mem_busy[c])                       st[c] <= C_IDLE;
          default: ;
        endcase
      end
      if (ld_valid && ld_ready) begin
        st[ld_ctx]      <= C_RUN;
        ubuf[ld_ctx]    <= ld_uops;
        livein[ld_ctx]  <= ld_livein;
        prf_rdy[ld_ctx] <= '0;
        cmpl[ld_ctx]    <= '0;
        len[ld_ctx]     <= ld_len;
        next[ld_ctx]    <= '0;
        core[ld_ctx]    <= ld_core;
        for (int i = 0; i < CHAIN_LEN; i++) inchain[ld_ctx][i] <= (i < int'(ld_len));
      end
    end
  end
endmodule
