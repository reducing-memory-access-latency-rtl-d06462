// emc_chain_gen: dependence chain generation unit at a home core.
//
// When the core's reorder buffer (ROB) is full and retirement is blocked by a
// last level cache miss at its head, this unit decides whether to offload the
// uops that depend on that miss to the EMC, and builds the chain:
//  * A 3-bit saturating counter, trained on every LLC miss (+1 if it had a
//    dependent miss, -1 if not), enables generation when either of its two
//    upper bits is set.
//  * The source miss (ROB entry 0 of the window) becomes chain position 0;
//    its destination tag is "pseudo-woken": broadcast without executing.
//  * Every cycle, a uop whose source tag was broadcast in the previous cycle,
//    whose other sources are ready at the core or already in the chain, and
//    whose operation the EMC supports, wakes up. Up to WIDTH woken uops per
//    cycle (oldest first) are added. A ready source is read and packed into
//    the live-in vector (live-in slot), a chain source is renamed through the
//    register remapping table (RRT: core register -> EMC register). The
//    destination gets the next EMC register, which equals the uop's chain
//    position, and is broadcast in the next cycle.
//  * Generation ends when nothing is left to wake, the chain holds CHAIN_LEN
//    uops, or the live-in vector is full; the chain and live-ins are then
//    offered to the EMC (chain_valid/chain_ready), together with the core
//    register and ROB index of every chain position, so that returned
//    live-outs can be written back and their tags broadcast.
// Interface: start (one cycle, window valid), rob[] window (entry 0 is the
// source miss at the ROB head), train_*, chain_* handshake, busy.
// The counter, pseudo-wakeup, RRT renaming, live-in packing and end conditions
// follow the document; the ROB window port, WIDTH per cycle and the stop on a
// full live-in vector are this design's choices.
// An assertion checks that an offered chain stays offered until taken.
// Its disable-iff on rst_n is why lint reports rst_n as used synchronously
// (SYNCASYNCNET); no flop here is reset synchronously.
module emc_chain_gen
  import emc_pkg::*;
#(
  parameter int unsigned ROB_N = 256,  // ROB entries visible from the head
  parameter int unsigned WIDTH = 4     // uops added per cycle (core back-end width)
) (
  input  logic                          clk,
  input  logic                          rst_n,
  input  logic                          train_valid,
  input  logic                          train_dep,
  input  logic                          start,
  input  rob_uop_t [ROB_N-1:0]          rob,
  output logic                          busy,
  output logic                          predict_dep,
  output logic                          chain_valid,
  input  logic                          chain_ready,
  output logic [SLOT_W:0]               chain_len,
  output emc_uop_t [CHAIN_LEN-1:0]      chain_uops,
  output logic [LIVEIN_N-1:0][XLEN-1:0] chain_livein,
  output logic [CHAIN_LEN-1:0][CPR_W-1:0] chain_cpr,
  output logic [CHAIN_LEN-1:0][$clog2(ROB_N)-1:0] chain_rob
);
  localparam int unsigned CPR_N = 1 << CPR_W;
  localparam int unsigned RW    = $clog2(ROB_N);

  typedef enum logic [1:0] {G_IDLE, G_GEN, G_SEND} gen_state_e;
  gen_state_e st;

  logic [2:0]               dep_ctr;
  logic [CPR_N-1:0]         bcast;     // tags broadcast this cycle
  logic [CPR_N-1:0]         inchain;   // tags broadcast so far
  logic [CPR_N-1:0][SLOT_W-1:0] rrt;
  logic [ROB_N-1:0]         incl, pend;
  logic [SLOT_W:0]          n_uops;
  logic [SLOT_W:0]          n_live;

  assign predict_dep = dep_ctr[2] | dep_ctr[1];
  assign busy        = st != G_IDLE;
  assign chain_valid = st == G_SEND;
  assign chain_len   = n_uops;

  // pseudo wakeup
  logic [ROB_N-1:0] woken, pend_all;
  always_comb begin
    for (int i = 0; i < ROB_N; i++) begin
      automatic logic hit = 1'b0;
      automatic logic ok  = 1'b1;
      for (int k = 0; k < 2; k++)
        if (rob[i].src_v[k]) begin
          if (!rob[i].src_rdy[k] && bcast[rob[i].src_cpr[k]]) hit = 1'b1;
          if (!rob[i].src_rdy[k] && !inchain[rob[i].src_cpr[k]]) ok = 1'b0;
        end
      woken[i] = (i != 0) && rob[i].valid && !incl[i] && rob[i].op != OP_OTHER && hit && ok;
    end
    pend_all = pend | woken;
  end

  // add up to WIDTH pending uops, oldest first
  emc_uop_t [CHAIN_LEN-1:0]               nx_uops;
  logic [LIVEIN_N-1:0][XLEN-1:0]          nx_live;
  logic [CHAIN_LEN-1:0][CPR_W-1:0]        nx_cpr;
  logic [CHAIN_LEN-1:0][RW-1:0]           nx_rob;
  logic [CPR_N-1:0]                       nx_bcast;
  logic [CPR_N-1:0][SLOT_W-1:0]           nx_rrt;
  logic [ROB_N-1:0]                       nx_incl, nx_pend;
  logic [SLOT_W:0]                        nx_n, nx_l;
  logic                                   nx_full;

  always_comb begin
    automatic int taken = 0;
    nx_uops = chain_uops; nx_live = chain_livein; nx_cpr = chain_cpr; nx_rob = chain_rob;
    nx_bcast = '0; nx_rrt = rrt; nx_incl = incl; nx_pend = pend_all;
    nx_n = n_uops; nx_l = n_live; nx_full = 1'b0;
    for (int i = 1; i < ROB_N; i++) begin
      if (pend_all[i] && taken < int'(WIDTH) && !nx_full) begin
        automatic int need = 0;
        for (int k = 0; k < 2; k++)
          if (rob[i].src_v[k] && rob[i].src_rdy[k]) need++;
        if (int'(nx_n) >= int'(CHAIN_LEN) || int'(nx_l) + need > int'(LIVEIN_N))
          nx_full = 1'b1;
        else begin
          automatic emc_uop_t u = '0;
          automatic emc_src_t s [2];
          for (int k = 0; k < 2; k++) begin
            s[k] = '0;
            if (rob[i].src_v[k]) begin
              s[k].valid = 1'b1;
              if (rob[i].src_rdy[k]) begin
                s[k].livein = 1'b1;
                s[k].idx    = nx_l[SLOT_W-1:0];
                nx_live[nx_l[SLOT_W-1:0]] = rob[i].src_val[k];
                nx_l++;
              end else
                s[k].idx = rrt[rob[i].src_cpr[k]];
            end
          end
          u.op = rob[i].op; u.src1 = s[0]; u.src2 = s[1];
          u.imm = rob[i].imm; u.pred_taken = rob[i].pred_taken; u.pc = rob[i].pc;
          nx_uops[nx_n[SLOT_W-1:0]] = u;
          nx_cpr[nx_n[SLOT_W-1:0]]  = rob[i].dst_cpr;
          nx_rob[nx_n[SLOT_W-1:0]]  = RW'(i);
          if (rob[i].dst_v) begin
            nx_rrt[rob[i].dst_cpr]   = nx_n[SLOT_W-1:0];
            nx_bcast[rob[i].dst_cpr] = 1'b1;
          end
          nx_incl[i] = 1'b1;
          nx_pend[i] = 1'b0;
          nx_n++;
          taken++;
        end
      end
    end
  end

  // the source miss as position 0: its sources are ready (it has issued)
  emc_uop_t                      src_uop;
  logic [LIVEIN_N-1:0][XLEN-1:0] src_live;
  logic [SLOT_W:0]               src_nl;
  always_comb begin
    src_uop = '0;
    src_live = '0;
    src_nl = '0;
    src_uop.op = rob[0].op; src_uop.imm = rob[0].imm; src_uop.pc = rob[0].pc;
    src_uop.pred_taken = rob[0].pred_taken;
    if (rob[0].src_v[0]) begin
      src_uop.src1 = '{valid: 1'b1, livein: 1'b1, idx: '0};
      src_live[0] = rob[0].src_val[0];
      src_nl++;
    end
    if (rob[0].src_v[1]) begin
      src_uop.src2 = '{valid: 1'b1, livein: 1'b1, idx: src_nl[SLOT_W-1:0]};
      src_live[src_nl[SLOT_W-1:0]] = rob[0].src_val[1];
      src_nl++;
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      st <= G_IDLE; dep_ctr <= '0;
      bcast <= '0; inchain <= '0; rrt <= '0; incl <= '0; pend <= '0;
      n_uops <= '0; n_live <= '0;
      chain_uops <= '0; chain_livein <= '0; chain_cpr <= '0; chain_rob <= '0;
    end else begin
      if (train_valid) begin
        if (train_dep && dep_ctr != 3'd7)       dep_ctr <= dep_ctr + 3'd1;
        else if (!train_dep && dep_ctr != 3'd0) dep_ctr <= dep_ctr - 3'd1;
      end
      unique case (st)
        G_IDLE: if (start && predict_dep && rob[0].valid) begin
          st <= G_GEN;
          chain_uops      <= '0;
          chain_uops[0]   <= src_uop;
          chain_livein    <= src_live;
          chain_cpr       <= '0;
          chain_cpr[0]    <= rob[0].dst_cpr;
          chain_rob       <= '0;
          n_uops          <= (SLOT_W+1)'(1);
          n_live          <= src_nl;
          rrt             <= '0;
          rrt[rob[0].dst_cpr] <= '0;
          bcast           <= '0;
          bcast[rob[0].dst_cpr]   <= 1'b1;
          inchain         <= '0;
          inchain[rob[0].dst_cpr] <= 1'b1;
          incl            <= ROB_N'(1);
          pend            <= '0;
        end
        G_GEN: begin
          chain_uops <= nx_uops; chain_livein <= nx_live;
          chain_cpr <= nx_cpr;   chain_rob <= nx_rob;
          rrt <= nx_rrt; incl <= nx_incl; pend <= nx_pend;
          n_uops <= nx_n; n_live <= nx_l;
          bcast   <= nx_bcast;
          inchain <= inchain | nx_bcast;
          if (nx_full || nx_n == (SLOT_W+1)'(CHAIN_LEN) || (nx_bcast == '0 && nx_pend == '0))
            st <= G_SEND;
        end
        G_SEND: if (chain_ready) st <= G_IDLE;
        default: st <= G_IDLE;
      endcase
    end
  end
  // A chain, once offered, stays offered and unchanged until it is taken.
  a_chain_hold: assert property (@(posedge clk) disable iff (!rst_n)
                                 chain_valid && !chain_ready |=> chain_valid && $stable(chain_len));

endmodule
