// emc_rs: the EMC reservation station with tag wakeup and two-wide select.
//
// Holds up to ENTRIES dispatched uops whose operands may still be pending.
// A pending operand is identified by the tag {context, chain position} of the
// uop that produces it. Every cycle the results on the two common data buses
// (CDB) are compared with all pending tags; a match captures the value and
// marks the operand ready (a uop dispatched in the same cycle as the broadcast
// is woken too). Out of the ready entries, select sends at most two uops to
// the two execution units per cycle, out of program order:
//   port 0 takes any uop; a load or store only while mem_ok is high, and a
//   load only once no older store of its chain is pending (st_pend), so the
//   load/store queue can forward store data to it,
//   port 1 takes a non-memory uop, and only while p1_ok is high (the engine
//   lowers p1_ok when a load result will need the second bus next cycle).
// Among ready entries the lowest-numbered one wins. flush (one bit per context) drops every
// entry of a context whose chain has been halted.
// Interface: disp_valid/disp_ready handshake, iss*_valid pulses (the unit
// always accepts), CDB inputs. The eight entries, out-of-order wakeup and the
// CDB follow the document; the port split and select priority are this
// design's choices.
module emc_rs
  import emc_pkg::*;
#(
  parameter int unsigned ENTRIES = 8
) (
  input  logic            clk,
  input  logic            rst_n,
  input  logic            disp_valid,
  output logic            disp_ready,
  input  emc_disp_t       disp,
  input  emc_cdb_t [1:0]  cdb,
  input  logic            mem_ok,
  input  logic            p1_ok,
  output logic            iss0_valid,
  output emc_disp_t       iss0,
  output logic            iss1_valid,
  output emc_disp_t       iss1,
  input  logic [NUM_CTX-1:0] flush,
  input  logic [NUM_CTX-1:0][CHAIN_LEN-1:0] st_pend,
  output logic [$clog2(ENTRIES+1)-1:0] occupancy
);
  localparam int unsigned IW = $clog2(ENTRIES);

  logic      [ENTRIES-1:0] vld;
  emc_disp_t [ENTRIES-1:0] ent;

  // entry values after this cycle's wakeup
  emc_disp_t [ENTRIES-1:0] woke;
  emc_disp_t               disp_w;

  function automatic emc_disp_t wake(emc_disp_t e, emc_cdb_t [1:0] b);
    emc_disp_t r;
    r = e;
    for (int k = 0; k < 2; k++) begin
      if (b[k].valid && b[k].ctx == e.ctx) begin
        if (!r.s1_rdy && b[k].slot == e.uop.src1.idx) begin
          r.s1_rdy = 1'b1; r.s1_val = b[k].data;
        end
        if (!r.s2_rdy && b[k].slot == e.uop.src2.idx) begin
          r.s2_rdy = 1'b1; r.s2_val = b[k].data;
        end
      end
    end
    return r;
  endfunction

  always_comb begin
    for (int i = 0; i < ENTRIES; i++) woke[i] = wake(ent[i], cdb);
    disp_w = wake(disp, cdb);
  end

  // a load waits until every older store of its chain has executed
  function automatic logic ld_blocked(emc_disp_t e);
    logic b = 1'b0;
    if (e.uop.op == OP_LD)
      for (int i = 0; i < CHAIN_LEN; i++)
        if (i < int'(e.slot) && st_pend[e.ctx][i]) b = 1'b1;
    return b;
  endfunction

  // select (on the stored state, i.e. operands ready at the start of the cycle)
  logic          s0_found, s1_found;
  logic [IW-1:0] s0_idx, s1_idx;
  always_comb begin
    s0_found = 1'b0; s0_idx = '0;
    s1_found = 1'b0; s1_idx = '0;
    for (int i = 0; i < ENTRIES; i++)
      if (!s0_found && vld[i] && ent[i].s1_rdy && ent[i].s2_rdy &&
          (mem_ok || !is_mem(ent[i].uop.op)) && !ld_blocked(ent[i])) begin
        s0_found = 1'b1; s0_idx = IW'(i);
      end
    for (int i = 0; i < ENTRIES; i++)
      if (!s1_found && p1_ok && vld[i] && ent[i].s1_rdy && ent[i].s2_rdy &&
          !is_mem(ent[i].uop.op) && !(s0_found && s0_idx == IW'(i))) begin
        s1_found = 1'b1; s1_idx = IW'(i);
      end
  end

  assign iss0_valid = s0_found && !flush[ent[s0_idx].ctx];
  assign iss1_valid = s1_found && !flush[ent[s1_idx].ctx];
  assign iss0 = ent[s0_idx];
  assign iss1 = ent[s1_idx];

  // allocation: first free entry
  logic          free_found;
  logic [IW-1:0] free_idx;
  always_comb begin
    free_found = 1'b0; free_idx = '0;
    for (int i = 0; i < ENTRIES; i++)
      if (!free_found && !vld[i]) begin
        free_found = 1'b1; free_idx = IW'(i);
      end
  end
  assign disp_ready = free_found;

  always_comb begin
    occupancy = '0;
    for (int i = 0; i < ENTRIES; i++) occupancy += vld[i];
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      vld <= '0;
      ent <= '0;
    end else begin
      for (int i = 0; i < ENTRIES; i++) ent[i] <= woke[i];
      if (s0_found) vld[s0_idx] <= 1'b0;
      if (s1_found) vld[s1_idx] <= 1'b0;
      if (disp_valid && free_found) begin
        vld[free_idx] <= 1'b1;
        ent[free_idx] <= disp_w;
      end
      for (int i = 0; i < ENTRIES; i++)
        if (disp_valid && free_found && IW'(i) == free_idx) begin
          if (flush[disp.ctx]) vld[i] <= 1'b0;
        end else if (flush[ent[i].ctx]) vld[i] <= 1'b0;
    end
  end
endmodule
