// emc_miss_pred: per-core load miss predictor of the EMC.
//
// An array of 3-bit saturating counters per core, indexed by a hash of the PC
// of the load. A load whose counter is above THRESH is predicted to miss in
// the last level cache, and the EMC then sends its request straight to DRAM
// instead of looking up the on-chip hierarchy first. Training: a load that
// missed in the LLC increments its counter, one that hit decrements it.
// Interface: combinational prediction (pd_core, pd_pc -> pd_miss); one training
// update per cycle (tr_valid, tr_core, tr_pc, tr_miss).
// The 3-bit counters per core, PC indexing and increment/decrement rule follow
// the document; the table size (ENTRIES), the XOR-fold hash and the threshold
// value are this design's choices. Counters reset to 0 (predict hit).
module emc_miss_pred
  import emc_pkg::*;
#(
  parameter int unsigned CORES   = 4,
  parameter int unsigned ENTRIES = 256,
  parameter int unsigned THRESH  = 3
) (
  input  logic                     clk,
  input  logic                     rst_n,
  input  logic [$clog2(CORES)-1:0] pd_core,
  input  logic [PCH_W-1:0]         pd_pc,
  output logic                     pd_miss,
  input  logic                     tr_valid,
  input  logic [$clog2(CORES)-1:0] tr_core,
  input  logic [PCH_W-1:0]         tr_pc,
  input  logic                     tr_miss
);
  localparam int unsigned IW = $clog2(ENTRIES);

  logic [CORES-1:0][ENTRIES-1:0][2:0] ctr;

  // Fold the carried PC bits onto the table index.
  function automatic logic [IW-1:0] hash(logic [PCH_W-1:0] pc);
    logic [IW-1:0] h;
    h = '0;
    for (int i = 0; i < PCH_W; i++) h[i % IW] ^= pc[i];
    return h;
  endfunction

  logic [IW-1:0] pd_idx, tr_idx;
  assign pd_idx  = hash(pd_pc);
  assign tr_idx  = hash(tr_pc);
  assign pd_miss = ctr[pd_core][pd_idx] > 3'(THRESH);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) ctr <= '0;
    else if (tr_valid) begin
      if (tr_miss && ctr[tr_core][tr_idx] != 3'd7)
        ctr[tr_core][tr_idx] <= ctr[tr_core][tr_idx] + 3'd1;
      else if (!tr_miss && ctr[tr_core][tr_idx] != 3'd0)
        ctr[tr_core][tr_idx] <= ctr[tr_core][tr_idx] - 3'd1;
    end
  end
endmodule
