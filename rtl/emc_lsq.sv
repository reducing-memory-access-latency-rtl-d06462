// emc_lsq: the EMC's load/store queue.
//
// One entry per chain position of each context, so an entry never has to be
// allocated and the queue can never fill: a store executed at the EMC writes
// its physical address and data into the entry of its own position. A load
// searches the entries of its context that are older in program order (lower
// position) and, if one of them stores to the same 8-byte word, takes the data
// of the youngest such store instead of reading the cache. Stores are never
// written to memory here: when a chain completes the engine returns the
// stores, with the live-out registers, to the home core, which makes them
// globally visible in program order. clr_* empties a context for a new chain.
// Interface: wr_* single-cycle store write; combinational forward search.
// Keeping stores in the queue and returning them to the core follows the
// document; indexing by chain position and word-granular forwarding are this
// design's choices (a load that runs before an older store to the same
// address is caught by the home core's ordering check, not here).
module emc_lsq
  import emc_pkg::*;
#(
  parameter int unsigned CTXS = NUM_CTX,
  parameter int unsigned N    = CHAIN_LEN
) (
  input  logic                      clk,
  input  logic                      rst_n,
  input  logic                      clr_valid,
  input  logic [$clog2(CTXS)-1:0]   clr_ctx,
  input  logic                      wr_valid,
  input  logic [$clog2(CTXS)-1:0]   wr_ctx,
  input  logic [$clog2(N)-1:0]      wr_slot,
  input  logic [PA_W-1:0]           wr_addr,
  input  logic [XLEN-1:0]           wr_data,
  input  logic [$clog2(CTXS)-1:0]   ld_ctx,
  input  logic [$clog2(N)-1:0]      ld_slot,
  input  logic [PA_W-1:0]           ld_addr,
  output logic                      fwd_hit,
  output logic [XLEN-1:0]           fwd_data,
  // stores of every context, returned to the core at chain completion
  output logic [CTXS-1:0][N-1:0]            st_valid,
  output logic [CTXS-1:0][N-1:0][PA_W-1:0]  st_addr,
  output logic [CTXS-1:0][N-1:0][XLEN-1:0]  st_data
);
  always_comb begin
    fwd_hit  = 1'b0;
    fwd_data = '0;
    for (int i = 0; i < N; i++)
      if (i < int'(ld_slot) && st_valid[ld_ctx][i] &&
          st_addr[ld_ctx][i][PA_W-1:3] == ld_addr[PA_W-1:3]) begin
        fwd_hit  = 1'b1;
        fwd_data = st_data[ld_ctx][i];
      end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      st_valid <= '0;
      st_addr  <= '0;
      st_data  <= '0;
    end else begin
      if (clr_valid) st_valid[clr_ctx] <= '0;
      if (wr_valid) begin
        st_valid[wr_ctx][wr_slot] <= 1'b1;
        st_addr[wr_ctx][wr_slot]  <= wr_addr;
        st_data[wr_ctx][wr_slot]  <= wr_data;
      end
    end
  end
endmodule
