// emc_tlb: the EMC's virtual address translation, one small TLB per core.
//
// Each core owns ENTRIES fully associative entries that form a circular
// buffer: a fill from the home core (the PTE of a source miss that is not yet
// resident) writes the entry under that core's head pointer and advances it, so
// the TLB always caches the last pages handed to the EMC for that core. A
// shootdown invalidates every matching entry of that core. The EMC does not
// walk page tables: a lookup miss is reported and the engine halts the chain.
// Interface: fill_* and inv_* are single-cycle commands; the lookup port is
// combinational (hit and ppn in the same cycle as core/vpn).
// The entry count and the circular-buffer policy follow the document; the
// all-entries lookup in one cycle and the fill-over-duplicate rule (a refill
// of a resident page overwrites that entry in place) are this design's choices.
module emc_tlb
  import emc_pkg::*;
#(
  parameter int unsigned CORES   = 4,
  parameter int unsigned ENTRIES = 32
) (
  input  logic                     clk,
  input  logic                     rst_n,
  input  logic                     fill_valid,
  input  logic [$clog2(CORES)-1:0] fill_core,
  input  logic [VPN_W-1:0]         fill_vpn,
  input  logic [PPN_W-1:0]         fill_ppn,
  input  logic                     inv_valid,
  input  logic [$clog2(CORES)-1:0] inv_core,
  input  logic [VPN_W-1:0]         inv_vpn,
  input  logic [$clog2(CORES)-1:0] lk_core,
  input  logic [VPN_W-1:0]         lk_vpn,
  output logic                     lk_hit,
  output logic [PPN_W-1:0]         lk_ppn
);
  localparam int unsigned IW = $clog2(ENTRIES);

  logic [CORES-1:0][ENTRIES-1:0]            vld;
  logic [CORES-1:0][ENTRIES-1:0][VPN_W-1:0] vpn;
  logic [CORES-1:0][ENTRIES-1:0][PPN_W-1:0] ppn;
  logic [CORES-1:0][IW-1:0]                 head;

  // Lookup
  always_comb begin
    lk_hit = 1'b0;
    lk_ppn = '0;
    for (int e = 0; e < ENTRIES; e++)
      if (vld[lk_core][e] && vpn[lk_core][e] == lk_vpn) begin
        lk_hit = 1'b1;
        lk_ppn = ppn[lk_core][e];
      end
  end

  // Existing entry of the page being filled, if any
  logic          fill_dup;
  logic [IW-1:0] fill_dup_idx;
  always_comb begin
    fill_dup = 1'b0;
    fill_dup_idx = '0;
    for (int e = 0; e < ENTRIES; e++)
      if (vld[fill_core][e] && vpn[fill_core][e] == fill_vpn) begin
        fill_dup = 1'b1;
        fill_dup_idx = IW'(e);
      end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      vld  <= '0;
      head <= '0;
      vpn  <= '0;
      ppn  <= '0;
    end else begin
      if (inv_valid)
        for (int e = 0; e < ENTRIES; e++)
          if (vpn[inv_core][e] == inv_vpn) vld[inv_core][e] <= 1'b0;
      if (fill_valid) begin
        if (fill_dup) begin
          ppn[fill_core][fill_dup_idx] <= fill_ppn;
          vld[fill_core][fill_dup_idx] <= 1'b1;
        end else begin
          vld[fill_core][head[fill_core]] <= 1'b1;
          vpn[fill_core][head[fill_core]] <= fill_vpn;
          ppn[fill_core][head[fill_core]] <= fill_ppn;
          head[fill_core] <= head[fill_core] + 1'b1;
        end
      end
    end
  end
endmodule
