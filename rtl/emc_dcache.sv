// emc_dcache: the EMC's small data cache.
//
// Holds the most recent cache lines that came from DRAM to the chip, so that a
// dependent load of a chain can hit on a line that has just arrived. It is
// set associative (LINES lines, WAYS ways, 64-byte lines) with one port and a
// two-cycle access: a lookup accepted in cycle t returns hit and the addressed
// 64-bit word in cycle t+2. Lines are installed through the fill port (each
// line the memory controller receives from DRAM, and each line returned for an
// EMC miss); a fill uses the single port, so lookups are refused (rd_ready=0)
// in that cycle. Victims are chosen first-in first-out within a set, which
// keeps the most recently transmitted lines. inv_* removes a line when the
// last level cache, which tracks the EMC's lines with one directory bit per
// line, takes it back for coherence. The cache holds no dirty data: EMC stores
// stay in the load/store queue and go back to the core.
// Size, ways, latency and port count follow the document; FIFO replacement,
// the invalidate port and 8-byte aligned word reads are this design's choices.
module emc_dcache
  import emc_pkg::*;
#(
  parameter int unsigned LINES = 64,
  parameter int unsigned WAYS  = 4,
  parameter int unsigned TAGW  = 8   // pass-through request tag
) (
  input  logic               clk,
  input  logic               rst_n,
  // lookup
  input  logic               rd_valid,
  output logic               rd_ready,
  input  logic [PA_W-1:0]    rd_addr,
  input  logic [TAGW-1:0]    rd_tag,
  output logic               rsp_valid,
  output logic               rsp_hit,
  output logic [XLEN-1:0]    rsp_data,
  output logic [TAGW-1:0]    rsp_tag,
  output logic [PA_W-1:0]    rsp_addr,
  // install a line
  input  logic               fill_valid,
  input  logic [LADDR_W-1:0] fill_laddr,
  input  logic [LINE_W-1:0]  fill_data,
  // coherence invalidation
  input  logic               inv_valid,
  input  logic [LADDR_W-1:0] inv_laddr
);
  localparam int unsigned SETS = LINES / WAYS;
  localparam int unsigned SW   = $clog2(SETS);
  localparam int unsigned WW   = $clog2(WAYS);
  localparam int unsigned TW   = LADDR_W - SW;

  logic [SETS-1:0][WAYS-1:0]         vld;
  logic [SETS-1:0][WAYS-1:0][TW-1:0] tags;
  logic [SETS-1:0][WW-1:0]           victim;
  logic [LINE_W-1:0]                 data [LINES];

  assign rd_ready = !fill_valid;

  // stage 1 register
  logic            s1_v;
  logic [PA_W-1:0] s1_addr;
  logic [TAGW-1:0] s1_tag;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      s1_v <= 1'b0; s1_addr <= '0; s1_tag <= '0;
    end else begin
      s1_v    <= rd_valid && rd_ready;
      s1_addr <= rd_addr;
      s1_tag  <= rd_tag;
    end
  end

  // stage 2: tag compare and data read
  logic [SW-1:0]  s1_set;
  logic [TW-1:0]  s1_t;
  logic           s1_hit;
  logic [WW-1:0]  s1_way;
  assign s1_set = s1_addr[OFF_W +: SW];
  assign s1_t   = s1_addr[OFF_W+SW +: TW];
  always_comb begin
    s1_hit = 1'b0;
    s1_way = '0;
    for (int w = 0; w < WAYS; w++)
      if (vld[s1_set][w] && tags[s1_set][w] == s1_t) begin
        s1_hit = 1'b1;
        s1_way = WW'(w);
      end
  end

  logic [LINE_W-1:0] s1_line;
  assign s1_line = data[{s1_set, s1_way}];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      rsp_valid <= 1'b0; rsp_hit <= 1'b0; rsp_data <= '0; rsp_tag <= '0; rsp_addr <= '0;
    end else begin
      rsp_valid <= s1_v;
      rsp_hit   <= s1_hit;
      rsp_data  <= s1_line[s1_addr[OFF_W-1:3]*XLEN +: XLEN];
      rsp_tag   <= s1_tag;
      rsp_addr  <= s1_addr;
    end
  end

  // fill and invalidate
  logic [SW-1:0] f_set;
  logic [TW-1:0] f_t;
  logic          f_present;
  logic [WW-1:0] f_way;
  assign f_set = fill_laddr[SW-1:0];
  assign f_t   = fill_laddr[SW +: TW];
  always_comb begin
    f_present = 1'b0;
    f_way     = victim[f_set];
    for (int w = 0; w < WAYS; w++)
      if (vld[f_set][w] && tags[f_set][w] == f_t) begin
        f_present = 1'b1;
        f_way     = WW'(w);
      end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      vld    <= '0;
      tags   <= '0;
      victim <= '0;
    end else begin
      if (inv_valid)
        for (int w = 0; w < WAYS; w++)
          if (tags[inv_laddr[SW-1:0]][w] == inv_laddr[SW +: TW])
            vld[inv_laddr[SW-1:0]][w] <= 1'b0;
      if (fill_valid) begin
        vld[f_set][f_way]  <= 1'b1;
        tags[f_set][f_way] <= f_t;
        if (!f_present) victim[f_set] <= victim[f_set] + 1'b1;
      end
    end
  end

  always_ff @(posedge clk)
    if (fill_valid) data[{f_set, f_way}] <= fill_data;
endmodule
