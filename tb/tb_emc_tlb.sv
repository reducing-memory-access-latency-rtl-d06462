// tb_emc_tlb: self-checking test of the per-core circular-buffer TLB. Fills
// pages for several cores, checks hits and translations against a reference
// list of the last ENTRIES pages per core, checks that the oldest page is
// evicted when a 33rd page is filled, that cores do not see each other's
// pages, and that a shootdown removes a page.
module tb_emc_tlb;
  import emc_pkg::*;
  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic fill_valid = 0, inv_valid = 0;
  logic [1:0] fill_core = 0, inv_core = 0, lk_core = 0;
  logic [VPN_W-1:0] fill_vpn = 0, inv_vpn = 0, lk_vpn = 0;
  logic [PPN_W-1:0] fill_ppn = 0, lk_ppn;
  logic lk_hit;

  emc_tlb dut (.clk, .rst_n, .fill_valid, .fill_core, .fill_vpn, .fill_ppn,
               .inv_valid, .inv_core, .inv_vpn, .lk_core, .lk_vpn, .lk_hit, .lk_ppn);

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic fill(int c, logic [VPN_W-1:0] v, logic [PPN_W-1:0] p);
    @(negedge clk); fill_valid = 1; fill_core = 2'(c); fill_vpn = v; fill_ppn = p;
    @(negedge clk); fill_valid = 0;
  endtask

  task automatic look(int c, logic [VPN_W-1:0] v, logic exp_hit, logic [PPN_W-1:0] exp_p);
    @(negedge clk); lk_core = 2'(c); lk_vpn = v; #1;
    checks++;
    if (lk_hit !== exp_hit || (exp_hit && lk_ppn !== exp_p)) begin
      failures++;
      $display("FAIL core %0d vpn %h hit %b ppn %h exp %b %h", c, v, lk_hit, lk_ppn, exp_hit, exp_p);
    end
  endtask

  initial begin
    repeat (2) @(posedge clk);
    rst_n = 1;
    // 32 pages for core 1, 3 for core 2
    for (int i = 0; i < 32; i++) fill(1, VPN_W'(36'h100 + i), PPN_W'(28'h5000 + i));
    for (int i = 0; i < 3; i++)  fill(2, VPN_W'(36'h100 + i), PPN_W'(28'h7000 + i));
    for (int i = 0; i < 32; i++) look(1, VPN_W'(36'h100 + i), 1, PPN_W'(28'h5000 + i));
    for (int i = 0; i < 3; i++)  look(2, VPN_W'(36'h100 + i), 1, PPN_W'(28'h7000 + i));
    look(2, VPN_W'(36'h110), 0, '0);
    look(0, VPN_W'(36'h100), 0, '0);
    // 33rd page replaces the oldest one of core 1
    fill(1, VPN_W'(36'h200), PPN_W'(28'h9999));
    look(1, VPN_W'(36'h200), 1, PPN_W'(28'h9999));
    look(1, VPN_W'(36'h100), 0, '0);
    look(1, VPN_W'(36'h101), 1, PPN_W'(28'h5001));
    // refill of a resident page updates it in place
    fill(1, VPN_W'(36'h105), PPN_W'(28'h1234));
    look(1, VPN_W'(36'h105), 1, PPN_W'(28'h1234));
    look(1, VPN_W'(36'h102), 1, PPN_W'(28'h5002));
    // shootdown
    @(negedge clk); inv_valid = 1; inv_core = 1; inv_vpn = VPN_W'(36'h103);
    @(negedge clk); inv_valid = 0;
    look(1, VPN_W'(36'h103), 0, '0);
    look(1, VPN_W'(36'h104), 1, PPN_W'(28'h5004));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
