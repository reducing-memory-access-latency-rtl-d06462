// tb_emc_dcache: self-checking test of the EMC data cache. Lines with
// contents generated from their address are filled; lookups must hit with
// the right word exactly two cycles after they are accepted. Five lines in
// one set check first-in first-out replacement (4 ways), an invalidation
// removes a line, and a lookup is refused while a fill holds the port.
module tb_emc_dcache;
  import emc_pkg::*;
  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic rd_valid = 0, rd_ready, rsp_valid, rsp_hit;
  logic [PA_W-1:0] rd_addr = 0, rsp_addr;
  logic [7:0] rd_tag = 0, rsp_tag;
  logic [XLEN-1:0] rsp_data;
  logic fill_valid = 0, inv_valid = 0;
  logic [LADDR_W-1:0] fill_laddr = 0, inv_laddr = 0;
  logic [LINE_W-1:0] fill_data = 0;

  emc_dcache dut (.clk, .rst_n, .rd_valid, .rd_ready, .rd_addr, .rd_tag, .rsp_valid, .rsp_hit,
                  .rsp_data, .rsp_tag, .rsp_addr, .fill_valid, .fill_laddr, .fill_data,
                  .inv_valid, .inv_laddr);

  function automatic logic [XLEN-1:0] word(logic [LADDR_W-1:0] la, int w);
    return {la[31:0] ^ 32'hA5A5_0000, 29'(w), 3'b101};
  endfunction

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic fill(logic [LADDR_W-1:0] la);
    @(negedge clk);
    fill_valid = 1; fill_laddr = la;
    for (int w = 0; w < 8; w++) fill_data[w*64 +: 64] = word(la, w);
    #1;
    checks++;
    if (rd_ready) begin failures++; $display("FAIL lookup accepted during fill"); end
    @(negedge clk); fill_valid = 0;
  endtask

  task automatic look(logic [LADDR_W-1:0] la, int w, logic exp_hit);
    int lat = 0;
    @(negedge clk);
    rd_valid = 1; rd_addr = {la, 3'(w), 3'b000}; rd_tag = 8'(w + 3);
    @(negedge clk); rd_valid = 0;
    lat = 1;
    while (!rsp_valid && lat < 10) begin @(negedge clk); lat++; end
    checks++;
    if (lat != 2 || rsp_hit !== exp_hit || rsp_tag !== 8'(w + 3) ||
        (exp_hit && rsp_data !== word(la, w))) begin
      failures++;
      $display("FAIL laddr %h w %0d lat %0d hit %b exp %b data %h", la, w, lat, rsp_hit, exp_hit, rsp_data);
    end
  endtask

  initial begin
    repeat (2) @(posedge clk);
    rst_n = 1;
    look(34'h123, 0, 0);
    for (int i = 0; i < 16; i++) fill(34'h1000 + 34'(i));
    for (int i = 0; i < 16; i++) look(34'h1000 + 34'(i), i % 8, 1);
    // set 3: four ways then a fifth line evicts the first
    for (int k = 0; k < 4; k++) fill(34'h3 + 34'(k) * 34'h10);
    for (int k = 0; k < 4; k++) look(34'h3 + 34'(k) * 34'h10, k, 1);
    fill(34'h3 + 34'h40);
    look(34'h3 + 34'h40, 7, 1);
    look(34'h3, 0, 0);
    look(34'h13, 1, 1);
    // refill of a present line keeps the others
    fill(34'h13);
    look(34'h23, 2, 1);
    // invalidation
    @(negedge clk); inv_valid = 1; inv_laddr = 34'h1005;
    @(negedge clk); inv_valid = 0;
    look(34'h1005, 0, 0);
    look(34'h1006, 0, 1);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
