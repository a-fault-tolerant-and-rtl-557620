// tb_tlb: fills and lookups of a 4-entry TLB against a model: hits return
// the filled PPA, a refill of the same LBA replaces it, a fifth mapping
// evicts one entry, inval_all empties it, and an injected bit flip makes
// the entry's lookup a parity error (not a hit) and removes the entry.
module tb_tlb;
  import ssd_pkg::*;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;
  logic [LBA_W-1:0] lookup_lba = 0, fill_lba = 0; logic [PPA_W-1:0] lookup_ppa, fill_ppa = 0;
  logic lookup_hit, lookup_perr, fill_valid = 0, inval_all = 0, err_inject = 0; logic [1:0] err_idx = 0;
  logic [15:0] perr_count;
  tlb #(.ENTRIES(4)) dut (.*);
  task automatic check(bit ok, string what);
    checks++; if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask
  task automatic fill(int l, int p);
    @(negedge clk); fill_valid = 1; fill_lba = LBA_W'(l); fill_ppa = PPA_W'(p);
    @(negedge clk); fill_valid = 0;
  endtask
  task automatic look(int l, output bit hit, output int p, output bit perr);
    lookup_lba = LBA_W'(l); #1; hit = lookup_hit; p = int'(lookup_ppa); perr = lookup_perr;
  endtask
  initial begin
    repeat (10000) @(posedge clk);
    failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
  initial begin
    bit h, pe; int p, nhit;
    repeat (2) @(posedge clk); rst_n = 1;
    look(5, h, p, pe); check(!h && !pe, "empty TLB misses");
    for (int i = 0; i < 4; i++) fill(10 + i, 1000 + i);
    for (int i = 0; i < 4; i++) begin look(10 + i, h, p, pe); check(h && p == 1000 + i && !pe, "hit returns PPA"); end
    fill(11, 2222);
    look(11, h, p, pe); check(h && p == 2222, "refill replaces mapping");
    nhit = 0;
    for (int i = 0; i < 4; i++) begin look(10 + i, h, p, pe); nhit += h; end
    check(nhit == 4, "refill did not evict");
    fill(20, 3000);
    look(20, h, p, pe); check(h && p == 3000, "new mapping present");
    nhit = 0;
    for (int i = 0; i < 4; i++) begin look(10 + i, h, p, pe); nhit += h; end
    check(nhit == 3, "one old mapping evicted");
    // upset every entry; a lookup of 20 now reports a parity error
    for (int i = 0; i < 4; i++) begin @(negedge clk); err_inject = 1; err_idx = 2'(i); end
    @(negedge clk); err_inject = 0;
    look(20, h, p, pe); check(!h && pe, "parity error detected, no hit");
    @(negedge clk); look(20, h, p, pe); check(!h && !pe, "bad entry dropped");
    check(perr_count == 1, "parity error counted");
    fill(20, 3001); look(20, h, p, pe); check(h && p == 3001, "refilled after error");
    @(negedge clk); inval_all = 1; @(negedge clk); inval_all = 0;
    look(20, h, p, pe); check(!h, "invalidate all");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
