// tb_ptw: page-table walks over a memory model with a variable ack delay:
// a mapped LBA returns its PPA after two reads at the expected addresses, an
// LBA without a second-level table or with an invalid entry is not found,
// and an install writes the entry that a later walk finds.
module tb_ptw;
  import ssd_pkg::*;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;
  logic op_valid = 0, op_ready, op_install = 0, done, found;
  logic [LBA_W-1:0] op_lba = 0; logic [PPA_W-1:0] op_ppa = 0, ppa;
  logic mem_req, mem_we, mem_ack = 0; logic [23:0] mem_addr; logic [31:0] mem_wdata, mem_rdata = 0;
  logic [31:0] mem [int unsigned];
  int nreads = 0;
  ptw #(.PT_BASE(24'h000100)) dut (.*);
  task automatic check(bit ok, string what);
    checks++; if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask
  // memory with a random 1..4 clock delay
  int wait_n = -1;
  always @(posedge clk) begin
    mem_ack <= 1'b0;
    if (mem_req && !mem_ack) begin
      if (wait_n < 0) wait_n = $urandom_range(0, 3);
      else if (wait_n == 0) begin
        mem_ack <= 1'b1; wait_n = -1;
        if (mem_we) mem[32'(mem_addr)] = mem_wdata;
        else begin mem_rdata <= mem.exists(32'(mem_addr)) ? mem[32'(mem_addr)] : 32'h0; nreads++; end
      end else wait_n--;
    end
  end
  task automatic walk(bit inst, int l, int p, output bit f, output int q);
    @(negedge clk); op_valid = 1; op_install = inst; op_lba = LBA_W'(l); op_ppa = PPA_W'(p);
    #1; while (!op_ready) begin @(negedge clk); #1; end
    @(negedge clk); op_valid = 0;
    while (!done) begin @(negedge clk); #1; end
    f = found; q = int'(ppa);
  endtask
  initial begin
    repeat (10000) @(posedge clk);
    failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
  initial begin
    bit f; int q;
    mem[32'h100 + 2] = 32'h8000_4000;            // L1 entry for lba[23:12] = 2
    mem[32'h4000 + 12'h345] = 32'h8000_0000 | 32'h00ABCDE;
    repeat (2) @(posedge clk); rst_n = 1;
    walk(0, 24'h002345, 0, f, q); check(f && q == 24'h0ABCDE, "mapped LBA found");
    check(nreads == 2, "two-level walk reads two entries");
    walk(0, 24'h002346, 0, f, q); check(!f, "invalid second-level entry not found");
    walk(0, 24'h003000, 0, f, q); check(!f, "missing second-level table not found");
    walk(1, 24'h002346, 24'h055555, f, q); check(f, "install done");
    check(mem[32'h4000 + 12'h346] == 32'h8005_5555, "install wrote the entry");
    walk(0, 24'h002346, 0, f, q); check(f && q == 24'h055555, "installed mapping found");
    walk(1, 24'h003000, 24'h1, f, q); check(!f, "install without table refused");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
