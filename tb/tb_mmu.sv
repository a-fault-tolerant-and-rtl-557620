// tb_mmu: the MMU with its TLB and page-table walker, a mapping-table memory
// model, an FTL firmware model and a command sink with random back-pressure.
// Checks: write asks the FTL for a page and issues a program at that PPA;
// read of the same LBA hits the TLB; read of a page-table mapping walks and
// issues without the FTL; read of an unmapped LBA asks the FTL and installs
// the answer; an FTL refusal ends with err; a write where no second-level
// table exists ends with err; firmware commands pass through.
module tb_mmu;
  import ssd_pkg::*;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;
  logic req_valid = 0, req_ready, done, done_err; host_op_e req_op = HOST_READ; logic [LBA_W-1:0] req_lba = 0;
  logic [PPA_W-1:0] done_ppa;
  logic [LBA_W-1:0] tlb_lba, tlb_fill_lba; logic tlb_hit, tlb_fill, tlb_perr; logic [PPA_W-1:0] tlb_ppa, tlb_fill_ppa;
  logic ptw_valid, ptw_ready, ptw_install, ptw_done, ptw_found; logic [LBA_W-1:0] ptw_lba; logic [PPA_W-1:0] ptw_ppa, ptw_result;
  logic ftl_req_valid, ftl_req_ready = 1, ftl_rsp_valid = 0, ftl_rsp_ok = 0; ftl_kind_e ftl_kind; logic [LBA_W-1:0] ftl_lba;
  logic [PPA_W-1:0] ftl_rsp_ppa = 0;
  logic fw_cmd_valid = 0, fw_cmd_ready; logic [DIE_W-1:0] fw_cmd_die = 0; ll_cmd_t fw_cmd;
  logic cmd_valid, cmd_ready = 0; logic [DIE_W-1:0] cmd_die; ll_cmd_t cmd;
  logic hc_write; logic [LBA_W-1:0] hc_lba; logic [31:0] n_tlb_hit, n_tlb_miss, n_ftl_req;
  logic mem_req, mem_we, mem_ack = 0; logic [23:0] mem_addr; logic [31:0] mem_wdata, mem_rdata = 0;
  logic [15:0] perr_count;
  mmu dut (.*);
  tlb #(.ENTRIES(16)) u_tlb (.clk, .rst_n, .lookup_lba(tlb_lba), .lookup_hit(tlb_hit), .lookup_ppa(tlb_ppa),
    .lookup_perr(tlb_perr), .fill_valid(tlb_fill), .fill_lba(tlb_fill_lba), .fill_ppa(tlb_fill_ppa),
    .inval_all(1'b0), .err_inject(1'b0), .err_idx(4'd0), .perr_count(perr_count));
  ptw #(.PT_BASE(24'h000100)) u_ptw (.clk, .rst_n, .op_valid(ptw_valid), .op_ready(ptw_ready), .op_install(ptw_install),
    .op_lba(ptw_lba), .op_ppa(ptw_ppa), .done(ptw_done), .found(ptw_found), .ppa(ptw_result),
    .mem_req, .mem_we, .mem_addr, .mem_wdata, .mem_ack, .mem_rdata);
  task automatic check(bit ok, string what);
    checks++; if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask
  logic [31:0] mem [int unsigned];
  always @(posedge clk) begin
    mem_ack <= 1'b0;
    if (mem_req && !mem_ack) begin
      mem_ack <= 1'b1;
      if (mem_we) mem[32'(mem_addr)] = mem_wdata;
      else mem_rdata <= mem.exists(32'(mem_addr)) ? mem[32'(mem_addr)] : 32'h0;
    end
  end
  // FTL firmware model: allocations come from a counter; misses are answered
  // from a small table of known mappings (others refused)
  int next_free = 24'h0A0040, ftl_delay = 0; bit ftl_busy = 0;
  int known [int];
  always @(posedge clk) begin
    ftl_rsp_valid <= 1'b0;
    if (ftl_busy) begin
      if (ftl_delay > 0) ftl_delay--;
      else begin
        ftl_busy = 0; ftl_rsp_valid <= 1'b1;
        if (ftl_kind == FTL_ALLOC) begin ftl_rsp_ok <= 1'b1; ftl_rsp_ppa <= PPA_W'(next_free); next_free++; end
        else begin ftl_rsp_ok <= known.exists(int'(ftl_lba)); ftl_rsp_ppa <= known.exists(int'(ftl_lba)) ? PPA_W'(known[int'(ftl_lba)]) : '0; end
      end
    end else if (ftl_req_valid && ftl_req_ready) begin ftl_busy = 1; ftl_delay = 2; end
  end
  // command sink
  ll_cmd_t got [$]; logic [DIE_W-1:0] got_die [$]; int n_hc = 0;
  always @(posedge clk) begin
    cmd_ready <= ($urandom_range(0, 2) != 0);
    if (cmd_valid && cmd_ready) begin got.push_back(cmd); got_die.push_back(cmd_die); end
    if (hc_write) n_hc++;
  end
  task automatic request(host_op_e o, int l, output bit err, output int p);
    @(negedge clk); req_valid = 1; req_op = o; req_lba = LBA_W'(l); #1;
    while (!req_ready) begin @(negedge clk); #1; end
    @(posedge clk); #1; req_valid = 0;
    while (!done) begin @(negedge clk); #1; end
    err = done_err; p = int'(done_ppa);
  endtask
  function automatic bit last_cmd_is(nand_cmd_e c, int p, int l);
    if (got.size() == 0) return 0;
    return got[$].cmd == c && got[$].addr == {2'b00, ppa_row(PPA_W'(p)), 16'h0} &&
           got_die[$] == ppa_die(PPA_W'(p)) && got[$].lba == LBA_W'(l);
  endfunction
  initial begin
    repeat (20000) @(posedge clk);
    failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
  initial begin
    bit e; int p, f0;
    fw_cmd = '0;
    mem[32'h100 + 0] = 32'h8000_4000;      // second-level table for lba[23:12] = 0
    mem[32'h100 + 1] = 32'h8000_5000;      // and for 1
    mem[32'h4000 + 32'h123] = 32'h8000_0000 | 32'h0C0155;
    known[24'h001050] = 24'h1F0203;
    repeat (2) @(posedge clk); rst_n = 1;
    request(HOST_WRITE, 24'h000010, e, p);
    check(!e && p == 24'h0A0040 && n_ftl_req == 1, "write allocated by FTL");
    check(last_cmd_is(NC_PROGRAM, p, 24'h000010), "program issued at the PPA");
    check(n_hc == 1, "write reported to hot/cold");
    check(mem[32'h4000 + 32'h10] == (32'h8000_0000 | 32'h0A0040), "mapping installed");
    request(HOST_READ, 24'h000010, e, p);
    check(!e && p == 24'h0A0040 && n_tlb_hit == 1, "read hits TLB");
    check(last_cmd_is(NC_READ, p, 24'h000010), "read issued");
    f0 = n_ftl_req;
    request(HOST_READ, 24'h000123, e, p);
    check(!e && p == 24'h0C0155 && n_ftl_req == f0, "read resolved by the walk");
    check(last_cmd_is(NC_READ, p, 24'h000123), "read issued after walk");
    request(HOST_READ, 24'h000123, e, p);
    check(n_tlb_hit == 2, "walk refilled the TLB");
    request(HOST_READ, 24'h001050, e, p);
    check(!e && p == 24'h1F0203 && n_ftl_req == f0 + 1, "unmapped read answered by FTL");
    check(mem[32'h5000 + 32'h050] == (32'h8000_0000 | 32'h1F0203), "FTL answer installed");
    request(HOST_READ, 24'h001051, e, p);
    check(e, "FTL refusal ends with err");
    request(HOST_WRITE, 24'h007000, e, p);
    check(e, "write without second-level table ends with err");
    // firmware command pass-through
    @(negedge clk); fw_cmd_valid = 1; fw_cmd_die = 5'd7; fw_cmd.cmd = NC_ERASE; fw_cmd.addr = 42'h12345_0000; #1;
    while (!fw_cmd_ready) begin @(negedge clk); #1; end
    @(posedge clk); #1; fw_cmd_valid = 0;
    repeat (3) @(posedge clk);
    check(got.size() > 0 && got[$].cmd == NC_ERASE && got_die[$] == 5'd7 && got[$].addr == 42'h12345_0000, "firmware command forwarded");
    check(n_tlb_miss >= 3, "misses counted");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
