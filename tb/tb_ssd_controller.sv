// tb_ssd_controller: end-to-end test of the flash-cube controller at reduced
// size (4 dies, 64 B pages + 64 B spare, 4-entry TLB, 8-set L1 cache, 64 B
// boot pages) with behavioural NAND and MRAM dies and a small firmware model
// that allocates pages log-structured, die after die.
// It writes and reads back pages through the whole path and makes every
// mechanism happen at least once, counting each: TLB hit, TLB miss with a
// page-table walk, FTL allocation, FTL miss (unmapped read), TLB parity
// error, L1 single-error correction, L1 double-error refetch, MRAM mirror
// down-selection, concurrent die operation, interleaved read return, block
// merge, spare-area CRC error, hot-list promotion and demotion, boot page
// hash pass and fail.
module tb_ssd_controller;
  import ssd_pkg::*;
  import secded_pkg::*;
  localparam int N = 4, DB = 64, SB = 64, PG = 4, TLBE = 4, SETS = 8, BOOTB = 64;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;
  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  logic req_valid = 0, req_ready; host_op_e req_op = HOST_READ; logic [LBA_W-1:0] req_lba = 0;
  logic done, done_err; logic [PPA_W-1:0] done_ppa;
  logic wr_valid = 0, wr_ready; logic [DIE_W-1:0] wr_die = 0; logic [7:0] wr_data = 0;
  logic rd_valid, rd_ready = 1, rd_last; logic [7:0] rd_data; logic [DIE_W-1:0] rd_die;
  logic resp_valid, resp_ready = 1; ll_resp_t resp; logic [DIE_W-1:0] resp_die;
  logic ftl_req_valid, ftl_req_ready = 1; ftl_kind_e ftl_kind; logic [LBA_W-1:0] ftl_lba;
  logic ftl_rsp_valid = 0, ftl_rsp_ok = 0; logic [PPA_W-1:0] ftl_rsp_ppa = 0;
  logic fw_cmd_valid = 0, fw_cmd_ready; logic [DIE_W-1:0] fw_cmd_die = 0; ll_cmd_t fw_cmd = '0;
  logic cpu_req = 0, cpu_we = 0, cpu_ack; logic [23:0] cpu_addr = 0; logic [31:0] cpu_wdata = 0, cpu_rdata;
  logic [LBA_W-1:0] hc_query_lba = 0; logic hc_query_hot;
  logic boot_start = 0, boot_busy, boot_word_valid = 0, boot_word_ready, boot_done, boot_ok;
  logic [255:0] boot_exp_hash = 0; logic [31:0] boot_word = 0;
  logic [1:0] mr_en; logic mr_we; logic [23:0] mr_addr; logic [SD_CODE_W-1:0] mr_wdata, mr_rdata [2];
  logic [N-1:0] nand_ce_n, nand_cle, nand_ale, nand_we_n, nand_re_n, nand_io_oe, die_busy;
  logic [N-1:0][7:0] nand_io_out, nand_io_in;
  logic err_tlb_inject = 0; logic [1:0] err_tlb_idx = 0;
  logic err_l1_inject = 0; logic [2:0] err_l1_set = 0; logic [1:0] err_l1_way = 0; logic [5:0] err_l1_bit = 0;
  ssd_stats_t stats;

  ssd_controller #(.N(N), .DATA_BYTES(DB), .SPR_BYTES(SB), .PAGES(PG), .TLB_ENTRIES(TLBE),
                   .L1_SETS(SETS), .BOOT_PAGE_BYTES(BOOTB)) dut (.*);

  for (genvar i = 0; i < N; i++) begin : g_nand
    nand_die_model #(.DATA_BYTES(DB), .SPR_BYTES(SB), .PAGES(PG), .T_PROG(300), .T_READ(40), .T_ERASE(400)) die (
      .clk, .ce_n(nand_ce_n[i]), .cle(nand_cle[i]), .ale(nand_ale[i]), .we_n(nand_we_n[i]),
      .re_n(nand_re_n[i]), .io_in(nand_io_out[i]), .io_out(nand_io_in[i]));
  end
  for (genvar i = 0; i < 2; i++) begin : g_mram
    mram_die_model #(.LAT(2)) m (.clk, .en(mr_en[i]), .we(mr_we), .addr(mr_addr), .wdata(mr_wdata), .rdata(mr_rdata[i]));
  end

  // ---------------- firmware model: log-structured allocation ----------------
  localparam logic [23:0] L2_BASE = 24'h001000;
  int alloc_k = 0;
  logic [PPA_W-1:0] shadow [int];     // LBA -> PPA as the firmware knows it
  int n_alloc = 0, n_miss = 0;
  always @(posedge clk) begin
    ftl_rsp_valid <= 1'b0;
    if (ftl_req_valid && ftl_req_ready) begin
      ftl_rsp_valid <= 1'b1;
      if (ftl_kind == FTL_ALLOC) begin
        logic [PPA_W-1:0] p;
        p = make_ppa(DIE_W'(alloc_k % N), 12'd1, 7'(alloc_k / N));
        alloc_k++;
        shadow[int'(ftl_lba)] = p;
        ftl_rsp_ok <= 1'b1; ftl_rsp_ppa <= p;
        n_alloc++;
      end else begin
        ftl_rsp_ok <= 1'b0; ftl_rsp_ppa <= '0;
        n_miss++;
      end
    end
  end

  // ---------------- response and read-data monitors ----------------
  int n_resp [nand_cmd_e];
  int n_resp_fail = 0, n_resp_crc = 0, n_resp_addr = 0;
  logic [7:0] rdq [N][$];
  int max_busy = 0, n_interleave = 0;
  logic [DIE_W-1:0] last_rd_die = 0; logic last_was_last = 1;
  always @(posedge clk) begin
    int nb;
    if (rst_n && resp_valid && resp_ready) begin
      n_resp[resp.cmd]++;
      if (resp.fail) n_resp_fail++;
      if (resp.crc_err) n_resp_crc++;
      if (resp.addr_err) n_resp_addr++;
    end
    if (rst_n && rd_valid && rd_ready) begin
      rdq[rd_die].push_back(rd_data);
      if (last_was_last && rd_die != last_rd_die) n_interleave++;
      last_rd_die <= rd_die;
      last_was_last <= rd_last;
    end
    nb = $countones(die_busy);
    if (nb > max_busy) max_busy = nb;
  end

  // ---------------- host tasks ----------------
  function automatic logic [7:0] pat(int lba, int gen, int i);
    return 8'(lba * 29 + gen * 101 + i * 3 + (i >> 4));
  endfunction

  task automatic host_req(host_op_e op, logic [LBA_W-1:0] l, output logic err, output logic [PPA_W-1:0] p);
    @(negedge clk);
    req_valid = 1; req_op = op; req_lba = l;
    #1;
    while (!req_ready) begin @(negedge clk); #1; end
    @(posedge clk); #1;
    req_valid = 0;
    while (!done) begin @(negedge clk); #1; end
    err = done_err; p = done_ppa;
  endtask

  task automatic host_write(int l, int gen, output logic [PPA_W-1:0] p);
    logic err;
    host_req(HOST_WRITE, LBA_W'(l), err, p);
    check(!err, "write translated");
    for (int i = 0; i < DB; i++) begin
      @(negedge clk);
      wr_valid = 1; wr_die = ppa_die(p); wr_data = pat(l, gen, i);
      #1;
      while (!wr_ready) begin @(negedge clk); #1; end
    end
    @(posedge clk); #1;
    wr_valid = 0;
  endtask

  task automatic host_read_req(int l, output logic err, output logic [PPA_W-1:0] p);
    host_req(HOST_READ, LBA_W'(l), err, p);
  endtask

  task automatic wait_page(int die, int l, int gen);
    int t; bit same;
    t = 0;
    while (rdq[die].size() < DB && t < 100000) begin @(posedge clk); t++; end
    same = 1;
    for (int i = 0; i < DB; i++) begin
      logic [7:0] b;
      b = rdq[die].pop_front();
      if (b !== pat(l, gen, i)) same = 0;
    end
    check(same, $sformatf("page of LBA %0d read back", l));
  endtask

  task automatic wait_idle();
    int t; t = 0;
    while ((die_busy != 0 || resp_valid) && t < 200000) begin @(posedge clk); t++; end
    repeat (4) @(posedge clk);
  endtask

  task automatic fw_issue(int die, nand_cmd_e c, logic [41:0] a);
    @(negedge clk);
    fw_cmd_valid = 1; fw_cmd_die = DIE_W'(die); fw_cmd = '{cmd: c, addr: a, lba: '0};
    #1;
    while (!fw_cmd_ready) begin @(negedge clk); #1; end
    @(posedge clk); #1;
    fw_cmd_valid = 0;
  endtask

  task automatic cpu_access(bit we, logic [23:0] a, logic [31:0] d, output logic [31:0] q);
    @(negedge clk);
    cpu_req = 1; cpu_we = we; cpu_addr = a; cpu_wdata = d;
    #1;
    while (!cpu_ack) begin @(negedge clk); #1; end
    q = cpu_rdata;
    @(posedge clk); #1;
    cpu_req = 0;
  endtask

  initial begin
    repeat (400000) @(posedge clk);
    failures++; $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic err; logic [PPA_W-1:0] p; logic [31:0] q;
    logic [PPA_W-1:0] ppa_of [16];
    int hits0, miss0, interleave0;
    repeat (3) @(posedge clk); rst_n = 1;
    repeat (2) @(posedge clk);

    // firmware: reset every die, create the second-level table for LBAs 0..4095
    for (int d = 0; d < N; d++) fw_issue(d, NC_RESET, '0);
    cpu_access(1, 24'h000000, {1'b1, 7'd0, L2_BASE}, q);
    cpu_access(0, 24'h000000, 0, q);
    check(q == {1'b1, 7'd0, L2_BASE}, "page directory readable through L1");
    wait_idle();
    check(n_resp[NC_RESET] == N, "all dies reset");

    // write 8 pages back to back: round-robin over the dies, concurrent programs
    for (int l = 0; l < 8; l++) begin host_write(l, 0, p); ppa_of[l] = p; end
    check(max_busy >= 2, "several dies programming at once");
    wait_idle();
    check(n_resp[NC_PROGRAM] == 8 && n_resp_fail == 0, "8 programs completed");
    check(n_alloc == 8, "firmware allocated each written page");
    check(ppa_die(ppa_of[1]) == 1 && ppa_die(ppa_of[4]) == 0, "pages spread over dies");

    // read back: LBAs 4..7 are still in the 4-entry TLB, 0..3 need walks
    hits0 = int'(stats.tlb_hit); miss0 = int'(stats.tlb_miss); interleave0 = n_interleave;
    for (int l = 7; l >= 4; l--) begin
      host_read_req(l, err, p);
      check(!err && p == ppa_of[l], "read translated by TLB");
    end
    for (int l = 4; l < 8; l++) wait_page(int'(ppa_die(ppa_of[l])), l, 0);
    check(int'(stats.tlb_hit) - hits0 == 4, "TLB hits");
    for (int l = 0; l < 4; l++) begin
      host_read_req(l, err, p);
      check(!err && p == ppa_of[l], "read translated by page-table walk");
    end
    for (int l = 0; l < 4; l++) wait_page(int'(ppa_die(ppa_of[l])), l, 0);
    check(int'(stats.tlb_miss) - miss0 == 4, "TLB misses walked");
    check(n_interleave - interleave0 >= 2, "read pages of different dies returned in turn");
    wait_idle();
    check(n_resp_crc == 0 && n_resp_addr == 0, "clean reads");

    // unmapped LBA: FTL notified, request ends with error
    host_read_req(2000, err, p);
    check(err && n_miss == 1, "unmapped read reported to the FTL");

    // TLB upset: corrupt every entry, reads still return correct data
    for (int i = 0; i < TLBE; i++) begin
      @(negedge clk); err_tlb_inject = 1; err_tlb_idx = 2'(i);
      @(negedge clk); err_tlb_inject = 0;
    end
    host_read_req(0, err, p);
    check(!err && p == ppa_of[0], "TLB parity error recovered by walk");
    wait_page(int'(ppa_die(ppa_of[0])), 0, 0);
    check(stats.tlb_parity_err >= 1, "TLB parity error detected");

    // L1 upsets on the page-directory word (set 0): one bit, then two bits
    for (int w = 0; w < 4; w++) begin
      @(negedge clk); err_l1_inject = 1; err_l1_set = 0; err_l1_way = 2'(w); err_l1_bit = 6'd5;
      @(negedge clk); err_l1_inject = 0;
    end
    cpu_access(0, 24'h000000, 0, q);
    check(q == {1'b1, 7'd0, L2_BASE}, "L1 single error corrected");
    check(stats.l1_corrected >= 1, "L1 correction counted");
    for (int w = 0; w < 4; w++) begin
      @(negedge clk); err_l1_inject = 1; err_l1_way = 2'(w); err_l1_bit = 6'd9;
      @(negedge clk); err_l1_bit = 6'd12;
      @(negedge clk); err_l1_inject = 0;
    end
    cpu_access(0, 24'h000000, 0, q);
    check(q == {1'b1, 7'd0, L2_BASE}, "L1 double error refetched from MRAM");
    check(stats.l1_uncorrectable >= 1, "L1 double error counted");

    // MRAM upset: two bits of the directory word in die A, evict it from L1
    g_mram[0].m.flip_bit(0, 3);
    g_mram[0].m.flip_bit(0, 20);
    for (int k = 1; k <= 4; k++) cpu_access(0, 24'(k * SETS), 0, q);   // fill set 0
    cpu_access(0, 24'h000000, 0, q);
    check(q == {1'b1, 7'd0, L2_BASE}, "MRAM mirror copy selected");
    check(stats.mram_mirror_select >= 1, "MRAM down-selection counted");

    // rewrite LBAs 1 and 5 several times: hot-list promotion and demotion
    for (int r = 1; r <= 2; r++) begin
      host_write(1, r, p); ppa_of[1] = p;
      host_write(5, r, p); ppa_of[5] = p;
    end
    hc_query_lba = 1; #1;
    check(hc_query_hot, "rewritten LBA is hot");
    hc_query_lba = 3; #1;
    check(!hc_query_hot, "LBA written once is not hot");
    for (int l = 100; l < 110; l++) begin host_write(l, 0, p); host_write(l, 1, p); end
    check(stats.hot_promote >= 2 && stats.hot_demote >= 1, "hot list promotion and demotion");
    wait_idle();
    host_read_req(5, err, p);
    wait_page(int'(ppa_die(p)), 5, 2);

    // merge on die 3: block 1 (data) pages were written above; merge into block 6
    begin
      int merges0; merges0 = n_resp[NC_MERGE];
      fw_issue(3, NC_MERGE, {6'b0, 12'd1, 12'd2, 12'd6});
      wait_idle();
      check(n_resp[NC_MERGE] == merges0 + 1, "block merge done");
    end
    // LBA 3 lived on die 3 block 1 page 0; after the merge it is at block 6 page 0
    begin
      int pos; pos = 0;
      for (int i = 0; i < DB; i++) if (g_nand[3].die.mem.exists(g_nand[3].die.key(6 * 128, i))) pos++;
      check(pos > 0, "merged page present in target block");
      check(!g_nand[3].die.mem.exists(g_nand[3].die.key(1 * 128, 0)), "source block erased");
    end
    // reading LBA 3 at its old place now fails the spare CRC check
    begin
      int crc0; crc0 = n_resp_crc;
      host_read_req(3, err, p);
      while (rdq[3].size() < DB) @(posedge clk);
      rdq[3].delete();
      wait_idle();
      check(n_resp_crc == crc0 + 1, "stale page flagged by spare CRC");
    end

    // boot page verification: good page then corrupted page
    for (int pass = 0; pass < 2; pass++) begin
      @(negedge clk);
      boot_start = 1;
      boot_exp_hash = 256'h39e3d7b6b5d075d37d053ad89b24b41bef4f3c29760c84447cab3f3be1882241;
      @(negedge clk); boot_start = 0;
      for (int w = 0; w < BOOTB / 4; w++) begin
        logic [31:0] v;
        for (int b = 0; b < 4; b++) v[31 - 8*b -: 8] = 8'((4*w + b) * 7 + 3);
        if (pass == 1 && w == 3) v[0] = ~v[0];
        @(negedge clk); boot_word_valid = 1; boot_word = v; #1;
        while (!boot_word_ready) begin @(negedge clk); #1; end
      end
      @(posedge clk); #1; boot_word_valid = 0;
      while (!boot_done) begin @(negedge clk); #1; end
      check(boot_ok == (pass == 0), pass == 0 ? "boot page hash matches" : "corrupted boot page rejected");
    end

    // mechanism summary
    $display("mechanisms: tlb_hit=%0d tlb_miss=%0d tlb_parity=%0d ftl_alloc=%0d ftl_miss=%0d l1_corr=%0d l1_unc=%0d mram_sel=%0d max_busy=%0d interleave=%0d merge=%0d crc_err=%0d promote=%0d demote=%0d boot_ok=%0d boot_bad=%0d",
             stats.tlb_hit, stats.tlb_miss, stats.tlb_parity_err, n_alloc, n_miss, stats.l1_corrected,
             stats.l1_uncorrectable, stats.mram_mirror_select, max_busy, n_interleave, n_resp[NC_MERGE],
             n_resp_crc, stats.hot_promote, stats.hot_demote, stats.boot_pages_ok, stats.boot_pages_bad);
    check(stats.tlb_hit > 0 && stats.tlb_miss > 0 && stats.tlb_parity_err > 0 && n_alloc > 0 && n_miss > 0 &&
          stats.l1_corrected > 0 && stats.l1_uncorrectable > 0 && stats.mram_mirror_select > 0 &&
          max_busy > 1 && n_interleave > 0 && n_resp[NC_MERGE] > 0 && n_resp_crc > 0 &&
          stats.hot_promote > 0 && stats.hot_demote > 0 && stats.boot_pages_ok > 0 && stats.boot_pages_bad > 0,
          "every mechanism happened");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
