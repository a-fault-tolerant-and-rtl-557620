// tb_ssd_full: one complete operation of the controller at its default size
// (24 dies, 8192 B pages with 448 B spare, 128 pages per block): the
// firmware model resets a die and creates a page-table level, a host write
// of one logical page is translated, allocated on die 5 and programmed, and
// a host read of the same page is translated through the TLB and returns the
// same 8192 bytes. A full 8 KB boot page is also hashed and checked against
// its SHA-256 digest. The NAND bus time of the page transfer is checked
// against 3 clocks per byte.
module tb_ssd_full;
  import ssd_pkg::*;
  import secded_pkg::*;
  localparam int N = N_DIES, DB = PAGE_DATA_BYTES, SB = SPARE_BYTES;
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
  logic err_tlb_inject = 0; logic [3:0] err_tlb_idx = 0;
  logic err_l1_inject = 0; logic [5:0] err_l1_set = 0; logic [1:0] err_l1_way = 0; logic [5:0] err_l1_bit = 0;
  ssd_stats_t stats;

  ssd_controller dut (.*);

  for (genvar i = 0; i < N; i++) begin : g_nand
    nand_die_model #(.DATA_BYTES(DB), .SPR_BYTES(SB), .PAGES(PAGES_PER_BLOCK)) die (
      .clk, .ce_n(nand_ce_n[i]), .cle(nand_cle[i]), .ale(nand_ale[i]), .we_n(nand_we_n[i]),
      .re_n(nand_re_n[i]), .io_in(nand_io_out[i]), .io_out(nand_io_in[i]));
  end
  for (genvar i = 0; i < 2; i++) begin : g_mram
    mram_die_model #(.LAT(2)) m (.clk, .en(mr_en[i]), .we(mr_we), .addr(mr_addr), .wdata(mr_wdata), .rdata(mr_rdata[i]));
  end

  // firmware model: the page goes to die 5, block 7, page 3
  localparam logic [PPA_W-1:0] TARGET = {5'd5, 12'd7, 7'd3};
  always @(posedge clk) begin
    ftl_rsp_valid <= ftl_req_valid && ftl_req_ready;
    ftl_rsp_ok    <= (ftl_kind == FTL_ALLOC);
    ftl_rsp_ppa   <= TARGET;
  end

  logic [7:0] rdq [$];
  int n_resp = 0, n_resp_err = 0;
  always @(posedge clk) begin
    if (rst_n && rd_valid && rd_ready) rdq.push_back(rd_data);
    if (rst_n && resp_valid && resp_ready) begin
      n_resp++;
      if (resp.fail || resp.crc_err || resp.addr_err) n_resp_err++;
    end
  end
  // NAND bus data cycles on die 5
  longint cyc = 0, t_first = 0, t_last = 0; int n_wd = 0; logic pwe = 1;
  always @(posedge clk) begin
    cyc++;
    pwe <= nand_we_n[5];
    if (rst_n && !nand_ce_n[5] && !pwe && nand_we_n[5] && !nand_cle[5] && !nand_ale[5]) begin
      if (n_wd == 0) t_first = cyc;
      t_last = cyc; n_wd++;
    end
  end

  function automatic logic [7:0] pat(int i);
    return 8'(i * 13 + (i >> 8) + 5);
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

  initial begin
    repeat (3000000) @(posedge clk);
    failures++; $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic err; logic [PPA_W-1:0] p; bit same;
    repeat (3) @(posedge clk); rst_n = 1;
    repeat (2) @(posedge clk);
    // firmware: reset die 5, second-level table for LBAs 0..4095
    @(negedge clk); fw_cmd_valid = 1; fw_cmd_die = 5; fw_cmd = '{cmd: NC_RESET, addr: '0, lba: '0}; #1;
    while (!fw_cmd_ready) begin @(negedge clk); #1; end
    @(posedge clk); #1; fw_cmd_valid = 0;
    @(negedge clk); cpu_req = 1; cpu_we = 1; cpu_addr = 0; cpu_wdata = 32'h8000_1000; #1;
    while (!cpu_ack) begin @(negedge clk); #1; end
    @(posedge clk); #1; cpu_req = 0;

    // write LBA 42
    host_req(HOST_WRITE, 24'd42, err, p);
    check(!err && p == TARGET, "write allocated on die 5");
    for (int i = 0; i < DB; i++) begin
      @(negedge clk); wr_valid = 1; wr_die = 5; wr_data = pat(i); #1;
      while (!wr_ready) begin @(negedge clk); #1; end
    end
    @(posedge clk); #1; wr_valid = 0;
    while (n_resp < 2) @(posedge clk);
    check(n_resp_err == 0, "reset and program completed");
    check(n_wd == DB + SB, $sformatf("page and spare area sent (%0d cycles, %0d clocks)", n_wd, t_last - t_first));
    check(t_last - t_first == 3 * (DB + SB - 1), "3 clocks per byte on the NAND bus");

    // read LBA 42 back
    host_req(HOST_READ, 24'd42, err, p);
    check(!err && p == TARGET, "read translated");
    check(stats.tlb_hit == 1, "translation from the TLB");
    while (rdq.size() < DB) @(posedge clk);
    same = 1;
    for (int i = 0; i < DB; i++) if (rdq[i] !== pat(i)) same = 0;
    check(same, "8 KB page read back intact");
    while (n_resp < 3) @(posedge clk);
    check(n_resp_err == 0, "read response clean");

    // boot page: 8192 bytes, byte i = 7i + 3
    @(negedge clk); boot_start = 1;
    boot_exp_hash = 256'h79a68194a5a1dc354264d70a556ff0a6acf1478d589a98cbb22bbb81fe55b5e5;
    @(negedge clk); boot_start = 0;
    for (int w = 0; w < DB / 4; w++) begin
      logic [31:0] v;
      for (int b = 0; b < 4; b++) v[31 - 8*b -: 8] = 8'((4*w + b) * 7 + 3);
      @(negedge clk); boot_word_valid = 1; boot_word = v; #1;
      while (!boot_word_ready) begin @(negedge clk); #1; end
    end
    @(posedge clk); #1; boot_word_valid = 0;
    while (!boot_done) begin @(negedge clk); #1; end
    check(boot_ok, "8 KB boot page hash matches");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
