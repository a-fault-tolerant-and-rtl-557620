// ssd_controller: logic controller of a 3D NAND flash cube, the die that sits
// under a stack of 24 edge-connected SLC NAND dies and two MRAM dies.
//
// The data path is all logic, so that a small processor only handles
// exceptions and flash management policy:
//   host request -> mmu (tlb, ptw -> l1_cache -> mram_ctrl -> MRAM dies)
//                -> channel_mux -> nand_ll_ctrl x N -> NAND dies
// A host request names one logical page (LBA). The MMU translates it (TLB
// first, then a hardware walk of the page table held in MRAM, then the
// firmware on a miss or for a write) and sends a program or read command to
// the low-level controller of the die that holds the page. Write data enters
// on wr_* steered by wr_die (the die of done_ppa), read data leaves on rd_*
// one whole page at a time, and every NAND command ends with a response on
// resp_*. All N dies run their commands concurrently.
// The firmware side (ftl_*, fw_cmd_*, cpu_*) stands for the processor
// running the flash translation layer: it answers MMU notifications, issues
// erase/merge/reset commands and reaches the page table through the L1
// cache's second port. hot_cold tracks write LBAs for garbage collection;
// boot_verifier hashes boot pages with SHA-256.
// Not inside this RTL: the Serial RapidIO host interface, the processor, the
// BCH codec, the compression engine, the DDR4 PHY (the MRAM die ports here are
// simple synchronous word ports) and the dies themselves.
// err_* inputs inject upsets into the TLB and the L1 cache for testing; tie
// them low in normal use.
module ssd_controller
  import ssd_pkg::*;
  import secded_pkg::*;
#(
  parameter int unsigned N           = N_DIES,
  parameter int unsigned DATA_BYTES  = PAGE_DATA_BYTES,
  parameter int unsigned SPR_BYTES   = SPARE_BYTES,
  parameter int unsigned PAGES       = PAGES_PER_BLOCK,
  parameter int unsigned TLB_ENTRIES = 16,
  parameter int unsigned L1_SETS     = 64,
  parameter int unsigned MRAM_LAT    = 2,
  parameter int unsigned HOT_LEN     = 8,
  parameter int unsigned CAND_LEN    = 16,
  parameter int unsigned BOOT_PAGE_BYTES = PAGE_DATA_BYTES
) (
  input  logic                   clk,
  input  logic                   rst_n,
  // host page requests
  input  logic                   req_valid,
  output logic                   req_ready,
  input  host_op_e               req_op,
  input  logic [LBA_W-1:0]       req_lba,
  output logic                   done,
  output logic                   done_err,
  output logic [PPA_W-1:0]       done_ppa,
  input  logic                   wr_valid,
  output logic                   wr_ready,
  input  logic [DIE_W-1:0]       wr_die,
  input  logic [7:0]             wr_data,
  output logic                   rd_valid,
  input  logic                   rd_ready,
  output logic [7:0]             rd_data,
  output logic                   rd_last,
  output logic [DIE_W-1:0]       rd_die,
  output logic                   resp_valid,
  input  logic                   resp_ready,
  output ll_resp_t               resp,
  output logic [DIE_W-1:0]       resp_die,
  // firmware (FTL processor)
  output logic                   ftl_req_valid,
  input  logic                   ftl_req_ready,
  output ftl_kind_e              ftl_kind,
  output logic [LBA_W-1:0]       ftl_lba,
  input  logic                   ftl_rsp_valid,
  input  logic                   ftl_rsp_ok,
  input  logic [PPA_W-1:0]       ftl_rsp_ppa,
  input  logic                   fw_cmd_valid,
  output logic                   fw_cmd_ready,
  input  logic [DIE_W-1:0]       fw_cmd_die,
  input  ll_cmd_t                fw_cmd,
  input  logic                   cpu_req,
  input  logic                   cpu_we,
  input  logic [23:0]            cpu_addr,
  input  logic [31:0]            cpu_wdata,
  output logic                   cpu_ack,
  output logic [31:0]            cpu_rdata,
  input  logic [LBA_W-1:0]       hc_query_lba,
  output logic                   hc_query_hot,
  // boot page check
  input  logic                   boot_start,
  input  logic [255:0]           boot_exp_hash,
  output logic                   boot_busy,
  input  logic                   boot_word_valid,
  output logic                   boot_word_ready,
  input  logic [31:0]            boot_word,
  output logic                   boot_done,
  output logic                   boot_ok,
  // MRAM dies (mirrored pair)
  output logic [1:0]             mr_en,
  output logic                   mr_we,
  output logic [23:0]            mr_addr,
  output logic [SD_CODE_W-1:0]   mr_wdata,
  input  logic [SD_CODE_W-1:0]   mr_rdata [2],
  // NAND dies
  output logic [N-1:0]           nand_ce_n,
  output logic [N-1:0]           nand_cle,
  output logic [N-1:0]           nand_ale,
  output logic [N-1:0]           nand_we_n,
  output logic [N-1:0]           nand_re_n,
  output logic [N-1:0][7:0]      nand_io_out,
  output logic [N-1:0]           nand_io_oe,
  input  logic [N-1:0][7:0]      nand_io_in,
  // upset injection and status
  input  logic                   err_tlb_inject,
  input  logic [$clog2(TLB_ENTRIES)-1:0] err_tlb_idx,
  input  logic                   err_l1_inject,
  input  logic [$clog2(L1_SETS)-1:0] err_l1_set,
  input  logic [1:0]             err_l1_way,
  input  logic [5:0]             err_l1_bit,
  output logic [N-1:0]           die_busy,
  output ssd_stats_t             stats
);
  logic [31:0] timestamp;
  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n) timestamp <= '0; else timestamp <= timestamp + 1;

  // ---------------- address translation ----------------
  logic [LBA_W-1:0] tlb_lba, tlb_fill_lba, ptw_lba, hc_lba;
  logic [PPA_W-1:0] tlb_ppa, tlb_fill_ppa, ptw_ppa, ptw_result;
  logic tlb_hit, tlb_perr, tlb_fill, ptw_valid, ptw_ready, ptw_install, ptw_done, ptw_found, hc_write;
  logic cmd_valid, cmd_ready;
  logic [DIE_W-1:0] cmd_die;
  ll_cmd_t cmd;

  mmu u_mmu (
    .clk, .rst_n,
    .req_valid, .req_ready, .req_op, .req_lba, .done, .done_err, .done_ppa,
    .tlb_lba, .tlb_hit, .tlb_ppa, .tlb_fill, .tlb_fill_lba, .tlb_fill_ppa,
    .ptw_valid, .ptw_ready, .ptw_install, .ptw_lba, .ptw_ppa, .ptw_done, .ptw_found, .ptw_result,
    .ftl_req_valid, .ftl_req_ready, .ftl_kind, .ftl_lba, .ftl_rsp_valid, .ftl_rsp_ok, .ftl_rsp_ppa,
    .fw_cmd_valid, .fw_cmd_ready, .fw_cmd_die, .fw_cmd,
    .cmd_valid, .cmd_ready, .cmd_die, .cmd,
    .hc_write, .hc_lba,
    .n_tlb_hit(stats.tlb_hit), .n_tlb_miss(stats.tlb_miss), .n_ftl_req(stats.ftl_req)
  );

  tlb #(.ENTRIES(TLB_ENTRIES)) u_tlb (
    .clk, .rst_n, .lookup_lba(tlb_lba), .lookup_hit(tlb_hit), .lookup_ppa(tlb_ppa),
    .lookup_perr(tlb_perr), .fill_valid(tlb_fill), .fill_lba(tlb_fill_lba), .fill_ppa(tlb_fill_ppa),
    .inval_all(1'b0), .err_inject(err_tlb_inject), .err_idx(err_tlb_idx),
    .perr_count(stats.tlb_parity_err)
  );

  logic        pt_req, pt_we, pt_ack;
  logic [23:0] pt_addr;
  logic [31:0] pt_wdata;
  ptw u_ptw (
    .clk, .rst_n, .op_valid(ptw_valid), .op_ready(ptw_ready), .op_install(ptw_install),
    .op_lba(ptw_lba), .op_ppa(ptw_ppa), .done(ptw_done), .found(ptw_found), .ppa(ptw_result),
    .mem_req(pt_req), .mem_we(pt_we), .mem_addr(pt_addr), .mem_wdata(pt_wdata),
    .mem_ack(pt_ack), .mem_rdata(cpu_rdata)
  );

  // ---------------- caches ----------------
  logic [1:0]  l1_ack;
  logic [23:0] l1_addr [2];
  logic [31:0] l1_wdata [2];
  logic        m_req, m_we, m_ack, m_unc;
  logic [23:0] m_addr;
  logic [31:0] m_wdata, m_rdata;
  assign l1_addr[0]  = pt_addr;   assign l1_addr[1]  = cpu_addr;
  assign l1_wdata[0] = pt_wdata;  assign l1_wdata[1] = cpu_wdata;
  assign pt_ack  = l1_ack[0];
  assign cpu_ack = l1_ack[1];

  l1_cache #(.SETS(L1_SETS), .AW(24)) u_l1 (
    .clk, .rst_n, .p_req({cpu_req, pt_req}), .p_we({cpu_we, pt_we}),
    .p_addr(l1_addr), .p_wdata(l1_wdata), .p_ack(l1_ack), .p_rdata(cpu_rdata),
    .m_req, .m_we, .m_addr, .m_wdata, .m_ack, .m_rdata,
    .err_inject(err_l1_inject), .err_set(err_l1_set), .err_way(err_l1_way), .err_bit(err_l1_bit),
    .n_hit(stats.l1_hit), .n_miss(stats.l1_miss), .n_corrected(stats.l1_corrected),
    .n_uncorrectable(stats.l1_uncorrectable)
  );

  mram_ctrl #(.AW(24), .LAT(MRAM_LAT)) u_mram (
    .clk, .rst_n, .req(m_req), .we(m_we), .addr(m_addr), .wdata(m_wdata),
    .ack(m_ack), .rdata(m_rdata), .rd_uncorrectable(m_unc),
    .mr_en, .mr_we, .mr_addr, .mr_wdata, .mr_rdata,
    .n_corrected(stats.mram_corrected), .n_mirror_select(stats.mram_mirror_select),
    .n_uncorrectable(stats.mram_uncorrectable)
  );

  // ---------------- flash channels ----------------
  logic [N-1:0] ll_cmd_valid, ll_cmd_ready, ll_wr_valid, ll_wr_ready;
  logic [N-1:0] ll_rd_valid, ll_rd_ready, ll_rd_last, ll_resp_valid, ll_resp_ready;
  ll_cmd_t      ll_cmd;
  logic [7:0]   ll_wr_data;
  logic [7:0]   ll_rd_data [N];
  ll_resp_t     ll_resp [N];

  channel_mux #(.N(N)) u_mux (
    .clk, .rst_n,
    .cmd_valid, .cmd_ready, .cmd_die, .cmd,
    .wr_valid, .wr_ready, .wr_die, .wr_data,
    .rd_valid, .rd_ready, .rd_data, .rd_last, .rd_die,
    .resp_valid, .resp_ready, .resp, .resp_die,
    .ll_cmd_valid, .ll_cmd_ready, .ll_cmd, .ll_wr_valid, .ll_wr_ready, .ll_wr_data,
    .ll_rd_valid, .ll_rd_ready, .ll_rd_data, .ll_rd_last, .ll_resp_valid, .ll_resp_ready, .ll_resp
  );

  for (genvar i = 0; i < N; i++) begin : g_die
    nand_ll_ctrl #(.DATA_BYTES(DATA_BYTES), .SPR_BYTES(SPR_BYTES), .PAGES(PAGES),
                   .DIE_ID(DIE_W'(i))) u_ll (
      .clk, .rst_n, .timestamp,
      .cmd_valid(ll_cmd_valid[i]), .cmd_ready(ll_cmd_ready[i]), .cmd_in(ll_cmd),
      .wr_valid(ll_wr_valid[i]), .wr_ready(ll_wr_ready[i]), .wr_data(ll_wr_data),
      .rd_valid(ll_rd_valid[i]), .rd_ready(ll_rd_ready[i]), .rd_data(ll_rd_data[i]),
      .rd_last(ll_rd_last[i]),
      .resp_valid(ll_resp_valid[i]), .resp_ready(ll_resp_ready[i]), .resp(ll_resp[i]),
      .busy(die_busy[i]),
      .nand_ce_n(nand_ce_n[i]), .nand_cle(nand_cle[i]), .nand_ale(nand_ale[i]),
      .nand_we_n(nand_we_n[i]), .nand_re_n(nand_re_n[i]), .nand_io_out(nand_io_out[i]),
      .nand_io_oe(nand_io_oe[i]), .nand_io_in(nand_io_in[i])
    );
  end

  // ---------------- accelerators ----------------
  hot_cold #(.HOT_LEN(HOT_LEN), .CAND_LEN(CAND_LEN)) u_hot (
    .clk, .rst_n, .wr_valid(hc_write), .wr_lba(hc_lba),
    .query_lba(hc_query_lba), .query_hot(hc_query_hot),
    .n_promote(stats.hot_promote), .n_demote(stats.hot_demote)
  );

  logic [255:0] boot_digest;
  boot_verifier #(.PAGE_BYTES(BOOT_PAGE_BYTES)) u_boot (
    .clk, .rst_n, .start(boot_start), .exp_hash(boot_exp_hash), .busy(boot_busy),
    .word_valid(boot_word_valid), .word_ready(boot_word_ready), .word(boot_word),
    .done(boot_done), .ok(boot_ok), .digest(boot_digest),
    .n_pages_ok(stats.boot_pages_ok), .n_pages_bad(stats.boot_pages_bad)
  );
endmodule
