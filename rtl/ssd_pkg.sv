// ssd_pkg: types, sizes and encodings shared by the flash-cube controller.
//
// Geometry follows the cube described for this controller: 24 SLC NAND dies,
// 8 KB pages with a 448 B spare area, 1 MB blocks (so 128 pages per block)
// and 96 GB in total (so 4096 blocks per die). A physical page address (PPA)
// is {die, block, page}; a logical block address (LBA) numbers 8 KB host
// pages, 24 bits for 96 GB.
//
// The 3-bit command code and the 42-bit address of a low-level controller
// command match the widths of the controller command bus (cmd[2:0],
// address[41:0]); the code points other than 3'b111 (reset) and 3'b001
// (program) and the address field layout are this design's own choice.
package ssd_pkg;

  localparam int unsigned N_DIES          = 24;
  localparam int unsigned DIE_W           = 5;
  localparam int unsigned PAGE_DATA_BYTES = 8192;
  localparam int unsigned SPARE_BYTES     = 448;
  localparam int unsigned PAGES_PER_BLOCK = 128;
  localparam int unsigned PAGE_IDX_W      = 7;
  localparam int unsigned BLOCKS_PER_DIE  = 4096;
  localparam int unsigned BLOCK_W         = 12;
  localparam int unsigned PPA_W           = DIE_W + BLOCK_W + PAGE_IDX_W;  // 24
  localparam int unsigned LBA_W           = 24;
  localparam int unsigned NADDR_W         = 42;

  // Low-level controller command codes (cmd[2:0]).
  typedef enum logic [2:0] {
    NC_PROGRAM = 3'b001,
    NC_READ    = 3'b010,
    NC_ERASE   = 3'b011,
    NC_MERGE   = 3'b100,
    NC_RESET   = 3'b111
  } nand_cmd_e;

  // One request to a low-level controller.
  //  addr[39:16] = row (3 NAND row-address cycles) = {5'b0, block, page}
  //  addr[15:0]  = column (2 NAND column-address cycles), 0 for page ops
  //  For NC_MERGE: addr[35:24] data block, [23:12] log block, [11:0] target block.
  typedef struct packed {
    nand_cmd_e            cmd;
    logic [NADDR_W-1:0]   addr;
    logic [LBA_W-1:0]     lba;     // logical page, seed of the scrambler
  } ll_cmd_t;

  // Completion of a low-level controller request.
  typedef struct packed {
    nand_cmd_e            cmd;
    logic                 fail;      // NAND status FAIL bit or merge failure
    logic                 addr_err;  // read-back PPA/LBA differs from the request
    logic                 crc_err;   // spare-area metadata CRC mismatch
  } ll_resp_t;

  // Micro-operations of the NAND timing controller (one bus cycle each).
  typedef enum logic [1:0] {
    NOP_CMD   = 2'd0,   // command latch cycle (CLE high)
    NOP_ADDR  = 2'd1,   // address latch cycle (ALE high)
    NOP_WDATA = 2'd2,   // data input cycle (WE# pulse)
    NOP_RDATA = 2'd3    // data output cycle (RE# pulse)
  } nand_op_e;

  // Host-side request kinds seen by the MMU.
  typedef enum logic [0:0] {
    HOST_READ  = 1'b0,
    HOST_WRITE = 1'b1
  } host_op_e;

  // FTL notifications raised by the MMU.
  typedef enum logic [0:0] {
    FTL_MISS  = 1'b0,   // read of an LBA with no mapping in the page table
    FTL_ALLOC = 1'b1    // write: firmware picks the next free page
  } ftl_kind_e;

  // Spare-area metadata kept by the controller (leading fields of the
  // 214-byte layout: LBA 12 B, PPA 12 B, timestamp 8 B, bad-block marker 4 B,
  // index 4 B, P/E count 8 B, metadata ECC 16 B, ...).
  localparam int unsigned SPARE_HDR_BYTES = 52;   // up to the first CRC word
  typedef struct packed {
    logic [LBA_W-1:0] lba;
    logic [PPA_W-1:0] ppa;
    logic [31:0]      timestamp;
    logic [31:0]      pe_count;
  } spare_meta_t;

  // Event counters brought out of the controller.
  typedef struct packed {
    logic [31:0] tlb_hit;
    logic [31:0] tlb_miss;
    logic [15:0] tlb_parity_err;
    logic [31:0] ftl_req;
    logic [31:0] l1_hit;
    logic [31:0] l1_miss;
    logic [31:0] l1_corrected;
    logic [31:0] l1_uncorrectable;
    logic [31:0] mram_corrected;
    logic [31:0] mram_mirror_select;
    logic [31:0] mram_uncorrectable;
    logic [31:0] hot_promote;
    logic [31:0] hot_demote;
    logic [31:0] boot_pages_ok;
    logic [31:0] boot_pages_bad;
  } ssd_stats_t;

  function automatic logic [PPA_W-1:0] make_ppa(logic [DIE_W-1:0] die,
                                                logic [BLOCK_W-1:0] blk,
                                                logic [PAGE_IDX_W-1:0] pg);
    return {die, blk, pg};
  endfunction

  function automatic logic [DIE_W-1:0] ppa_die(logic [PPA_W-1:0] ppa);
    return ppa[PPA_W-1 -: DIE_W];
  endfunction

  // NAND row address of a PPA (die bits dropped: the die is chosen by the mux).
  function automatic logic [23:0] ppa_row(logic [PPA_W-1:0] ppa);
    return 24'(ppa[BLOCK_W+PAGE_IDX_W-1:0]);
  endfunction

  // CRC-32 (IEEE 802.3, reflected, init and final xor all ones), one byte.
  function automatic logic [31:0] crc32_byte(logic [31:0] crc, logic [7:0] b);
    logic [31:0] c;
    c = crc ^ {24'd0, b};
    for (int i = 0; i < 8; i++)
      c = c[0] ? ((c >> 1) ^ 32'hEDB88320) : (c >> 1);
    return c;
  endfunction

endpackage
