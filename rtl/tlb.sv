// tlb: translation-lookaside buffer caching the most recent LBA -> PPA
// mappings of the flash translation layer.
//
// Fully associative, ENTRIES entries, each holding {lba, ppa} and an even
// parity bit over both, so that an upset in a stored entry is detected. The
// lookup is combinational: lookup_hit/lookup_ppa for lookup_lba in the same
// clock. A matching entry whose parity fails is not a hit: lookup_perr is
// raised and the entry is dropped at the next clock, so the mapping is simply
// fetched again from the page table (which lives in the MRAM) and refilled.
// fill_valid writes a mapping, replacing an entry with the same LBA, else a
// free entry, else the round-robin victim. inval_all clears the TLB.
// err_inject flips one stored PPA bit of entry err_idx (upset injection for
// tests). Parity protection follows the described architecture; the size,
// associativity and replacement are this design's choice.
module tlb
  import ssd_pkg::*;
#(
  parameter int unsigned ENTRIES = 16
) (
  input  logic                       clk,
  input  logic                       rst_n,
  input  logic [LBA_W-1:0]           lookup_lba,
  output logic                       lookup_hit,
  output logic [PPA_W-1:0]           lookup_ppa,
  output logic                       lookup_perr,
  input  logic                       fill_valid,
  input  logic [LBA_W-1:0]           fill_lba,
  input  logic [PPA_W-1:0]           fill_ppa,
  input  logic                       inval_all,
  input  logic                       err_inject,
  input  logic [$clog2(ENTRIES)-1:0] err_idx,
  output logic [15:0]                perr_count
);
  localparam int unsigned IW = $clog2(ENTRIES);
  typedef struct packed {
    logic             valid;
    logic             par;
    logic [LBA_W-1:0] lba;
    logic [PPA_W-1:0] ppa;
  } entry_t;
  entry_t ent [ENTRIES];
  logic [IW-1:0] victim, match_idx, free_idx, fill_idx;
  logic match_any, match_bad, free_any, fill_match;

  always_comb begin
    match_any = 1'b0; match_idx = '0; match_bad = 1'b0;
    for (int i = 0; i < ENTRIES; i++)
      if (ent[i].valid && ent[i].lba == lookup_lba && !match_any) begin
        match_any = 1'b1;
        match_idx = IW'(i);
        match_bad = (^{ent[i].lba, ent[i].ppa}) != ent[i].par;
      end
    lookup_hit  = match_any && !match_bad;
    lookup_perr = match_any && match_bad;
    lookup_ppa  = ent[match_idx].ppa;

    fill_match = 1'b0; fill_idx = '0; free_any = 1'b0; free_idx = '0;
    for (int i = 0; i < ENTRIES; i++) begin
      if (ent[i].valid && ent[i].lba == fill_lba && !fill_match) begin
        fill_match = 1'b1; fill_idx = IW'(i);
      end
      if (!ent[i].valid && !free_any) begin
        free_any = 1'b1; free_idx = IW'(i);
      end
    end
    if (!fill_match) fill_idx = free_any ? free_idx : victim;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int i = 0; i < ENTRIES; i++) ent[i] <= '0;
      victim <= '0;
      perr_count <= '0;
    end else begin
      if (inval_all) begin
        for (int i = 0; i < ENTRIES; i++) ent[i].valid <= 1'b0;
      end else begin
        if (lookup_perr) begin
          ent[match_idx].valid <= 1'b0;
          perr_count <= perr_count + 1'b1;
        end
        if (err_inject) ent[err_idx].ppa[0] <= ~ent[err_idx].ppa[0];
        if (fill_valid) begin
          ent[fill_idx] <= '{valid: 1'b1, par: ^{fill_lba, fill_ppa}, lba: fill_lba, ppa: fill_ppa};
          if (!fill_match && !free_any) victim <= (victim == IW'(ENTRIES - 1)) ? '0 : victim + 1'b1;
        end
      end
    end
  end
endmodule
