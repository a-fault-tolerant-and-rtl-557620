// hot_cold: hot-page identification for garbage collection, done in RTL.
//
// Two fixed-length LRU lists of LBAs are kept: the hot list (HOT_LEN
// entries) and the candidate hot list (CAND_LEN entries), both updated on
// every host write (wr_valid, wr_lba):
//  * LBA in the hot list: it moves to the head (most recent) of the hot list.
//  * LBA in the candidate list: it is promoted to the head of the hot list;
//    if the hot list was full its tail (least recent) is demoted to the head
//    of the candidate list.
//  * otherwise: it enters at the head of the candidate list, whose tail
//    falls out when full.
// query_lba -> query_hot is combinational, for the garbage collector, which
// avoids copying pages that are likely to be overwritten soon. Index 0 is
// the head of each list. The two-list scheme follows the described
// architecture; the list lengths are this design's choice.
module hot_cold
  import ssd_pkg::*;
#(
  parameter int unsigned HOT_LEN  = 8,
  parameter int unsigned CAND_LEN = 16
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             wr_valid,
  input  logic [LBA_W-1:0] wr_lba,
  input  logic [LBA_W-1:0] query_lba,
  output logic             query_hot,
  output logic [31:0]      n_promote,
  output logic [31:0]      n_demote
);
  logic [LBA_W-1:0] hot   [HOT_LEN];
  logic [HOT_LEN-1:0] hot_v;
  logic [LBA_W-1:0] cand  [CAND_LEN];
  logic [CAND_LEN-1:0] cand_v;

  logic [LBA_W-1:0] hot_n  [HOT_LEN];
  logic [HOT_LEN-1:0] hot_vn;
  logic [LBA_W-1:0] cand_n [CAND_LEN];
  logic [CAND_LEN-1:0] cand_vn;
  logic in_hot, in_cand, hot_full, promote, demote;
  int unsigned hi, ci, top;
  logic [LBA_W-1:0] cand_t [CAND_LEN];
  logic [CAND_LEN-1:0] cand_vt;

  always_comb begin
    query_hot = 1'b0;
    for (int i = 0; i < HOT_LEN; i++) if (hot_v[i] && hot[i] == query_lba) query_hot = 1'b1;
  end

  always_comb begin
    in_hot = 1'b0; in_cand = 1'b0; hi = HOT_LEN - 1; ci = CAND_LEN - 1;
    for (int i = HOT_LEN - 1; i >= 0; i--)  if (hot_v[i] && hot[i] == wr_lba)  begin in_hot = 1'b1;  hi = i; end
    for (int i = CAND_LEN - 1; i >= 0; i--) if (cand_v[i] && cand[i] == wr_lba) begin in_cand = 1'b1; ci = i; end
    hot_full = &hot_v;
    promote  = !in_hot && in_cand;
    demote   = promote && hot_full;
    hot_n = hot; hot_vn = hot_v; cand_n = cand; cand_vn = cand_v; cand_t = cand; cand_vt = cand_v;
    top = HOT_LEN - 1;
    if (in_hot || promote) begin
      // hot list: shift entries above the removed slot down, insert at head.
      // For a promotion the removed slot is the tail (or first free slot).
      if (in_hot) top = hi;
      else for (int i = HOT_LEN - 1; i >= 0; i--) if (!hot_v[i]) top = i;
      for (int i = HOT_LEN - 1; i > 0; i--)
        if (i <= int'(top)) begin hot_n[i] = hot[i-1]; hot_vn[i] = hot_v[i-1]; end
      hot_n[0] = wr_lba; hot_vn[0] = 1'b1;
    end
    if (promote) begin
      // candidate list: remove slot ci; insert the demoted hot tail at head
      for (int i = 0; i < CAND_LEN - 1; i++)
        if (i >= int'(ci)) begin cand_t[i] = cand[i+1]; cand_vt[i] = cand_v[i+1]; end
      cand_vt[CAND_LEN-1] = 1'b0;
      cand_n = cand_t; cand_vn = cand_vt;
      if (demote) begin
        for (int i = CAND_LEN - 1; i > 0; i--) begin cand_n[i] = cand_t[i-1]; cand_vn[i] = cand_vt[i-1]; end
        cand_n[0] = hot[HOT_LEN-1]; cand_vn[0] = 1'b1;
      end
    end else if (!in_hot) begin
      for (int i = CAND_LEN - 1; i > 0; i--) begin cand_n[i] = cand[i-1]; cand_vn[i] = cand_v[i-1]; end
      cand_n[0] = wr_lba; cand_vn[0] = 1'b1;
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      hot_v <= '0; cand_v <= '0; n_promote <= '0; n_demote <= '0;
      for (int i = 0; i < HOT_LEN; i++) hot[i] <= '0;
      for (int i = 0; i < CAND_LEN; i++) cand[i] <= '0;
    end else if (wr_valid) begin
      hot <= hot_n; hot_v <= hot_vn; cand <= cand_n; cand_v <= cand_vn;
      if (promote) n_promote <= n_promote + 1;
      if (demote)  n_demote  <= n_demote + 1;
    end
  end
endmodule
