// boot_verifier: hash check of the boot loader. The firmware image is kept in
// the lowest block of each NAND die together with a table holding one SHA-256
// digest per code page; while the image is copied into the processor's
// memories, every page is hashed in hardware and compared with its table
// entry, so that only a valid copy is used.
//
// start (with exp_hash, the page's table entry) begins a page; the page's
// PAGE_BYTES bytes then arrive as 32-bit big-endian words on
// word_valid/word_ready. Every 16 words form a block for sha256_core; after
// the last word the standard padding block (0x80, zeros, the 64-bit bit
// length) is hashed, which is a whole block because a page is a multiple of
// 64 bytes. done pulses with ok = (digest == exp_hash) and digest.
// Per page: PAGE_BYTES/64 + 1 blocks of 66 clocks each, plus word transfer.
// Hashing each page with SHA-256 in RTL follows the described boot loader;
// the word interface and the per-page start are this design's choice.
module boot_verifier #(
  parameter int unsigned PAGE_BYTES = 8192
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         start,
  input  logic [255:0] exp_hash,
  output logic         busy,
  input  logic         word_valid,
  output logic         word_ready,
  input  logic [31:0]  word,
  output logic         done,
  output logic         ok,
  output logic [255:0] digest,
  output logic [31:0]  n_pages_ok,
  output logic [31:0]  n_pages_bad
);
  localparam int unsigned WORDS = PAGE_BYTES / 4;
  localparam logic [63:0] BITLEN = 64'(PAGE_BYTES) * 64'd8;

  typedef enum logic [2:0] {B_IDLE, B_INIT, B_FILL, B_HASH, B_PAD, B_PADWAIT, B_CMP} bstate_e;
  bstate_e       state;
  logic [511:0]  buffer;
  logic [3:0]    wi;
  logic [$clog2(WORDS+1)-1:0] nw;
  logic [255:0]  exp_r;
  logic          sh_init, sh_valid, sh_ready, sh_done;
  logic [511:0]  sh_blk;
  logic          issued;

  sha256_core u_sha (
    .clk, .rst_n, .init(sh_init), .blk_valid(sh_valid), .blk_ready(sh_ready),
    .blk(sh_blk), .blk_done(sh_done), .digest
  );

  assign busy       = (state != B_IDLE);
  assign word_ready = (state == B_FILL);
  assign sh_init    = (state == B_INIT);
  assign sh_valid   = (state == B_HASH && !issued) || (state == B_PAD);
  assign sh_blk     = (state == B_PAD) ? {32'h8000_0000, 416'd0, BITLEN} : buffer;


  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state <= B_IDLE; buffer <= '0; wi <= '0; nw <= '0; exp_r <= '0; issued <= 1'b0;
      done <= 1'b0; ok <= 1'b0; n_pages_ok <= '0; n_pages_bad <= '0;
    end else begin
      done <= 1'b0;
      case (state)
        B_IDLE: if (start) begin
          exp_r <= exp_hash; nw <= '0; wi <= '0; state <= B_INIT;
        end
        B_INIT: state <= B_FILL;
        B_FILL: if (word_valid) begin
          buffer[511 - 32*wi -: 32] <= word;
          wi <= wi + 1'b1;
          nw <= nw + 1'b1;
          if (wi == 4'd15) state <= B_HASH;
        end
        B_HASH: begin
          if (sh_valid && sh_ready) issued <= 1'b1;
          if (sh_done) begin
            issued <= 1'b0;
            state  <= (nw == WORDS[$clog2(WORDS+1)-1:0]) ? B_PAD : B_FILL;
          end
        end
        B_PAD: if (sh_ready) state <= B_PADWAIT;
        B_PADWAIT: if (sh_done) state <= B_CMP;
        B_CMP: begin
          done <= 1'b1;
          ok   <= (digest == exp_r);
          if (digest == exp_r) n_pages_ok <= n_pages_ok + 1;
          else n_pages_bad <= n_pages_bad + 1;
          state <= B_IDLE;
        end
        default: state <= B_IDLE;
      endcase
    end
  end
endmodule
