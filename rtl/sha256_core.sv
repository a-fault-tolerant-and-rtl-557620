// sha256_core: SHA-256 compression engine (FIPS 180-4), the hash accelerator
// used by the boot loader to check the code pages it loads.
//
// A message is hashed as a sequence of already padded 512-bit blocks. init
// resets the chaining value to the standard initial hash; each block taken on
// blk_valid/blk_ready (blk[511:480] is the first big-endian word) is
// processed in 64 rounds, one per clock, with the message schedule held in a
// 16-word sliding window. blk_done pulses 66 clocks after the block is taken
// and digest then holds the chaining value, the message digest after the
// last block. Padding is left to the user of the core (see boot_verifier).
// The round-per-clock organisation is this design's choice.
module sha256_core (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         init,
  input  logic         blk_valid,
  output logic         blk_ready,
  input  logic [511:0] blk,
  output logic         blk_done,
  output logic [255:0] digest
);
  localparam logic [31:0] K [64] = '{
    32'h428a2f98, 32'h71374491, 32'hb5c0fbcf, 32'he9b5dba5,
    32'h3956c25b, 32'h59f111f1, 32'h923f82a4, 32'hab1c5ed5,
    32'hd807aa98, 32'h12835b01, 32'h243185be, 32'h550c7dc3,
    32'h72be5d74, 32'h80deb1fe, 32'h9bdc06a7, 32'hc19bf174,
    32'he49b69c1, 32'hefbe4786, 32'h0fc19dc6, 32'h240ca1cc,
    32'h2de92c6f, 32'h4a7484aa, 32'h5cb0a9dc, 32'h76f988da,
    32'h983e5152, 32'ha831c66d, 32'hb00327c8, 32'hbf597fc7,
    32'hc6e00bf3, 32'hd5a79147, 32'h06ca6351, 32'h14292967,
    32'h27b70a85, 32'h2e1b2138, 32'h4d2c6dfc, 32'h53380d13,
    32'h650a7354, 32'h766a0abb, 32'h81c2c92e, 32'h92722c85,
    32'ha2bfe8a1, 32'ha81a664b, 32'hc24b8b70, 32'hc76c51a3,
    32'hd192e819, 32'hd6990624, 32'hf40e3585, 32'h106aa070,
    32'h19a4c116, 32'h1e376c08, 32'h2748774c, 32'h34b0bcb5,
    32'h391c0cb3, 32'h4ed8aa4a, 32'h5b9cca4f, 32'h682e6ff3,
    32'h748f82ee, 32'h78a5636f, 32'h84c87814, 32'h8cc70208,
    32'h90befffa, 32'ha4506ceb, 32'hbef9a3f7, 32'hc67178f2
  };
  localparam logic [31:0] H0 [8] = '{
    32'h6a09e667, 32'hbb67ae85, 32'h3c6ef372, 32'ha54ff53a,
    32'h510e527f, 32'h9b05688c, 32'h1f83d9ab, 32'h5be0cd19
  };

  typedef enum logic [1:0] {H_IDLE, H_ROUND, H_ADD} hstate_e;
  hstate_e     state;
  logic [31:0] h [8];
  logic [31:0] a, b, c, d, e, f, g, hh;
  logic [31:0] w [16];
  logic [6:0]  rnd;

  function automatic logic [31:0] rotr(logic [31:0] x, int n);
    return (x >> n) | (x << (32 - n));
  endfunction

  logic [31:0] s0, s1, ch, maj, t1, t2, ws0, ws1, wnew;
  always_comb begin
    s1   = rotr(e, 6) ^ rotr(e, 11) ^ rotr(e, 25);
    ch   = (e & f) ^ (~e & g);
    t1   = hh + s1 + ch + K[rnd[5:0]] + w[0];
    s0   = rotr(a, 2) ^ rotr(a, 13) ^ rotr(a, 22);
    maj  = (a & b) ^ (a & c) ^ (b & c);
    t2   = s0 + maj;
    ws0  = rotr(w[1], 7) ^ rotr(w[1], 18) ^ (w[1] >> 3);
    ws1  = rotr(w[14], 17) ^ rotr(w[14], 19) ^ (w[14] >> 10);
    wnew = w[0] + ws0 + w[9] + ws1;    // W[t+16]
  end

  assign blk_ready = (state == H_IDLE) && !init;
  always_comb for (int i = 0; i < 8; i++) digest[255 - 32*i -: 32] = h[i];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state <= H_IDLE; rnd <= '0; blk_done <= 1'b0;
      for (int i = 0; i < 8; i++) h[i] <= H0[i];
      for (int i = 0; i < 16; i++) w[i] <= '0;
      {a, b, c, d, e, f, g, hh} <= '0;
    end else begin
      blk_done <= 1'b0;
      case (state)
        H_IDLE: begin
          if (init) begin
            for (int i = 0; i < 8; i++) h[i] <= H0[i];
          end else if (blk_valid) begin
            for (int i = 0; i < 16; i++) w[i] <= blk[511 - 32*i -: 32];
            {a, b, c, d, e, f, g, hh} <= {h[0], h[1], h[2], h[3], h[4], h[5], h[6], h[7]};
            rnd   <= '0;
            state <= H_ROUND;
          end
        end
        H_ROUND: begin
          {a, b, c, d, e, f, g, hh} <= {t1 + t2, a, b, c, d + t1, e, f, g};
          for (int i = 0; i < 15; i++) w[i] <= w[i+1];
          w[15] <= wnew;
          rnd <= rnd + 1'b1;
          if (rnd == 7'd63) state <= H_ADD;
        end
        H_ADD: begin
          h[0] <= h[0] + a; h[1] <= h[1] + b; h[2] <= h[2] + c; h[3] <= h[3] + d;
          h[4] <= h[4] + e; h[5] <= h[5] + f; h[6] <= h[6] + g; h[7] <= h[7] + hh;
          blk_done <= 1'b1;
          state <= H_IDLE;
        end
        default: state <= H_IDLE;
      endcase
    end
  end
endmodule
