// secded_pkg: Hamming single-error-correct, double-error-detect code for
// 32-bit words, as used on the SRAM (L1) cache and on the MRAM words.
//
// Code word layout (39 bits): bit 0 is the overall parity, bits 1..38 are a
// classic Hamming code in which positions that are powers of two (1, 2, 4, 8,
// 16, 32) hold check bits and the remaining 32 positions hold the data bits in
// ascending order. The word width and the bit layout are this design's choice.
package secded_pkg;

  localparam int unsigned SD_DATA_W = 32;
  localparam int unsigned SD_CODE_W = 39;

  typedef struct packed {
    logic [SD_DATA_W-1:0] data;
    logic                 corrected;   // one bit was wrong and was fixed
    logic                 uncorrectable; // two bits wrong
  } sd_result_t;

  function automatic logic [SD_CODE_W-1:0] sd_encode(logic [SD_DATA_W-1:0] d);
    logic [SD_CODE_W-1:0] c;
    int unsigned k;
    c = '0;
    k = 0;
    for (int unsigned pos = 1; pos < SD_CODE_W; pos++) begin
      if ((pos & (pos - 1)) != 0) begin
        c[pos] = d[k];
        k++;
      end
    end
    for (int unsigned p = 0; p < 6; p++) begin
      logic par;
      par = 1'b0;
      for (int unsigned pos = 1; pos < SD_CODE_W; pos++)
        if (pos[p]) par ^= c[pos];
      c[1 << p] = par;
    end
    c[0] = ^c[SD_CODE_W-1:1];
    return c;
  endfunction

  function automatic sd_result_t sd_decode(logic [SD_CODE_W-1:0] c_in);
    sd_result_t r;
    logic [SD_CODE_W-1:0] c;
    logic [5:0] syn;
    logic overall;
    int unsigned k;
    c = c_in;
    syn = '0;
    for (int unsigned pos = 1; pos < SD_CODE_W; pos++)
      if (c[pos]) syn ^= 6'(pos);
    overall = ^c;
    r.corrected = 1'b0;
    r.uncorrectable = 1'b0;
    if (overall) begin
      // odd number of flips: a single error, at position syn (0 = overall bit)
      r.corrected = 1'b1;
      if (syn != 0 && 32'(syn) < SD_CODE_W) c[syn] = ~c[syn];
      else if (syn != 0) r.uncorrectable = 1'b1;
    end else if (syn != 0) begin
      r.uncorrectable = 1'b1;
    end
    k = 0;
    r.data = '0;
    for (int unsigned pos = 1; pos < SD_CODE_W; pos++) begin
      if ((pos & (pos - 1)) != 0) begin
        r.data[k] = c[pos];
        k++;
      end
    end
    return r;
  endfunction

endpackage
