// spare_codec: spare-area metadata of a NAND page (spare control).
//
// Every programmed page carries, in its spare area, the addressing and FTL
// information needed to rebuild the mapping tables at start-up and to check
// a read: the page's LBA, its own PPA, a timestamp, a bad-block marker, an
// index, the block's P/E count and a CRC over these fields. On a read the
// stored PPA and LBA are compared with the requested ones and the CRC is
// checked, which catches a page delivered from the wrong address.
//
// Byte offsets follow the spare layout of the page format (LBA 0..11, PPA
// 12..23, timestamp 24..31, bad-block marker 32..35, index 36..39, P/E count
// 40..47, metadata ECC 48..63); values are little-endian in the low bytes of
// their fields. This design puts a CRC-32 of bytes 0..47 in the first four
// bytes of the metadata-ECC field; the data hash and data-ECC fields are not
// produced here and read as 0xFF. Purely combinational.
module spare_codec
  import ssd_pkg::*;
(
  // build side
  input  spare_meta_t                     meta_in,
  output logic [SPARE_HDR_BYTES*8-1:0]    hdr_out,
  // check side
  input  logic [SPARE_HDR_BYTES*8-1:0]    hdr_in,
  input  logic [PPA_W-1:0]                exp_ppa,
  input  logic [LBA_W-1:0]                exp_lba,
  output spare_meta_t                     meta_out,
  output logic                            crc_ok,
  output logic                            ppa_ok,
  output logic                            lba_ok
);
  function automatic logic [SPARE_HDR_BYTES*8-1:0] build(spare_meta_t m);
    logic [SPARE_HDR_BYTES*8-1:0] h;
    logic [31:0] crc;
    h = '0;
    h[0*8 +: LBA_W]  = m.lba;
    h[12*8 +: PPA_W] = m.ppa;
    h[24*8 +: 32]    = m.timestamp;
    h[32*8 +: 32]    = 32'hFFFF_FFFF;   // good-block marker
    h[40*8 +: 32]    = m.pe_count;
    crc = 32'hFFFF_FFFF;
    for (int i = 0; i < 48; i++) crc = crc32_byte(crc, h[i*8 +: 8]);
    h[48*8 +: 32] = ~crc;
    return h;
  endfunction

  logic [31:0] crc_calc;
  always_comb begin
    hdr_out  = build(meta_in);
    crc_calc = 32'hFFFF_FFFF;
    for (int i = 0; i < 48; i++) crc_calc = crc32_byte(crc_calc, hdr_in[i*8 +: 8]);
    crc_calc = ~crc_calc;
    meta_out.lba       = hdr_in[0*8 +: LBA_W];
    meta_out.ppa       = hdr_in[12*8 +: PPA_W];
    meta_out.timestamp = hdr_in[24*8 +: 32];
    meta_out.pe_count  = hdr_in[40*8 +: 32];
    crc_ok = (crc_calc == hdr_in[48*8 +: 32]);
    ppa_ok = (meta_out.ppa == exp_ppa);
    lba_ok = (meta_out.lba == exp_lba);
  end
endmodule
