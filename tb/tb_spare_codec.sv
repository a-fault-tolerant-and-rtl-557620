// tb_spare_codec: the spare-area header built from metadata is checked byte
// by byte against the page layout, its CRC against a bitwise CRC-32 model
// (checked first on the standard "123456789" vector), and the read-side
// checks must flag a changed byte, a wrong PPA and a wrong LBA.
module tb_spare_codec;
  import ssd_pkg::*;
  int checks = 0, failures = 0;
  spare_meta_t meta_in, meta_out;
  logic [SPARE_HDR_BYTES*8-1:0] hdr_out, hdr_in;
  logic [PPA_W-1:0] exp_ppa; logic [LBA_W-1:0] exp_lba;
  logic crc_ok, ppa_ok, lba_ok;
  spare_codec dut (.*);
  task automatic check(bit ok, string what);
    checks++; if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask
  function automatic logic [31:0] crc_model(logic [7:0] b [], int n);
    logic [31:0] c; c = 32'hFFFFFFFF;
    for (int i = 0; i < n; i++)
      for (int k = 0; k < 8; k++) begin
        logic fb; fb = c[0] ^ b[i][k];
        c = c >> 1;
        if (fb) c = c ^ 32'hEDB88320;
      end
    return ~c;
  endfunction
  initial begin
    logic [7:0] v []; logic [7:0] h [];
    v = new[9];
    for (int i = 0; i < 9; i++) v[i] = 8'h31 + 8'(i);
    check(crc_model(v, 9) == 32'hCBF43926, "CRC model check value");
    h = new[48];
    for (int t = 0; t < 50; t++) begin
      meta_in.lba = 24'($urandom); meta_in.ppa = 24'($urandom);
      meta_in.timestamp = $urandom; meta_in.pe_count = $urandom;
      #1;
      for (int i = 0; i < 48; i++) h[i] = hdr_out[i*8 +: 8];
      check(h[0] == meta_in.lba[7:0] && h[1] == meta_in.lba[15:8] && h[2] == meta_in.lba[23:16] && h[3] == 0, "LBA field");
      check(h[12] == meta_in.ppa[7:0] && h[14] == meta_in.ppa[23:16] && h[15] == 0, "PPA field");
      check(h[24] == meta_in.timestamp[7:0] && h[27] == meta_in.timestamp[31:24], "timestamp field");
      check(h[32] == 8'hFF && h[35] == 8'hFF, "good-block marker");
      check(h[40] == meta_in.pe_count[7:0] && h[43] == meta_in.pe_count[31:24], "P/E field");
      check(hdr_out[48*8 +: 32] == crc_model(h, 48), "metadata CRC");
      hdr_in = hdr_out; exp_ppa = meta_in.ppa; exp_lba = meta_in.lba; #1;
      check(crc_ok && ppa_ok && lba_ok && meta_out == meta_in, "clean header accepted");
      hdr_in[$urandom_range(0, 51) * 8 + $urandom_range(0, 7)] ^= 1'b1; #1;
      check(!crc_ok, "changed bit detected");
      hdr_in = hdr_out; exp_ppa = meta_in.ppa ^ 24'h80; #1;
      check(crc_ok && !ppa_ok, "wrong PPA detected");
      exp_ppa = meta_in.ppa; exp_lba = meta_in.lba + 1; #1;
      check(!lba_ok, "wrong LBA detected");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
