// tb_secded_codec: random 32-bit words are encoded, 0, 1 or 2 bits of the
// code word are flipped, and the decoder must return the original word with
// the right corrected / uncorrectable flags, one clock after its input.
module tb_secded_codec;
  import secded_pkg::*;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;
  logic [31:0] enc_data = 0, dec_data;
  logic [38:0] enc_code, dec_code = 0;
  logic dec_corrected, dec_uncorrectable;
  secded_codec dut (.*);
  initial begin
    repeat (100000) @(posedge clk);
    failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
  initial begin
    repeat (2) @(posedge clk); rst_n = 1;
    for (int t = 0; t < 600; t++) begin
      logic [31:0] d; logic [38:0] c; int nflip, b1, b2;
      d = $urandom;
      @(negedge clk); enc_data = d;
      @(negedge clk); c = enc_code;
      // the code word carries the data bits at the non-power-of-two positions
      begin
        int k; bit okmap; k = 0; okmap = 1;
        for (int pos = 1; pos < 39; pos++) if ((pos & (pos - 1)) != 0) begin
          if (c[pos] != d[k]) okmap = 0; k++;
        end
        checks++; if (!okmap || ^c != 1'b0) begin failures++; $display("FAIL: code layout/parity"); end
      end
      nflip = t % 3;
      b1 = $urandom_range(0, 38);
      do b2 = $urandom_range(0, 38); while (b2 == b1);
      if (nflip >= 1) c[b1] = ~c[b1];
      if (nflip == 2) c[b2] = ~c[b2];
      dec_code = c;
      @(negedge clk);
      checks++;
      if (nflip < 2 && (dec_data != d || dec_uncorrectable || dec_corrected != (nflip == 1))) begin
        failures++; $display("FAIL: %0d flips not corrected", nflip);
      end
      if (nflip == 2 && (!dec_uncorrectable || dec_corrected)) begin
        failures++; $display("FAIL: double error not detected");
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
