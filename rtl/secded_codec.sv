// secded_codec: registered Hamming SECDED encoder and checker for one 32-bit
// word, the building block used to protect the SRAM cache and the MRAM data.
//
// enc_data -> enc_code is the 39-bit code word of secded_pkg; dec_code is
// checked and corrected into dec_data with dec_corrected (single error fixed)
// and dec_uncorrectable (double error). Both paths are registered: results
// appear one clock after the inputs. Using SECDED on the cache words follows
// the described architecture; the register stage is this design's choice.
module secded_codec
  import secded_pkg::*;
(
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic [SD_DATA_W-1:0] enc_data,
  output logic [SD_CODE_W-1:0] enc_code,
  input  logic [SD_CODE_W-1:0] dec_code,
  output logic [SD_DATA_W-1:0] dec_data,
  output logic                 dec_corrected,
  output logic                 dec_uncorrectable
);
  sd_result_t res;
  always_comb res = sd_decode(dec_code);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      enc_code          <= '0;
      dec_data          <= '0;
      dec_corrected     <= 1'b0;
      dec_uncorrectable <= 1'b0;
    end else begin
      enc_code          <= sd_encode(enc_data);
      dec_data          <= res.data;
      dec_corrected     <= res.corrected;
      dec_uncorrectable <= res.uncorrectable;
    end
  end
endmodule
