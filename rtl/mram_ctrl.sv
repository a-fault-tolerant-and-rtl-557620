// mram_ctrl: MRAM controller with ECC and die mirroring. Two MRAM dies are
// used in parallel against single-event effects: every word is stored as a
// SECDED code word, written to both dies, and on a read both copies are
// checked and one good copy is selected.
//
// Read selection: a copy with no error first (die A before die B), else a
// copy whose single error was corrected, else the word is uncorrectable
// (rd_uncorrectable with the ack). Whenever one of the copies was not clean
// and a good value exists, that value is written back to both dies before
// the ack (scrubbing). Front port: req held until ack, read data with ack.
// Die ports: synchronous, single-cycle request, read data LAT clocks later;
// they stand for the DDR4 interface, which is not modelled here.
// Mirroring, ECC and down-selection follow the described MRAM organisation;
// the selection order, the write-back and the simple die port are this
// design's choice.
module mram_ctrl
  import secded_pkg::*;
#(
  parameter int unsigned AW  = 24,
  parameter int unsigned LAT = 2
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic                 req,
  input  logic                 we,
  input  logic [AW-1:0]        addr,
  input  logic [31:0]          wdata,
  output logic                 ack,
  output logic [31:0]          rdata,
  output logic                 rd_uncorrectable,
  // two MRAM dies
  output logic [1:0]           mr_en,
  output logic                 mr_we,
  output logic [AW-1:0]        mr_addr,
  output logic [SD_CODE_W-1:0] mr_wdata,
  input  logic [SD_CODE_W-1:0] mr_rdata [2],
  // statistics
  output logic [31:0]          n_corrected,
  output logic [31:0]          n_mirror_select,
  output logic [31:0]          n_uncorrectable
);
  typedef enum logic [2:0] {R_IDLE, R_WR, R_RD, R_WAIT, R_SEL, R_SCRUB, R_ACK} rstate_e;
  rstate_e              state;
  logic [7:0]           cnt;
  logic [SD_CODE_W-1:0] ca, cb, good;
  sd_result_t           da, db;
  logic [31:0]          sel_data;
  logic                 sel_bad, sel_b, any_err;

  always_comb begin
    da = sd_decode(ca);
    db = sd_decode(cb);
    sel_b   = 1'b0;
    sel_bad = 1'b0;
    if (!da.corrected && !da.uncorrectable)      sel_b = 1'b0;
    else if (!db.corrected && !db.uncorrectable) sel_b = 1'b1;
    else if (!da.uncorrectable)                  sel_b = 1'b0;
    else if (!db.uncorrectable)                  sel_b = 1'b1;
    else sel_bad = 1'b1;
    sel_data = sel_b ? db.data : da.data;
    any_err  = da.corrected || da.uncorrectable || db.corrected || db.uncorrectable;
  end

  assign mr_en    = (state == R_WR || state == R_RD || state == R_SCRUB) ? 2'b11 : 2'b00;
  assign mr_we    = (state == R_WR || state == R_SCRUB);
  assign mr_addr  = addr;
  assign mr_wdata = (state == R_SCRUB) ? good : sd_encode(wdata);
  assign ack      = (state == R_ACK);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state <= R_IDLE; cnt <= '0; ca <= '0; cb <= '0; good <= '0;
      rdata <= '0; rd_uncorrectable <= 1'b0;
      n_corrected <= '0; n_mirror_select <= '0; n_uncorrectable <= '0;
    end else begin
      case (state)
        R_IDLE: if (req) begin
          rd_uncorrectable <= 1'b0;
          state <= we ? R_WR : R_RD;
        end
        R_WR: state <= R_ACK;
        R_RD: begin cnt <= '0; state <= R_WAIT; end
        R_WAIT: begin
          if (cnt == 8'(LAT - 1)) begin
            ca <= mr_rdata[0]; cb <= mr_rdata[1]; state <= R_SEL;
          end else cnt <= cnt + 1'b1;
        end
        R_SEL: begin
          rdata <= sel_data;
          rd_uncorrectable <= sel_bad;
          good  <= sd_encode(sel_data);
          if (sel_bad) n_uncorrectable <= n_uncorrectable + 1;
          if (sel_b && !sel_bad) n_mirror_select <= n_mirror_select + 1;
          if ((da.corrected || db.corrected) && !sel_bad) n_corrected <= n_corrected + 1;
          state <= (any_err && !sel_bad) ? R_SCRUB : R_ACK;
        end
        R_SCRUB: state <= R_ACK;
        R_ACK: state <= R_IDLE;
        default: state <= R_IDLE;
      endcase
    end
  end
endmodule
