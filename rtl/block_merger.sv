// block_merger: hardware merge of a hybrid-mapped data block and its log block
// inside a low-level controller, so that the pages never travel through the
// channel mux or the processor.
//
// For every page offset p the newest copy is found and copied into the target
// (free) block at the same offset: the log block's page p if it holds a valid
// page (its spare-area CRC checks), otherwise the data block's page p if that
// one is valid, otherwise nothing (the page was never written). Afterwards the
// data block and the log block are erased. Each step is a page operation
// (read into the page buffer, program from it, erase) handed to the
// controller's page engine over a valid/ready request with a done pulse.
// The offset-aligned log block and the copy order are this design's choice;
// the merge of data and log blocks by page copies and erases inside the
// low-level controller follows the described architecture.
module block_merger
  import ssd_pkg::*;
#(
  parameter int unsigned PAGES = PAGES_PER_BLOCK
) (
  input  logic               clk,
  input  logic               rst_n,
  input  logic               start,
  input  logic [BLOCK_W-1:0] data_blk,
  input  logic [BLOCK_W-1:0] log_blk,
  input  logic [BLOCK_W-1:0] dst_blk,
  output logic               busy,
  output logic               done,        // one-clock pulse
  output logic               fail,        // valid with done
  output logic [15:0]        copied,      // pages programmed by the last merge
  // page engine requests
  output logic               pe_valid,
  input  logic               pe_ready,
  output logic [1:0]         pe_op,       // 0 read, 1 program, 2 erase
  output logic [23:0]        pe_row,
  input  logic               pe_done,
  input  logic               pe_fail,
  input  logic               pe_valid_page // read: spare CRC checked
);
  localparam logic [1:0] PE_READ = 2'd0, PE_PROG = 2'd1, PE_ERASE = 2'd2;
  typedef enum logic [2:0] {M_IDLE, M_RD_LOG, M_RD_DATA, M_PROG, M_ER_DATA, M_ER_LOG, M_DONE} mstate_e;
  mstate_e state;
  logic [PAGE_IDX_W-1:0] pg;
  logic [BLOCK_W-1:0] dblk, lblk, tblk;
  logic issued, err;

  function automatic logic [23:0] row_of(logic [BLOCK_W-1:0] b, logic [PAGE_IDX_W-1:0] p);
    return 24'({b, p});
  endfunction

  assign busy     = (state != M_IDLE);
  assign pe_valid = !issued && (state inside {M_RD_LOG, M_RD_DATA, M_PROG, M_ER_DATA, M_ER_LOG});
  always_comb begin
    pe_op  = PE_READ;
    pe_row = row_of(lblk, pg);
    case (state)
      M_RD_DATA: begin pe_op = PE_READ;  pe_row = row_of(dblk, pg); end
      M_PROG:    begin pe_op = PE_PROG;  pe_row = row_of(tblk, pg); end
      M_ER_DATA: begin pe_op = PE_ERASE; pe_row = row_of(dblk, '0); end
      M_ER_LOG:  begin pe_op = PE_ERASE; pe_row = row_of(lblk, '0); end
      default: ;
    endcase
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state <= M_IDLE; pg <= '0; dblk <= '0; lblk <= '0; tblk <= '0;
      issued <= 1'b0; err <= 1'b0; done <= 1'b0; fail <= 1'b0; copied <= '0;
    end else begin
      done <= 1'b0;
      if (pe_valid && pe_ready) issued <= 1'b1;
      if (pe_done) issued <= 1'b0;
      case (state)
        M_IDLE: if (start) begin
          dblk <= data_blk; lblk <= log_blk; tblk <= dst_blk;
          pg <= '0; err <= 1'b0; copied <= '0; state <= M_RD_LOG;
        end
        M_RD_LOG: if (pe_done) state <= pe_valid_page ? M_PROG : M_RD_DATA;
        M_RD_DATA: if (pe_done) begin
          if (pe_valid_page) state <= M_PROG;
          else if (32'(pg) == PAGES - 1) state <= M_ER_DATA;
          else begin pg <= pg + 1'b1; state <= M_RD_LOG; end
        end
        M_PROG: if (pe_done) begin
          copied <= copied + 1'b1;
          if (pe_fail) err <= 1'b1;
          if (32'(pg) == PAGES - 1) state <= M_ER_DATA;
          else begin pg <= pg + 1'b1; state <= M_RD_LOG; end
        end
        M_ER_DATA: if (pe_done) begin
          if (pe_fail) err <= 1'b1;
          state <= M_ER_LOG;
        end
        M_ER_LOG: if (pe_done) begin
          if (pe_fail) err <= 1'b1;
          state <= M_DONE;
        end
        M_DONE: begin
          done <= 1'b1; fail <= err; state <= M_IDLE;
        end
        default: state <= M_IDLE;
      endcase
    end
  end
endmodule
