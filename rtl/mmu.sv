// mmu: memory management unit of the controller. It turns host page requests
// (read or write of one 8 KB logical page) into low-level NAND commands,
// translating LBAs to PPAs in hardware so the firmware only sees exceptions.
//
// Read: the TLB is looked up; on a hit the read command is issued at once.
// On a miss (or a TLB parity error) the page-table walker fetches the
// mapping and the TLB is refilled. If the page table has no mapping the FTL
// firmware is notified (FTL_MISS) and answers with a PPA (installed in the
// page table and the TLB) or with ok = 0, which ends the request with err.
// Write: the log-structured mapping writes every update to the next free
// page, chosen by the firmware: the FTL is asked (FTL_ALLOC), the new mapping
// is installed and the program command is issued; the LBA is reported to the
// hot/cold identifier.
// Firmware management commands (erase, merge, reset) enter on fw_cmd and are
// forwarded to the channel mux whenever the MMU is not issuing its own.
// done pulses when a request's NAND command has been accepted by the mux,
// with its PPA (or err). Counters report TLB hits, misses and FTL requests.
// Request/response framing and the counters are this design's choice.
module mmu
  import ssd_pkg::*;
(
  input  logic             clk,
  input  logic             rst_n,
  // host requests
  input  logic             req_valid,
  output logic             req_ready,
  input  host_op_e         req_op,
  input  logic [LBA_W-1:0] req_lba,
  output logic             done,
  output logic             done_err,
  output logic [PPA_W-1:0] done_ppa,
  // TLB
  output logic [LBA_W-1:0] tlb_lba,
  input  logic             tlb_hit,
  input  logic [PPA_W-1:0] tlb_ppa,
  output logic             tlb_fill,
  output logic [LBA_W-1:0] tlb_fill_lba,
  output logic [PPA_W-1:0] tlb_fill_ppa,
  // page-table walker
  output logic             ptw_valid,
  input  logic             ptw_ready,
  output logic             ptw_install,
  output logic [LBA_W-1:0] ptw_lba,
  output logic [PPA_W-1:0] ptw_ppa,
  input  logic             ptw_done,
  input  logic             ptw_found,
  input  logic [PPA_W-1:0] ptw_result,
  // FTL firmware
  output logic             ftl_req_valid,
  input  logic             ftl_req_ready,
  output ftl_kind_e        ftl_kind,
  output logic [LBA_W-1:0] ftl_lba,
  input  logic             ftl_rsp_valid,
  input  logic             ftl_rsp_ok,
  input  logic [PPA_W-1:0] ftl_rsp_ppa,
  input  logic             fw_cmd_valid,
  output logic             fw_cmd_ready,
  input  logic [DIE_W-1:0] fw_cmd_die,
  input  ll_cmd_t          fw_cmd,
  // channel mux
  output logic             cmd_valid,
  input  logic             cmd_ready,
  output logic [DIE_W-1:0] cmd_die,
  output ll_cmd_t          cmd,
  // hot/cold identification
  output logic             hc_write,
  output logic [LBA_W-1:0] hc_lba,
  // statistics
  output logic [31:0]      n_tlb_hit,
  output logic [31:0]      n_tlb_miss,
  output logic [31:0]      n_ftl_req
);
  typedef enum logic [2:0] {U_IDLE, U_LOOKUP, U_WALK, U_FTL_REQ, U_FTL_WAIT,
                            U_INSTALL, U_ISSUE, U_DONE} ustate_e;
  ustate_e          state;
  host_op_e         op;
  logic [LBA_W-1:0] lba;
  logic [PPA_W-1:0] ppa;
  logic             err, ptw_issued;

  assign req_ready     = (state == U_IDLE);
  assign tlb_lba       = lba;
  assign ptw_lba       = lba;
  assign ptw_ppa       = ppa;
  assign ptw_install   = (state == U_INSTALL);
  assign ptw_valid     = (state == U_WALK || state == U_INSTALL) && !ptw_issued;
  assign ftl_req_valid = (state == U_FTL_REQ);
  assign ftl_kind      = (op == HOST_WRITE) ? FTL_ALLOC : FTL_MISS;
  assign ftl_lba       = lba;
  assign done          = (state == U_DONE);
  assign done_err      = err;
  assign done_ppa      = ppa;
  assign hc_write      = (state == U_ISSUE) && cmd_ready && (op == HOST_WRITE);
  assign hc_lba        = lba;

  always_comb begin
    if (state == U_ISSUE) begin
      cmd_valid    = 1'b1;
      cmd_die      = ppa_die(ppa);
      cmd.cmd      = (op == HOST_WRITE) ? NC_PROGRAM : NC_READ;
      cmd.addr     = {2'b00, ppa_row(ppa), 16'h0000};
      cmd.lba      = lba;
      fw_cmd_ready = 1'b0;
    end else begin
      cmd_valid    = fw_cmd_valid;
      cmd_die      = fw_cmd_die;
      cmd          = fw_cmd;
      fw_cmd_ready = cmd_ready;
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state <= U_IDLE; op <= HOST_READ; lba <= '0; ppa <= '0; err <= 1'b0; ptw_issued <= 1'b0;
      tlb_fill <= 1'b0; tlb_fill_lba <= '0; tlb_fill_ppa <= '0;
      n_tlb_hit <= '0; n_tlb_miss <= '0; n_ftl_req <= '0;
    end else begin
      tlb_fill <= 1'b0;
      if (ptw_valid && ptw_ready) ptw_issued <= 1'b1;
      case (state)
        U_IDLE: if (req_valid) begin
          op <= req_op; lba <= req_lba; err <= 1'b0; ptw_issued <= 1'b0;
          state <= U_LOOKUP;
        end
        U_LOOKUP: begin
          if (op == HOST_WRITE) state <= U_FTL_REQ;
          else if (tlb_hit) begin
            ppa <= tlb_ppa; n_tlb_hit <= n_tlb_hit + 1; state <= U_ISSUE;
          end else begin
            n_tlb_miss <= n_tlb_miss + 1; state <= U_WALK;
          end
        end
        U_WALK: if (ptw_done) begin
          ptw_issued <= 1'b0;
          if (ptw_found) begin
            ppa <= ptw_result;
            tlb_fill <= 1'b1; tlb_fill_lba <= lba; tlb_fill_ppa <= ptw_result;
            state <= U_ISSUE;
          end else state <= U_FTL_REQ;
        end
        U_FTL_REQ: if (ftl_req_ready) begin
          n_ftl_req <= n_ftl_req + 1; state <= U_FTL_WAIT;
        end
        U_FTL_WAIT: if (ftl_rsp_valid) begin
          if (ftl_rsp_ok) begin ppa <= ftl_rsp_ppa; state <= U_INSTALL; end
          else begin err <= 1'b1; state <= U_DONE; end
        end
        U_INSTALL: if (ptw_done) begin
          ptw_issued <= 1'b0;
          if (ptw_found) begin
            tlb_fill <= 1'b1; tlb_fill_lba <= lba; tlb_fill_ppa <= ppa;
            state <= U_ISSUE;
          end else begin
            err <= 1'b1; state <= U_DONE;   // no second-level table for this LBA
          end
        end
        U_ISSUE: if (cmd_ready) state <= U_DONE;
        U_DONE: state <= U_IDLE;
        default: state <= U_IDLE;
      endcase
    end
  end
endmodule
