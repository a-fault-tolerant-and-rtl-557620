// ptw: hardware page-table walker. On a TLB miss it walks the two-level
// page table that maps LBAs to PPAs, held in the memory behind the L1 cache
// (the MRAM), and it installs new mappings provided by the firmware.
//
// Page table entries are 32-bit words: bit 31 valid, bits 23:0 payload. The
// first level, at word address PT_BASE, is indexed by lba[23:12] and its
// payload is the word address of a second-level table; the second level is
// indexed by lba[11:0] and its payload is the PPA. Second-level tables are
// allocated by the firmware.
// op_valid/op_ready start a walk (op_install = 0) or an install of
// op_ppa for op_lba (op_install = 1); done pulses with found (mapping
// present / installed) and ppa. Memory port: mem_req is held until mem_ack,
// read data is valid with mem_ack. The two-level split, the entry format and
// the port are this design's choice; the walker's role follows the
// described memory management.
module ptw
  import ssd_pkg::*;
#(
  parameter logic [23:0] PT_BASE = 24'h000000
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             op_valid,
  output logic             op_ready,
  input  logic             op_install,
  input  logic [LBA_W-1:0] op_lba,
  input  logic [PPA_W-1:0] op_ppa,
  output logic             done,
  output logic             found,
  output logic [PPA_W-1:0] ppa,
  output logic             mem_req,
  output logic             mem_we,
  output logic [23:0]      mem_addr,
  output logic [31:0]      mem_wdata,
  input  logic             mem_ack,
  input  logic [31:0]      mem_rdata
);
  typedef enum logic [1:0] {W_IDLE, W_L1, W_L2, W_DONE} wstate_e;
  wstate_e          state;
  logic             inst;
  logic [LBA_W-1:0] lba_r;
  logic [PPA_W-1:0] ppa_w;
  logic [23:0]      l2_base;
  logic             found_r;
  logic [PPA_W-1:0] ppa_r;

  assign op_ready  = (state == W_IDLE);
  assign mem_req   = (state == W_L1) || (state == W_L2);
  assign mem_we    = (state == W_L2) && inst;
  assign mem_addr  = (state == W_L1) ? PT_BASE + 24'(lba_r[LBA_W-1:12])
                                     : l2_base + 24'(lba_r[11:0]);
  assign mem_wdata = {1'b1, 7'd0, 24'(ppa_w)};
  assign done  = (state == W_DONE);
  assign found = found_r;
  assign ppa   = ppa_r;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state <= W_IDLE; inst <= 1'b0; lba_r <= '0; ppa_w <= '0; l2_base <= '0;
      found_r <= 1'b0; ppa_r <= '0;
    end else begin
      case (state)
        W_IDLE: if (op_valid) begin
          inst <= op_install; lba_r <= op_lba; ppa_w <= op_ppa; state <= W_L1;
        end
        W_L1: if (mem_ack) begin
          if (mem_rdata[31]) begin
            l2_base <= mem_rdata[23:0];
            state   <= W_L2;
          end else begin
            found_r <= 1'b0; state <= W_DONE;
          end
        end
        W_L2: if (mem_ack) begin
          found_r <= inst ? 1'b1 : mem_rdata[31];
          ppa_r   <= inst ? ppa_w : mem_rdata[PPA_W-1:0];
          state   <= W_DONE;
        end
        W_DONE: state <= W_IDLE;
        default: state <= W_IDLE;
      endcase
    end
  end
endmodule
