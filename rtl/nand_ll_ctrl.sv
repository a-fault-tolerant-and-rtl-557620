// nand_ll_ctrl: low-level controller of one NAND die. The cube gives every
// die its own point-to-point bus, so one of these runs per die and all dies
// work concurrently and independently.
//
// Requests (ssd_pkg::ll_cmd_t: cmd[2:0], address[41:0], LBA) enter a request
// queue, so the sender never waits for the NAND. One request runs at a time:
//  * NC_PROGRAM: DATA_BYTES bytes are taken from the write stream, scrambled
//    with the LBA-seeded LFSR into the page buffer, then sent to the die as
//    80h, 5 address cycles, data, the spare area (spare_codec metadata), 10h,
//    followed by 70h status polling until the die is ready.
//  * NC_READ: 00h, 5 address cycles, 30h, status polling, 00h, then the page
//    and the spare header are read; the spare CRC and the stored PPA/LBA are
//    checked; the data is descrambled onto the read stream (rd_last on the
//    last byte).
//  * NC_ERASE: 60h, 3 row cycles, D0h, status polling.
//  * NC_RESET: FFh, status polling.
//  * NC_MERGE: block_merger copies the valid pages of a data block and its
//    log block into a free block and erases both, entirely inside this
//    controller; copied pages get a new spare area with their new PPA.
// Every request ends with one response (ll_resp_t) on resp_valid/resp_ready.
// The command cycles and status polling follow common ONFI practice; the
// queue depth, the response format and the timestamp source are this design's
// choice. The BCH encoder/decoder of the controller is not part of this RTL.
module nand_ll_ctrl
  import ssd_pkg::*;
#(
  parameter int unsigned          DATA_BYTES = PAGE_DATA_BYTES,
  parameter int unsigned          SPR_BYTES  = SPARE_BYTES,
  parameter int unsigned          PAGES      = PAGES_PER_BLOCK,
  parameter int unsigned          QDEPTH     = 4,
  parameter logic [DIE_W-1:0]     DIE_ID     = '0,
  parameter int unsigned          T_WP = 2, T_WH = 1, T_RP = 2, T_REH = 1
) (
  input  logic        clk,
  input  logic        rst_n,
  input  logic [31:0] timestamp,
  // requests
  input  logic        cmd_valid,
  output logic        cmd_ready,
  input  ll_cmd_t     cmd_in,
  // write data (program)
  input  logic        wr_valid,
  output logic        wr_ready,
  input  logic [7:0]  wr_data,
  // read data
  output logic        rd_valid,
  input  logic        rd_ready,
  output logic [7:0]  rd_data,
  output logic        rd_last,
  // responses
  output logic        resp_valid,
  input  logic        resp_ready,
  output ll_resp_t    resp,
  output logic        busy,
  // NAND pins
  output logic        nand_ce_n,
  output logic        nand_cle,
  output logic        nand_ale,
  output logic        nand_we_n,
  output logic        nand_re_n,
  output logic [7:0]  nand_io_out,
  output logic        nand_io_oe,
  input  logic [7:0]  nand_io_in
);
  localparam int unsigned PAGE_BYTES = DATA_BYTES + SPR_BYTES;
  localparam int unsigned BW = $clog2(PAGE_BYTES + 1);
  localparam logic [1:0] PE_READ = 2'd0, PE_PROG = 2'd1, PE_ERASE = 2'd2, PE_RESET = 2'd3;

  // ---------------- request queue ----------------
  logic    q_valid, q_pop;
  logic [$clog2(QDEPTH+1)-1:0] q_count;
  ll_cmd_t q_cmd;
  sync_fifo #(.WIDTH($bits(ll_cmd_t)), .DEPTH(QDEPTH)) u_queue (
    .clk, .rst_n,
    .in_valid(cmd_valid), .in_ready(cmd_ready), .in_data(cmd_in),
    .out_valid(q_valid), .out_ready(q_pop), .out_data(q_cmd), .count(q_count)
  );

  // ---------------- page buffer and scrambler ----------------
  logic [7:0] pbuf [DATA_BYTES];
  logic       scr_load, scr_step;
  logic [LBA_W-1:0] scr_seed;
  logic [7:0] scr_key, scr_unused;
  scrambler #(.LBA_W(LBA_W)) u_scr (
    .clk, .rst_n, .load(scr_load), .seed_lpa(scr_seed), .step(scr_step),
    .din(8'h00), .key(scr_key), .dout(scr_unused)
  );

  // ---------------- main request state machine ----------------
  typedef enum logic [2:0] {C_IDLE, C_LOAD, C_PE, C_OUT, C_MERGE, C_RESP} cstate_e;
  cstate_e    cstate;
  ll_cmd_t    cur;
  logic [BW-1:0] dcnt;
  ll_resp_t   resp_r;
  logic [31:0] ts_r;        // timestamp of the current request

  // page engine request, from the main FSM or the merger
  logic        pe_valid, pe_ready, pe_done, pe_fail, pe_crc_ok;
  logic [1:0]  pe_op;
  logic [23:0] pe_row;
  logic        m_pe_valid;
  logic [1:0]  m_pe_op;
  logic [23:0] m_pe_row;
  logic        main_pe_valid;
  logic [1:0]  main_pe_op;
  logic        main_issued;
  logic        m_busy, m_done, m_fail;
  logic [15:0] m_copied;
  logic        merge_mode;

  assign merge_mode = (cstate == C_MERGE);
  assign pe_valid   = merge_mode ? m_pe_valid : main_pe_valid;
  assign pe_op      = merge_mode ? m_pe_op    : main_pe_op;
  assign pe_row     = merge_mode ? m_pe_row   : cur.addr[39:16];
  assign main_pe_valid = (cstate == C_PE) && !main_issued;
  always_comb begin
    case (cur.cmd)
      NC_PROGRAM: main_pe_op = PE_PROG;
      NC_ERASE:   main_pe_op = PE_ERASE;
      NC_RESET:   main_pe_op = PE_RESET;
      default:    main_pe_op = PE_READ;
    endcase
  end

  block_merger #(.PAGES(PAGES)) u_merger (
    .clk, .rst_n,
    .start(cstate == C_MERGE && !m_busy && !m_done),
    .data_blk(cur.addr[35:24]), .log_blk(cur.addr[23:12]), .dst_blk(cur.addr[11:0]),
    .busy(m_busy), .done(m_done), .fail(m_fail), .copied(m_copied),
    .pe_valid(m_pe_valid), .pe_ready(pe_ready), .pe_op(m_pe_op), .pe_row(m_pe_row),
    .pe_done(pe_done), .pe_fail(pe_fail), .pe_valid_page(pe_crc_ok)
  );

  // ---------------- spare area ----------------
  logic [SPARE_HDR_BYTES*8-1:0] hdr_w, hdr_r;
  spare_meta_t meta_w, meta_r;
  logic        sp_crc_ok, sp_ppa_ok, sp_lba_ok;
  logic [23:0] row_r;      // row of the page engine's current operation
  spare_codec u_spare (
    .meta_in(meta_w), .hdr_out(hdr_w),
    .hdr_in(hdr_r), .exp_ppa({DIE_ID, row_r[BLOCK_W+PAGE_IDX_W-1:0]}), .exp_lba(cur.lba),
    .meta_out(meta_r), .crc_ok(sp_crc_ok), .ppa_ok(sp_ppa_ok), .lba_ok(sp_lba_ok)
  );
  always_comb begin
    if (merge_mode) begin
      meta_w     = meta_r;                 // carry LBA, timestamp, P/E count
      meta_w.ppa = {DIE_ID, row_r[BLOCK_W+PAGE_IDX_W-1:0]};
    end else begin
      meta_w.lba       = cur.lba;
      meta_w.ppa       = {DIE_ID, row_r[BLOCK_W+PAGE_IDX_W-1:0]};
      meta_w.timestamp = ts_r;
      meta_w.pe_count  = '0;
    end
  end

  // ---------------- page engine ----------------
  typedef enum logic [3:0] {P_IDLE, P_CMD1, P_ADDR, P_WDATA, P_CMD2, P_POLL_CMD,
                            P_POLL_RD, P_POLL_WAIT, P_RD_CMD, P_RDATA, P_RWAIT, P_DONE} pstate_e;
  pstate_e     pstate;
  logic [1:0]  pop_r;
  logic [BW-1:0] bcnt, rcnt;
  logic        st_fail;
  logic        t_valid, t_ready, t_rd_valid;
  nand_op_e    t_kind;
  logic [7:0]  t_byte, t_rd_data;
  logic [7:0]  wbyte;
  logic [2:0]  addr_first;

  assign pe_ready  = (pstate == P_IDLE);
  assign addr_first = (pop_r == PE_ERASE) ? 3'd2 : 3'd0;

  function automatic logic [7:0] addr_byte(logic [23:0] row, logic [2:0] i);
    case (i)
      3'd0, 3'd1: return 8'h00;          // column 0
      3'd2:       return row[7:0];
      3'd3:       return row[15:8];
      default:    return row[23:16];
    endcase
  endfunction

  always_comb begin
    if (bcnt < BW'(DATA_BYTES)) wbyte = pbuf[bcnt[$clog2(DATA_BYTES)-1:0]];
    else if (bcnt < BW'(DATA_BYTES + SPARE_HDR_BYTES))
      wbyte = hdr_w[(32'(bcnt) - DATA_BYTES)*8 +: 8];
    else wbyte = 8'hFF;
  end

  always_comb begin
    t_valid = 1'b0;
    t_kind  = NOP_CMD;
    t_byte  = 8'h00;
    case (pstate)
      P_CMD1: begin
        t_valid = 1'b1;
        case (pop_r)
          PE_PROG:  t_byte = 8'h80;
          PE_ERASE: t_byte = 8'h60;
          PE_RESET: t_byte = 8'hFF;
          default:  t_byte = 8'h00;
        endcase
      end
      P_ADDR:  begin t_valid = 1'b1; t_kind = NOP_ADDR; t_byte = addr_byte(row_r, bcnt[2:0]); end
      P_WDATA: begin t_valid = 1'b1; t_kind = NOP_WDATA; t_byte = wbyte; end
      P_CMD2: begin
        t_valid = 1'b1;
        case (pop_r)
          PE_PROG:  t_byte = 8'h10;
          PE_ERASE: t_byte = 8'hD0;
          default:  t_byte = 8'h30;
        endcase
      end
      P_POLL_CMD: begin t_valid = 1'b1; t_byte = 8'h70; end
      P_POLL_RD:  begin t_valid = 1'b1; t_kind = NOP_RDATA; end
      P_RD_CMD:   begin t_valid = 1'b1; t_byte = 8'h00; end
      P_RDATA:    begin t_valid = 1'b1; t_kind = NOP_RDATA; end
      default: ;
    endcase
  end

  logic t_fire;
  assign t_fire = t_valid && t_ready;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      pstate <= P_IDLE; pop_r <= PE_READ; row_r <= '0; bcnt <= '0; rcnt <= '0;
      st_fail <= 1'b0; pe_done <= 1'b0; pe_fail <= 1'b0; pe_crc_ok <= 1'b0; hdr_r <= '0;
    end else begin
      pe_done <= 1'b0;
      case (pstate)
        P_IDLE: if (pe_valid) begin
          pop_r <= pe_op; row_r <= pe_row; st_fail <= 1'b0;
          bcnt <= BW'((pe_op == PE_ERASE) ? 2 : 0); rcnt <= '0;
          if (pe_op == PE_READ) hdr_r <= '1;
          pstate <= P_CMD1;
        end
        P_CMD1: if (t_fire) pstate <= (pop_r == PE_RESET) ? P_POLL_CMD : P_ADDR;
        P_ADDR: if (t_fire) begin
          if (bcnt == BW'(4)) begin
            bcnt   <= '0;
            pstate <= (pop_r == PE_PROG) ? P_WDATA : P_CMD2;
          end else bcnt <= bcnt + 1'b1;
        end
        P_WDATA: if (t_fire) begin
          if (bcnt == BW'(PAGE_BYTES - 1)) begin bcnt <= '0; pstate <= P_CMD2; end
          else bcnt <= bcnt + 1'b1;
        end
        P_CMD2:     if (t_fire) pstate <= P_POLL_CMD;
        P_POLL_CMD: if (t_fire) pstate <= P_POLL_RD;
        P_POLL_RD:  if (t_fire) pstate <= P_POLL_WAIT;
        P_POLL_WAIT: if (t_rd_valid) begin
          if (t_rd_data[6]) begin
            st_fail <= t_rd_data[0];
            pstate  <= (pop_r == PE_READ) ? P_RD_CMD : P_DONE;
          end else pstate <= P_POLL_RD;
        end
        P_RD_CMD: if (t_fire) begin bcnt <= '0; rcnt <= '0; pstate <= P_RDATA; end
        P_RDATA: if (t_fire) begin
          if (bcnt == BW'(PAGE_BYTES - 1)) pstate <= P_RWAIT;
          bcnt <= bcnt + 1'b1;
        end
        P_RWAIT: if (rcnt == BW'(PAGE_BYTES)) pstate <= P_DONE;
        P_DONE: begin
          pe_done   <= 1'b1;
          pe_fail   <= st_fail;
          pe_crc_ok <= sp_crc_ok;
          pstate    <= P_IDLE;
        end
        default: pstate <= P_IDLE;
      endcase
      // read data capture (page bytes arrive in order)
      if (t_rd_valid && (pstate == P_RDATA || pstate == P_RWAIT)) begin
        if (rcnt >= BW'(DATA_BYTES) && rcnt < BW'(DATA_BYTES + SPARE_HDR_BYTES))
          hdr_r[(32'(rcnt) - DATA_BYTES)*8 +: 8] <= t_rd_data;
        rcnt <= rcnt + 1'b1;
      end
    end
  end

  // page buffer writes: host data (scrambled) or NAND read data
  always_ff @(posedge clk) begin
    if (cstate == C_LOAD && wr_valid)
      pbuf[dcnt[$clog2(DATA_BYTES)-1:0]] <= wr_data ^ scr_key;
    else if (t_rd_valid && (pstate == P_RDATA || pstate == P_RWAIT) && rcnt < BW'(DATA_BYTES))
      pbuf[rcnt[$clog2(DATA_BYTES)-1:0]] <= t_rd_data;
  end

  nand_timing_ctrl #(.T_WP(T_WP), .T_WH(T_WH), .T_RP(T_RP), .T_REH(T_REH)) u_timing (
    .clk, .rst_n, .ce_hold(pstate != P_IDLE),
    .op_valid(t_valid), .op_ready(t_ready), .op_kind(t_kind), .op_byte(t_byte),
    .rd_valid(t_rd_valid), .rd_data(t_rd_data),
    .nand_ce_n, .nand_cle, .nand_ale, .nand_we_n, .nand_re_n,
    .nand_io_out, .nand_io_oe, .nand_io_in
  );

  // ---------------- main FSM ----------------
  assign q_pop    = (cstate == C_IDLE) && q_valid;
  assign wr_ready = (cstate == C_LOAD);
  assign rd_valid = (cstate == C_OUT);
  assign rd_data  = pbuf[dcnt[$clog2(DATA_BYTES)-1:0]] ^ scr_key;
  assign rd_last  = (cstate == C_OUT) && (dcnt == BW'(DATA_BYTES - 1));
  assign resp_valid = (cstate == C_RESP);
  assign resp     = resp_r;
  assign busy     = (cstate != C_IDLE) || q_valid;
  assign scr_load = q_pop || (cstate == C_PE && pe_done && cur.cmd == NC_READ);
  assign scr_seed = q_pop ? q_cmd.lba : cur.lba;
  assign scr_step = (cstate == C_LOAD && wr_valid) || (cstate == C_OUT && rd_ready);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      cstate <= C_IDLE; cur <= '0; dcnt <= '0; resp_r <= '0; main_issued <= 1'b0; ts_r <= '0;
    end else begin
      case (cstate)
        C_IDLE: if (q_valid) begin
          cur <= q_cmd; dcnt <= '0; main_issued <= 1'b0; ts_r <= timestamp;
          resp_r <= '{cmd: q_cmd.cmd, fail: 1'b0, addr_err: 1'b0, crc_err: 1'b0};
          case (q_cmd.cmd)
            NC_PROGRAM: cstate <= C_LOAD;
            NC_MERGE:   cstate <= C_MERGE;
            default:    cstate <= C_PE;
          endcase
        end
        C_LOAD: if (wr_valid) begin
          if (dcnt == BW'(DATA_BYTES - 1)) begin dcnt <= '0; cstate <= C_PE; end
          else dcnt <= dcnt + 1'b1;
        end
        C_PE: begin
          if (pe_valid && pe_ready) main_issued <= 1'b1;
          if (pe_done) begin
            resp_r.fail <= pe_fail;
            if (cur.cmd == NC_READ) begin
              resp_r.crc_err  <= !sp_crc_ok;
              resp_r.addr_err <= sp_crc_ok && !(sp_ppa_ok && sp_lba_ok);
              dcnt   <= '0;
              cstate <= C_OUT;
            end else cstate <= C_RESP;
          end
        end
        C_OUT: if (rd_ready) begin
          if (dcnt == BW'(DATA_BYTES - 1)) cstate <= C_RESP;
          dcnt <= dcnt + 1'b1;
        end
        C_MERGE: if (m_done) begin
          resp_r.fail <= m_fail;
          cstate <= C_RESP;
        end
        C_RESP: if (resp_ready) cstate <= C_IDLE;
        default: cstate <= C_IDLE;
      endcase
    end
  end

  // The response is held until taken.
  a_resp_hold: assert property (@(posedge clk) disable iff (!rst_n)
                                resp_valid && !resp_ready |=> resp_valid && $stable(resp));
endmodule
