// l1_cache: first-level SRAM cache in front of the MRAM, holding the FTL's
// mapping tables and metadata words. Two requesters share it: port 0 (the
// page-table walker) and port 1 (the processor).
//
// 4-way set-associative, SETS sets of one 32-bit word per line, pseudo-tree
// LRU replacement (three bits per set: a root bit choosing the half, one bit
// per half choosing the way). Every stored word is a 39-bit Hamming SECDED
// code word: a single upset is corrected on the fly and the corrected word is
// written back; a double upset invalidates the line and the word is fetched
// again from the MRAM, which always holds the current value because writes go
// through to it (write-through, a write updates the line only on a hit).
// Ports: *_req held until *_ack; read data comes with the ack. A read hit
// takes 2 clocks, a miss 2 clocks plus the MRAM access. Requests are served
// one at a time, round-robin between the ports. err_inject flips bit
// err_bit of the code word in set err_set, way err_way (upset injection).
// 4 ways, pseudo-tree LRU and SECDED follow the described architecture; the
// line size, the number of sets, write-through and the blocking operation
// are this design's choice.
module l1_cache
  import secded_pkg::*;
#(
  parameter int unsigned SETS = 64,
  parameter int unsigned AW   = 24
) (
  input  logic                    clk,
  input  logic                    rst_n,
  input  logic [1:0]              p_req,
  input  logic [1:0]              p_we,
  input  logic [AW-1:0]           p_addr  [2],
  input  logic [31:0]             p_wdata [2],
  output logic [1:0]              p_ack,
  output logic [31:0]             p_rdata,
  // memory side (MRAM controller)
  output logic                    m_req,
  output logic                    m_we,
  output logic [AW-1:0]           m_addr,
  output logic [31:0]             m_wdata,
  input  logic                    m_ack,
  input  logic [31:0]             m_rdata,
  // upset injection and statistics
  input  logic                    err_inject,
  input  logic [$clog2(SETS)-1:0] err_set,
  input  logic [1:0]              err_way,
  input  logic [5:0]              err_bit,
  output logic [31:0]             n_hit,
  output logic [31:0]             n_miss,
  output logic [31:0]             n_corrected,
  output logic [31:0]             n_uncorrectable
);
  localparam int unsigned WAYS = 4;
  localparam int unsigned SW   = $clog2(SETS);
  localparam int unsigned TW   = AW - SW;

  logic               vld  [SETS][WAYS];
  logic [TW-1:0]      tag  [SETS][WAYS];
  logic [SD_CODE_W-1:0] dat [SETS][WAYS];
  logic [2:0]         plru [SETS];

  typedef enum logic [2:0] {L_IDLE, L_LOOKUP, L_MEM_RD, L_MEM_WR, L_ACK} lstate_e;
  lstate_e       state;
  logic          port, last_port;
  logic          we_r;
  logic [AW-1:0] addr_r;
  logic [31:0]   wdata_r, rdata_r;
  logic [SW-1:0] set_r;
  logic [TW-1:0] tag_r;

  logic sel;
  assign sel   = (p_req == 2'b11) ? !last_port : p_req[1];
  assign set_r = addr_r[SW-1:0];
  assign tag_r = addr_r[AW-1:SW];

  // lookup of the selected set
  logic       hit;
  logic [1:0] hit_way, victim;
  sd_result_t dec;
  always_comb begin
    hit = 1'b0; hit_way = '0;
    for (int w = 0; w < WAYS; w++)
      if (vld[set_r][w] && tag[set_r][w] == tag_r && !hit) begin hit = 1'b1; hit_way = 2'(w); end
    dec = sd_decode(dat[set_r][hit_way]);
    victim = plru[set_r][0] ? (plru[set_r][2] ? 2'd3 : 2'd2) : (plru[set_r][1] ? 2'd1 : 2'd0);
    for (int w = WAYS - 1; w >= 0; w--) if (!vld[set_r][w]) victim = 2'(w);
  end

  function automatic logic [2:0] plru_touch(logic [2:0] p, logic [1:0] w);
    logic [2:0] n;
    n = p;
    if (w[1] == 1'b0) begin n[0] = 1'b1; n[1] = (w == 2'd0); end
    else              begin n[0] = 1'b0; n[2] = (w == 2'd2); end
    return n;
  endfunction

  assign m_req   = (state == L_MEM_RD) || (state == L_MEM_WR);
  assign m_we    = (state == L_MEM_WR);
  assign m_addr  = addr_r;
  assign m_wdata = wdata_r;
  assign p_rdata = rdata_r;
  assign p_ack   = (state == L_ACK) ? (port ? 2'b10 : 2'b01) : 2'b00;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state <= L_IDLE; port <= 1'b0; last_port <= 1'b1; we_r <= 1'b0;
      addr_r <= '0; wdata_r <= '0; rdata_r <= '0;
      n_hit <= '0; n_miss <= '0; n_corrected <= '0; n_uncorrectable <= '0;
      for (int s = 0; s < SETS; s++) begin
        plru[s] <= '0;
        for (int w = 0; w < WAYS; w++) vld[s][w] <= 1'b0;
      end
    end else begin
      if (err_inject) dat[err_set][err_way][err_bit] <= ~dat[err_set][err_way][err_bit];
      case (state)
        L_IDLE: if (p_req != 2'b00) begin
          port <= sel; last_port <= sel;
          we_r <= p_we[sel]; addr_r <= p_addr[sel]; wdata_r <= p_wdata[sel];
          state <= L_LOOKUP;
        end
        L_LOOKUP: begin
          if (we_r) state <= L_MEM_WR;
          else if (hit && !dec.uncorrectable) begin
            n_hit <= n_hit + 1;
            rdata_r <= dec.data;
            plru[set_r] <= plru_touch(plru[set_r], hit_way);
            if (dec.corrected) begin
              n_corrected <= n_corrected + 1;
              dat[set_r][hit_way] <= sd_encode(dec.data);   // scrub
            end
            state <= L_ACK;
          end else begin
            if (hit) begin
              n_uncorrectable <= n_uncorrectable + 1;
              vld[set_r][hit_way] <= 1'b0;
            end
            n_miss <= n_miss + 1;
            state <= L_MEM_RD;
          end
        end
        L_MEM_RD: if (m_ack) begin
          rdata_r <= m_rdata;
          vld[set_r][victim] <= 1'b1;
          tag[set_r][victim] <= tag_r;
          dat[set_r][victim] <= sd_encode(m_rdata);
          plru[set_r] <= plru_touch(plru[set_r], victim);
          state <= L_ACK;
        end
        L_MEM_WR: if (m_ack) begin
          if (hit) begin
            dat[set_r][hit_way] <= sd_encode(wdata_r);
            plru[set_r] <= plru_touch(plru[set_r], hit_way);
          end
          state <= L_ACK;
        end
        L_ACK: state <= L_IDLE;
        default: state <= L_IDLE;
      endcase
    end
  end
endmodule
