// channel_mux: flash multiplexer/demultiplexer between the memory manager and
// the N per-die low-level controllers.
//
// Commands carry a die number and are steered to that controller
// (cmd_ready is that controller's queue ready). Write data is steered by
// wr_die. Read data and responses from all controllers share one return
// path each: a round-robin arbiter picks a controller with data and keeps it
// until the end of its page (rd_last), so pages are never interleaved; the
// selected die is shown on rd_die / resp_die. Responses are single beats and
// are arbitrated round-robin every beat. All paths are combinational except
// the arbiter state. The steering and arbitration policy are this design's
// choice; the mux itself is part of the described architecture.
module channel_mux
  import ssd_pkg::*;
#(
  parameter int unsigned N = N_DIES
) (
  input  logic               clk,
  input  logic               rst_n,
  // upstream (memory manager side)
  input  logic               cmd_valid,
  output logic               cmd_ready,
  input  logic [DIE_W-1:0]   cmd_die,
  input  ll_cmd_t            cmd,
  input  logic               wr_valid,
  output logic               wr_ready,
  input  logic [DIE_W-1:0]   wr_die,
  input  logic [7:0]         wr_data,
  output logic               rd_valid,
  input  logic               rd_ready,
  output logic [7:0]         rd_data,
  output logic               rd_last,
  output logic [DIE_W-1:0]   rd_die,
  output logic               resp_valid,
  input  logic               resp_ready,
  output ll_resp_t           resp,
  output logic [DIE_W-1:0]   resp_die,
  // downstream (one per low-level controller)
  output logic [N-1:0]       ll_cmd_valid,
  input  logic [N-1:0]       ll_cmd_ready,
  output ll_cmd_t            ll_cmd,
  output logic [N-1:0]       ll_wr_valid,
  input  logic [N-1:0]       ll_wr_ready,
  output logic [7:0]         ll_wr_data,
  input  logic [N-1:0]       ll_rd_valid,
  output logic [N-1:0]       ll_rd_ready,
  input  logic [7:0]         ll_rd_data [N],
  input  logic [N-1:0]       ll_rd_last,
  input  logic [N-1:0]       ll_resp_valid,
  output logic [N-1:0]       ll_resp_ready,
  input  ll_resp_t           ll_resp [N]
);
  // round-robin pick: first requester at or after 'start'
  function automatic logic [DIE_W-1:0] rr_pick(logic [N-1:0] req, logic [DIE_W-1:0] start);
    logic [DIE_W-1:0] idx;
    idx = start;
    for (int k = 0; k < N; k++) begin
      int unsigned j;
      j = (32'(start) + k) % N;
      if (req[j]) return DIE_W'(j);
    end
    return idx;
  endfunction

  // commands and write data
  always_comb begin
    ll_cmd       = cmd;
    ll_cmd_valid = '0;
    ll_wr_valid  = '0;
    ll_wr_data   = wr_data;
    cmd_ready    = 1'b0;
    wr_ready     = 1'b0;
    if (32'(cmd_die) < N) begin
      ll_cmd_valid[cmd_die] = cmd_valid;
      cmd_ready             = ll_cmd_ready[cmd_die];
    end
    if (32'(wr_die) < N) begin
      ll_wr_valid[wr_die] = wr_valid;
      wr_ready            = ll_wr_ready[wr_die];
    end
  end

  // read data: locked round-robin
  logic             rd_lock;
  logic [DIE_W-1:0] rd_sel, rd_ptr, rd_pick;
  assign rd_pick = rr_pick(ll_rd_valid, rd_ptr);
  assign rd_sel  = rd_lock ? rd_die : rd_pick;
  always_comb begin
    ll_rd_ready = '0;
    rd_valid    = (ll_rd_valid != '0) && ll_rd_valid[rd_sel];
    rd_data     = ll_rd_data[rd_sel];
    rd_last     = ll_rd_last[rd_sel];
    ll_rd_ready[rd_sel] = rd_ready;
  end
  logic [DIE_W-1:0] rd_die_r;
  assign rd_die = rd_lock ? rd_die_r : rd_pick;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      rd_lock <= 1'b0; rd_die_r <= '0; rd_ptr <= '0;
    end else if (rd_valid && rd_ready) begin
      if (rd_last) begin
        rd_lock <= 1'b0;
        rd_ptr  <= (32'(rd_sel) == N - 1) ? '0 : rd_sel + 1'b1;
      end else begin
        rd_lock  <= 1'b1;
        rd_die_r <= rd_sel;
      end
    end
  end

  // responses: round-robin per beat
  logic [DIE_W-1:0] rs_ptr;
  always_comb begin
    resp_die      = rr_pick(ll_resp_valid, rs_ptr);
    resp_valid    = (ll_resp_valid != '0);
    resp          = ll_resp[resp_die];
    ll_resp_ready = '0;
    ll_resp_ready[resp_die] = resp_ready;
  end
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) rs_ptr <= '0;
    else if (resp_valid && resp_ready)
      rs_ptr <= (32'(resp_die) == N - 1) ? '0 : resp_die + 1'b1;
  end

  a_rd_page_atomic: assert property (@(posedge clk) disable iff (!rst_n)
                                     rd_lock |-> rd_die == rd_die_r);
endmodule
