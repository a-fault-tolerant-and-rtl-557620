// tb_channel_mux: checks command and write-data steering by die number,
// page-atomic round-robin return of read data from several dies at once, and
// round-robin return of responses, with 4 ports whose controller side is
// driven by the testbench.
module tb_channel_mux;
  import ssd_pkg::*;
  localparam int N = 4, PB = 8;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;
  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  logic cmd_valid = 0, cmd_ready; logic [DIE_W-1:0] cmd_die = 0; ll_cmd_t cmd = '0;
  logic wr_valid = 0, wr_ready; logic [DIE_W-1:0] wr_die = 0; logic [7:0] wr_data = 0;
  logic rd_valid, rd_ready = 0, rd_last; logic [7:0] rd_data; logic [DIE_W-1:0] rd_die;
  logic resp_valid, resp_ready = 0; ll_resp_t resp; logic [DIE_W-1:0] resp_die;
  logic [N-1:0] ll_cmd_valid, ll_cmd_ready = '1, ll_wr_valid, ll_wr_ready = '0;
  ll_cmd_t ll_cmd; logic [7:0] ll_wr_data;
  logic [N-1:0] ll_rd_valid = '0, ll_rd_ready, ll_rd_last, ll_resp_valid = '0, ll_resp_ready;
  logic [7:0] ll_rd_data [N];
  ll_resp_t ll_resp [N];
  int rd_pos [N];

  channel_mux #(.N(N)) dut (.*);

  // controller-side read sources: die d sends bytes {d, pos}, PB bytes per page
  always_comb
    for (int d = 0; d < N; d++) begin
      ll_rd_data[d] = 8'((d << 4) | rd_pos[d]);
      ll_rd_last[d] = (rd_pos[d] == PB - 1);
      ll_resp[d]    = '{cmd: NC_READ, fail: d[0], addr_err: d[1], crc_err: 1'b0};
    end
  always @(posedge clk)
    for (int d = 0; d < N; d++)
      if (ll_rd_valid[d] && ll_rd_ready[d]) begin
        if (rd_pos[d] == PB - 1) begin ll_rd_valid[d] <= 1'b0; rd_pos[d] <= 0; end
        else rd_pos[d] <= rd_pos[d] + 1;
      end
  always @(posedge clk)
    for (int d = 0; d < N; d++)
      if (ll_resp_valid[d] && ll_resp_ready[d]) ll_resp_valid[d] <= 1'b0;

  initial begin
    repeat (20000) @(posedge clk);
    failures++; $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int got [N]; int seen_resp [N]; int order [$];
    for (int d = 0; d < N; d++) rd_pos[d] = 0;
    repeat (2) @(posedge clk); rst_n = 1;
    // command steering
    for (int d = 0; d < N; d++) begin
      @(negedge clk);
      cmd_valid = 1; cmd_die = DIE_W'(d); cmd.cmd = NC_ERASE; ll_cmd_ready = '1; ll_cmd_ready[d] = 1'b0;
      #1;
      check(ll_cmd_valid == (1 << d), "command goes only to its die");
      check(!cmd_ready, "ready follows the addressed die");
      ll_cmd_ready[d] = 1'b1; #1;
      check(cmd_ready && ll_cmd.cmd == NC_ERASE, "ready and command pass");
    end
    @(negedge clk); cmd_valid = 0;
    // write data steering
    wr_valid = 1; wr_die = 2; wr_data = 8'hA7; ll_wr_ready = 4'b0100; #1;
    check(ll_wr_valid == 4'b0100 && ll_wr_data == 8'hA7 && wr_ready, "write data steered to die 2");
    wr_die = 1; #1;
    check(ll_wr_valid == 4'b0010 && !wr_ready, "write ready follows its die");
    @(negedge clk); wr_valid = 0;
    // three dies deliver pages at the same time
    ll_rd_valid = 4'b1101;
    rd_ready = 1;
    for (int d = 0; d < N; d++) got[d] = 0;
    begin
      int cur; cur = -1;
      #1;
      for (int n = 0; n < 3 * PB; n++) begin
        if (n != 0) begin @(negedge clk); #1; end
        while (!rd_valid) begin @(negedge clk); #1; end
        if (cur < 0) cur = rd_die;
        check(rd_die == DIE_W'(cur) && rd_data == 8'((cur << 4) | got[cur]), "read bytes in order, page not interleaved");
        got[cur]++;
        if (rd_last) begin order.push_back(cur); cur = -1; end
      end
    end
    @(negedge clk); rd_ready = 0;
    check(got[0] == PB && got[2] == PB && got[3] == PB && got[1] == 0, "every page delivered whole");
    check(order.size() == 3, "three pages");
    // responses
    ll_resp_valid = 4'b1011;
    resp_ready = 1;
    for (int d = 0; d < N; d++) seen_resp[d] = 0;
    #1;
    for (int n = 0; n < 3; n++) begin
      if (n != 0) begin @(negedge clk); #1; end
      while (!resp_valid) begin @(negedge clk); #1; end
      seen_resp[resp_die]++;
      check(resp.fail == resp_die[0] && resp.addr_err == resp_die[1], "response matches its die");
    end
    @(negedge clk); #1;
    check(!resp_valid, "all responses taken");
    check(seen_resp[0] == 1 && seen_resp[1] == 1 && seen_resp[3] == 1, "each response once");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
