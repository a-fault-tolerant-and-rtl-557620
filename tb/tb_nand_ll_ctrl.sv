// tb_nand_ll_ctrl: self-checking test of one low-level NAND controller
// against the behavioural NAND die, with small pages (64 B + 64 B spare,
// 4 pages per block). Checks reset, program/read round trip with scrambling,
// the spare-area address and CRC checks, erase, a failing program, the
// in-controller block merge, and the 3-clock-per-byte data rate on the bus.
module tb_nand_ll_ctrl;
  import ssd_pkg::*;
  localparam int unsigned DB = 64, SB = 64, PG = 4;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic cmd_valid = 0, cmd_ready; ll_cmd_t cmd_in;
  logic wr_valid = 0, wr_ready; logic [7:0] wr_data;
  logic rd_valid, rd_ready = 0, rd_last; logic [7:0] rd_data;
  logic resp_valid, resp_ready = 0, busy; ll_resp_t resp;
  logic ce_n, cle, ale, we_n, re_n, io_oe; logic [7:0] io_out, io_in;

  nand_ll_ctrl #(.DATA_BYTES(DB), .SPR_BYTES(SB), .PAGES(PG), .DIE_ID(5'd3)) dut (
    .clk, .rst_n, .timestamp(32'h1234_5678),
    .cmd_valid, .cmd_ready, .cmd_in, .wr_valid, .wr_ready, .wr_data,
    .rd_valid, .rd_ready, .rd_data, .rd_last, .resp_valid, .resp_ready, .resp, .busy,
    .nand_ce_n(ce_n), .nand_cle(cle), .nand_ale(ale), .nand_we_n(we_n), .nand_re_n(re_n),
    .nand_io_out(io_out), .nand_io_oe(io_oe), .nand_io_in(io_in));
  nand_die_model #(.DATA_BYTES(DB), .SPR_BYTES(SB), .PAGES(PG), .T_PROG(40), .T_READ(10), .T_ERASE(60)) die (
    .clk, .ce_n, .cle, .ale, .we_n, .re_n, .io_in(io_out), .io_out(io_in));

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  function automatic logic [41:0] row_addr(int unsigned blk, int unsigned pg);
    return {2'b00, 24'(blk * 128 + pg), 16'h0};   // row = {block, 7-bit page}
  endfunction

  task automatic issue(nand_cmd_e c, logic [41:0] a, logic [LBA_W-1:0] l);
    @(negedge clk);
    cmd_in = '{cmd: c, addr: a, lba: l};
    cmd_valid = 1;
    #1;
    while (!cmd_ready) begin @(negedge clk); #1; end
    @(posedge clk); #1;
    cmd_valid = 0;
  endtask

  task automatic get_resp(output ll_resp_t r);
    resp_ready = 1;
    forever begin
      @(negedge clk); #1;
      if (resp_valid) begin r = resp; break; end
    end
    @(posedge clk); #1;
    resp_ready = 0;
  endtask

  task automatic program_page(int unsigned blk, int unsigned pg, logic [LBA_W-1:0] l,
                              input logic [7:0] d [DB], output ll_resp_t r);
    issue(NC_PROGRAM, row_addr(blk, pg), l);
    for (int i = 0; i < DB; i++) begin
      @(negedge clk);
      wr_valid = 1; wr_data = d[i];
      #1;
      while (!wr_ready) begin @(negedge clk); #1; end
    end
    @(posedge clk); #1;
    wr_valid = 0;
    get_resp(r);
  endtask

  task automatic read_page(int unsigned blk, int unsigned pg, logic [LBA_W-1:0] l,
                           output logic [7:0] d [DB], output ll_resp_t r);
    int n;
    issue(NC_READ, row_addr(blk, pg), l);
    n = 0;
    rd_ready = 1;
    while (n < DB) begin
      @(negedge clk); #1;
      if (rd_valid) begin
        d[n] = rd_data;
        if ((n == DB - 1) != rd_last) begin failures++; $display("FAIL: rd_last"); end
        n++;
      end
    end
    @(posedge clk); #1;
    rd_ready = 0;
    get_resp(r);
  endtask

  function automatic logic [7:0] pat(int seed, int i);
    return 8'((seed * 37 + i * 11 + (i >> 3)) ^ 8'h5A);
  endfunction

  // data-cycle timing of the last program
  longint t_first = -1, t_last = -1; int n_wdata = 0; longint cyc = 0;
  always @(posedge clk) cyc++;
  logic pwe = 1;
  always @(posedge clk) begin
    pwe <= we_n;
    if (rst_n && !pwe && we_n && !cle && !ale && !ce_n) begin
      if (n_wdata == 0) t_first = cyc;
      t_last = cyc;
      n_wdata++;
    end
  end

  initial begin
    repeat (2000000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [7:0] d [DB], q [DB];
    ll_resp_t r;
    bit same; int diff;
    repeat (3) @(posedge clk);
    rst_n = 1;
    @(posedge clk);

    issue(NC_RESET, '0, '0);
    get_resp(r);
    check(r.cmd == NC_RESET && !r.fail, "reset response");
    check(die.n_reset == 1, "reset reached the die");

    // program / read round trip
    for (int i = 0; i < DB; i++) d[i] = pat(1, i);
    n_wdata = 0;
    program_page(1, 0, 24'h000123, d, r);
    check(!r.fail && r.cmd == NC_PROGRAM, "program ok");
    check(n_wdata == DB + SB, "program data cycles = page + spare");
    check(t_last - t_first == 3 * (DB + SB - 1), "3 clocks per byte on the NAND bus");
    diff = 0;
    for (int i = 0; i < DB; i++)
      if (die.mem[die.key(128, i)] != d[i]) diff++;
    check(diff > DB / 2, "stored data is scrambled");
    // stored spare: LBA bytes and PPA bytes
    check(die.mem[die.key(128, DB + 0)] == 8'h23 && die.mem[die.key(128, DB + 1)] == 8'h01, "spare LBA stored");
    check(die.mem[die.key(128, DB + 12)] == 8'h80 && die.mem[die.key(128, DB + 14)] == 8'h18, "spare PPA stored");
    read_page(1, 0, 24'h000123, q, r);
    same = 1;
    for (int i = 0; i < DB; i++) if (q[i] !== d[i]) same = 0;
    check(same, "read returns programmed data");
    check(!r.fail && !r.crc_err && !r.addr_err, "clean read response");

    // read with a different expected LBA: address error
    read_page(1, 0, 24'h000124, q, r);
    check(r.addr_err && !r.crc_err, "LBA mismatch flagged");
    // never-written page: CRC error
    read_page(1, 1, 24'h0, q, r);
    check(r.crc_err, "erased page flagged by CRC");
    // corrupted spare header
    die.flip_bit(128, DB + 5, 2);
    read_page(1, 0, 24'h000123, q, r);
    check(r.crc_err, "corrupted metadata flagged");

    // erase
    issue(NC_ERASE, row_addr(1, 0), '0);
    get_resp(r);
    check(!r.fail && r.cmd == NC_ERASE, "erase ok");
    check(!die.mem.exists(die.key(128, 0)), "block erased in die");

    // failing program
    die.set_fail_next();
    program_page(0, 2, 24'h7, d, r);
    check(r.fail, "program failure reported");

    // merge: data block 2 pages 0..3, log block 3 holds newer pages 1 and 3
    for (int p = 0; p < PG; p++) begin
      for (int i = 0; i < DB; i++) d[i] = pat(10 + p, i);
      program_page(2, p, 24'(100 + p), d, r);
    end
    for (int p = 1; p < PG; p += 2) begin
      for (int i = 0; i < DB; i++) d[i] = pat(20 + p, i);
      program_page(3, p, 24'(100 + p), d, r);
    end
    issue(NC_MERGE, {6'b0, 12'd2, 12'd3, 12'd5}, '0);
    get_resp(r);
    check(r.cmd == NC_MERGE && !r.fail, "merge completes");
    check(dut.u_merger.copied == PG, "merge copied every page");
    for (int p = 0; p < PG; p++) begin
      read_page(5, p, 24'(100 + p), q, r);
      same = 1;
      for (int i = 0; i < DB; i++) if (q[i] !== pat(((p % 2) ? 20 : 10) + p, i)) same = 0;
      check(same, $sformatf("merged page %0d holds newest data", p));
      check(!r.crc_err && !r.addr_err, $sformatf("merged page %0d metadata rewritten", p));
    end
    read_page(2, 0, 24'(100), q, r);
    check(r.crc_err, "data block erased after merge");
    read_page(3, 1, 24'(101), q, r);
    check(r.crc_err, "log block erased after merge");

    // queueing: several commands accepted while busy
    issue(NC_ERASE, row_addr(6, 0), '0);
    issue(NC_ERASE, row_addr(7, 0), '0);
    issue(NC_RESET, '0, '0);
    check(busy, "controller busy with queued requests");
    get_resp(r); check(r.cmd == NC_ERASE, "queued 1");
    get_resp(r); check(r.cmd == NC_ERASE, "queued 2");
    get_resp(r); check(r.cmd == NC_RESET, "queued 3");

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
