// tb_nand_timing_ctrl: a stream of command, address, data-in and data-out
// cycles. A pin monitor records every WE# and RE# pulse: latch type
// (CLE/ALE), IO byte, low and high widths. Checks the bytes and types, the
// pulse widths (2 low, 1 high), back-to-back spacing of 3 clocks per byte,
// read data returned from the IO pins, and CE# following ce_hold.
module tb_nand_timing_ctrl;
  import ssd_pkg::*;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;
  logic ce_hold = 0, op_valid = 0, op_ready, rd_valid; nand_op_e op_kind = NOP_CMD; logic [7:0] op_byte = 0, rd_data;
  logic nand_ce_n, nand_cle, nand_ale, nand_we_n, nand_re_n, nand_io_oe; logic [7:0] nand_io_out, nand_io_in;
  nand_timing_ctrl dut (.*);
  task automatic check(bit ok, string what);
    checks++; if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask
  // pin monitor
  typedef struct { bit re; bit cle; bit ale; logic [7:0] io; int low; int start; } pulse_t;
  pulse_t pulses [$];
  int cyc = 0, low_cnt = 0, low_start = 0; bit cle_s, ale_s; logic [7:0] io_s;
  logic [7:0] rd_seq = 8'h2F;
  // the die drives the next byte after each RE# falling edge
  always @(negedge nand_re_n) if (rst_n) rd_seq = rd_seq + 8'h11;
  bit prev_we = 1, prev_re = 1, ce_bad = 0;
  assign nand_io_in = rd_seq;
  always @(posedge clk) begin
    cyc++;
    if (rst_n) begin
      if (!nand_we_n || !nand_re_n) begin
        if (low_cnt == 0) low_start = cyc;
        low_cnt++; cle_s = nand_cle; ale_s = nand_ale; io_s = nand_io_out;
        if (nand_ce_n) ce_bad = 1;
      end
      if ((nand_we_n && !prev_we) || (nand_re_n && !prev_re)) begin
        pulses.push_back('{re: !prev_re, cle: cle_s, ale: ale_s, io: io_s, low: low_cnt, start: low_start});
        low_cnt = 0;
      end
      prev_we = nand_we_n; prev_re = nand_re_n;
    end
  end
  logic [7:0] got [$];
  always @(posedge clk) if (rst_n && rd_valid) got.push_back(rd_data);
  task automatic op(nand_op_e k, logic [7:0] b);
    @(negedge clk); op_valid = 1; op_kind = k; op_byte = b; #1;
    while (!op_ready) begin @(negedge clk); #1; end
    @(posedge clk); #1; op_valid = 0;
  endtask
  initial begin
    repeat (5000) @(posedge clk);
    failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
  initial begin
    repeat (3) @(posedge clk); rst_n = 1;
    #1; check(nand_ce_n && nand_we_n && nand_re_n, "idle pins");
    @(negedge clk); ce_hold = 1;
    op(NOP_CMD, 8'h80);
    for (int i = 0; i < 5; i++) op(NOP_ADDR, 8'(i + 1));
    for (int i = 0; i < 4; i++) op(NOP_WDATA, 8'(8'hD0 + i));
    op(NOP_CMD, 8'h10);
    for (int i = 0; i < 3; i++) op(NOP_RDATA, 8'h00);
    repeat (8) @(posedge clk);
    @(negedge clk); ce_hold = 0; #1;
    check(nand_ce_n, "CE# released");
    check(pulses.size() == 14, $sformatf("14 bus cycles (%0d)", pulses.size()));
    if (pulses.size() == 14) begin
      check(pulses[0].cle && !pulses[0].ale && pulses[0].io == 8'h80 && !pulses[0].re, "command latch 80h");
      for (int i = 1; i <= 5; i++) check(pulses[i].ale && !pulses[i].cle && pulses[i].io == 8'(i), "address latch");
      for (int i = 6; i <= 9; i++) check(!pulses[i].ale && !pulses[i].cle && pulses[i].io == 8'(8'hD0 + i - 6), "data in");
      check(pulses[10].cle && pulses[10].io == 8'h10, "command latch 10h");
      for (int i = 11; i <= 13; i++) check(pulses[i].re, "data out uses RE#");
      for (int i = 0; i < 14; i++) check(pulses[i].low == 2, "low width 2 clocks");
      for (int i = 1; i < 14; i++) check(pulses[i].start - pulses[i-1].start == 3, "3 clocks per byte");
    end
    check(got.size() == 3 && got[0] == 8'h40 && got[1] == 8'h51 && got[2] == 8'h62, "read data from IO");
    check(!ce_bad, "CE# low during every pulse");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
