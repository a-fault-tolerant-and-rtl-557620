// tb_block_merger: merges with a 4-page block over a page-engine model that
// keeps a tag per programmed page. The log block has pages 1 and 3, the data
// block pages 0, 1 and 2: the target must receive data 0, log 1, data 2 and
// log 3, both source blocks must be erased, and copied must be 4. A second
// merge with a failing program reports fail. A merge of empty blocks copies 0.
module tb_block_merger;
  import ssd_pkg::*;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;
  logic start = 0, busy, done, fail; logic [BLOCK_W-1:0] data_blk = 0, log_blk = 0, dst_blk = 0;
  logic [15:0] copied;
  logic pe_valid, pe_ready, pe_done = 0, pe_fail = 0, pe_valid_page = 0; logic [1:0] pe_op; logic [23:0] pe_row;
  block_merger #(.PAGES(4)) dut (.*);
  task automatic check(bit ok, string what);
    checks++; if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask
  int pages [int];
  int buf_tag = -1, n_erase = 0, fail_prog = 0;
  logic eng_busy = 0; int busy_n = 0; logic [1:0] op_r; int row_r;
  assign pe_ready = !eng_busy;
  always @(posedge clk) begin
    pe_done <= 0; pe_fail <= 0;
    if (!eng_busy) begin
      if (pe_valid) begin eng_busy <= 1; busy_n <= $urandom_range(0, 3); op_r <= pe_op; row_r <= int'(pe_row); end
    end else if (busy_n > 0) busy_n <= busy_n - 1;
    else begin
      eng_busy <= 0; pe_done <= 1;
      case (op_r)
        2'd0: begin pe_valid_page <= pages.exists(row_r); buf_tag = pages.exists(row_r) ? pages[row_r] : -1; end
        2'd1: begin pages[row_r] = buf_tag; if (fail_prog > 0) begin fail_prog--; pe_fail <= 1; end end
        default: begin
          n_erase++;
          for (int p = 0; p < 128; p++) if (pages.exists(row_r + p)) pages.delete(row_r + p);
        end
      endcase
    end
  end
  function automatic int row(int b, int p); return b * 128 + p; endfunction
  task automatic merge(int d, int l, int t);
    @(negedge clk); start = 1; data_blk = BLOCK_W'(d); log_blk = BLOCK_W'(l); dst_blk = BLOCK_W'(t);
    @(negedge clk); start = 0;
    while (!done) begin @(negedge clk); end
  endtask
  initial begin
    repeat (20000) @(posedge clk);
    failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
  initial begin
    repeat (2) @(posedge clk); rst_n = 1;
    pages[row(7, 0)] = 100; pages[row(7, 1)] = 101; pages[row(7, 2)] = 102;
    pages[row(9, 1)] = 201; pages[row(9, 3)] = 203;
    merge(7, 9, 12);
    check(!fail && copied == 4, "merge copied 4 pages");
    check(pages.exists(row(12, 0)) && pages[row(12, 0)] == 100, "page 0 from data block");
    check(pages.exists(row(12, 1)) && pages[row(12, 1)] == 201, "page 1 from log block");
    check(pages.exists(row(12, 2)) && pages[row(12, 2)] == 102, "page 2 from data block");
    check(pages.exists(row(12, 3)) && pages[row(12, 3)] == 203, "page 3 from log block");
    check(!pages.exists(row(7, 0)) && !pages.exists(row(9, 1)) && n_erase == 2, "sources erased");
    check(!busy, "idle after merge");
    pages[row(20, 2)] = 300;
    fail_prog = 1;
    merge(20, 21, 22);
    check(fail && copied == 1, "program failure reported");
    merge(30, 31, 32);
    check(!fail && copied == 0 && n_erase == 6, "empty merge copies nothing");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
