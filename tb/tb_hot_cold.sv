// tb_hot_cold: random writes from a small LBA range are applied to the RTL
// and to a queue model of the two LRU lists (hot list 4, candidate list 6);
// after every write, the hot status of every LBA in the range must agree.
module tb_hot_cold;
  import ssd_pkg::*;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;
  logic wr_valid = 0; logic [LBA_W-1:0] wr_lba = 0, query_lba = 0; logic query_hot;
  logic [31:0] n_promote, n_demote;
  hot_cold #(.HOT_LEN(4), .CAND_LEN(6)) dut (.*);
  int hotq [$], candq [$];
  int mp = 0, md = 0;
  function automatic int find(int q [$], int v);
    foreach (q[i]) if (q[i] == v) return i;
    return -1;
  endfunction
  task automatic model_write(int l);
    int h, c;
    h = find(hotq, l); c = find(candq, l);
    if (h >= 0) begin hotq.delete(h); hotq.push_front(l); end
    else if (c >= 0) begin
      candq.delete(c);
      mp++;
      if (hotq.size() == 4) begin candq.push_front(hotq.pop_back()); md++; end
      hotq.push_front(l);
    end else begin
      candq.push_front(l);
      if (candq.size() > 6) void'(candq.pop_back());
    end
  endtask
  initial begin
    repeat (100000) @(posedge clk);
    failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
  initial begin
    repeat (2) @(posedge clk); rst_n = 1;
    for (int t = 0; t < 400; t++) begin
      int l; l = (t % 5 == 0) ? $urandom_range(0, 3) : $urandom_range(0, 15);
      @(negedge clk); wr_valid = 1; wr_lba = LBA_W'(l);
      @(negedge clk); wr_valid = 0;
      model_write(l);
      for (int q = 0; q < 16; q++) begin
        query_lba = LBA_W'(q); #1;
        checks++;
        if (query_hot != (find(hotq, q) >= 0)) begin failures++; $display("FAIL: t=%0d lba %0d", t, q); end
      end
    end
    checks++;
    if (n_promote != 32'(mp) || n_demote != 32'(md) || md == 0) begin failures++; $display("FAIL: counters"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
