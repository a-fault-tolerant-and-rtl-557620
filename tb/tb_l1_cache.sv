// tb_l1_cache: 8-set cache over a memory model with a random delay.
// Checks: miss then hit; write-through; pseudo-LRU victim after filling a
// set; a single upset corrected and scrubbed; a double upset refetched; both
// ports active together with random traffic against a reference array.
module tb_l1_cache;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;
  logic [1:0] p_req = 0, p_we = 0, p_ack; logic [23:0] p_addr [2]; logic [31:0] p_wdata [2], p_rdata;
  logic m_req, m_we, m_ack = 0; logic [23:0] m_addr; logic [31:0] m_wdata, m_rdata = 0;
  logic err_inject = 0; logic [2:0] err_set = 0; logic [1:0] err_way = 0; logic [5:0] err_bit = 0;
  logic [31:0] n_hit, n_miss, n_corrected, n_uncorrectable;
  l1_cache #(.SETS(8)) dut (.*);
  logic [31:0] mem [int unsigned];
  int n_mem_rd = 0;
  task automatic check(bit ok, string what);
    checks++; if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask
  function automatic logic [31:0] memval(int unsigned a);
    return mem.exists(a) ? mem[a] : a * 32'h01000193 + 7;
  endfunction
  int dly = -1;
  always @(posedge clk) begin
    m_ack <= 1'b0;
    if (m_req && !m_ack) begin
      if (dly < 0) dly = $urandom_range(0, 2);
      else if (dly == 0) begin
        m_ack <= 1'b1; dly = -1;
        if (m_we) mem[32'(m_addr)] = m_wdata;
        else begin m_rdata <= memval(32'(m_addr)); n_mem_rd++; end
      end else dly--;
    end
  end
  task automatic access(int p, bit we, int unsigned a, logic [31:0] wd, output logic [31:0] rd);
    @(negedge clk); p_req[p] = 1; p_we[p] = we; p_addr[p] = 24'(a); p_wdata[p] = wd; #1;
    while (!p_ack[p]) begin @(negedge clk); #1; end
    rd = p_rdata;
    @(posedge clk); #1; p_req[p] = 0;
  endtask
  task automatic inject(int s, int b);
    for (int w = 0; w < 4; w++) begin
      @(negedge clk); err_inject = 1; err_set = 3'(s); err_way = 2'(w); err_bit = 6'(b);
    end
    @(negedge clk); err_inject = 0;
  endtask
  initial begin
    repeat (50000) @(posedge clk);
    failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
  logic [31:0] ref_mem [64];
  initial begin
    logic [31:0] r; int h0, m0, rd0;
    p_addr[0] = 0; p_addr[1] = 0; p_wdata[0] = 0; p_wdata[1] = 0;
    repeat (2) @(posedge clk); rst_n = 1;
    access(0, 0, 8'h13, 0, r); check(r == memval(8'h13) && n_miss == 1, "read miss");
    access(1, 0, 8'h13, 0, r); check(r == memval(8'h13) && n_hit == 1, "read hit on other port");
    access(0, 1, 8'h13, 32'hCAFE0001, r); check(mem[8'h13] == 32'hCAFE0001, "write goes through");
    rd0 = n_mem_rd;
    access(1, 0, 8'h13, 0, r); check(r == 32'hCAFE0001 && n_mem_rd == rd0, "write updated line");
    // set 5: a0..a3 fill the ways, a4 must evict a0 (the pseudo-LRU way)
    for (int i = 0; i < 4; i++) access(0, 0, 5 + 8*i, 0, r);
    access(0, 0, 5 + 32, 0, r);
    rd0 = n_mem_rd;
    for (int i = 1; i < 5; i++) access(0, 0, 5 + 8*i, 0, r);
    check(n_mem_rd == rd0, "a1..a4 still cached");
    access(0, 0, 5, 0, r); check(n_mem_rd == rd0 + 1 && r == memval(5), "a0 was the victim");
    // single upset in every way of set 3 (holds 0x13): corrected, scrubbed
    inject(3, 9);
    h0 = n_hit; rd0 = n_mem_rd;
    access(1, 0, 8'h13, 0, r);
    check(r == 32'hCAFE0001 && n_corrected == 1 && n_hit == h0 + 1 && n_mem_rd == rd0, "single upset corrected");
    access(1, 0, 8'h13, 0, r); check(n_corrected == 1, "line was scrubbed");
    // double upset: line dropped, word fetched again
    inject(3, 4); inject(3, 20);
    m0 = n_miss;
    access(0, 0, 8'h13, 0, r);
    check(r == 32'hCAFE0001 && n_uncorrectable == 1 && n_miss == m0 + 1, "double upset refetched");
    // both ports at once
    for (int i = 0; i < 64; i++) ref_mem[i] = memval(i);
    fork
      for (int t = 0; t < 150; t++) begin
        int a; bit we; logic [31:0] d, q;
        a = $urandom_range(0, 31); we = $urandom_range(0, 2) == 0; d = $urandom;
        access(0, we, a, d, q);
        if (we) ref_mem[a] = d; else check(q == ref_mem[a], "port 0 random read");
      end
      for (int t = 0; t < 150; t++) begin
        int a; bit we; logic [31:0] d, q;
        a = 32 + $urandom_range(0, 31); we = $urandom_range(0, 2) == 0; d = $urandom;
        access(1, we, a, d, q);
        if (we) ref_mem[a] = d; else check(q == ref_mem[a], "port 1 random read");
      end
    join
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
