// tb_scrambler: the keystream for a seed is compared with an LFSR model
// (polynomial 0x04C11DB7, 8 steps per byte, seed = LPA xor 0x9E3779B9);
// scrambling twice restores the data; different LPAs give different
// streams; the scrambled stream of an all-zero page is close to half ones.
module tb_scrambler;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;
  logic load = 0, step = 0; logic [23:0] seed_lpa = 0; logic [7:0] din = 0, key, dout;
  scrambler #(.LBA_W(24)) dut (.*);
  task automatic check(bit ok, string what);
    checks++; if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask
  function automatic logic [7:0] model_byte(logic [23:0] lpa, int n);
    logic [31:0] s;
    s = {8'd0, lpa} ^ 32'h9E3779B9;
    if (s == 0) s = 1;
    for (int i = 0; i < 8 * n; i++) s = s[31] ? ((s << 1) ^ 32'h04C11DB7) : (s << 1);
    return s[31:24];
  endfunction
  initial begin
    repeat (100000) @(posedge clk);
    failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
  initial begin
    logic [7:0] ks [256]; int ones;
    repeat (2) @(posedge clk); rst_n = 1;
    for (int s = 0; s < 3; s++) begin
      logic [23:0] lpa; lpa = (s == 2) ? 24'h9E3779 : 24'($urandom);
      @(negedge clk); load = 1; seed_lpa = lpa;
      @(negedge clk); load = 0; step = 1;
      ones = 0;
      for (int n = 0; n < 256; n++) begin
        din = 8'(n * 5); #1;
        ks[n] = key;
        if (n < 40) check(key == model_byte(lpa, n), "keystream matches LFSR model");
        check((dout ^ key) == din, "descrambling restores data");
        ones += $countones(key);
        @(negedge clk);
      end
      step = 0;
      check(ones > 900 && ones < 1148, "about half of the scrambled bits are ones");
    end
    // different seeds give different keystreams
    @(negedge clk); load = 1; seed_lpa = 24'h000001;
    @(negedge clk); load = 0; #1; ks[0] = key;
    @(negedge clk); load = 1; seed_lpa = 24'h000002;
    @(negedge clk); load = 0; #1;
    check(key != ks[0] || model_byte(24'h1, 0) == model_byte(24'h2, 0), "seed changes the stream");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
