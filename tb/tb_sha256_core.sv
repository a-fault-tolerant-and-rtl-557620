// tb_sha256_core: FIPS 180-4 examples: "abc" (one block) and the 56-byte
// two-block message, and the 66-clock block latency.
module tb_sha256_core;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;
  logic init = 0, blk_valid = 0, blk_ready, blk_done; logic [511:0] blk = 0; logic [255:0] digest;
  sha256_core dut (.*);
  task automatic check(bit ok, string what);
    checks++; if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask
  task automatic hash_block(logic [511:0] b, output int lat);
    @(negedge clk); blk_valid = 1; blk = b; #1;
    while (!blk_ready) begin @(negedge clk); #1; end
    @(negedge clk); blk_valid = 0; lat = 1;
    while (!blk_done) begin @(negedge clk); lat++; end
  endtask
  initial begin
    repeat (10000) @(posedge clk);
    failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
  initial begin
    int lat;
    string m2;
    logic [1023:0] two;
    repeat (2) @(posedge clk); rst_n = 1;
    @(negedge clk); init = 1; @(negedge clk); init = 0;
    hash_block({24'h616263, 8'h80, 416'd0, 64'd24}, lat);
    check(digest == 256'hba7816bf8f01cfea414140de5dae2223b00361a396177a9cb410ff61f20015ad, "abc digest");
    check(lat == 66, $sformatf("block latency 66 clocks (%0d)", lat));
    m2 = "abcdbcdecdefdefgefghfghighijhijkijkljklmklmnlmnomnopnopq";
    two = '0;
    for (int i = 0; i < 56; i++) two[1023 - 8*i -: 8] = m2[i];
    two[1023 - 8*56 -: 8] = 8'h80;
    two[63:0] = 64'd448;
    @(negedge clk); init = 1; @(negedge clk); init = 0;
    hash_block(two[1023:512], lat);
    hash_block(two[511:0], lat);
    check(digest == 256'h248d6a61d20638b8e5c026930c3e6039a33ce45964ff2167f6ecedd419db06c1, "two-block digest");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
