// tb_boot_verifier: a 128-byte page (byte i = 13i + 1) is hashed and matched
// against its SHA-256 digest; the same page with one flipped bit, and the
// right page with a wrong table entry, must both be rejected.
module tb_boot_verifier;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;
  logic start = 0, busy, word_valid = 0, word_ready, done, ok;
  logic [255:0] exp_hash = 0, digest; logic [31:0] word = 0, n_pages_ok, n_pages_bad;
  boot_verifier #(.PAGE_BYTES(128)) dut (.*);
  localparam logic [255:0] GOOD = 256'h1bd9b72c6f0a1dcefbe20088983ea7cba3cb097d601468d690da693af5573090;
  task automatic check(bit ok_, string what);
    checks++; if (!ok_) begin failures++; $display("FAIL: %s", what); end
  endtask
  task automatic run_page(logic [255:0] h, int flip_word, output bit res);
    @(negedge clk); start = 1; exp_hash = h;
    @(negedge clk); start = 0;
    for (int w = 0; w < 32; w++) begin
      logic [31:0] v;
      for (int b = 0; b < 4; b++) v[31 - 8*b -: 8] = 8'((4*w + b) * 13 + 1);
      if (w == flip_word) v[7] = ~v[7];
      @(negedge clk); word_valid = 1; word = v; #1;
      while (!word_ready) begin @(negedge clk); #1; end
    end
    @(posedge clk); #1; word_valid = 0;
    while (!done) begin @(negedge clk); #1; end
    res = ok;
  endtask
  initial begin
    repeat (20000) @(posedge clk);
    failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
  initial begin
    bit r;
    repeat (2) @(posedge clk); rst_n = 1;
    run_page(GOOD, -1, r); check(r && digest == GOOD, "good page accepted");
    run_page(GOOD, 17, r); check(!r, "corrupted page rejected");
    run_page(GOOD ^ 256'h1, -1, r); check(!r, "wrong table entry rejected");
    run_page(GOOD, -1, r); check(r, "good page accepted again");
    check(n_pages_ok == 2 && n_pages_bad == 2, "page counters");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
