// tb_mram_ctrl: mirrored, SECDED-protected MRAM over two die models.
// Checks: write reaches both dies; clean read; single upset in die A or B
// corrected; double upset in one die served from the other (mirror select);
// double upsets in both dies reported uncorrectable; scrubbing of both dies.
module tb_mram_ctrl;
  import secded_pkg::*;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;
  logic req = 0, we = 0, ack, rd_uncorrectable; logic [23:0] addr = 0; logic [31:0] wdata = 0, rdata;
  logic [1:0] mr_en; logic mr_we; logic [23:0] mr_addr; logic [SD_CODE_W-1:0] mr_wdata, mr_rdata [2];
  logic [31:0] n_corrected, n_mirror_select, n_uncorrectable;
  mram_ctrl #(.LAT(2)) dut (.*);
  mram_die_model #(.LAT(2)) dA (.clk, .en(mr_en[0]), .we(mr_we), .addr(mr_addr), .wdata(mr_wdata), .rdata(mr_rdata[0]));
  mram_die_model #(.LAT(2)) dB (.clk, .en(mr_en[1]), .we(mr_we), .addr(mr_addr), .wdata(mr_wdata), .rdata(mr_rdata[1]));
  task automatic check(bit ok, string what);
    checks++; if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask
  task automatic access(bit w, int unsigned a, logic [31:0] d, output logic [31:0] q, output bit unc);
    @(negedge clk); req = 1; we = w; addr = 24'(a); wdata = d; #1;
    while (!ack) begin @(negedge clk); #1; end
    q = rdata; unc = rd_uncorrectable;
    @(posedge clk); #1; req = 0;
  endtask
  initial begin
    repeat (10000) @(posedge clk);
    failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
  initial begin
    logic [31:0] q; bit u;
    repeat (2) @(posedge clk); rst_n = 1;
    access(1, 100, 32'h1234_5678, q, u);
    check(dA.mem[100] == sd_encode(32'h1234_5678) && dB.mem[100] == sd_encode(32'h1234_5678), "write to both dies");
    access(0, 100, 0, q, u); check(q == 32'h1234_5678 && !u && n_corrected == 0, "clean read");
    dA.flip_bit(100, 7);
    access(0, 100, 0, q, u); check(q == 32'h1234_5678 && !u && n_corrected == 1 && n_mirror_select == 1, "single upset in A, clean B selected");
    check(dA.mem[100] == sd_encode(32'h1234_5678), "A scrubbed");
    dB.flip_bit(100, 30);
    access(0, 100, 0, q, u); check(q == 32'h1234_5678 && !u && n_corrected == 2, "single upset in B");
    dA.flip_bit(100, 3); dA.flip_bit(100, 11);
    access(0, 100, 0, q, u); check(q == 32'h1234_5678 && !u && n_mirror_select == 2, "double upset in A, B selected");
    check(dA.mem[100] == sd_encode(32'h1234_5678), "A rewritten from B");
    dA.flip_bit(100, 5); dB.flip_bit(100, 2); dB.flip_bit(100, 8);
    access(0, 100, 0, q, u); check(q == 32'h1234_5678 && !u, "single in A, double in B");
    check(dB.mem[100] == sd_encode(32'h1234_5678), "B rewritten");
    dA.flip_bit(100, 1); dA.flip_bit(100, 2); dB.flip_bit(100, 3); dB.flip_bit(100, 4);
    access(0, 100, 0, q, u); check(u && n_uncorrectable == 1, "double upsets in both dies reported");
    access(1, 100, 32'hA5A5_0F0F, q, u);
    access(0, 100, 0, q, u); check(q == 32'hA5A5_0F0F && !u, "rewrite recovers the word");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
