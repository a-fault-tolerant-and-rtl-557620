// tb_sync_fifo: random pushes and pops on a 4-deep queue, compared with a
// queue model: order of data, full and empty flags, and the fill count.
module tb_sync_fifo;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;
  logic in_valid = 0, in_ready, out_valid, out_ready = 0;
  logic [15:0] in_data = 0, out_data;
  logic [2:0] count;
  logic [15:0] model [$];
  sync_fifo #(.WIDTH(16), .DEPTH(4)) dut (.*);
  initial begin
    repeat (100000) @(posedge clk);
    failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
  initial begin
    repeat (2) @(posedge clk); rst_n = 1;
    for (int t = 0; t < 2000; t++) begin
      @(negedge clk);
      in_valid = ($urandom_range(0, 2) != 0) && (t < 1900); in_data = 16'($urandom);
      out_ready = ($urandom_range(0, 2) == 0) || (t >= 1900);
      #1;
      checks++;
      if (count != 3'(model.size()) || in_ready != (model.size() < 4) || out_valid != (model.size() > 0) ||
          (out_valid && out_data != model[0])) begin
        failures++; $display("FAIL: t=%0d count %0d model %0d", t, count, model.size());
      end
      @(posedge clk);
      if (out_valid && out_ready) void'(model.pop_front());
      if (in_valid && in_ready) model.push_back(in_data);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
