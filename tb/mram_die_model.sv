// mram_die_model: behavioural model of one MRAM die behind a simple
// synchronous word port, for simulation only. A read issued with en && !we
// returns the stored 39-bit word LAT clocks later on rdata; never-written
// words read as zero (the SECDED code word of zero). flip_bit() models an
// upset in a stored word.
module mram_die_model #(
  parameter int unsigned AW  = 24,
  parameter int unsigned W   = 39,
  parameter int unsigned LAT = 2
) (
  input  logic          clk,
  input  logic          en,
  input  logic          we,
  input  logic [AW-1:0] addr,
  input  logic [W-1:0]  wdata,
  output logic [W-1:0]  rdata
);
  logic [W-1:0] mem [int unsigned];
  logic [W-1:0] pipe [LAT];
  int unsigned n_write = 0;

  task automatic flip_bit(int unsigned a, int unsigned b);
    logic [W-1:0] v;
    v = mem.exists(a) ? mem[a] : '0;
    v[b] = ~v[b];
    mem[a] = v;
  endtask

  assign rdata = pipe[LAT-1];
  always @(posedge clk) begin
    for (int i = LAT - 1; i > 0; i--) pipe[i] <= pipe[i-1];
    pipe[0] <= '0;
    if (en && we) begin mem[32'(addr)] = wdata; n_write++; end
    else if (en) pipe[0] <= mem.exists(32'(addr)) ? mem[32'(addr)] : '0;
  end
endmodule
