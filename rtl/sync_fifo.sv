// sync_fifo: single-clock first-in first-out queue with valid/ready handshakes
// on both sides. It serves as the request queue of each low-level NAND
// controller, so that commands sent by the memory manager are buffered in the
// controller instead of stalling upstream.
//
// A word is written when in_valid && in_ready and read when out_valid &&
// out_ready; out_data shows the oldest entry combinationally. DEPTH entries
// (power of two); count gives the fill level. The depth is this design's
// choice: the queue is only named, not sized, in the architecture.
module sync_fifo #(
  parameter int unsigned WIDTH = 32,
  parameter int unsigned DEPTH = 4
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             in_valid,
  output logic             in_ready,
  input  logic [WIDTH-1:0] in_data,
  output logic             out_valid,
  input  logic             out_ready,
  output logic [WIDTH-1:0] out_data,
  output logic [$clog2(DEPTH+1)-1:0] count
);
  localparam int unsigned AW = (DEPTH > 1) ? $clog2(DEPTH) : 1;
  logic [WIDTH-1:0] mem [DEPTH];
  logic [AW-1:0] wp, rp;
  logic push, pop;

  assign in_ready  = (count != DEPTH[$clog2(DEPTH+1)-1:0]);
  assign out_valid = (count != 0);
  assign out_data  = mem[rp];
  assign push = in_valid && in_ready;
  assign pop  = out_valid && out_ready;

  always_ff @(posedge clk) if (push) mem[wp] <= in_data;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      wp <= '0; rp <= '0; count <= '0;
    end else begin
      if (push) wp <= (wp == AW'(DEPTH-1)) ? '0 : wp + 1'b1;
      if (pop)  rp <= (rp == AW'(DEPTH-1)) ? '0 : rp + 1'b1;
      if (push && !pop) count <= count + 1'b1;
      else if (pop && !push) count <= count - 1'b1;
    end
  end

  property p_no_overflow; @(posedge clk) disable iff (!rst_n) 32'(count) <= DEPTH; endproperty
  a_no_overflow: assert property (p_no_overflow);
endmodule
