// scrambler: LFSR keystream for the NAND data scrambler of a low-level
// controller. Data XOR keystream spreads zeros and ones evenly over the
// cells; applying the same keystream again restores the data.
//
// The LFSR is seeded from the logical page address (LPA) of the page, so a
// page can be descrambled wherever it has been moved to. load seeds the
// register (one clock); each clock with step high advances it by 8 bits.
// key is the keystream byte for the current position; dout = din ^ key is
// provided combinationally. The LFSR (32-bit Galois, polynomial 0x04C11DB7)
// and the seed mixing are this design's choice; the seeding by LPA and the
// use of an LFSR follow the described architecture.
module scrambler #(
  parameter int unsigned LBA_W = 24
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             load,
  input  logic [LBA_W-1:0] seed_lpa,
  input  logic             step,
  input  logic [7:0]       din,
  output logic [7:0]       key,
  output logic [7:0]       dout
);
  localparam logic [31:0] POLY = 32'h04C11DB7;
  logic [31:0] lfsr;

  function automatic logic [31:0] advance8(logic [31:0] s);
    logic [31:0] t;
    t = s;
    for (int i = 0; i < 8; i++)
      t = t[31] ? ((t << 1) ^ POLY) : (t << 1);
    return t;
  endfunction

  function automatic logic [31:0] seed_of(logic [LBA_W-1:0] lpa);
    logic [31:0] s;
    s = 32'(lpa) ^ 32'h9E37_79B9;
    return (s == 0) ? 32'h1 : s;   // the all-zero state would lock the LFSR
  endfunction

  assign key  = lfsr[31:24];
  assign dout = din ^ key;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)     lfsr <= 32'h1;
    else if (load)  lfsr <= seed_of(seed_lpa);
    else if (step)  lfsr <= advance8(lfsr);
  end
endmodule
