// nand_timing_ctrl: NAND bus cycle generator of a low-level controller.
//
// Each accepted micro-operation (ssd_pkg::nand_op_e) becomes one cycle of the
// asynchronous 8-bit NAND interface: a command latch (CLE high), an address
// latch (ALE high) or a data input cycle drive IO and pulse WE# low for T_WP
// clocks then high for T_WH clocks; a data output cycle pulses RE# low for
// T_RP clocks, samples IO on the last low clock and holds RE# high for T_REH
// clocks. CE# is low while ce_hold is high.
//
// Handshake: op_valid/op_ready; a new op is accepted on the last clock of the
// current one, so back-to-back bytes take T_WP+T_WH (or T_RP+T_REH) clocks.
// rd_valid pulses with rd_data when a data output cycle finishes.
// With the defaults and a 100 MHz clock a byte takes 30 ns (33 MB/s per die,
// 800 MB/s over 24 dies, the cube's peak bandwidth); the pulse widths
// themselves are this design's choice.
module nand_timing_ctrl
  import ssd_pkg::*;
#(
  parameter int unsigned T_WP  = 2,
  parameter int unsigned T_WH  = 1,
  parameter int unsigned T_RP  = 2,
  parameter int unsigned T_REH = 1
) (
  input  logic       clk,
  input  logic       rst_n,
  input  logic       ce_hold,
  input  logic       op_valid,
  output logic       op_ready,
  input  nand_op_e   op_kind,
  input  logic [7:0] op_byte,
  output logic       rd_valid,
  output logic [7:0] rd_data,
  // NAND pins
  output logic       nand_ce_n,
  output logic       nand_cle,
  output logic       nand_ale,
  output logic       nand_we_n,
  output logic       nand_re_n,
  output logic [7:0] nand_io_out,
  output logic       nand_io_oe,
  input  logic [7:0] nand_io_in
);
  typedef enum logic [1:0] {S_IDLE, S_LOW, S_HIGH} state_e;
  state_e     state;
  nand_op_e   kind;
  logic [7:0] cnt;
  logic       last;

  assign last     = (state == S_HIGH) &&
                    (cnt == 8'(((kind == NOP_RDATA) ? T_REH : T_WH) - 1));
  assign op_ready = (state == S_IDLE) || last;
  assign nand_ce_n = !ce_hold;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state <= S_IDLE; kind <= NOP_CMD; cnt <= '0;
      nand_cle <= 1'b0; nand_ale <= 1'b0; nand_we_n <= 1'b1; nand_re_n <= 1'b1;
      nand_io_out <= '0; nand_io_oe <= 1'b0; rd_valid <= 1'b0; rd_data <= '0;
    end else begin
      rd_valid <= 1'b0;
      if (op_valid && op_ready) begin
        state       <= S_LOW;
        kind        <= op_kind;
        cnt         <= '0;
        nand_cle    <= (op_kind == NOP_CMD);
        nand_ale    <= (op_kind == NOP_ADDR);
        nand_io_out <= op_byte;
        nand_io_oe  <= (op_kind != NOP_RDATA);
        nand_we_n   <= (op_kind == NOP_RDATA);
        nand_re_n   <= (op_kind != NOP_RDATA);
      end else begin
        case (state)
          S_LOW: begin
            if (cnt == 8'(((kind == NOP_RDATA) ? T_RP : T_WP) - 1)) begin
              state     <= S_HIGH;
              cnt       <= '0;
              nand_we_n <= 1'b1;
              nand_re_n <= 1'b1;
              if (kind == NOP_RDATA) begin
                rd_valid <= 1'b1;
                rd_data  <= nand_io_in;
              end
            end else cnt <= cnt + 1'b1;
          end
          S_HIGH: begin
            if (last) begin
              state <= S_IDLE;
              nand_cle <= 1'b0; nand_ale <= 1'b0; nand_io_oe <= 1'b0;
            end else cnt <= cnt + 1'b1;
          end
          default: ;
        endcase
      end
    end
  end
endmodule
