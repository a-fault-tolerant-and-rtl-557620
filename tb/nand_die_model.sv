// nand_die_model: behavioural model of one SLC NAND flash die for simulation
// only (not synthesizable). It understands the asynchronous 8-bit command set
// used by the low-level controller: FFh reset, 80h/10h page program, 00h/30h
// page read, 60h/D0h block erase and 70h read status. Commands, addresses and
// data are taken on the rising edge of WE#, read data advances on the rising
// edge of RE#; both edges are detected on the simulation clock. The die is
// busy for T_PROG / T_READ / T_ERASE clocks after an operation; the status
// byte is {1, RDY, RDY, 0000, FAIL}. Programming can only clear bits, erased
// bytes read 0xFF. Tasks let a testbench flip a stored bit or make the next
// program fail.
module nand_die_model #(
  parameter int unsigned DATA_BYTES = 8192,
  parameter int unsigned SPR_BYTES  = 448,
  parameter int unsigned PAGES      = 128,
  parameter int unsigned T_PROG     = 200,
  parameter int unsigned T_READ     = 25,
  parameter int unsigned T_ERASE    = 500
) (
  input  logic       clk,
  input  logic       ce_n,
  input  logic       cle,
  input  logic       ale,
  input  logic       we_n,
  input  logic       re_n,
  input  logic [7:0] io_in,
  output logic [7:0] io_out
);
  localparam int unsigned PAGE_BYTES = DATA_BYTES + SPR_BYTES;
  logic [7:0] mem [longint unsigned];
  logic [7:0] preg [PAGE_BYTES];
  logic prev_we = 1'b1, prev_re = 1'b1;
  int unsigned busy = 0, col = 0, row = 0, acnt = 0;
  logic [7:0] cmd = 8'h00;
  logic status_mode = 1'b0, fail = 1'b0, fail_next = 1'b0;
  int unsigned n_prog = 0, n_read = 0, n_erase = 0, n_reset = 0;

  function automatic longint unsigned key(int unsigned r, int unsigned c);
    return longint'(r) * PAGE_BYTES + c;
  endfunction

  task automatic flip_bit(int unsigned r, int unsigned c, int unsigned b);
    logic [7:0] v;
    v = mem.exists(key(r, c)) ? mem[key(r, c)] : 8'hFF;
    v[b] = ~v[b];
    mem[key(r, c)] = v;
  endtask

  task automatic set_fail_next();
    fail_next = 1'b1;
  endtask

  assign io_out = status_mode ? {1'b1, busy == 0, busy == 0, 4'b0, fail}
                              : preg[col % PAGE_BYTES];

  always @(posedge clk) begin
    if (busy != 0) busy <= busy - 1;
    prev_we <= we_n;
    prev_re <= re_n;
    if (!ce_n && !prev_we && we_n) begin
      if (cle) begin
        cmd = io_in;
        acnt = 0;
        case (io_in)
          8'hFF: begin busy <= 10; status_mode <= 1'b1; fail <= 1'b0; n_reset++; end
          8'h80: begin for (int i = 0; i < PAGE_BYTES; i++) preg[i] = 8'hFF; col = 0; end
          8'h10: begin
            for (int i = 0; i < PAGE_BYTES; i++)
              if (preg[i] != 8'hFF)
                mem[key(row, i)] = (mem.exists(key(row, i)) ? mem[key(row, i)] : 8'hFF) & preg[i];
            busy <= T_PROG; status_mode <= 1'b1; fail <= fail_next; fail_next = 1'b0; n_prog++;
          end
          8'h00: status_mode <= 1'b0;
          8'h30: begin
            for (int i = 0; i < PAGE_BYTES; i++)
              preg[i] = mem.exists(key(row, i)) ? mem[key(row, i)] : 8'hFF;
            busy <= T_READ; status_mode <= 1'b1; fail <= 1'b0; n_read++;
          end
          8'h60: ;
          8'hD0: begin
            int unsigned b0;
            b0 = row - (row % PAGES);
            for (int p = 0; p < PAGES; p++)
              for (int i = 0; i < PAGE_BYTES; i++)
                if (mem.exists(key(b0 + p, i))) mem.delete(key(b0 + p, i));
            busy <= T_ERASE; status_mode <= 1'b1; fail <= 1'b0; n_erase++;
          end
          8'h70: status_mode <= 1'b1;
          default: ;
        endcase
      end else if (ale) begin
        if (cmd == 8'h60) begin
          row = (acnt == 0) ? int'(io_in) : row | (int'(io_in) << (8 * acnt));
        end else begin
          if (acnt == 0) col = io_in;
          else if (acnt == 1) col = col | (int'(io_in) << 8);
          else if (acnt == 2) row = io_in;
          else row = row | (int'(io_in) << (8 * (acnt - 2)));
        end
        acnt++;
      end else begin
        preg[col % PAGE_BYTES] = io_in;
        col++;
      end
    end
    if (!ce_n && !prev_re && re_n && !status_mode) col++;
  end
endmodule
