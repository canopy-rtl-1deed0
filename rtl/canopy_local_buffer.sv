// canopy_local_buffer: the 6 KB input staging buffer of one tile.
//
// The buffer sits between the shared input buffer and the left edge of the
// tile. It is a first-in first-out queue of DEPTH words; a word holds one
// operand byte for each of the ROWS rows of the tile (with each byte's row
// on/off tag), so at the default 256 rows x 24 words it stores 6 KB of
// operands. Words are written as the shared input buffer delivers them and
// read in order; the word at the head is visible on 'dout' before it is
// popped (show-ahead). Fetching row inputs straight from this per-tile
// buffer, rather than passing them across tiles, keeps the skew of rows in
// different tiles independent.
//
// The FIFO organisation, the depth that makes 6 KB and the storage of the
// tag bits next to the data are this design's choices; the source gives only
// the size and the role of the buffer. Push when full and pop when empty are
// errors (assertions); such requests are ignored.
module canopy_local_buffer
  import canopy_pkg::*;
#(
  parameter int unsigned ROWS  = 256,
  parameter int unsigned DEPTH = 24
) (
  input  logic            clk,
  input  logic            rst_n,
  input  logic            push,
  input  op_t [ROWS-1:0]  din,
  input  logic            pop,
  output op_t [ROWS-1:0]  dout,
  output logic            empty,
  output logic            full
);

  localparam int unsigned PW = (DEPTH > 1) ? $clog2(DEPTH) : 1;

  op_t [ROWS-1:0]   mem [DEPTH];
  logic [PW-1:0]    wr_ptr, rd_ptr;
  logic [PW:0]      count;

  logic do_push, do_pop;
  assign do_push = push && !full;
  assign do_pop  = pop && !empty;

  assign empty = (count == '0);
  assign full  = (count == (PW+1)'(DEPTH));
  assign dout  = mem[rd_ptr];

  function automatic logic [PW-1:0] next_ptr(logic [PW-1:0] p);
    return (p == PW'(DEPTH - 1)) ? '0 : p + 1'b1;
  endfunction

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      wr_ptr <= '0;
      rd_ptr <= '0;
      count  <= '0;
    end else begin
      if (do_push) wr_ptr <= next_ptr(wr_ptr);
      if (do_pop)  rd_ptr <= next_ptr(rd_ptr);
      count <= count + (PW+1)'(do_push) - (PW+1)'(do_pop);
    end
  end

  always_ff @(posedge clk) begin
    if (do_push) mem[wr_ptr] <= din;
  end

  a_no_overflow:  assert property (@(posedge clk) disable iff (!rst_n) !(push && full));
  a_no_underflow: assert property (@(posedge clk) disable iff (!rst_n) !(pop && empty));

endmodule
