// canopy_tile: one CANOPY tile, a ROWS x COLS MAC array with its column
// weight selectors and its local input buffer.
//
// Rows are independent 1 x COLS MAC rows (canopy_mac_row): operands enter at
// the left edge from the local buffer, and weights enter the top row through
// the per-column selector and travel down all rows of the column. A tile has
// no row-to-row data dependence other than the shared weight stream, so rows
// with different delay classes can work side by side; the on/off tag carried
// with each row's operands decides which operands a row consumes.
//
// Interface and timing:
//  - lb_push/lb_din write one word (one operand per row) into the local
//    buffer. Whenever the buffer is not empty the tile pops one word per
//    cycle and applies it to the row inputs; otherwise the rows get idle
//    (switched-off) operands.
//  - buf_w is registered once in the selector; tile_w (neighbour's bottom row)
//    is used directly. bot_w is the weight leaving the bottom row, for the
//    next tile of a chain.
//  - rd_row selects one row whose partial sums appear on rd_psum in the same
//    cycle (combinational read-out multiplexer, this design's choice of how
//    results leave the array).
module canopy_tile
  import canopy_pkg::*;
#(
  parameter int unsigned ROWS     = 256,
  parameter int unsigned COLS     = 256,
  parameter int unsigned LB_DEPTH = 24
) (
  input  logic                         clk,
  input  logic                         rst_n,
  // weights
  input  logic                         from_tile,
  input  logic [COLS-1:0][DATA_W-1:0]  buf_w,
  input  logic [COLS-1:0][DATA_W-1:0]  tile_w,
  output logic [COLS-1:0][DATA_W-1:0]  bot_w,
  // inputs
  input  logic                         lb_push,
  input  op_t [ROWS-1:0]               lb_din,
  output logic                         lb_full,
  // read-out
  input  logic [$clog2(ROWS)-1:0]      rd_row,
  output logic [COLS-1:0][PSUM_W-1:0]  rd_psum
);

  logic [COLS-1:0][DATA_W-1:0] w_chain [ROWS+1];
  logic [COLS-1:0][PSUM_W-1:0] psum_rows [ROWS];
  op_t  [ROWS-1:0]             lb_dout;
  logic                        lb_empty;

  canopy_weight_mux #(.COLS(COLS)) u_wmux (
    .clk       (clk),
    .rst_n     (rst_n),
    .from_tile (from_tile),
    .buf_w     (buf_w),
    .tile_w    (tile_w),
    .top_w     (w_chain[0])
  );

  canopy_local_buffer #(.ROWS(ROWS), .DEPTH(LB_DEPTH)) u_lbuf (
    .clk   (clk),
    .rst_n (rst_n),
    .push  (lb_push),
    .din   (lb_din),
    .pop   (!lb_empty),
    .dout  (lb_dout),
    .empty (lb_empty),
    .full  (lb_full)
  );

  for (genvar r = 0; r < ROWS; r++) begin : g_row
    op_t row_op;
    assign row_op = lb_empty ? OP_IDLE : lb_dout[r];

    canopy_mac_row #(.COLS(COLS)) u_row (
      .clk   (clk),
      .rst_n (rst_n),
      .op_in (row_op),
      .w_in  (w_chain[r]),
      .w_out (w_chain[r+1]),
      .psum  (psum_rows[r])
    );
  end

  assign bot_w   = w_chain[ROWS];
  assign rd_psum = psum_rows[rd_row];

endmodule
