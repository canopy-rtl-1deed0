// canopy_weight_mux: the per-column weight selectors at the top of a tile.
//
// Each column of a tile has a two-input multiplexer choosing what enters the
// top MAC of that column: weights read from the shared weight buffer, or the
// weights leaving the bottom row of the neighbouring tile. Chaining tiles
// through this selector builds the tall and wide logical arrays used for
// single-input processing; taking weights from the buffer keeps the tile
// independent. One select drives all columns of the tile.
//
// The buffer path has one register stage so that a weight read at the same
// step as an input byte reaches the top row in the same cycle as that byte
// reaches the leftmost column (the input path passes the tile's local
// buffer, which costs one cycle). The neighbour path is taken directly from
// the neighbour's bottom weight registers. Both the register stage and the
// single shared select are this design's choices.
module canopy_weight_mux
  import canopy_pkg::*;
#(
  parameter int unsigned COLS = 256
) (
  input  logic                        clk,
  input  logic                        rst_n,
  input  logic                        from_tile,  // 1: neighbour tile, 0: weight buffer
  input  logic [COLS-1:0][DATA_W-1:0] buf_w,      // from the weight buffer
  input  logic [COLS-1:0][DATA_W-1:0] tile_w,     // from the neighbour's bottom row
  output logic [COLS-1:0][DATA_W-1:0] top_w       // into the tile's top row
);

  logic [COLS-1:0][DATA_W-1:0] buf_q;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) buf_q <= '0;
    else        buf_q <= buf_w;
  end

  always_comb begin
    for (int c = 0; c < COLS; c++)
      top_w[c] = from_tile ? tile_w[c] : buf_q[c];
  end

endmodule
