// canopy_output_buffer: the 8 MB output feature-map buffer shared by the tiles.
//
// Finished MAC rows are copied here one row per cycle: an entry holds the
// COLS 32-bit partial sums of one row, i.e. one output pixel for COLS output
// channels (1 KB at the default 256 columns, 8192 entries = 8 MB). The host
// reads entries back through a separate port.
//
// Interface and timing: wr_en/wr_addr/wr_data write one entry per cycle;
// rd_addr is sampled on the clock and its entry appears on rd_data in the
// next cycle. The entry width and the read port are this design's choices.
module canopy_output_buffer
  import canopy_pkg::*;
#(
  parameter int unsigned COLS    = 256,
  parameter int unsigned ENTRIES = 8192
) (
  input  logic                               clk,
  input  logic                               wr_en,
  input  logic [$clog2(ENTRIES)-1:0]         wr_addr,
  input  logic [COLS-1:0][PSUM_W-1:0]        wr_data,
  input  logic [$clog2(ENTRIES)-1:0]         rd_addr,
  output logic [COLS-1:0][PSUM_W-1:0]        rd_data
);

  logic [COLS-1:0][PSUM_W-1:0] mem [ENTRIES];

  always_ff @(posedge clk) begin
    if (wr_en) mem[wr_addr] <= wr_data;
    rd_data <= mem[rd_addr];
  end

endmodule
