// canopy_input_buffer: the 8 MB input feature-map buffer shared by the tiles.
//
// The buffer is split into LANES byte-wide lanes, one per MAC row of the
// accelerator (tile t, row r is lane t*ROWS + r). A lane holds the unrolled
// input windows its row will consume, one byte per address, laid out by the
// host. Every lane has its own read address so that each row can be fed at
// its own skew and pace; this is how the rows of non-uniform speed are kept
// from sharing one systolic input pipeline.
//
// Interface and timing: one host write per cycle (lane, address, byte). Each
// cycle every lane with rd_en set reads rd_addr; the byte appears on rd_data
// one cycle later. A lane not read returns zero. The lane organisation is
// this design's choice; the source gives only the 8 MB capacity (default
// 1024 lanes x 8192 bytes).
module canopy_input_buffer
  import canopy_pkg::*;
#(
  parameter int unsigned LANES = 1024,
  parameter int unsigned DEPTH = 8192
) (
  input  logic                          clk,
  input  logic                          rst_n,
  // host write port
  input  logic                          wr_en,
  input  logic [$clog2(LANES)-1:0]      wr_lane,
  input  logic [$clog2(DEPTH)-1:0]      wr_addr,
  input  logic [DATA_W-1:0]             wr_data,
  // per-lane read ports
  input  logic [LANES-1:0]              rd_en,
  input  logic [$clog2(DEPTH)-1:0]      rd_addr [LANES],
  output logic [LANES-1:0][DATA_W-1:0]  rd_data
);

  logic [DATA_W-1:0] mem [LANES][DEPTH];

  always_ff @(posedge clk) begin
    if (wr_en) mem[wr_lane][wr_addr] <= wr_data;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      rd_data <= '0;
    end else begin
      for (int l = 0; l < LANES; l++)
        rd_data[l] <= rd_en[l] ? mem[l][rd_addr[l]] : '0;
    end
  end

endmodule
