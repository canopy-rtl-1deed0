// canopy_weight_buffer: the 8 MB weight buffer shared by the tiles.
//
// The buffer is split into LANES byte-wide lanes, one per MAC column of the
// accelerator (tile t, column c is lane t*COLS + c). Lane c holds the
// unrolled kernel of its column: element k at address w_base + k. During a
// round the buffer itself produces the systolic skew of the weight stream:
// at stream step 'step', column c of tile t receives element
// k = step - skew[t] - c, or zero when k lies outside 0..k_len-1. The same
// kernel elements are streamed again in every round, which is the weight
// reuse across the different inputs held by the rows.
//
// Interface and timing: one host write per cycle (lane, address, byte).
// Tiles with rd_en set are read each cycle; data appears on rd_data one
// cycle after 'step'. The lane organisation and the address generation in
// the buffer are this design's choices; the source gives only the 8 MB
// capacity (default 1024 lanes x 8192 bytes).
module canopy_weight_buffer
  import canopy_pkg::*;
#(
  parameter int unsigned COLS  = 256,
  parameter int unsigned DEPTH = 8192
) (
  input  logic                                     clk,
  input  logic                                     rst_n,
  // host write port
  input  logic                                     wr_en,
  input  logic [$clog2(TILES*COLS)-1:0]            wr_lane,
  input  logic [$clog2(DEPTH)-1:0]                 wr_addr,
  input  logic [DATA_W-1:0]                        wr_data,
  // streaming read
  input  logic [TILES-1:0]                         rd_en,
  input  logic [CNT_W-1:0]                         step,
  input  logic [CNT_W-1:0]                         skew [TILES],
  input  logic [CNT_W-1:0]                         k_len,
  input  logic [CNT_W-1:0]                         w_base,
  output logic [TILES-1:0][COLS-1:0][DATA_W-1:0]   rd_data
);

  localparam int unsigned LANES = TILES * COLS;
  localparam int unsigned AW    = $clog2(DEPTH);

  logic [DATA_W-1:0] mem [LANES][DEPTH];

  always_ff @(posedge clk) begin
    if (wr_en) mem[wr_lane][wr_addr] <= wr_data;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      rd_data <= '0;
    end else begin
      for (int t = 0; t < TILES; t++) begin
        for (int c = 0; c < COLS; c++) begin
          logic [CNT_W:0] k;
          k = {1'b0, step} - {1'b0, skew[t]} - (CNT_W+1)'(c);
          if (rd_en[t] && !k[CNT_W] && (k[CNT_W-1:0] < k_len))
            rd_data[t][c] <= mem[t*COLS + c][AW'(w_base + k[CNT_W-1:0])];
          else
            rd_data[t][c] <= '0;
        end
      end
    end
  end

endmodule
