// canopy_top: the CANOPY process-variation-aware systolic DNN accelerator.
//
// Four tiles of ROWS x COLS MACs (2 x 2 layout) share an input buffer, a
// weight buffer and an output buffer, and one controller runs the dataflow.
// Every MAC row of a tile lies along one carbon-nanotube stripe, so its
// delay is one of four classes (8f, 4f, 2f, f) determined after fabrication
// and written into the controller's delay tables. Rows never exchange
// operands: each row owns an input-buffer lane and accumulates its outputs
// in place (output stationary), while the weights of a column stream down
// through every row. The row on/off tags let slow rows consume a strided
// subset of the weight stream in each round, so all rows work at their own
// speed and remain correct.
//
// Tiles are joined through the per-column weight selectors into one of three
// logical arrays (see canopy_controller): 512x512 for batches, 1024x256 or
// 256x1024 for a single input, where only the 8f rows are switched on.
// Weight-chain neighbours: tile 3 takes tile 1's bottom row, tile 2 takes
// tile 3's, tile 4 takes tile 2's and tile 1 takes tile 4's (ring).
//
// Host ports: byte writes into the input buffer (lane = tile*ROWS + row) and
// the weight buffer (lane = tile*COLS + column), delay-table writes, a job
// descriptor with 'start', 'busy'/'done', and a read port on the output
// buffer (one row of COLS 32-bit sums per entry, data one cycle after the
// address). Operands are signed 8-bit; sums are 32-bit two's complement.
module canopy_top
  import canopy_pkg::*;
#(
  parameter int unsigned ROWS     = 256,
  parameter int unsigned COLS     = 256,
  parameter int unsigned LB_DEPTH = 24,
  parameter int unsigned IB_DEPTH = 8192,
  parameter int unsigned WB_DEPTH = 8192,
  parameter int unsigned OB_DEPTH = 8192
) (
  input  logic                                 clk,
  input  logic                                 rst_n,
  // input buffer host write
  input  logic                                 ib_wr_en,
  input  logic [$clog2(TILES*ROWS)-1:0]        ib_wr_lane,
  input  logic [$clog2(IB_DEPTH)-1:0]          ib_wr_addr,
  input  logic [DATA_W-1:0]                    ib_wr_data,
  // weight buffer host write
  input  logic                                 wb_wr_en,
  input  logic [$clog2(TILES*COLS)-1:0]        wb_wr_lane,
  input  logic [$clog2(WB_DEPTH)-1:0]          wb_wr_addr,
  input  logic [DATA_W-1:0]                    wb_wr_data,
  // row delay tables
  input  logic                                 spd_we,
  input  logic [1:0]                           spd_tile,
  input  logic [$clog2(ROWS)-1:0]              spd_row,
  input  speed_e                               spd_val,
  // job control
  input  logic                                 start,
  input  job_t                                 job,
  output logic                                 busy,
  output logic                                 done,
  output logic [CNT_W-1:0]                     out_count,
  // output buffer host read
  input  logic [$clog2(OB_DEPTH)-1:0]          ob_rd_addr,
  output logic [COLS-1:0][PSUM_W-1:0]          ob_rd_data
);

  logic [TILES*ROWS-1:0]                ib_rd_en;
  logic [$clog2(IB_DEPTH)-1:0]          ib_rd_addr [TILES*ROWS];
  logic [TILES*ROWS-1:0][DATA_W-1:0]    ib_rd_data;

  logic [TILES-1:0]                     wb_rd_en;
  logic [CNT_W-1:0]                     wb_step, wb_k_len, wb_base;
  logic [CNT_W-1:0]                     wb_skew [TILES];
  logic [TILES-1:0][COLS-1:0][DATA_W-1:0] wb_rd_data;

  logic [TILES-1:0]                     from_tile, lb_push, lb_full;
  op_t  [TILES-1:0][ROWS-1:0]           lb_din;
  logic [1:0]                           rd_tile;
  logic [$clog2(ROWS)-1:0]              rd_row;
  logic [COLS-1:0][PSUM_W-1:0]          rd_psum [TILES];
  logic [COLS-1:0][DATA_W-1:0]          bot_w   [TILES];

  logic                                 ob_wr_en;
  logic [$clog2(OB_DEPTH)-1:0]          ob_wr_addr;

  // weight-chain neighbour of each tile (index 0..3 = tiles 1..4)
  localparam int unsigned NEIGHBOUR [TILES] = '{3, 2, 0, 1};

  canopy_controller #(
    .ROWS(ROWS), .COLS(COLS), .IB_DEPTH(IB_DEPTH), .OB_DEPTH(OB_DEPTH)
  ) u_ctrl (
    .clk        (clk),
    .rst_n      (rst_n),
    .start      (start),
    .job        (job),
    .spd_we     (spd_we),
    .spd_tile   (spd_tile),
    .spd_row    (spd_row),
    .spd_val    (spd_val),
    .busy       (busy),
    .done       (done),
    .out_count  (out_count),
    .ib_rd_en   (ib_rd_en),
    .ib_rd_addr (ib_rd_addr),
    .ib_rd_data (ib_rd_data),
    .wb_rd_en   (wb_rd_en),
    .wb_step    (wb_step),
    .wb_skew    (wb_skew),
    .wb_k_len   (wb_k_len),
    .wb_base    (wb_base),
    .from_tile  (from_tile),
    .lb_push    (lb_push),
    .lb_din     (lb_din),
    .rd_tile    (rd_tile),
    .rd_row     (rd_row),
    .ob_wr_en   (ob_wr_en),
    .ob_wr_addr (ob_wr_addr)
  );

  canopy_input_buffer #(.LANES(TILES*ROWS), .DEPTH(IB_DEPTH)) u_ibuf (
    .clk     (clk),
    .rst_n   (rst_n),
    .wr_en   (ib_wr_en),
    .wr_lane (ib_wr_lane),
    .wr_addr (ib_wr_addr),
    .wr_data (ib_wr_data),
    .rd_en   (ib_rd_en),
    .rd_addr (ib_rd_addr),
    .rd_data (ib_rd_data)
  );

  canopy_weight_buffer #(.COLS(COLS), .DEPTH(WB_DEPTH)) u_wbuf (
    .clk     (clk),
    .rst_n   (rst_n),
    .wr_en   (wb_wr_en),
    .wr_lane (wb_wr_lane),
    .wr_addr (wb_wr_addr),
    .wr_data (wb_wr_data),
    .rd_en   (wb_rd_en),
    .step    (wb_step),
    .skew    (wb_skew),
    .k_len   (wb_k_len),
    .w_base  (wb_base),
    .rd_data (wb_rd_data)
  );

  for (genvar t = 0; t < TILES; t++) begin : g_tile
    canopy_tile #(.ROWS(ROWS), .COLS(COLS), .LB_DEPTH(LB_DEPTH)) u_tile (
      .clk       (clk),
      .rst_n     (rst_n),
      .from_tile (from_tile[t]),
      .buf_w     (wb_rd_data[t]),
      .tile_w    (bot_w[NEIGHBOUR[t]]),
      .bot_w     (bot_w[t]),
      .lb_push   (lb_push[t]),
      .lb_din    (lb_din[t]),
      .lb_full   (lb_full[t]),
      .rd_row    (rd_row),
      .rd_psum   (rd_psum[t])
    );
  end

  canopy_output_buffer #(.COLS(COLS), .ENTRIES(OB_DEPTH)) u_obuf (
    .clk     (clk),
    .wr_en   (ob_wr_en),
    .wr_addr (ob_wr_addr),
    .wr_data (rd_psum[rd_tile]),
    .rd_addr (ob_rd_addr),
    .rd_data (ob_rd_data)
  );

  // The local buffers are drained every cycle, so they can never fill.
  a_lb_never_full: assert property (@(posedge clk) disable iff (!rst_n) lb_full == '0);

endmodule
