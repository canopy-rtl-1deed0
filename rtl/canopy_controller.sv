// canopy_controller: sequencing of the CANOPY dataflow.
//
// A job is a number of rounds. In every round the controller
//  1. streams: it counts 'step' from 0 while the weight buffer emits the
//     kernel elements of every column with systolic skew, and the row
//     schedules (one canopy_row_sched per tile, instantiated here) fetch the
//     input bytes of the rows that are switched on. Each input byte is
//     combined with its row's on/off tag and pushed, one word per tile per
//     cycle, into the tile's local buffer. The stream lasts until the last
//     element has reached the far corner of the largest logical array and its
//     partial sum has settled;
//  2. reads out: it visits every row of every tile, one per cycle, and copies
//     the partial sums of the rows that finished an output in this round to
//     consecutive entries of the output buffer (tile-major, then row order).
// Rounds do not overlap; this keeps the read-out simple at the cost of idle
// array cycles and is this design's choice.
//
// The configuration of the job selects how the four tiles are joined
// (tile index 0..3 = tiles 1..4, laid out 1 2 / 3 4):
//   CFG_BATCH  512x512: tiles 1 and 2 take weights from the buffer, tile 3
//              continues tile 1's columns and tile 4 continues tile 2's;
//              every row runs at its own speed.
//   CFG_TALL   1024x256: one chain 1 -> 3 -> 2 -> 4; only 8f rows work.
//   CFG_WIDE   256x1024: all tiles take their own kernels from the buffer;
//              only 8f rows work.
// 'skew' is the step at which a tile's first row sees element 0; a chained
// tile starts ROWS steps after the tile feeding it. The chain order is this
// design's choice (the source gives the groupings and array sizes only).
//
// Host interface: 'start' with a job_t (sampled), delay-table writes, 'busy',
// a one-cycle 'done', and the running number of rows written ('out_count').
module canopy_controller
  import canopy_pkg::*;
#(
  parameter int unsigned ROWS     = 256,
  parameter int unsigned COLS     = 256,
  parameter int unsigned IB_DEPTH = 8192,
  parameter int unsigned OB_DEPTH = 8192
) (
  input  logic                                   clk,
  input  logic                                   rst_n,
  // host
  input  logic                                   start,
  input  job_t                                   job,
  input  logic                                   spd_we,
  input  logic [1:0]                             spd_tile,
  input  logic [$clog2(ROWS)-1:0]                spd_row,
  input  speed_e                                 spd_val,
  output logic                                   busy,
  output logic                                   done,
  output logic [CNT_W-1:0]                       out_count,
  // input buffer
  output logic [TILES*ROWS-1:0]                  ib_rd_en,
  output logic [$clog2(IB_DEPTH)-1:0]            ib_rd_addr [TILES*ROWS],
  input  logic [TILES*ROWS-1:0][DATA_W-1:0]      ib_rd_data,
  // weight buffer
  output logic [TILES-1:0]                       wb_rd_en,
  output logic [CNT_W-1:0]                       wb_step,
  output logic [CNT_W-1:0]                       wb_skew [TILES],
  output logic [CNT_W-1:0]                       wb_k_len,
  output logic [CNT_W-1:0]                       wb_base,
  // tiles
  output logic [TILES-1:0]                       from_tile,
  output logic [TILES-1:0]                       lb_push,
  output op_t  [TILES-1:0][ROWS-1:0]             lb_din,
  output logic [1:0]                             rd_tile,
  output logic [$clog2(ROWS)-1:0]                rd_row,
  // output buffer
  output logic                                   ob_wr_en,
  output logic [$clog2(OB_DEPTH)-1:0]            ob_wr_addr
);

  typedef enum logic [1:0] {S_IDLE, S_STREAM, S_READ, S_DONE} state_e;

  localparam int unsigned RW = $clog2(ROWS);
  localparam int unsigned IW = RW + 2;  // read-out index: tile, row

  state_e            state;
  job_t              job_q;
  logic [CNT_W-1:0]  step, round, last_step;
  logic [IW-1:0]     rd_idx;
  logic              stream, stream_q, single, job_start, round_end;
  logic [CNT_W-1:0]  skew [TILES];
  logic [ROWS-1:0]   row_done [TILES];
  op_t  [ROWS-1:0]   row_op   [TILES];

  // ---- configuration tables ------------------------------------------------
  always_comb begin
    single = (job_q.mode != CFG_BATCH);
    unique case (job_q.mode)
      CFG_TALL: begin
        from_tile = 4'b1110;
        skew[0] = '0;
        skew[2] = CNT_W'(ROWS);
        skew[1] = CNT_W'(2 * ROWS);
        skew[3] = CNT_W'(3 * ROWS);
        last_step = CNT_W'(3 * ROWS + ROWS + COLS + 2) + job_q.k_len;
      end
      CFG_WIDE: begin
        from_tile = 4'b0000;
        for (int t = 0; t < TILES; t++) skew[t] = '0;
        last_step = CNT_W'(ROWS + COLS + 2) + job_q.k_len;
      end
      default: begin  // CFG_BATCH
        from_tile = 4'b1100;
        skew[0] = '0;
        skew[1] = '0;
        skew[2] = CNT_W'(ROWS);
        skew[3] = CNT_W'(ROWS);
        last_step = CNT_W'(ROWS + ROWS + COLS + 2) + job_q.k_len;
      end
    endcase
  end

  // ---- state machine -------------------------------------------------------
  assign stream    = (state == S_STREAM);
  assign job_start = (state == S_IDLE) && start;
  assign round_end = (state == S_READ) && (rd_idx == IW'(TILES * ROWS - 1));
  assign rd_tile   = rd_idx[IW-1:RW];
  assign rd_row    = rd_idx[RW-1:0];
  assign ob_wr_en  = (state == S_READ) && row_done[rd_tile][rd_row];
  assign ob_wr_addr = ($clog2(OB_DEPTH))'(out_count);
  assign busy      = (state != S_IDLE);
  assign done      = (state == S_DONE);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state     <= S_IDLE;
      job_q     <= '{mode: CFG_BATCH, default: '0};
      step      <= '0;
      round     <= '0;
      rd_idx    <= '0;
      out_count <= '0;
      stream_q  <= 1'b0;
    end else begin
      stream_q <= stream;
      unique case (state)
        S_IDLE: if (start) begin
          job_q     <= job;
          step      <= '0;
          round     <= '0;
          out_count <= '0;
          state     <= (job.n_rounds == '0) ? S_DONE : S_STREAM;
        end
        S_STREAM: begin
          if (step == last_step) begin
            rd_idx <= '0;
            state  <= S_READ;
          end else begin
            step <= step + 1'b1;
          end
        end
        S_READ: begin
          if (ob_wr_en) out_count <= out_count + 1'b1;
          rd_idx <= rd_idx + 1'b1;
          if (round_end) begin
            round <= round + 1'b1;
            step  <= '0;
            state <= (round + 1'b1 == job_q.n_rounds) ? S_DONE : S_STREAM;
          end
        end
        S_DONE: state <= S_IDLE;
      endcase
    end
  end

  // ---- row schedules, one per tile ----------------------------------------
  for (genvar t = 0; t < TILES; t++) begin : g_tile
    logic [$clog2(IB_DEPTH)-1:0] addr_t [ROWS];

    canopy_row_sched #(.ROWS(ROWS), .DEPTH(IB_DEPTH)) u_sched (
      .clk       (clk),
      .rst_n     (rst_n),
      .spd_we    (spd_we && (spd_tile == 2'(t))),
      .spd_row   (spd_row),
      .spd_val   (spd_val),
      .single    (single),
      .job_start (job_start),
      .round_end (round_end),
      .phase     (round[2:0]),
      .stream    (stream),
      .step      (step),
      .skew      (skew[t]),
      .k_len     (job_q.k_len),
      .rd_en     (ib_rd_en[t*ROWS +: ROWS]),
      .rd_addr   (addr_t),
      .row_op    (row_op[t]),
      .row_done  (row_done[t])
    );

    for (genvar r = 0; r < ROWS; r++) begin : g_row
      assign ib_rd_addr[t*ROWS + r] = addr_t[r];
      // join the registered tag with the byte read at the same step
      assign lb_din[t][r] = '{on:    row_op[t][r].on,
                              first: row_op[t][r].first,
                              data:  ib_rd_data[t*ROWS + r]};
    end

    assign lb_push[t]  = stream_q;
    assign wb_rd_en[t] = stream && !from_tile[t];
    assign wb_skew[t]  = skew[t];
  end

  assign wb_step  = step;
  assign wb_k_len = job_q.k_len;
  assign wb_base  = job_q.w_base;

  a_start_when_idle: assert property (@(posedge clk) disable iff (!rst_n)
    start |-> (state == S_IDLE));

endmodule
