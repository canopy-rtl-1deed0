// tb_canopy_controller: self-checking test of the CANOPY controller.
//
// A reduced controller (tiles of 4 x 3) is run in each configuration with a
// delay table holding all four classes. Checked against values worked out in
// the testbench:
//  - tile joining: column selects and per-tile skews of each configuration;
//  - round structure: the stream phase lasts (largest skew + ROWS + COLS +
//    K + 3) cycles, the read-out visits TILES*ROWS rows in tile-major order,
//    and 'done' rises after rounds x (stream + read-out) + 1 cycles;
//  - read-out: only rows that finish a window in that round are written,
//    to consecutive output addresses;
//  - the local-buffer push follows the stream phase by one cycle, and the
//    byte read from each input lane is passed on with its row's tag.
module tb_canopy_controller;
  import canopy_pkg::*;

  localparam int unsigned ROWS = 4, COLS = 3, IB_DEPTH = 64, OB_DEPTH = 64;

  logic clk = 0, rst_n = 0;
  logic start, spd_we, busy, done;
  job_t job;
  logic [1:0] spd_tile;
  logic [$clog2(ROWS)-1:0] spd_row;
  speed_e spd_val;
  logic [CNT_W-1:0] out_count;
  logic [TILES*ROWS-1:0] ib_rd_en;
  logic [$clog2(IB_DEPTH)-1:0] ib_rd_addr [TILES*ROWS];
  logic [TILES*ROWS-1:0][DATA_W-1:0] ib_rd_data;
  logic [TILES-1:0] wb_rd_en, from_tile, lb_push;
  logic [CNT_W-1:0] wb_step, wb_k_len, wb_base;
  logic [CNT_W-1:0] wb_skew [TILES];
  op_t [TILES-1:0][ROWS-1:0] lb_din;
  logic [1:0] rd_tile;
  logic [$clog2(ROWS)-1:0] rd_row;
  logic ob_wr_en;
  logic [$clog2(OB_DEPTH)-1:0] ob_wr_addr;

  canopy_controller #(.ROWS(ROWS), .COLS(COLS), .IB_DEPTH(IB_DEPTH), .OB_DEPTH(OB_DEPTH)) dut (.*);

  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  int cls [TILES][ROWS];

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(string what, longint got, longint exp);
    checks++;
    if (got != exp) begin
      failures++;
      $display("FAIL %s: got %0d expected %0d", what, got, exp);
    end
  endtask

  // each lane returns its own index, so data routing can be checked
  always_comb for (int l = 0; l < TILES * ROWS; l++) ib_rd_data[l] = 8'(l + 1);

  task automatic run(cfg_e m, int k, int rounds);
    int exp_skew [TILES];
    logic [3:0] exp_sel;
    int smax, stream_cycles, n_stream, n_read, n_wr, exp_wr, idx;
    bit stream_prev;
    case (m)
      CFG_TALL: begin exp_sel = 4'b1110; exp_skew = '{0, 2*ROWS, ROWS, 3*ROWS}; smax = 3*ROWS; end
      CFG_WIDE: begin exp_sel = 4'b0000; exp_skew = '{0, 0, 0, 0};             smax = 0; end
      default:  begin exp_sel = 4'b1100; exp_skew = '{0, 0, ROWS, ROWS};       smax = ROWS; end
    endcase
    stream_cycles = smax + ROWS + COLS + k + 3;
    @(negedge clk);
    job = '{mode: m, k_len: CNT_W'(k), n_rounds: CNT_W'(rounds), w_base: '0};
    start = 1;
    @(negedge clk); start = 0;
    check("tile selects", from_tile, exp_sel);
    for (int t = 0; t < TILES; t++) check($sformatf("skew tile %0d", t), wb_skew[t], exp_skew[t]);
    exp_wr = 0;
    for (int j = 0; j < rounds; j++) begin
      n_stream = 0;
      while (dut.stream) begin
        n_stream++;
        stream_prev = 1;
        check("weight read enables", wb_rd_en, 4'(~exp_sel));
        @(negedge clk);
        check("push follows stream", lb_push, {TILES{stream_prev}});
        for (int l = 0; l < TILES * ROWS; l++)
          if (lb_din[l / ROWS][l % ROWS].data != 8'(l + 1)) begin
            failures++; $display("FAIL lane data routing %0d", l);
          end
      end
      check("stream cycles", n_stream, stream_cycles);
      n_read = 0; n_wr = 0; idx = 0;
      while (busy && !dut.stream && !done) begin
        int d; bit fin;
        check("read-out order", {rd_tile, rd_row}, idx);
        d = (m == CFG_BATCH) ? (1 << cls[idx / ROWS][idx % ROWS]) : 1;
        fin = (m == CFG_BATCH) ? ((j % d) == d - 1) : (cls[idx / ROWS][idx % ROWS] == 0);
        check("write only finished rows", ob_wr_en, fin);
        if (ob_wr_en) begin
          check("consecutive addresses", ob_wr_addr, exp_wr);
          exp_wr++;
        end
        idx++; n_read++;
        @(negedge clk);
      end
      check("read-out cycles", n_read, TILES * ROWS);
    end
    check("done", done, 1);
    check("rows written", out_count, exp_wr);
    @(negedge clk);
    check("idle after done", busy, 0);
  endtask

  initial begin
    start = 0; spd_we = 0; spd_tile = '0; spd_row = '0; spd_val = SPD_8F;
    job = '{mode: CFG_BATCH, default: '0};
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int t = 0; t < TILES; t++)
      for (int r = 0; r < ROWS; r++) begin
        cls[t][r] = (3 * t + r) % 4;
        @(negedge clk);
        spd_we = 1; spd_tile = 2'(t); spd_row = r[$clog2(ROWS)-1:0]; spd_val = speed_e'(cls[t][r]);
      end
    @(negedge clk); spd_we = 0;
    run(CFG_BATCH, 5, 8);
    run(CFG_TALL, 3, 2);
    run(CFG_WIDE, 6, 1);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
