// tb_canopy_top: end-to-end test of the CANOPY accelerator.
//
// A reduced instance (4 tiles of 4 x 3 MACs) is loaded through its host ports
// with random input lanes, random kernels and a delay table that gives every
// tile rows of all four classes. Three jobs are run:
//   1. batch (512x512-style configuration), 8 rounds: every row works at its
//      own speed, slow rows are held off at the start of later rounds and
//      finish a window every 2, 4 or 8 rounds; tiles 3 and 4 take their
//      weights from tiles 1 and 2 through the column selectors;
//   2. single input, tall chain 1 -> 3 -> 2 -> 4: only 8f rows work and
//      all tiles compute with tile 1's kernels passed down the chain;
//   3. single input, wide: only 8f rows, every tile with its own kernels.
// For each job the testbench computes the expected output rows (dot products
// of each row's window with the kernel that reaches its column), in the order
// the controller writes them, and compares them with the output buffer. It
// also checks the number of rows written and the job's cycle count
// (rounds x (stream + read-out) + 1), and counts how often each mechanism
// occurred: completions per delay class, held-off rounds of slow rows,
// chained-weight cycles, each configuration, single-input idle rows.
module tb_canopy_top;
  import canopy_pkg::*;

  localparam int unsigned ROWS = 4, COLS = 3;
  localparam int unsigned IB_DEPTH = 64, WB_DEPTH = 16, OB_DEPTH = 128;
  localparam int unsigned LANES_I = TILES * ROWS, LANES_W = TILES * COLS;

  logic clk = 0, rst_n = 0;
  logic ib_wr_en, wb_wr_en, spd_we, start, busy, done;
  logic [$clog2(LANES_I)-1:0]  ib_wr_lane;
  logic [$clog2(IB_DEPTH)-1:0] ib_wr_addr;
  logic [DATA_W-1:0]           ib_wr_data, wb_wr_data;
  logic [$clog2(LANES_W)-1:0]  wb_wr_lane;
  logic [$clog2(WB_DEPTH)-1:0] wb_wr_addr;
  logic [1:0]                  spd_tile;
  logic [$clog2(ROWS)-1:0]     spd_row;
  speed_e                      spd_val;
  job_t                        job;
  logic [CNT_W-1:0]            out_count;
  logic [$clog2(OB_DEPTH)-1:0] ob_rd_addr;
  logic [COLS-1:0][PSUM_W-1:0] ob_rd_data;

  canopy_top #(
    .ROWS(ROWS), .COLS(COLS), .LB_DEPTH(4),
    .IB_DEPTH(IB_DEPTH), .WB_DEPTH(WB_DEPTH), .OB_DEPTH(OB_DEPTH)
  ) dut (.*);

  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  logic signed [7:0] I [LANES_I][IB_DEPTH];
  logic signed [7:0] W [LANES_W][WB_DEPTH];
  int cls [TILES][ROWS];
  // mechanism counters
  int n_class_done [4];
  int n_held_off = 0, n_chain_cycles = 0, n_idle_single = 0;
  int n_mode [3];

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always @(posedge clk) if (busy && dut.from_tile != '0) n_chain_cycles++;

  task automatic check(string what, longint got, longint exp);
    checks++;
    if (got != exp) begin
      failures++;
      $display("FAIL %s: got %0d expected %0d", what, got, exp);
    end
  endtask

  // lane of the weight buffer whose kernel reaches tile t in configuration m
  function automatic int src_tile(cfg_e m, int t);
    case (m)
      CFG_BATCH: return (t >= 2) ? t - 2 : t;  // tile 3 <- 1, tile 4 <- 2
      CFG_TALL:  return 0;                     // one chain from tile 1
      default:   return t;                     // wide: own kernels
    endcase
  endfunction

  function automatic longint stream_len(cfg_e m, int k);
    case (m)
      CFG_TALL: return 3 * ROWS + ROWS + COLS + 2 + k + 1;
      CFG_WIDE: return ROWS + COLS + 2 + k + 1;
      default:  return 2 * ROWS + COLS + 2 + k + 1;
    endcase
  endfunction

  task automatic run_job(cfg_e m, int k, int rounds, int wbase);
    logic [COLS-1:0][PSUM_W-1:0] exp_rows [$];
    longint t0, cycles;
    int base [TILES][ROWS];
    bit single;
    single = (m != CFG_BATCH);
    n_mode[m]++;
    for (int t = 0; t < TILES; t++) for (int r = 0; r < ROWS; r++) base[t][r] = 0;
    // expected output rows, in write order
    for (int j = 0; j < rounds; j++)
      for (int t = 0; t < TILES; t++)
        for (int r = 0; r < ROWS; r++) begin
          int d; bit fin;
          d = single ? 1 : (1 << cls[t][r]);
          if (single && cls[t][r] != 0) begin
            if (j == 0) n_idle_single++;
            continue;
          end
          if (!single && d > 1 && (j % d) != 0) n_held_off++;
          fin = (j % d) == d - 1;
          if (fin) begin
            logic [COLS-1:0][PSUM_W-1:0] row;
            for (int c = 0; c < COLS; c++) begin
              longint s; s = 0;
              for (int kk = 0; kk < k; kk++)
                s += longint'(I[t*ROWS + r][base[t][r] + kk]) *
                     longint'(W[src_tile(m, t)*COLS + c][wbase + kk]);
              row[c] = PSUM_W'(s);
            end
            exp_rows.push_back(row);
            n_class_done[single ? 0 : cls[t][r]]++;
            base[t][r] += k;
          end
        end
    @(negedge clk);
    job = '{mode: m, k_len: CNT_W'(k), n_rounds: CNT_W'(rounds), w_base: CNT_W'(wbase)};
    start = 1;
    @(posedge clk); t0 = $time;
    @(negedge clk); start = 0;
    while (!done) @(posedge clk);
    cycles = ($time - t0) / 10;
    check($sformatf("cycles of job mode %0d", m), cycles,
          rounds * (stream_len(m, k) + TILES * ROWS) + 1);
    @(negedge clk);
    check("rows written", out_count, exp_rows.size());
    for (int e = 0; e < exp_rows.size(); e++) begin
      ob_rd_addr = e[$clog2(OB_DEPTH)-1:0];
      @(posedge clk); #1;
      for (int c = 0; c < COLS; c++)
        check($sformatf("mode %0d entry %0d col %0d", m, e, c),
              longint'($signed(ob_rd_data[c])), longint'($signed(exp_rows[e][c])));
      @(negedge clk);
    end
  endtask

  initial begin
    ib_wr_en = 0; wb_wr_en = 0; spd_we = 0; start = 0;
    ib_wr_lane = '0; ib_wr_addr = '0; ib_wr_data = '0;
    wb_wr_lane = '0; wb_wr_addr = '0; wb_wr_data = '0;
    spd_tile = '0; spd_row = '0; spd_val = SPD_8F; ob_rd_addr = '0;
    job = '{mode: CFG_BATCH, default: '0};
    for (int i = 0; i < 4; i++) n_class_done[i] = 0;
    for (int i = 0; i < 3; i++) n_mode[i] = 0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    // delay tables: every class in every tile, rotated per tile
    for (int t = 0; t < TILES; t++)
      for (int r = 0; r < ROWS; r++) begin
        cls[t][r] = (r + t) % 4;
        @(negedge clk);
        spd_we = 1; spd_tile = 2'(t); spd_row = r[$clog2(ROWS)-1:0]; spd_val = speed_e'(cls[t][r]);
      end
    @(negedge clk); spd_we = 0;
    for (int l = 0; l < LANES_I; l++)
      for (int a = 0; a < IB_DEPTH; a++) begin
        I[l][a] = 8'($urandom);
        @(negedge clk);
        ib_wr_en = 1; ib_wr_lane = l[$clog2(LANES_I)-1:0]; ib_wr_addr = a[$clog2(IB_DEPTH)-1:0];
        ib_wr_data = I[l][a];
      end
    @(negedge clk); ib_wr_en = 0;
    for (int l = 0; l < LANES_W; l++)
      for (int a = 0; a < WB_DEPTH; a++) begin
        W[l][a] = 8'($urandom);
        @(negedge clk);
        wb_wr_en = 1; wb_wr_lane = l[$clog2(LANES_W)-1:0]; wb_wr_addr = a[$clog2(WB_DEPTH)-1:0];
        wb_wr_data = W[l][a];
      end
    @(negedge clk); wb_wr_en = 0;

    run_job(CFG_BATCH, 5, 8, 2);
    run_job(CFG_TALL, 6, 2, 0);
    run_job(CFG_WIDE, 4, 3, 7);

    // every mechanism must have occurred
    for (int i = 0; i < 4; i++) check($sformatf("class %0d completions", i), n_class_done[i] > 0, 1);
    check("slow rows held off at round start", n_held_off > 0, 1);
    check("weights chained between tiles", n_chain_cycles > 0, 1);
    check("single-input idle slow rows", n_idle_single > 0, 1);
    for (int i = 0; i < 3; i++) check($sformatf("configuration %0d used", i), n_mode[i], 1);
    $display("mechanisms: done per class %0d/%0d/%0d/%0d held-off %0d chain-cycles %0d idle %0d",
             n_class_done[0], n_class_done[1], n_class_done[2], n_class_done[3],
             n_held_off, n_chain_cycles, n_idle_single);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
