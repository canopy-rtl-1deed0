// tb_canopy_conv_layer: a batch convolution layer on a reduced accelerator.
//
// Workload: 256 input feature maps of 5x5x32 convolved with 64 kernels of
// 3x3x32 (stride 1, no padding: 3x3 output pixels per map), the example
// layer used to explain the CANOPY dataflow. The accelerator is built with
// four tiles of 64 x 64 MACs so that its 256 rows hold the 256 maps and the
// 64 columns of a tile hold the 64 kernels; the batch configuration is used
// and every row gets a random delay class. Each row's input lane holds the
// nine unrolled 288-byte windows of its map; every tile's weight lanes hold
// the unrolled kernels. Slow rows need up to 8 x 9 = 72 rounds for their nine
// outputs, so 72 rounds are run (fast rows go on computing beyond their nine
// windows; only the first nine outputs of every row are checked).
//
// The outputs are compared with a direct convolution of the original
// 5x5x32 maps, computed here without the unrolled layout. The output buffer
// is read through hierarchical references, and the buffers are preloaded the
// same way, to keep the run short.
module tb_canopy_conv_layer;
  import canopy_pkg::*;

  localparam int unsigned ROWS = 64, COLS = 64;
  localparam int unsigned NMAP = 256, HW = 5, CH = 32, KS = 3, OHW = 3, NKER = 64;
  localparam int unsigned K = KS * KS * CH;          // 288
  localparam int unsigned NWIN = OHW * OHW;          // 9
  localparam int unsigned ROUNDS = 8 * NWIN;         // 72
  localparam int unsigned IB_DEPTH = 32768, WB_DEPTH = 512, OB_DEPTH = 32768;

  logic clk = 0, rst_n = 0;
  logic ib_wr_en = 0, wb_wr_en = 0, spd_we = 0, start = 0, busy, done;
  logic [$clog2(TILES*ROWS)-1:0] ib_wr_lane = '0;
  logic [$clog2(TILES*COLS)-1:0] wb_wr_lane = '0;
  logic [$clog2(IB_DEPTH)-1:0] ib_wr_addr = '0;
  logic [$clog2(WB_DEPTH)-1:0] wb_wr_addr = '0;
  logic [$clog2(OB_DEPTH)-1:0] ob_rd_addr = '0;
  logic [7:0] ib_wr_data = '0, wb_wr_data = '0;
  logic [1:0] spd_tile = '0;
  logic [$clog2(ROWS)-1:0] spd_row = '0;
  speed_e spd_val = SPD_8F;
  job_t job;
  logic [CNT_W-1:0] out_count;
  logic [COLS-1:0][PSUM_W-1:0] ob_rd_data;

  canopy_top #(
    .ROWS(ROWS), .COLS(COLS), .LB_DEPTH(24),
    .IB_DEPTH(IB_DEPTH), .WB_DEPTH(WB_DEPTH), .OB_DEPTH(OB_DEPTH)
  ) dut (.*);

  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  // maps are stored flat as [n][y][x][ch], kernels as [m][ky][kx][ch]; the
  // unrolled element k of a window is (ky*3 + kx)*32 + ch.
  logic signed [7:0] X  [NMAP*HW*HW*CH];
  logic signed [7:0] KW [NKER*K];
  int cls [TILES*ROWS];
  int n_checked_class [4];

  function automatic int x_idx(int n, int p, int k);
    int ky, kx, c;
    ky = k / (KS * CH); kx = (k / CH) % KS; c = k % CH;
    return ((n * HW + p / OHW + ky) * HW + p % OHW + kx) * CH + c;
  endfunction

  function automatic int conv(int n, int p, int m);
    int s; s = 0;
    for (int k = 0; k < int'(K); k++)
      s += int'(X[x_idx(n, p, k)]) * int'(KW[m * K + k]);
    return s;
  endfunction

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int e, mism;
    job = '{mode: CFG_BATCH, default: '0};
    for (int i = 0; i < 4; i++) n_checked_class[i] = 0;
    for (int i = 0; i < int'(NMAP*HW*HW*CH); i++) X[i] = 8'($urandom);
    for (int i = 0; i < int'(NKER*K); i++) KW[i] = 8'($urandom);
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int i = 0; i < int'(TILES*ROWS); i++) begin
      cls[i] = $urandom % 4;
      @(negedge clk);
      spd_we = 1; spd_tile = 2'(i / ROWS); spd_row = $clog2(ROWS)'(i % ROWS);
      spd_val = speed_e'(cls[i]);
    end
    @(negedge clk); spd_we = 0;
    for (int i = 0; i < int'(NMAP*NWIN*K); i++)
      dut.u_ibuf.mem[i / (NWIN*K)][i % (NWIN*K)] = X[x_idx(i / (NWIN*K), (i / K) % NWIN, i % K)];
    for (int i = 0; i < int'(TILES*NKER*K); i++)
      dut.u_wbuf.mem[i / K][i % K] = KW[(i / K) % NKER * K + i % K];

    @(negedge clk);
    job = '{mode: CFG_BATCH, k_len: CNT_W'(K), n_rounds: CNT_W'(ROUNDS), w_base: '0};
    start = 1;
    @(negedge clk); start = 0;
    while (!done) @(posedge clk);
    @(negedge clk);

    e = 0; mism = 0;
    for (int i = 0; i < int'(ROUNDS*TILES*ROWS); i++) begin
      int j, n, d, g;
      j = i / (TILES*ROWS); n = i % (TILES*ROWS);     // row n = tile*ROWS + row
      d = 1 << cls[n];
      if ((j % d) != d - 1) continue;
      g = j / d;
      if (g < int'(NWIN)) begin
        for (int m = 0; m < int'(NKER); m++) begin
          checks++;
          if ($signed(dut.u_obuf.mem[e][m]) != conv(n, g, m)) begin
            failures++;
            if (mism++ < 5) $display("FAIL map %0d pixel %0d kernel %0d", n, g, m);
          end
        end
        n_checked_class[cls[n]]++;
      end
      e++;
    end
    checks++;
    if (out_count != CNT_W'(e)) begin failures++; $display("FAIL count %0d vs %0d", out_count, e); end
    for (int i = 0; i < 4; i++) begin
      checks++;
      if (n_checked_class[i] == 0) begin failures++; $display("FAIL no row of class %0d", i); end
    end
    $display("output pixels checked per class 8f/4f/2f/f: %0d/%0d/%0d/%0d",
             n_checked_class[0], n_checked_class[1], n_checked_class[2], n_checked_class[3]);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
