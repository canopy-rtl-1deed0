// tb_canopy_top_full: one complete batch job on the full-size accelerator.
//
// The accelerator is instantiated with its default sizes (four tiles of
// 256 x 256 MACs, 8 MB input, weight and output buffers). To keep the run
// short the buffers are preloaded through hierarchical references instead
// of the one-byte host ports, and the delay table of every tile gets a random
// class per row (half 8f, the rest spread over 4f, 2f and f). A batch job of
// eight rounds with a reduction length of 3 is run, so every row completes
// at least one window; the output buffer is then compared row by row with
// dot products computed here, and the job's cycle count with
// 8 x (stream + read-out) + 1.
module tb_canopy_top_full;
  import canopy_pkg::*;

  localparam int unsigned ROWS = 256, COLS = 256, K = 3, ROUNDS = 8;

  logic clk = 0, rst_n = 0;
  logic ib_wr_en = 0, wb_wr_en = 0, spd_we = 0, start = 0, busy, done;
  logic [9:0]  ib_wr_lane = '0, wb_wr_lane = '0;
  logic [12:0] ib_wr_addr = '0, wb_wr_addr = '0, ob_rd_addr = '0;
  logic [7:0]  ib_wr_data = '0, wb_wr_data = '0;
  logic [1:0]  spd_tile = '0;
  logic [7:0]  spd_row = '0;
  speed_e      spd_val = SPD_8F;
  job_t        job;
  logic [CNT_W-1:0] out_count;
  logic [COLS-1:0][PSUM_W-1:0] ob_rd_data;

  canopy_top dut (.*);

  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  int cls [TILES][ROWS];
  int n_class [4];

  initial begin
    repeat (40000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic logic [7:0] in_byte(int lane, int addr);
    return 8'((lane * 37 + addr * 11 + 5) ^ (lane >> 3));
  endfunction
  function automatic logic [7:0] w_byte(int lane, int addr);
    return 8'((lane * 13 + addr * 29 + 1) ^ (lane >> 2));
  endfunction

  initial begin
    longint t0, cycles;
    int e, mism;
    job = '{mode: CFG_BATCH, default: '0};
    for (int i = 0; i < 4; i++) n_class[i] = 0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int t = 0; t < TILES; t++)
      for (int r = 0; r < ROWS; r++) begin
        int u; u = $urandom % 8;
        cls[t][r] = (u < 4) ? 0 : (u < 6) ? 1 : (u < 7) ? 2 : 3;
        n_class[cls[t][r]]++;
        @(negedge clk);
        spd_we = 1; spd_tile = 2'(t); spd_row = 8'(r); spd_val = speed_e'(cls[t][r]);
      end
    @(negedge clk); spd_we = 0;
    for (int l = 0; l < TILES * ROWS; l++)
      for (int a = 0; a < ROUNDS * K; a++) dut.u_ibuf.mem[l][a] = in_byte(l, a);
    for (int l = 0; l < TILES * COLS; l++)
      for (int a = 0; a < K; a++) dut.u_wbuf.mem[l][a] = w_byte(l, a);

    @(negedge clk);
    job = '{mode: CFG_BATCH, k_len: CNT_W'(K), n_rounds: CNT_W'(ROUNDS), w_base: '0};
    start = 1;
    @(posedge clk); t0 = $time;
    @(negedge clk); start = 0;
    while (!done) @(posedge clk);
    cycles = ($time - t0) / 10;
    checks++;
    if (cycles != ROUNDS * ((2 * ROWS + COLS + 2 + K + 1) + TILES * ROWS) + 1) begin
      failures++; $display("FAIL cycles %0d", cycles);
    end
    @(negedge clk);

    // expected entries in write order: round, tile, row
    e = 0; mism = 0;
    begin
      int base [TILES][ROWS];
      for (int t = 0; t < TILES; t++) for (int r = 0; r < ROWS; r++) base[t][r] = 0;
      for (int j = 0; j < ROUNDS; j++)
        for (int t = 0; t < TILES; t++)
          for (int r = 0; r < ROWS; r++) begin
            int d; d = 1 << cls[t][r];
            if ((j % d) == d - 1) begin
              int src; src = (t >= 2) ? t - 2 : t;
              for (int c = 0; c < COLS; c++) begin
                int s; s = 0;
                for (int k = 0; k < K; k++)
                  s += int'($signed(in_byte(t * ROWS + r, base[t][r] + k))) *
                       int'($signed(w_byte(src * COLS + c, k)));
                checks++;
                if ($signed(dut.u_obuf.mem[e][c]) != s) begin
                  failures++;
                  if (mism++ < 5) $display("FAIL entry %0d col %0d", e, c);
                end
              end
              base[t][r] += K;
              e++;
            end
          end
    end
    checks++;
    if (out_count != CNT_W'(e)) begin failures++; $display("FAIL count %0d vs %0d", out_count, e); end
    $display("rows per class %0d/%0d/%0d/%0d, entries %0d, cycles %0d",
             n_class[0], n_class[1], n_class[2], n_class[3], e, cycles);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
