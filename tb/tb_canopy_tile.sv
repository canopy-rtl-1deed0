// tb_canopy_tile: self-checking test of one CANOPY tile.
//
// A 4 x 3 tile runs eight rounds of a batch job with one row of each delay
// class (8f, 4f, 2f, f). The testbench plays the role of the controller: per
// step it pushes one word into the local buffer (row r gets element
// k = step - r of its current window, tagged on when k mod d = round mod d)
// and offers column c element step - c of its kernel from the buffer side.
// After each round the rows that completed a window are read out and every
// column is compared with the dot product computed in the testbench; the
// weights leaving the bottom row must be the buffer weights delayed by
// ROWS+1 cycles. A last round feeds the weights through the neighbour-tile
// input instead.
module tb_canopy_tile;
  import canopy_pkg::*;

  localparam int unsigned ROWS = 4, COLS = 3, K = 7;
  localparam int unsigned NWIN = 8;

  logic clk = 0, rst_n = 0;
  logic from_tile, lb_push, lb_full;
  logic [COLS-1:0][DATA_W-1:0] buf_w, tile_w, bot_w;
  op_t [ROWS-1:0] lb_din;
  logic [$clog2(ROWS)-1:0] rd_row;
  logic [COLS-1:0][PSUM_W-1:0] rd_psum;
  int checks = 0, failures = 0, n_done = 0, n_bot = 0;

  logic signed [7:0] I [ROWS][NWIN][K];
  logic signed [7:0] W [COLS][K];
  logic [COLS-1:0][DATA_W-1:0] buf_hist [$];
  int cls [ROWS] = '{0, 1, 2, 3};

  canopy_tile #(.ROWS(ROWS), .COLS(COLS), .LB_DEPTH(4)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
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

  // bottom-row weights are the buffer weights ROWS+1 cycles earlier
  always @(posedge clk) if (rst_n && !from_tile) begin
    buf_hist.push_back(buf_w);
    if (buf_hist.size() > ROWS) begin
      #1;
      check("bottom weights", bot_w, buf_hist[0]);
      n_bot++;
      void'(buf_hist.pop_front());
    end
  end

  task automatic run_round(int j, bit neighbour, bit all_fast);
    for (int s = 0; s < ROWS + COLS + K + 8; s++) begin
      @(negedge clk);
      lb_push = 1;
      for (int r = 0; r < ROWS; r++) begin
        int k, d, win;
        k = s - r;
        d = all_fast ? 1 : (1 << cls[r]);
        win = j / d;
        lb_din[r] = OP_IDLE;
        if (k >= 0 && k < K && (k % d) == (j % d)) begin
          lb_din[r].on    = 1'b1;
          lb_din[r].first = (j % d == 0) && (k == 0);
          lb_din[r].data  = I[r][win % NWIN][k];
        end
      end
      for (int c = 0; c < COLS; c++) begin
        int k; k = s - c;
        buf_w[c]  = (k >= 0 && k < K) ? W[c][k] : '0;
        // neighbour path has no register stage: offer one cycle later
        k = s - 1 - c;
        tile_w[c] = (k >= 0 && k < K) ? W[c][k] : '0;
      end
    end
    @(negedge clk); lb_push = 0; lb_din = '0; buf_w = '0; tile_w = '0;
    repeat (4) @(negedge clk);
    for (int r = 0; r < ROWS; r++) begin
      int d, win;
      d = all_fast ? 1 : (1 << cls[r]);
      win = j / d;
      if ((j % d) == d - 1) begin
        rd_row = r[$clog2(ROWS)-1:0];
        #1;
        n_done++;
        for (int c = 0; c < COLS; c++) begin
          longint e; e = 0;
          for (int k = 0; k < K; k++) e += longint'(I[r][win % NWIN][k]) * longint'(W[c][k]);
          check($sformatf("round %0d row %0d col %0d", j, r, c), longint'($signed(rd_psum[c])), e);
        end
      end
    end
  endtask

  initial begin
    from_tile = 0; lb_push = 0; lb_din = '0; buf_w = '0; tile_w = '0; rd_row = '0;
    for (int r = 0; r < ROWS; r++) for (int w = 0; w < NWIN; w++) for (int k = 0; k < K; k++)
      I[r][w][k] = 8'($urandom);
    for (int c = 0; c < COLS; c++) for (int k = 0; k < K; k++) W[c][k] = 8'($urandom);
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int j = 0; j < 8; j++) run_round(j, 1'b0, 1'b0);
    check("rows completed (4f:4, 2f:2, f:1, 8f:8 windows)", n_done, 8 + 4 + 2 + 1);
    // weights from the neighbour tile, all rows taken as 8f
    @(negedge clk); from_tile = 1;
    run_round(8, 1'b1, 1'b1);
    check("bottom-weight checks ran", n_bot > 0, 1);
    check("local buffer never full", lb_full, 0);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
