// tb_canopy_weight_buffer: self-checking test of the weight buffer's skewed
// kernel stream.
//
// A small instance (4 tiles x 4 columns x 64 bytes) is filled with random
// bytes through the host port. A stream is then run with a different skew
// per tile, a kernel length K and a base address; one cycle after each step,
// column c of tile t must show element k = step - skew[t] - c of its lane
// (address base + k), or zero outside 0..K-1 or for a tile not enabled.
module tb_canopy_weight_buffer;
  import canopy_pkg::*;

  localparam int unsigned COLS = 4, DEPTH = 64;
  localparam int unsigned K = 9, BASE = 5;

  logic clk = 0, rst_n = 0;
  logic wr_en;
  logic [$clog2(TILES*COLS)-1:0] wr_lane;
  logic [$clog2(DEPTH)-1:0] wr_addr;
  logic [DATA_W-1:0] wr_data;
  logic [TILES-1:0] rd_en;
  logic [CNT_W-1:0] step, k_len, w_base;
  logic [CNT_W-1:0] skew [TILES];
  logic [TILES-1:0][COLS-1:0][DATA_W-1:0] rd_data;
  logic [DATA_W-1:0] model [TILES*COLS][DEPTH];
  int checks = 0, failures = 0, nonzero = 0;

  canopy_weight_buffer #(.COLS(COLS), .DEPTH(DEPTH)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    wr_en = 0; wr_lane = '0; wr_addr = '0; wr_data = '0; rd_en = '0; step = '0;
    k_len = CNT_W'(K); w_base = CNT_W'(BASE);
    skew[0] = 0; skew[1] = 2; skew[2] = 7; skew[3] = 11;
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int l = 0; l < TILES * COLS; l++)
      for (int a = 0; a < DEPTH; a++) begin
        @(negedge clk);
        wr_en = 1; wr_lane = l[$clog2(TILES*COLS)-1:0]; wr_addr = a[$clog2(DEPTH)-1:0];
        wr_data = 8'($urandom | 1);
        model[l][a] = wr_data;
      end
    @(negedge clk); wr_en = 0;
    for (int pass = 0; pass < 2; pass++) begin
      rd_en = (pass == 0) ? 4'b1111 : 4'b0101;
      for (int s = 0; s < 30; s++) begin
        @(negedge clk);
        step = CNT_W'(s);
        @(posedge clk); #1;
        for (int t = 0; t < TILES; t++)
          for (int c = 0; c < COLS; c++) begin
            int k;
            logic [7:0] e;
            k = s - int'(skew[t]) - c;
            e = (rd_en[t] && k >= 0 && k < K) ? model[t*COLS + c][BASE + k] : 8'd0;
            if (e != 0) nonzero++;
            checks++;
            if (rd_data[t][c] != e) begin
              failures++;
              $display("FAIL t%0d c%0d step %0d: %0h vs %0h", t, c, s, rd_data[t][c], e);
            end
          end
      end
    end
    checks++;
    if (nonzero == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
