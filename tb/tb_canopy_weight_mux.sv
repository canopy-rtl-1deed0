// tb_canopy_weight_mux: self-checking test of the per-column weight selectors.
//
// Random buffer and neighbour weights and a random select are applied every
// cycle. With the select on 'neighbour tile' the top-row weights must equal
// the neighbour weights of the same cycle; with the select on 'buffer' they
// must equal the buffer weights of the previous cycle (one register stage).
module tb_canopy_weight_mux;
  import canopy_pkg::*;

  localparam int unsigned COLS = 8;

  logic clk = 0, rst_n = 0;
  logic from_tile;
  logic [COLS-1:0][DATA_W-1:0] buf_w, tile_w, top_w, buf_prev;
  int checks = 0, failures = 0, n_tile = 0, n_buf = 0;

  canopy_weight_mux #(.COLS(COLS)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (2000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    from_tile = 0; buf_w = '0; tile_w = '0; buf_prev = '0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int n = 0; n < 400; n++) begin
      @(negedge clk);
      buf_prev = buf_w;  // value the register captured at the last edge
      from_tile = $urandom % 2;
      for (int c = 0; c < COLS; c++) begin
        buf_w[c]  = 8'($urandom);
        tile_w[c] = 8'($urandom);
      end
      #1;
      checks++;
      if (from_tile) begin
        n_tile++;
        if (top_w != tile_w) begin failures++; $display("FAIL neighbour path"); end
      end else begin
        n_buf++;
        if (n > 0 && top_w != buf_prev) begin failures++; $display("FAIL buffer path"); end
      end
    end
    checks++;
    if (n_tile == 0 || n_buf == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
