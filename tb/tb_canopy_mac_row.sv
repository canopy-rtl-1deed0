// tb_canopy_mac_row: self-checking test of a CANOPY MAC row.
//
// A row of COLS MACs receives one unrolled input stream at its left edge and
// one kernel per column from above, skewed by one cycle per column. The
// stream is sent twice with the on/off pattern of a 4f row (every second
// element; phase 0 in the first pass, phase 1 in the second), so only after
// both passes does every column hold the full dot product of the input and
// its kernel. A third pass with all elements on and 'first' set checks that a
// new sum restarts. Results and the one-cycle weight forwarding are compared
// with sums computed in the testbench, and the psum of the last column must
// settle exactly COLS+2 cycles after the last element enters.
module tb_canopy_mac_row;
  import canopy_pkg::*;

  localparam int unsigned COLS = 6;
  localparam int unsigned K    = 10;

  logic clk = 0, rst_n = 0;
  op_t  op_in;
  logic [COLS-1:0][DATA_W-1:0] w_in, w_out, w_prev;
  logic [COLS-1:0][PSUM_W-1:0] psum;
  int checks = 0, failures = 0;

  logic signed [7:0] I [K];
  logic signed [7:0] W [COLS][K];

  canopy_mac_row #(.COLS(COLS)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (5000) @(posedge clk);
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

  // One pass of the stream. Element k enters the row at cycle k; column c
  // receives W[c][k] at cycle k + c. Tag: on when k mod stride == phase.
  task automatic run_pass(int stride, int phase, bit restart);
    for (int n = 0; n < K + COLS; n++) begin
      @(negedge clk);
      if (n < K) begin
        op_in.data  = I[n];
        op_in.on    = (n % stride) == phase;
        op_in.first = restart && (n == phase);
      end else begin
        op_in = OP_IDLE;
      end
      for (int c = 0; c < COLS; c++)
        w_in[c] = (n - c >= 0 && n - c < K) ? W[c][n-c] : '0;
    end
  endtask

  longint exp_sum;

  initial begin
    op_in = OP_IDLE; w_in = '0;
    for (int k = 0; k < K; k++) I[k] = 8'($urandom);
    for (int c = 0; c < COLS; c++) for (int k = 0; k < K; k++) W[c][k] = 8'($urandom);
    repeat (3) @(posedge clk);
    rst_n = 1;

    // half of the elements, then the other half
    run_pass(2, 0, 1'b1);
    repeat (4) @(posedge clk);
    for (int c = 0; c < COLS; c++) begin
      exp_sum = 0;
      for (int k = 0; k < K; k += 2) exp_sum += longint'(I[k]) * longint'(W[c][k]);
      check($sformatf("half sum col %0d", c), longint'($signed(psum[c])), exp_sum);
    end
    run_pass(2, 1, 1'b0);
    repeat (4) @(posedge clk);
    for (int c = 0; c < COLS; c++) begin
      exp_sum = 0;
      for (int k = 0; k < K; k++) exp_sum += longint'(I[k]) * longint'(W[c][k]);
      check($sformatf("full sum col %0d", c), longint'($signed(psum[c])), exp_sum);
    end

    // restart with all elements on and check latency of the last column
    for (int k = 0; k < K; k++) I[k] = 8'($urandom);
    fork
      run_pass(1, 0, 1'b1);
      begin
        int lat;
        // element K-1 enters at pass cycle K-1; wait for it, then count
        repeat (K) @(posedge clk);
        lat = 0;
        exp_sum = 0;
        for (int k = 0; k < K; k++) exp_sum += longint'(I[k]) * longint'(W[COLS-1][k]);
        while (longint'($signed(psum[COLS-1])) != exp_sum && lat < 40) begin
          @(posedge clk); lat++;
        end
        check("last column latency", lat, COLS + 2);
      end
    join
    repeat (4) @(posedge clk);
    for (int c = 0; c < COLS; c++) begin
      exp_sum = 0;
      for (int k = 0; k < K; k++) exp_sum += longint'(I[k]) * longint'(W[c][k]);
      check($sformatf("restart sum col %0d", c), longint'($signed(psum[c])), exp_sum);
    end

    // weights leave one cycle after they enter
    for (int n = 0; n < 20; n++) begin
      @(negedge clk);
      for (int c = 0; c < COLS; c++) w_in[c] = 8'($urandom);
      w_prev = w_in;
      @(posedge clk); #1;
      check("weight forward", w_out, w_prev);
    end

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
