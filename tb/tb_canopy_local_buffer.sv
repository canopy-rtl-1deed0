// tb_canopy_local_buffer: self-checking test of the tile's local buffer.
//
// A small instance (4 rows x 6 words) is pushed and popped at random without
// overflowing or underflowing it. A queue in the testbench models the FIFO;
// the head word, 'empty' and 'full' are compared with it every cycle, and
// the buffer must be filled to 'full' at least once.
module tb_canopy_local_buffer;
  import canopy_pkg::*;

  localparam int unsigned ROWS = 4, DEPTH = 6;

  logic clk = 0, rst_n = 0;
  logic push, pop, empty, full;
  op_t [ROWS-1:0] din, dout;
  op_t [ROWS-1:0] model [$];
  int checks = 0, failures = 0, n_full = 0;

  canopy_local_buffer #(.ROWS(ROWS), .DEPTH(DEPTH)) dut (.*);

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
      $display("FAIL %s: got %0h expected %0h", what, got, exp);
    end
  endtask

  initial begin
    push = 0; pop = 0; din = '0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int n = 0; n < 1000; n++) begin
      @(negedge clk);
      check("empty", empty, model.size() == 0);
      check("full", full, model.size() == DEPTH);
      if (full) n_full++;
      if (model.size() != 0) check("head", dout, model[0]);
      // bias towards filling in the first half, draining in the second
      push = !full && (($urandom % 4) < ((n % 200) < 100 ? 3 : 1));
      pop  = !empty && (($urandom % 4) < ((n % 200) < 100 ? 1 : 3));
      for (int r = 0; r < ROWS; r++) din[r] = op_t'($urandom);
      @(posedge clk);
      if (pop)  void'(model.pop_front());
      if (push) model.push_back(din);
    end
    check("reached full", n_full > 0, 1);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
