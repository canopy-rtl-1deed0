// tb_canopy_mac: self-checking test of one CANOPY MAC (a row of one column).
//
// Drives random signed operands with random on/off and 'first' tags and
// checks, against a reference model kept in the testbench, that weights are
// forwarded down after one cycle, that only tagged operands are
// accumulated, that 'first' restarts the sum, and that a product reaches the
// partial sum exactly two cycles after the operand is registered.
module tb_canopy_mac;
  import canopy_pkg::*;

  logic clk = 0, rst_n = 0;
  op_t  op_in;
  logic [DATA_W-1:0] w_in, w_out;
  logic [PSUM_W-1:0] psum;
  int checks = 0, failures = 0;

  logic [0:0][DATA_W-1:0] w_in_v, w_out_v;
  logic [0:0][PSUM_W-1:0] psum_v;
  assign w_in_v[0] = w_in;
  assign w_out = w_out_v[0];
  assign psum = psum_v[0];

  // a single MAC is a row of one column; its operand output is not visible,
  // so forwarding to the right is checked through tb_canopy_mac_row
  canopy_mac_row #(.COLS(1)) dut (.clk, .rst_n, .op_in, .w_in(w_in_v), .w_out(w_out_v), .psum(psum_v));

  always #5 clk = ~clk;

  initial begin
    repeat (2000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // reference: pipeline of tagged products
  op_t               hist_op [3];
  logic [DATA_W-1:0] hist_w  [3];
  int                ref_sum;

  task automatic check(string what, longint got, longint exp);
    checks++;
    if (got != exp) begin
      failures++;
      $display("FAIL %s: got %0d expected %0d at %0t", what, got, exp, $time);
    end
  endtask

  initial begin
    op_in = OP_IDLE; w_in = '0; ref_sum = 0;
    for (int i = 0; i < 3; i++) begin hist_op[i] = OP_IDLE; hist_w[i] = '0; end
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int n = 0; n < 600; n++) begin
      @(negedge clk);
      op_in.data  = 8'($urandom);
      op_in.on    = ($urandom % 3) != 0;
      op_in.first = op_in.on && (($urandom % 10) == 0);
      w_in        = 8'($urandom);
      @(posedge clk);
      // shift reference history: [0] = operand now registered
      hist_op[2] = hist_op[1]; hist_w[2] = hist_w[1];
      hist_op[1] = hist_op[0]; hist_w[1] = hist_w[0];
      hist_op[0] = op_in;      hist_w[0] = w_in;
      // the operand registered two edges ago has now been added
      if (hist_op[2].on) begin
        int p;
        p = int'($signed(hist_op[2].data)) * int'($signed(hist_w[2]));
        ref_sum = hist_op[2].first ? p : ref_sum + p;
      end
      #1;

      check("forward w", w_out, hist_w[0]);
      check("psum", $signed(psum), ref_sum);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
