// tb_canopy_row_sched: self-checking test of the row delay table and row
// on/off control.
//
// Eight rows are given the delay classes 8f, 4f, 2f, f in turn. Eight batch
// rounds are streamed; for every row the testbench records which elements
// the row was switched on for and checks that
//  - within one round a row of class d takes every d-th element, starting at
//    element (round mod d), i.e. it is held off at the start of the round for
//    as many elements as the round's phase (the row_off alignment);
//  - after d rounds every element 0..K-1 has been taken exactly once, with
//    'first' on the first element of the group only;
//  - the row reports done in the last round of each group, and its lane
//    address is its base plus the element index, the base advancing by K
//    after each completed group;
//  - the registered tag follows the read enable by exactly one cycle.
// Then a single-input round checks that only 8f rows are switched on, for
// every element, and that they alone report done.
module tb_canopy_row_sched;
  import canopy_pkg::*;

  localparam int unsigned ROWS = 8, DEPTH = 256;
  localparam int unsigned K = 12, SKEW = 3;

  logic clk = 0, rst_n = 0;
  logic spd_we, single, job_start, round_end, stream;
  logic [$clog2(ROWS)-1:0] spd_row;
  speed_e spd_val;
  logic [2:0] phase;
  logic [CNT_W-1:0] step, skew, k_len;
  logic [ROWS-1:0] rd_en, row_done, en_prev;
  logic [$clog2(DEPTH)-1:0] rd_addr [ROWS];
  op_t [ROWS-1:0] row_op;
  int checks = 0, failures = 0;

  int cls [ROWS];
  int taken [ROWS][K];
  int base_exp [ROWS];
  int firsts [ROWS];
  int n_offset_rounds = 0;

  canopy_row_sched #(.ROWS(ROWS), .DEPTH(DEPTH)) dut (.*);

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

  task automatic run_round(int j, bit is_single);
    @(negedge clk);
    phase = 3'(j); stream = 1; step = '0; en_prev = '0;
    for (int s = 0; s < SKEW + ROWS + K + 2; s++) begin
      step = CNT_W'(s);
      #1;
      for (int r = 0; r < ROWS; r++) begin
        int k, d;
        k = s - SKEW - r;
        d = 1 << cls[r];
        if (rd_en[r]) begin
          check("element in range", (k >= 0 && k < K), 1);
          if (k >= 0 && k < K) begin
            taken[r][k]++;
            check("address", rd_addr[r], base_exp[r] + k);
            if (!is_single) check("stride and phase", k % d, j % d);
            else            check("only 8f rows in single mode", cls[r], 0);
          end
        end
      end
      @(posedge clk); #1;
      for (int r = 0; r < ROWS; r++) begin
        check("tag follows enable", row_op[r].on, rd_en[r]);
        if (row_op[r].first) firsts[r]++;
      end
      @(negedge clk);
    end
    stream = 0;
    // done flags
    for (int r = 0; r < ROWS; r++) begin
      int d; d = 1 << cls[r];
      if (is_single) check("single done", row_done[r], cls[r] == 0);
      else           check("batch done", row_done[r], (j % d) == d - 1);
    end
    for (int r = 0; r < ROWS; r++)
      if ((j % (1 << cls[r])) != 0 && !is_single) n_offset_rounds++;
    round_end = 1;
    @(negedge clk);
    round_end = 0;
    for (int r = 0; r < ROWS; r++) begin
      int d; d = 1 << cls[r];
      if (is_single ? (cls[r] == 0) : ((j % d) == d - 1)) begin
        // group complete: every element exactly once, one 'first'
        for (int k = 0; k < K; k++) check($sformatf("row %0d elem %0d once", r, k), taken[r][k], 1);
        check("one first per group", firsts[r], 1);
        for (int k = 0; k < K; k++) taken[r][k] = 0;
        firsts[r] = 0;
        base_exp[r] += K;
      end
    end
  endtask

  initial begin
    spd_we = 0; single = 0; job_start = 0; round_end = 0; stream = 0;
    spd_row = '0; spd_val = SPD_8F; phase = '0; step = '0; skew = CNT_W'(SKEW); k_len = CNT_W'(K);
    for (int r = 0; r < ROWS; r++) begin
      cls[r] = r % 4; base_exp[r] = 0; firsts[r] = 0;
      for (int k = 0; k < K; k++) taken[r][k] = 0;
    end
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int r = 0; r < ROWS; r++) begin
      @(negedge clk);
      spd_we = 1; spd_row = r[$clog2(ROWS)-1:0]; spd_val = speed_e'(cls[r]);
    end
    @(negedge clk); spd_we = 0; job_start = 1;
    @(negedge clk); job_start = 0;
    for (int j = 0; j < 8; j++) run_round(j, 1'b0);
    check("held-off rounds seen", n_offset_rounds > 0, 1);

    // single-input round
    @(negedge clk); single = 1; job_start = 1;
    for (int r = 0; r < ROWS; r++) begin
      base_exp[r] = 0; firsts[r] = 0;
      for (int k = 0; k < K; k++) taken[r][k] = 0;
    end
    @(negedge clk); job_start = 0;
    run_round(0, 1'b1);
    for (int r = 0; r < ROWS; r++)
      if (cls[r] != 0) check("slow row idle in single mode", taken[r][0], 0);

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
