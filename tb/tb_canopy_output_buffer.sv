// tb_canopy_output_buffer: self-checking test of the output buffer.
//
// Random rows of partial sums are written to random entries of a small
// instance (4 columns x 16 entries) while random entries are read back; each
// read must return, one cycle later, the last row written to that entry.
module tb_canopy_output_buffer;
  import canopy_pkg::*;

  localparam int unsigned COLS = 4, ENTRIES = 16;

  logic clk = 0;
  logic wr_en;
  logic [$clog2(ENTRIES)-1:0] wr_addr, rd_addr;
  logic [COLS-1:0][PSUM_W-1:0] wr_data, rd_data;
  logic [COLS-1:0][PSUM_W-1:0] model [ENTRIES];
  logic [ENTRIES-1:0] written;
  int checks = 0, failures = 0;

  canopy_output_buffer #(.COLS(COLS), .ENTRIES(ENTRIES)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [COLS-1:0][PSUM_W-1:0] expect_q;
    logic expect_v;
    wr_en = 0; wr_addr = '0; rd_addr = '0; wr_data = '0; written = '0; expect_v = 0;
    for (int n = 0; n < 600; n++) begin
      @(negedge clk);
      if (expect_v) begin
        checks++;
        if (rd_data != expect_q) begin failures++; $display("FAIL read %0d", n); end
      end
      wr_en = $urandom % 2;
      wr_addr = $clog2(ENTRIES)'($urandom);
      for (int c = 0; c < COLS; c++) wr_data[c] = $urandom;
      rd_addr = $clog2(ENTRIES)'($urandom);
      // the read sees the memory before this cycle's write
      expect_v = written[rd_addr];
      expect_q = model[rd_addr];
      @(posedge clk);
      if (wr_en) begin model[wr_addr] = wr_data; written[wr_addr] = 1'b1; end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
