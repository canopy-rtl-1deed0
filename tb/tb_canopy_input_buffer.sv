// tb_canopy_input_buffer: self-checking test of the lane-organised input buffer.
//
// A small instance (8 lanes x 64 bytes) is filled through the host port with
// random bytes that the testbench remembers. Then every cycle each lane is
// read at its own random address with a random enable; one cycle later each
// lane must return its byte, or zero when it was not enabled.
module tb_canopy_input_buffer;
  import canopy_pkg::*;

  localparam int unsigned LANES = 8, DEPTH = 64;

  logic clk = 0, rst_n = 0;
  logic wr_en;
  logic [$clog2(LANES)-1:0] wr_lane;
  logic [$clog2(DEPTH)-1:0] wr_addr;
  logic [DATA_W-1:0] wr_data;
  logic [LANES-1:0] rd_en, en_prev;
  logic [$clog2(DEPTH)-1:0] rd_addr [LANES], addr_prev [LANES];
  logic [LANES-1:0][DATA_W-1:0] rd_data;
  logic [DATA_W-1:0] model [LANES][DEPTH];
  int checks = 0, failures = 0;

  canopy_input_buffer #(.LANES(LANES), .DEPTH(DEPTH)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    wr_en = 0; wr_lane = '0; wr_addr = '0; wr_data = '0; rd_en = '0;
    for (int l = 0; l < LANES; l++) rd_addr[l] = '0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int l = 0; l < LANES; l++)
      for (int a = 0; a < DEPTH; a++) begin
        @(negedge clk);
        wr_en = 1; wr_lane = l[$clog2(LANES)-1:0]; wr_addr = a[$clog2(DEPTH)-1:0];
        wr_data = 8'($urandom);
        model[l][a] = wr_data;
      end
    @(negedge clk); wr_en = 0;
    for (int n = 0; n < 200; n++) begin
      @(negedge clk);
      if (n > 0)
        for (int l = 0; l < LANES; l++) begin
          checks++;
          if (rd_data[l] != (en_prev[l] ? model[l][addr_prev[l]] : 8'd0)) begin
            failures++;
            $display("FAIL lane %0d", l);
          end
        end
      for (int l = 0; l < LANES; l++) begin
        rd_en[l] = $urandom % 2;
        rd_addr[l] = $clog2(DEPTH)'($urandom);
      end
      en_prev = rd_en; addr_prev = rd_addr;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
