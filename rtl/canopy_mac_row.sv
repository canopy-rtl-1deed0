// canopy_mac_row: a 1 x COLS row of CANOPY multiply-accumulate units.
//
// All MACs of a row lie along one carbon-nanotube stripe, so they share one
// delay class and are switched on and off together. Each MAC has the four
// registers of the CANOPY MAC: a one-byte IFP register, a one-byte weight
// register, a two-byte product register and a four-byte partial-sum
// register; here they are held as arrays indexed by column.
//
// Every cycle the IFP register of column c (operand plus its on/off tag)
// takes the IFP register of column c-1 (column 0 takes the row input), and
// the weight register of column c takes the weight arriving from above; the
// weights leave downwards unchanged. So operands move one MAC to the right
// per cycle, and the tag always accompanies its operand: every MAC computes
// on exactly the slots the row schedule switched on. When the operand in the
// IFP register of a column is on, its product register is loaded with
// IFP*weight; one cycle later the product is added into the partial sum
// ('first' restarts the sum). Sums stay in place (output stationary).
//
// Timing: a row input applied in cycle n is in column c's IFP register in
// cycle n+c+1, its product in n+c+2 and its partial sum in n+c+3; a weight
// applied in cycle n is in the weight register (and on w_out) in n+1.
// A row of a slow delay class needs several array cycles per MAC; its on
// tags are spaced that many cycles apart, so the one-cycle transfers here
// stand for the row's multicycle compute.
// Operands are signed 8-bit integers (this design's choice; only 8-bit
// quantisation is given). Reset is asynchronous, active low.
module canopy_mac_row
  import canopy_pkg::*;
#(
  parameter int unsigned COLS = 256
) (
  input  logic                         clk,
  input  logic                         rst_n,
  input  op_t                          op_in,
  input  logic [COLS-1:0][DATA_W-1:0]  w_in,
  output logic [COLS-1:0][DATA_W-1:0]  w_out,
  output logic [COLS-1:0][PSUM_W-1:0]  psum
);

  op_t                      ifp_q  [COLS];  // IFP register (with tag)
  logic [DATA_W-1:0]        w_q    [COLS];  // weight register
  logic signed [PROD_W-1:0] prod_q [COLS];  // product register
  logic signed [PSUM_W-1:0] psum_q [COLS];  // partial-sum register
  logic [COLS-1:0]          acc_q;          // product register holds a new product
  logic [COLS-1:0]          clr_q;          // ... which starts a new sum

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int c = 0; c < COLS; c++) begin
        ifp_q[c]  <= OP_IDLE;
        w_q[c]    <= '0;
        prod_q[c] <= '0;
        psum_q[c] <= '0;
      end
      acc_q <= '0;
      clr_q <= '0;
    end else begin
      for (int c = 0; c < COLS; c++) begin
        ifp_q[c] <= (c == 0) ? op_in : ifp_q[(c == 0) ? 0 : c - 1];
        w_q[c]   <= w_in[c];
        acc_q[c] <= ifp_q[c].on;
        clr_q[c] <= ifp_q[c].first;
        if (ifp_q[c].on)
          prod_q[c] <= $signed(ifp_q[c].data) * $signed(w_q[c]);
        if (acc_q[c])
          psum_q[c] <= (clr_q[c] ? '0 : psum_q[c]) + PSUM_W'(prod_q[c]);
      end
    end
  end

  always_comb begin
    for (int c = 0; c < COLS; c++) begin
      w_out[c] = w_q[c];
      psum[c]  = psum_q[c];
    end
  end

endmodule
