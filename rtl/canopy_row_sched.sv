// canopy_row_sched: row delay table and row on/off control for one tile.
//
// After fabrication every MAC row is tested and its delay is quantised to one
// of four classes (8f, 4f, 2f, f: 1, 2, 4 or 8 array cycles per MAC). The host
// writes the class of each row into this table. During a round the whole
// array is clocked at the 8f rate and the weights of the round stream down
// the columns once; a row of class d (d cycles per MAC) can take only every
// d-th element of that stream. The schedule therefore switches the row on for
// elements k with k mod d = j mod d in round j: in the first round of a group
// the row takes elements 0, d, 2d, ..., in the next round it is held off for
// one more element at the start and takes 1, d+1, ..., and so on, so that
// after d rounds every element has been consumed once and the row's output
// is complete. Fast (8f) rows finish an output every round, slower rows every
// 2, 4 or 8 rounds; skipped elements stay in the input buffer for later
// rounds. In single-input configurations only 8f rows are switched on and
// all of them finish every round.
//
// Each row has an input-buffer lane with a base address that advances by
// k_len whenever the row finishes an output, so a row reads its unrolled
// windows one after another. Row r of a tile whose stream starts at 'skew'
// is offered element k = step - skew - r (systolic skew).
//
// Timing: rd_en/rd_addr are combinational from 'step'; row_op (tags, data
// zero) is registered so that it lines up with the input-buffer data read at
// the same step. row_done is combinational from the round phase and the
// table. The phase rule, the base-address scheme and the table write port
// are this design's reading of the row_off description.
module canopy_row_sched
  import canopy_pkg::*;
#(
  parameter int unsigned ROWS  = 256,
  parameter int unsigned DEPTH = 8192   // input-buffer lane depth
) (
  input  logic                       clk,
  input  logic                       rst_n,
  // delay table programming
  input  logic                       spd_we,
  input  logic [$clog2(ROWS)-1:0]    spd_row,
  input  speed_e                     spd_val,
  // job and round control
  input  logic                       single,     // single-input configuration
  input  logic                       job_start,  // reset lane base addresses
  input  logic                       round_end,  // advance rows that finished
  input  logic [2:0]                 phase,      // round index mod 8
  input  logic                       stream,     // stream phase of a round
  input  logic [CNT_W-1:0]           step,
  input  logic [CNT_W-1:0]           skew,
  input  logic [CNT_W-1:0]           k_len,
  // outputs
  output logic [ROWS-1:0]            rd_en,
  output logic [$clog2(DEPTH)-1:0]   rd_addr [ROWS],
  output op_t  [ROWS-1:0]            row_op,     // tags, one cycle after step
  output logic [ROWS-1:0]            row_done    // row completes an output this round
);

  localparam int unsigned AW = $clog2(DEPTH);

  speed_e           spd  [ROWS];
  logic [AW-1:0]    base [ROWS];
  logic [ROWS-1:0]  on_c, first_c, active;

  always_comb begin
    for (int r = 0; r < ROWS; r++) begin
      logic [CNT_W:0] k;
      logic [2:0]     mask, ph;
      logic           valid;
      k     = {1'b0, step} - {1'b0, skew} - (CNT_W+1)'(r);
      valid = stream && !k[CNT_W] && (k[CNT_W-1:0] < k_len);
      mask  = 3'((speed_div(spd[r])) - 1);
      ph    = phase & mask;
      active[r] = single ? (spd[r] == SPD_8F) : 1'b1;
      if (single) begin
        on_c[r]     = valid && active[r];
        first_c[r]  = on_c[r] && (k[CNT_W-1:0] == '0);
        row_done[r] = active[r];
      end else begin
        on_c[r]     = valid && ((3'(k[2:0]) & mask) == ph);
        first_c[r]  = on_c[r] && (ph == 3'd0) && (k[CNT_W-1:0] == '0);
        row_done[r] = (ph == mask);
      end
      rd_en[r]   = on_c[r];
      rd_addr[r] = base[r] + AW'(k[CNT_W-1:0]);
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int r = 0; r < ROWS; r++) begin
        spd[r]  <= SPD_8F;
        base[r] <= '0;
      end
      row_op <= '0;
    end else begin
      if (spd_we) spd[spd_row] <= spd_val;
      for (int r = 0; r < ROWS; r++) begin
        if (job_start)                    base[r] <= '0;
        else if (round_end && row_done[r]) base[r] <= base[r] + AW'(k_len);
        row_op[r] <= '{on: on_c[r], first: first_c[r], data: '0};
      end
    end
  end

  // A row of a slow class must never be switched on in two consecutive cycles.
  for (genvar r = 0; r < ROWS; r++) begin : g_chk
    a_slow_row_spacing: assert property (@(posedge clk) disable iff (!rst_n)
      (row_op[r].on && spd[r] != SPD_8F) |=> !row_op[r].on);
  end

endmodule
