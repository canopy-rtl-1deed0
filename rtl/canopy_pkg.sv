// canopy_pkg: types and constants shared by the CANOPY accelerator.
//
// CANOPY is a systolic DNN accelerator whose 256 MAC rows per tile each run
// at their own speed (one of four delay classes fixed by carbon-nanotube
// process variation). This package holds the operand widths (8-bit operands,
// 16-bit product, 32-bit partial sum, as the MAC register sizes describe),
// the delay-class encoding, the three logical array configurations and the
// operand bundle that travels along a MAC row together with its on/off tag.
// The encodings themselves are this design's own choice.
package canopy_pkg;

  localparam int unsigned DATA_W = 8;   // IFP and weight registers: one byte each
  localparam int unsigned PROD_W = 16;  // temporal product register: two bytes
  localparam int unsigned PSUM_W = 32;  // partial-sum register: four bytes

  // The accelerator has four tiles in a 2 x 2 layout.
  localparam int unsigned TILES = 4;

  // Width of the step, round, length and address fields of the control path.
  localparam int unsigned CNT_W = 16;

  // Delay class of a MAC row. A row of class c completes one MAC every
  // 2**c cycles of the array clock (the 8f clock).
  typedef enum logic [1:0] {
    SPD_8F = 2'd0,  // 1 cycle per MAC
    SPD_4F = 2'd1,  // 2 cycles per MAC
    SPD_2F = 2'd2,  // 4 cycles per MAC
    SPD_F  = 2'd3   // 8 cycles per MAC
  } speed_e;

  // Logical configuration of the four tiles.
  typedef enum logic [1:0] {
    CFG_BATCH = 2'd0,  // square 512x512: batch processing, every row at its own speed
    CFG_TALL  = 2'd1,  // vertical 1024x256: single input, CONV dominated
    CFG_WIDE  = 2'd2   // horizontal 256x1024: single input, FC dominated
  } cfg_e;

  // One operand on the input path of a MAC row. 'on' is the row on/off
  // control for this operand slot and 'first' clears the accumulator.
  typedef struct packed {
    logic              on;
    logic              first;
    logic [DATA_W-1:0] data;
  } op_t;

  localparam op_t OP_IDLE = '{on: 1'b0, first: 1'b0, data: '0};

  // Run-time job description written by the host before 'start'.
  typedef struct packed {
    cfg_e             mode;
    logic [CNT_W-1:0] k_len;     // reduction length (unrolled window size)
    logic [CNT_W-1:0] n_rounds;  // number of rounds to run
    logic [CNT_W-1:0] w_base;    // weight-buffer address of element 0 of the kernels
  } job_t;

  // Number of array cycles a row of the given class needs for one MAC.
  function automatic int unsigned speed_div(speed_e s);
    return 1 << s;
  endfunction

endpackage
