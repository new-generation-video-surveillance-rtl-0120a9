// vss_pkg: constants and types shared by the surveillance FPGA modules.
//
// The image is 512 x 512 pixels of 8 bits. The master camera's field of
// view is cut into a 10 x 10 grid of sub-regions; the slave camera is
// pointed at one of them. The system clock is 10 MHz, which at the CCIR
// line rate of 15.625 kHz gives 640 clocks per line. Image size, grid size,
// clock rate, gain G = 1/8 and the person limits (4 pixels wide, 6 rows
// high) follow the document; the sub-region pitch, the car limits, the
// window offsets and the record layouts are this design's choices.
package vss_pkg;

  localparam int unsigned IMG_W          = 512;
  localparam int unsigned IMG_H          = 512;
  localparam int unsigned PIX_W          = 8;
  localparam int unsigned COORD_W        = 9;    // 0..511
  localparam int unsigned CLKS_PER_LINE  = 640;  // 10 MHz / 15.625 kHz
  localparam int unsigned LINES_PER_FRM  = 625;  // CCIR
  localparam int unsigned NREG_X         = 10;   // 10 x 10 = 100 sub-regions
  localparam int unsigned NREG_Y         = 10;
  localparam int unsigned NREG           = NREG_X * NREG_Y;
  localparam int unsigned SR_W           = 51;   // sub-region pitch; last one takes the rest
  localparam int unsigned SR_H           = 51;
  localparam int unsigned REG_W          = 7;    // bits of a sub-region number 0..99
  localparam int unsigned CNT_W          = 4;    // col_count and row_count are 4-bit counters

  // default user limits: width and height of a person and of a car
  localparam logic [CNT_W-1:0] COL_UDTP1_DEF = 4'd4;
  localparam logic [CNT_W-1:0] ROW_UDTP1_DEF = 4'd6;
  localparam logic [CNT_W-1:0] COL_UDTP2_DEF = 4'd12;
  localparam logic [CNT_W-1:0] ROW_UDTP2_DEF = 4'd8;

  // background memory behaviour
  typedef enum logic [1:0] {
    BG_FILTER  = 2'd0,  // Bg += G * (Live - Bg) every frame
    BG_HOLD    = 2'd1,  // keep the stored background unchanged
    BG_CAPTURE = 2'd2   // store the live frame as the background
  } bg_mode_e;

  typedef enum logic {
    OBJ_PERSON = 1'b0,
    OBJ_CAR    = 1'b1
  } obj_class_e;

  // one entry of the target list
  typedef struct packed {
    obj_class_e         cls;
    logic [COORD_W-1:0] col;  // start column of the last matched run
    logic [COORD_W-1:0] row;  // row of the last matched run
  } target_t;

  // sub-region number of grid position (x, y), numbered top-left first,
  // left to right, then top to bottom
  function automatic logic [REG_W-1:0] region_num(input logic [3:0] x, input logic [3:0] y);
    return REG_W'(y) * REG_W'(NREG_X) + REG_W'(x);
  endfunction

endpackage
