// target_detect: moving-target detection over a 10 x 10 grid of sub-regions.
//
// Each pixel is differenced against the stored background and thresholded:
// it is a target pixel when |Live - Bg| > Threshold. Along each row a 4-bit
// counter col_count measures the run of target pixels. When a background
// pixel ends a run, the run is tested against two width limits: at least
// col_udtp2 wide is a large object (a car), otherwise at least col_udtp1
// wide is a small object (a person); shorter runs are discarded. Each class
// has its own tracking state per sub-region: a 4-bit row_count and the
// start column and row of the last accepted run. The first accepted run
// starts an object. A run in the next row that starts within one column of
// the saved start extends it; when row_count reaches the class's height
// limit (row_udtp2 or row_udtp1) the target is reported and the
// sub-region's counters are cleared. A qualifying run that neither extends
// the object nor lies in the object's last row clears that class's state.
// Only the first target of a sub-region in a frame is reported.
//
// Pixels arrive row by row across the whole image, so a row passes through
// ten sub-regions in turn. col_count is a single register, cleared where a
// row enters a new sub-region; the per-class state is kept in small
// arrays, one entry per sub-region column, cleared where a new row of
// sub-regions begins. The grid pitch is SR_W x SR_H pixels (51 x 51), the
// last sub-region of a row or column taking the rest of the image.
//
// Interface and timing: one pixel per clock; pix_valid, col, row, live and
// bg belong to the same pixel. det_valid pulses one clock after the pixel
// that completed a target, with the sub-region number (0..99, top-left
// first, row-major) and the target's class, saved column and row.
// The thresholding, the run and row counters, the two object classes, the
// +-1 column tolerance and one target per sub-region follow the document;
// the saved coordinates (see README), the grid pitch and the clearing of
// col_count at sub-region edges are this design's reading of it.
module target_detect
  import vss_pkg::*;
#(
  parameter int unsigned ACT_W = IMG_W,
  parameter int unsigned ACT_H = IMG_H,
  parameter int unsigned REG_PW = SR_W,   // sub-region pitch, columns
  parameter int unsigned REG_PH = SR_H    // sub-region pitch, rows
) (
  input  logic               clk,
  input  logic               rst_n,
  input  logic               pix_valid,
  input  logic [COORD_W-1:0] col,
  input  logic [COORD_W-1:0] row,
  input  logic [PIX_W-1:0]   live,
  input  logic [PIX_W-1:0]   bg,
  input  logic [PIX_W-1:0]   threshold,
  input  logic [CNT_W-1:0]   col_udtp1,   // person width limit
  input  logic [CNT_W-1:0]   row_udtp1,   // person height limit
  input  logic [CNT_W-1:0]   col_udtp2,   // car width limit
  input  logic [CNT_W-1:0]   row_udtp2,   // car height limit
  output logic               binary,      // thresholded difference of the pixel, one clock later
  output logic               det_valid,
  output logic [REG_W-1:0]   det_region,
  output target_t            det_target
);

  typedef struct packed {
    logic [CNT_W-1:0]   row_count;
    logic [COORD_W-1:0] save_col;
    logic [COORD_W-1:0] save_row;
  } obj_state_t;

  localparam obj_state_t OBJ_CLEAR = '0;

  // per sub-region column state (internal RAM of the device)
  obj_state_t       st_car    [NREG_X];
  obj_state_t       st_person [NREG_X];
  logic [NREG_X-1:0] done;

  // position of the pixel inside the grid
  logic [COORD_W-1:0] cx_nxt, cy_q;
  logic [3:0]         rx_nxt, ry_q;
  logic [COORD_W-1:0] cur_cx, cur_cy;
  logic [3:0]         cur_rx, cur_ry;

  logic [CNT_W-1:0]   col_count;
  logic [CNT_W-1:0]   run;

  // pixel classification
  logic [PIX_W-1:0]   diff;
  logic               pix_bin;

  // working copies of the current sub-region's state
  obj_state_t         car_in, per_in, car_out, per_out;
  logic               done_in, done_out;
  logic               hit;
  obj_class_e         hit_cls;
  obj_state_t         hit_st;

  // events, visible to a testbench
  logic               ev_start, ev_extend, ev_drop, ev_short;

  assign cur_cx = (col == '0) ? '0 : cx_nxt;
  assign cur_rx = (col == '0) ? '0 : rx_nxt;
  assign cur_cy = (row == '0) ? '0 : cy_q;
  assign cur_ry = (row == '0) ? '0 : ry_q;

  assign diff    = (live > bg) ? (live - bg) : (bg - live);
  assign pix_bin = diff > threshold;

  // run length so far in this sub-region
  assign run = (cur_cx == '0) ? '0 : col_count;

  // One class's step of the tracking rule for a run that ended before `col`.
  function automatic obj_state_t track(input obj_state_t s,
                                       input logic [COORD_W-1:0] c,
                                       input logic [COORD_W-1:0] r,
                                       input logic [CNT_W-1:0] cw,
                                       output logic started,
                                       output logic extended,
                                       output logic dropped);
    logic [COORD_W-1:0] start;
    obj_state_t         n;
    start    = c - COORD_W'(cw);
    n        = s;
    started  = 1'b0;
    extended = 1'b0;
    dropped  = 1'b0;
    if (s.row_count == '0) begin
      n.save_col  = start;
      n.save_row  = r;
      n.row_count = CNT_W'(1);
      started     = 1'b1;
    end else if ((s.save_row == r - 1'b1) &&
                 ((s.save_col == start) || (s.save_col == start + 1'b1) ||
                  (s.save_col + 1'b1 == start))) begin
      n.save_col  = start;
      n.save_row  = r;
      n.row_count = s.row_count + 1'b1;
      extended    = 1'b1;
    end else if (s.save_row != r) begin
      n        = OBJ_CLEAR;
      dropped  = 1'b1;
    end
    return n;
  endfunction

  always_comb begin
    logic fresh;
    logic st_s, st_e, st_d;
    fresh    = (cur_cy == '0) && (cur_cx == '0);
    car_in   = fresh ? OBJ_CLEAR : st_car[cur_rx];
    per_in   = fresh ? OBJ_CLEAR : st_person[cur_rx];
    done_in  = fresh ? 1'b0 : done[cur_rx];
    car_out  = car_in;
    per_out  = per_in;
    done_out = done_in;
    hit      = 1'b0;
    hit_cls  = OBJ_PERSON;
    hit_st   = OBJ_CLEAR;
    ev_start = 1'b0;
    ev_extend = 1'b0;
    ev_drop  = 1'b0;
    ev_short = 1'b0;
    st_s = 1'b0; st_e = 1'b0; st_d = 1'b0;
    if (pix_valid && !pix_bin && !done_in && run != '0) begin
      if (run >= col_udtp2) begin
        car_out = track(car_in, col, row, col_udtp2, st_s, st_e, st_d);
        if (car_out.row_count == row_udtp2 && st_e) begin
          hit     = 1'b1;
          hit_cls = OBJ_CAR;
          hit_st  = car_out;
        end
      end else if (run >= col_udtp1) begin
        per_out = track(per_in, col, row, col_udtp1, st_s, st_e, st_d);
        if (per_out.row_count == row_udtp1 && st_e) begin
          hit     = 1'b1;
          hit_cls = OBJ_PERSON;
          hit_st  = per_out;
        end
      end else begin
        ev_short = 1'b1;
      end
      ev_start  = st_s;
      ev_extend = st_e;
      ev_drop   = st_d;
      if (hit) begin
        car_out  = OBJ_CLEAR;
        per_out  = OBJ_CLEAR;
        done_out = 1'b1;
      end
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      cx_nxt     <= '0;
      rx_nxt     <= '0;
      cy_q       <= '0;
      ry_q       <= '0;
      col_count  <= '0;
      done       <= '0;
      binary     <= 1'b0;
      det_valid  <= 1'b0;
      det_region <= '0;
      det_target <= '0;
      for (int i = 0; i < NREG_X; i++) begin
        st_car[i]    <= OBJ_CLEAR;
        st_person[i] <= OBJ_CLEAR;
      end
    end else begin
      det_valid <= 1'b0;
      if (pix_valid) begin
        binary <= pix_bin;
        // grid position of the next pixel
        if (cur_cx == COORD_W'(REG_PW - 1) && cur_rx != 4'(NREG_X - 1)) begin
          cx_nxt <= '0;
          rx_nxt <= cur_rx + 1'b1;
        end else begin
          cx_nxt <= cur_cx + 1'b1;
          rx_nxt <= cur_rx;
        end
        if (col == COORD_W'(ACT_W - 1)) begin
          if (cur_cy == COORD_W'(REG_PH - 1) && cur_ry != 4'(NREG_Y - 1)) begin
            cy_q <= '0;
            ry_q <= cur_ry + 1'b1;
          end else begin
            cy_q <= cur_cy + 1'b1;
            ry_q <= cur_ry;
          end
        end
        // run of target pixels
        if (pix_bin)
          col_count <= (run == '1) ? run : run + 1'b1;
        else
          col_count <= '0;
        st_car[cur_rx]    <= car_out;
        st_person[cur_rx] <= per_out;
        done[cur_rx]      <= done_out;
        if (hit) begin
          det_valid      <= 1'b1;
          det_region     <= region_num(cur_rx, cur_ry);
          det_target.cls <= hit_cls;
          det_target.col <= hit_st.save_col;
          det_target.row <= hit_st.save_row;
        end
      end
    end
  end

endmodule
