// vss_top: the single-FPGA controller of the two-camera surveillance system.
//
// A fixed master camera is digitised at 512 x 512 x 8 bits, 25 frames per
// second, and every pixel is processed as it arrives:
//   - frame_grabber_ctrl follows the sync pulses, enables the ADC and
//     blanks the DAC outside the 512 x 512 window;
//   - memory_ctrl reads the stored background pixel from the two external
//     SRAM chips and, one clock later, writes back the value computed by
//     bg_update (Bg += (Live - Bg) / 8);
//   - threshold_select averages the live frame and sets the threshold of
//     the next frame to f times the mean;
//   - target_detect thresholds |Live - Bg| and looks for person- and
//     car-sized groups of target pixels in each of 100 sub-regions;
//   - target_list stores the targets of a frame in internal RAM;
//   - robot_arm_ctrl points the slave camera at each sub-region holding a
//     target, top-left first.
// The live video goes on to the DAC for the wide-angle monitor.
//
// Interface and timing: one clock (10 MHz from the external PLL) drives
// everything; the ADC byte adc_data must belong to the pixel of the cycle
// in which adc_en is high. dac_data/dac_blank lag the ADC by one clock.
// SRAM lines are active low; the data bus is split into in, out and
// output-enable. The parameters let a testbench shrink the window; their
// defaults are the full-size system. The block structure follows the
// document's schematic; the pipeline and handshakes are this design's own.
// Two internal results are computed but not used here: the thresholded
// pixel of target_detect (for a display of the binary image) and the
// coordinates stored in the target list, which a finer pointing mechanism
// could use; the arm is only told the sub-region.
module vss_top
  import vss_pkg::*;
#(
  parameter int unsigned ACT_W        = IMG_W,
  parameter int unsigned ACT_H        = IMG_H,
  parameter int unsigned H_START      = 112,
  parameter int unsigned V_START      = 56,
  parameter int unsigned REG_PW       = SR_W,
  parameter int unsigned REG_PH       = SR_H,
  parameter int unsigned SAMPLE_SHIFT = 3,
  parameter int unsigned MEAN_SHIFT   = 12
) (
  input  logic                  clk,
  input  logic                  rst_n,
  // digitiser: sync separator and flash ADC
  input  logic                  hsync,
  input  logic                  vsync,
  input  logic [PIX_W-1:0]      adc_data,
  output logic                  adc_en,
  // DAC to the wide-angle monitor
  output logic [PIX_W-1:0]      dac_data,
  output logic                  dac_blank,
  // background SRAM, two 128K x 8 chips
  output logic [1:0][16:0]      sram_addr,
  output logic [1:0]            sram_cs_n,
  output logic [1:0]            sram_oe_n,
  output logic [1:0]            sram_we_n,
  output logic [1:0][PIX_W-1:0] sram_dq_out,
  output logic [1:0]            sram_dq_oe,
  input  logic [1:0][PIX_W-1:0] sram_dq_in,
  // robot arm carrying the slave camera
  output logic                  arm_req,
  output logic [3:0]            arm_x,
  output logic [3:0]            arm_y,
  input  logic                  arm_done,
  output logic [REG_W-1:0]      cam_region,    // sub-region the slave camera was sent to
  output logic                  cam_valid,
  // user settings
  input  bg_mode_e              bg_mode,
  input  logic signed [2:0]     f_exp,
  input  logic [CNT_W-1:0]      col_udtp1,
  input  logic [CNT_W-1:0]      row_udtp1,
  input  logic [CNT_W-1:0]      col_udtp2,
  input  logic [CNT_W-1:0]      row_udtp2,
  input  logic                  track_en,
  // status
  output logic [PIX_W-1:0]      threshold,
  output logic [PIX_W-1:0]      mean,          // mean grey level of the last frame
  output logic                  target_found,  // pulse per detected target
  output logic [REG_W:0]        target_count   // targets in the last frame
);

  logic               pix_valid, frame_start, frame_end, fg_blank;
  logic [COORD_W-1:0] col, row;
  logic [PIX_W-1:0]   bg;
  logic               wr_valid;
  logic [COORD_W-1:0] wr_col, wr_row;
  logic [PIX_W-1:0]   wr_data;
  logic               binary;
  logic               det_valid;
  logic [REG_W-1:0]   det_region;
  target_t            det_target;
  logic               rd_en, rd_hit;
  logic [REG_W-1:0]   rd_region;
  target_t            rd_data;

  frame_grabber_ctrl #(
    .ACT_W(ACT_W), .ACT_H(ACT_H), .H_START(H_START), .V_START(V_START)
  ) u_fg (
    .clk, .rst_n, .hsync, .vsync,
    .pix_valid, .col, .row, .frame_start, .frame_end,
    .adc_en, .dac_blank(fg_blank)
  );

  memory_ctrl u_mem (
    .rd_valid(pix_valid), .rd_col(col), .rd_row(row), .rd_data(bg),
    .wr_valid, .wr_col, .wr_row, .wr_data,
    .sram_addr, .sram_cs_n, .sram_oe_n, .sram_we_n,
    .sram_dq_out, .sram_dq_oe, .sram_dq_in
  );

  bg_update u_bg (
    .clk, .rst_n, .mode(bg_mode),
    .in_valid(pix_valid), .in_col(col), .in_row(row), .live(adc_data), .bg,
    .wr_valid, .wr_col, .wr_row, .wr_data
  );

  threshold_select #(
    .SAMPLE_SHIFT(SAMPLE_SHIFT), .MEAN_SHIFT(MEAN_SHIFT)
  ) u_thr (
    .clk, .rst_n, .frame_start, .frame_end,
    .pix_valid, .col, .row, .live(adc_data), .f_exp,
    .threshold, .mean
  );

  target_detect #(
    .ACT_W(ACT_W), .ACT_H(ACT_H), .REG_PW(REG_PW), .REG_PH(REG_PH)
  ) u_det (
    .clk, .rst_n, .pix_valid, .col, .row, .live(adc_data), .bg, .threshold,
    .col_udtp1, .row_udtp1, .col_udtp2, .row_udtp2,
    .binary, .det_valid, .det_region, .det_target
  );

  target_list u_list (
    .clk, .rst_n, .frame_start,
    .wr_en(det_valid), .wr_region(det_region), .wr_data(det_target),
    .rd_en, .rd_region, .rd_hit, .rd_data, .count(target_count)
  );

  robot_arm_ctrl u_arm (
    .clk, .rst_n, .enable(track_en),
    .rd_en, .rd_region, .rd_hit,
    .arm_req, .arm_x, .arm_y, .arm_done, .cam_region, .cam_valid
  );

  // live video to the monitor
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      dac_data  <= '0;
      dac_blank <= 1'b1;
    end else begin
      dac_data  <= fg_blank ? '0 : adc_data;
      dac_blank <= fg_blank;
    end
  end

  assign target_found = det_valid;

endmodule
