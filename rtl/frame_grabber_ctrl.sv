// frame_grabber_ctrl: video timing for the frame grabber.
//
// The sync separator delivers a line sync pulse every 64 us (15.625 kHz) and
// a frame sync pulse every 40 ms. This module counts clocks from the rising
// edge of the line sync and lines from the rising edge of the frame sync,
// and marks a window of ACT_W x ACT_H pixels (512 x 512 by default) that
// starts H_START clocks after line sync and V_START lines after frame sync.
// Inside the window it enables the ADC, reports the pixel's column and row
// and lets the DAC show video; outside it blanks the DAC.
//
// Interface and timing: all outputs are registered. In a cycle with
// pix_valid high, col/row name the pixel that the ADC presents on its data
// bus in that same cycle. frame_start pulses for one cycle after the frame
// sync edge; frame_end pulses one cycle after the last pixel of the window.
// The document gives the 10 MHz clock, the line rate and the 512 x 512
// window; the window offsets, the sync polarity and the treatment of the
// two interlaced fields as one 625-line frame are this design's choices.
module frame_grabber_ctrl
  import vss_pkg::*;
#(
  parameter int unsigned ACT_W   = IMG_W,
  parameter int unsigned ACT_H   = IMG_H,
  parameter int unsigned H_START = 112,
  parameter int unsigned V_START = 56
) (
  input  logic               clk,
  input  logic               rst_n,
  input  logic               hsync,       // line sync from the sync separator, active high
  input  logic               vsync,       // frame sync from the sync separator, active high
  output logic               pix_valid,   // pixel of the active window this cycle
  output logic [COORD_W-1:0] col,
  output logic [COORD_W-1:0] row,
  output logic               frame_start,
  output logic               frame_end,
  output logic               adc_en,      // ADC enable
  output logic               dac_blank    // blank the DAC output
);

  localparam int unsigned HC_W = 11;  // up to 2047 clocks per line
  localparam int unsigned VC_W = 10;  // up to 1023 lines per frame

  logic            hsync_q, vsync_q;
  logic            h_edge, v_edge;
  logic [HC_W-1:0] hcnt;
  logic [VC_W-1:0] vcnt;
  logic            h_act, v_act;

  assign h_edge = hsync & ~hsync_q;
  assign v_edge = vsync & ~vsync_q;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      hsync_q <= 1'b0;
      vsync_q <= 1'b0;
      hcnt    <= '1;
      vcnt    <= '1;
    end else begin
      hsync_q <= hsync;
      vsync_q <= vsync;
      if (h_edge)
        hcnt <= '0;
      else if (hcnt != '1)
        hcnt <= hcnt + 1'b1;
      if (v_edge)
        vcnt <= '0;
      else if (h_edge && vcnt != '1)
        vcnt <= vcnt + 1'b1;
    end
  end

  assign h_act = (hcnt >= HC_W'(H_START)) && (hcnt < HC_W'(H_START + ACT_W));
  assign v_act = (vcnt >= VC_W'(V_START)) && (vcnt < VC_W'(V_START + ACT_H));

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      pix_valid   <= 1'b0;
      col         <= '0;
      row         <= '0;
      frame_start <= 1'b0;
      frame_end   <= 1'b0;
    end else begin
      pix_valid   <= h_act && v_act;
      col         <= COORD_W'(hcnt - HC_W'(H_START));
      row         <= COORD_W'(vcnt - VC_W'(V_START));
      frame_start <= v_edge;
      frame_end   <= pix_valid && (col == COORD_W'(ACT_W - 1)) && (row == COORD_W'(ACT_H - 1));
    end
  end

  assign adc_en    = pix_valid;
  assign dac_blank = ~pix_valid;

endmodule
