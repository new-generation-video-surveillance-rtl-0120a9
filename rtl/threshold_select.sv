// threshold_select: adaptive threshold from the mean grey level of a frame.
//
// Threshold = f * (sum of live pixels) / (number of pixels). The sum is
// kept in a 20-bit accumulator. To keep a 512 x 512 x 8-bit frame within 20
// bits the accumulator takes one pixel of every 2^SAMPLE_SHIFT x
// 2^SAMPLE_SHIFT block (every 8th pixel of every 8th row: 4096 samples),
// so the sum is at most 4096 * 255 < 2^20 and the division by the number
// of samples is a right shift by MEAN_SHIFT = 12. The user factor f is a
// power of two, f = 2^f_exp with f_exp from -4 to +3, applied by shifting;
// results above 255 saturate. f = 1 (f_exp = 0) gives the mean itself.
//
// Interface and timing: frame_start clears the accumulator; the pixel
// stream (pix_valid, col, row, live) is summed during the frame; one clock
// after frame_end the new threshold appears on `threshold` and is held for
// the whole of the next frame. Until the first frame has ended the
// threshold is THR_INIT. The formula, the 20-bit accumulator and division
// by shifting follow the document; the sub-sampling, the power-of-two f and
// THR_INIT are this design's choices.
module threshold_select
  import vss_pkg::*;
#(
  parameter int unsigned SAMPLE_SHIFT = 3,
  parameter int unsigned ACC_W        = 20,
  parameter int unsigned MEAN_SHIFT   = 12,
  parameter logic [PIX_W-1:0] THR_INIT = 8'd128
) (
  input  logic               clk,
  input  logic               rst_n,
  input  logic               frame_start,
  input  logic               frame_end,
  input  logic               pix_valid,
  input  logic [COORD_W-1:0] col,
  input  logic [COORD_W-1:0] row,
  input  logic [PIX_W-1:0]   live,
  input  logic signed [2:0]  f_exp,
  output logic [PIX_W-1:0]   threshold,
  output logic [PIX_W-1:0]   mean          // mean grey level of the last frame
);

  logic [ACC_W-1:0] acc;
  logic             sample;
  logic [PIX_W-1:0] acc_mean;
  logic [PIX_W+3:0] scaled;
  logic [PIX_W-1:0] thr_next;

  if (SAMPLE_SHIFT > 0) begin : g_sub
    assign sample = pix_valid && (col[SAMPLE_SHIFT-1:0] == '0) && (row[SAMPLE_SHIFT-1:0] == '0);
  end else begin : g_all
    assign sample = pix_valid;
  end

  assign acc_mean = PIX_W'(acc >> MEAN_SHIFT);

  always_comb begin
    if (f_exp >= 0) begin
      scaled   = (PIX_W+4)'(acc_mean) << f_exp;
      thr_next = (scaled > (PIX_W+4)'(8'hFF)) ? 8'hFF : scaled[PIX_W-1:0];
    end else begin
      scaled   = (PIX_W+4)'(acc_mean) >> (-f_exp);
      thr_next = scaled[PIX_W-1:0];
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      acc       <= '0;
      threshold <= THR_INIT;
      mean      <= THR_INIT;
    end else begin
      if (frame_start)
        acc <= '0;
      else if (sample)
        acc <= acc + ACC_W'(live);
      if (frame_end) begin
        threshold <= thr_next;
        mean      <= acc_mean;
      end
    end
  end

endmodule
