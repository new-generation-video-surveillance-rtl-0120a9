// bg_update: temporal low-pass filter that keeps the background image.
//
// For every pixel the stored background Bg is moved towards the live value
// by a fraction G of their difference, Bg' = Bg + G * (Live - Bg), with
// G = 2^-G_SHIFT (1/8 by default) so that the multiplication is an
// arithmetic right shift of the 9-bit signed difference. The shift rounds
// towards minus infinity; the result always lies between Bg and Live, so it
// never overflows 8 bits. Besides this filter the stored background can be
// frozen (BG_HOLD) or replaced by the live frame (BG_CAPTURE).
//
// Interface and timing: one pixel per clock, registered, latency one clock.
// The output is the write request for the background memory: wr_valid,
// the pixel's column and row, and the new background value. The filter,
// the gain of 1/8 and its shift implementation follow the document; the
// hold and capture modes are this design's way of offering its "stored
// single live image" alternative.
module bg_update
  import vss_pkg::*;
#(
  parameter int unsigned G_SHIFT = 3
) (
  input  logic               clk,
  input  logic               rst_n,
  input  bg_mode_e           mode,
  input  logic               in_valid,
  input  logic [COORD_W-1:0] in_col,
  input  logic [COORD_W-1:0] in_row,
  input  logic [PIX_W-1:0]   live,
  input  logic [PIX_W-1:0]   bg,
  output logic               wr_valid,
  output logic [COORD_W-1:0] wr_col,
  output logic [COORD_W-1:0] wr_row,
  output logic [PIX_W-1:0]   wr_data
);

  logic signed [PIX_W:0]   diff;
  logic signed [PIX_W:0]   step;
  logic signed [PIX_W+1:0] sum;
  logic [PIX_W-1:0]        new_bg;

  always_comb begin
    diff = $signed({1'b0, live}) - $signed({1'b0, bg});
    step = diff >>> G_SHIFT;
    sum  = $signed({2'b00, bg}) + (PIX_W+2)'(step);
    unique case (mode)
      BG_HOLD:    new_bg = bg;
      BG_CAPTURE: new_bg = live;
      default:    new_bg = sum[PIX_W-1:0];
    endcase
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      wr_valid <= 1'b0;
      wr_col   <= '0;
      wr_row   <= '0;
      wr_data  <= '0;
    end else begin
      wr_valid <= in_valid;
      wr_col   <= in_col;
      wr_row   <= in_row;
      wr_data  <= new_bg;
    end
  end

endmodule
