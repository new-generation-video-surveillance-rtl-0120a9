// tb_frame_grabber_ctrl: drives CCIR-like sync (640 clocks per line, 625
// lines per frame) and checks that exactly 512 x 512 pixels are marked per
// frame, in raster order, starting H_START clocks after line sync and
// V_START lines after frame sync, that each line of pixels is contiguous,
// that lines of the window are 640 clocks apart, and that frame_end,
// frame_start, adc_en and dac_blank behave.
module tb_frame_grabber_ctrl;
  import vss_pkg::*;
  localparam int HS = 112, VS = 56;
  logic clk = 0, rst_n = 0, hsync = 0, vsync = 0;
  logic pix_valid, frame_start, frame_end, adc_en, dac_blank;
  logic [COORD_W-1:0] col, row;
  int checks = 0, failures = 0;

  frame_grabber_ctrl dut (.*);

  always #50 clk = ~clk;   // 10 MHz

  initial begin
    #(100 * 640 * 625 * 4);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // sync generator
  int hc = 0, lc = 0;
  longint cyc = 0;
  longint hedge_cyc = 0;
  always @(posedge clk) begin
    cyc <= cyc + 1;
    if (rst_n) begin
      hc <= (hc == 639) ? 0 : hc + 1;
      if (hc == 639) lc <= (lc == 624) ? 0 : lc + 1;
      hsync <= (hc < 47);           // 4.7 us pulse
      vsync <= (lc == 0 && hc < 320);
      if (hc == 0) hedge_cyc <= cyc;
    end
  end

  // checker
  int npix = 0, nframes = 0, exp_c = 0, exp_r = 0, nend = 0, nstart = 0;
  longint last_row_cyc = -1;
  always @(posedge clk) begin
    if (rst_n) begin
      if (adc_en !== pix_valid || dac_blank !== !pix_valid) begin
        failures++; $display("adc_en / dac_blank wrong");
      end
      if (frame_start) nstart++;
      if (pix_valid) begin
        checks++;
        if (int'(col) != exp_c || int'(row) != exp_r) begin
          failures++;
          if (failures < 10) $display("pixel (%0d,%0d) expected (%0d,%0d)", col, row, exp_c, exp_r);
        end
        if (col == 0) begin
          if (last_row_cyc >= 0 && row != 0 && cyc - last_row_cyc != 640) begin
            failures++; $display("line period %0d", cyc - last_row_cyc);
          end
          last_row_cyc = cyc;
          if (lc != VS + int'(row) + 0 && !(lc == VS + int'(row) + 1 && hc < 2)) begin
            failures++; $display("row %0d on line %0d", row, lc);
          end
        end
        npix++;
        exp_c = (exp_c == 511) ? 0 : exp_c + 1;
        if (col == 511) exp_r = (exp_r == 511) ? 0 : exp_r + 1;
      end
      if (frame_end) begin
        nend++;
        checks++;
        if (npix != 512 * 512) begin failures++; $display("frame had %0d pixels", npix); end
        npix = 0;
      end
    end
  end

  // the first pixel of each line comes H_START + 3 clocks after hc wraps:
  // one for the sync register here, one for the edge detector, one for the
  // output register
  always @(posedge clk)
    if (rst_n && pix_valid && col == 0) begin
      checks++;
      if (cyc - hedge_cyc != longint'(HS) + 3) begin
        failures++;
        if (failures < 10) $display("first pixel %0d clocks after sync", cyc - hedge_cyc);
      end
    end

  initial begin
    repeat (5) @(posedge clk);
    rst_n = 1;
    wait (nend == 3);
    repeat (10) @(posedge clk);
    checks++;
    if (nstart < 3) begin failures++; $display("frame_start seen %0d times", nstart); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
