// tb_bg_update: checks the background filter against Bg + floor((Live-Bg)/8)
// for random pixels in all three modes, and its one-clock latency.
module tb_bg_update;
  import vss_pkg::*;
  logic clk = 0, rst_n = 0;
  bg_mode_e mode;
  logic in_valid;
  logic [COORD_W-1:0] in_col, in_row, wr_col, wr_row;
  logic [PIX_W-1:0] live, bg, wr_data;
  logic wr_valid;
  int checks = 0, failures = 0;

  bg_update dut (.*);

  always #5 clk = ~clk;

  initial begin
    #200000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic int expect_bg(int l, int b, bg_mode_e m);
    int d;
    if (m == BG_HOLD) return b;
    if (m == BG_CAPTURE) return l;
    d = l - b;
    // floor division by 8
    if (d >= 0) return b + d / 8;
    return b - ((-d + 7) / 8);
  endfunction

  initial begin
    int e;
    mode = BG_FILTER; in_valid = 0; in_col = 0; in_row = 0; live = 0; bg = 0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int i = 0; i < 3000; i++) begin
      @(negedge clk);
      mode     = (i % 10 == 7) ? BG_HOLD : (i % 10 == 9) ? BG_CAPTURE : BG_FILTER;
      in_valid = (i % 5 != 3);
      in_col   = COORD_W'(i);
      in_row   = COORD_W'(i / 512);
      live     = (i < 20) ? 8'(i * 13) : 8'($urandom);
      bg       = (i < 20) ? 8'(255 - i * 11) : 8'($urandom);
      e = expect_bg(int'(live), int'(bg), mode);
      @(posedge clk); #1;
      checks++;
      if (wr_valid !== in_valid || wr_col !== in_col || wr_row !== in_row || int'(wr_data) != e) begin
        failures++;
        if (failures < 10)
          $display("mismatch live=%0d bg=%0d mode=%0d got %0d want %0d", live, bg, mode, wr_data, e);
      end
    end
    // a step change settles within about 20 frames at G = 1/8
    begin
      automatic int b = 0, n = 0;
      mode = BG_FILTER;
      while (b < 255 - 255 / 8) begin
        @(negedge clk); live = 255; bg = 8'(b); in_valid = 1;
        @(posedge clk); #1;
        b = int'(wr_data); n++;
      end
      checks++;
      if (n < 14 || n > 22) begin
        failures++;
        $display("step response took %0d frames", n);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
