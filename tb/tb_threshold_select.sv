// tb_threshold_select: streams whole 512 x 512 frames of random pixels and
// checks that the threshold of the next frame is f times the mean of the
// sampled pixels (one of every 8 x 8 block), for f = 1, 2, 1/2 and a case
// that saturates at 255; also checks the initial threshold and that the
// value appears one clock after frame_end and holds during the next frame.
module tb_threshold_select;
  import vss_pkg::*;
  logic clk = 0, rst_n = 0;
  logic frame_start, frame_end, pix_valid;
  logic [COORD_W-1:0] col, row;
  logic [PIX_W-1:0] live, threshold, mean;
  logic signed [2:0] f_exp;
  int checks = 0, failures = 0;

  threshold_select dut (.*);

  always #5 clk = ~clk;

  initial begin
    #60000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic run_frame(input int base, input int spread, input logic signed [2:0] f, output int expect_thr);
    longint sum = 0;
    int m;
    int prev = int'(threshold);
    @(negedge clk); frame_start = 1; f_exp = f;
    @(negedge clk); frame_start = 0;
    for (int r = 0; r < 512; r++) begin
      for (int c = 0; c < 512; c++) begin
        pix_valid = 1; col = 9'(c); row = 9'(r);
        live = 8'(base + $urandom_range(spread));
        if (c % 8 == 0 && r % 8 == 0) sum += longint'(live);
        @(negedge clk);
        if (threshold != 8'(prev)) begin
          failures++; checks++;
          $display("threshold changed during a frame");
          prev = int'(threshold);
        end
      end
      pix_valid = 0;
      repeat (3) @(negedge clk);
    end
    m = int'(sum / 4096);
    if (f >= 0) expect_thr = m << f; else expect_thr = m >> (-f);
    if (expect_thr > 255) expect_thr = 255;
    frame_end = 1;
    @(negedge clk); frame_end = 0;
    checks++;
    if (int'(threshold) != expect_thr || int'(mean) != m) begin
      failures++;
      $display("threshold %0d mean %0d, expected %0d and %0d", threshold, mean, expect_thr, m);
    end
  endtask

  initial begin
    int e;
    frame_start = 0; frame_end = 0; pix_valid = 0; col = 0; row = 0; live = 0; f_exp = 0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    @(negedge clk);
    checks++;
    if (threshold != 8'd128) begin failures++; $display("initial threshold %0d", threshold); end
    run_frame(60, 80, 3'sd0, e);
    run_frame(20, 40, 3'sd1, e);
    run_frame(100, 155, -3'sd1, e);
    run_frame(150, 100, 3'sd3, e);
    run_frame(255, 0, 3'sd0, e);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
