// tb_target_detect: streams one 512 x 512 frame through the detector with a
// flat background of 100, threshold 50 and the default limits (person 4 x 6,
// car 12 x 8), and a scene of hand-placed objects whose outcome was worked
// out by hand from the detection rule:
//   A  person 5 wide, rows 60-67, cols 120-124, sub-region 12: reported at
//      row 65 (its 6th row), start column 125 - 4 = 121;
//   A2 second person lower in sub-region 12 (rows 80-89): not reported,
//      one target per sub-region;
//   B  car 14 wide, darker than the background (|Live - Bg| = 80), rows
//      210-219, cols 260-273, sub-region 45: reported at row 217 (8th row),
//      start column 274 - 12 = 262;
//   C  person drifting one column right per row, rows 10-17 from col 360,
//      sub-region 7: reported at row 15, start column 370 - 4 = 366;
//   D  person drifting three columns per row, sub-region 30: never reported;
//   E  runs 3 wide, sub-region 58: too narrow, never reported;
//   F  runs whose difference equals the threshold exactly, sub-region 99:
//      not target pixels, never reported.
// A second frame must repeat the reports; two more frames change the
// user limits (person width 6, then car height 11) and check the effect.
// Also counts the thresholded pixels against the painted scene.
module tb_target_detect;
  import vss_pkg::*;
  logic clk = 0, rst_n = 0;
  logic pix_valid;
  logic [COORD_W-1:0] col, row;
  logic [PIX_W-1:0] live, bg, threshold;
  logic [CNT_W-1:0] col_udtp1, row_udtp1, col_udtp2, row_udtp2;
  logic binary, det_valid;
  logic [REG_W-1:0] det_region;
  target_t det_target;
  int checks = 0, failures = 0;

  target_detect dut (.*);

  always #5 clk = ~clk;

  initial begin
    #60000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic int scene(int c, int r);
    // A and A2
    if (r >= 60 && r <= 67 && c >= 120 && c <= 124) return 200;
    if (r >= 80 && r <= 89 && c >= 130 && c <= 135) return 200;
    // B
    if (r >= 210 && r <= 219 && c >= 260 && c <= 273) return 20;
    // C
    if (r >= 10 && r <= 17 && c >= 360 + (r - 10) && c <= 364 + (r - 10)) return 220;
    // D
    if (r >= 160 && r <= 170 && c >= 10 + 3 * (r - 160) && c <= 14 + 3 * (r - 160)) return 220;
    // E
    if (r >= 300 && r <= 310 && c >= 450 && c <= 452) return 220;
    // F
    if (r >= 470 && r <= 480 && c >= 470 && c <= 480) return 150;
    return 100;
  endfunction

  typedef struct { int region; obj_class_e cls; int c; int r; } det_t;
  det_t got [$];
  int nbin = 0, exp_bin = 0;

  always @(posedge clk) begin
    if (det_valid) got.push_back('{int'(det_region), det_target.cls, int'(det_target.col), int'(det_target.row)});
  end

  task automatic run_frame();
    for (int r = 0; r < 512; r++) begin
      for (int c = 0; c < 512; c++) begin
        @(negedge clk);
        pix_valid = 1; col = 9'(c); row = 9'(r); live = 8'(scene(c, r));
        if (scene(c, r) > 150 || scene(c, r) < 50) exp_bin++;
        @(posedge clk); #1;
        if (binary) nbin++;
      end
      @(negedge clk); pix_valid = 0;
      repeat (20) @(negedge clk);
    end
    repeat (5) @(negedge clk);
  endtask

  task automatic check_reports(input det_t want [$]);
    checks++;
    if (got.size() != want.size()) begin
      failures++; $display("%0d targets reported, want %0d", got.size(), want.size());
    end
    for (int i = 0; i < got.size() && i < want.size(); i++) begin
      checks++;
      if (got[i] != want[i]) begin
        failures++;
        $display("target %0d: region %0d cls %0d (%0d,%0d), want region %0d cls %0d (%0d,%0d)",
                 i, got[i].region, got[i].cls, got[i].c, got[i].r,
                 want[i].region, want[i].cls, want[i].c, want[i].r);
      end
    end
    checks++;
    if (nbin != exp_bin) begin failures++; $display("%0d target pixels, want %0d", nbin, exp_bin); end
    got.delete();
    nbin = 0;
    exp_bin = 0;
  endtask

  initial begin
    pix_valid = 0; col = 0; row = 0; live = 100; bg = 100; threshold = 50;
    col_udtp1 = COL_UDTP1_DEF; row_udtp1 = ROW_UDTP1_DEF;
    col_udtp2 = COL_UDTP2_DEF; row_udtp2 = ROW_UDTP2_DEF;
    repeat (3) @(posedge clk);
    rst_n = 1;
    // frames 1 and 2: default limits; the second frame must report the
    // same targets again (the one-per-sub-region rule is per frame)
    for (int f = 0; f < 2; f++) begin
      run_frame();
      check_reports('{'{7, OBJ_PERSON, 366, 15}, '{12, OBJ_PERSON, 121, 65}, '{45, OBJ_CAR, 262, 217}});
    end
    // frame 3: person width limit raised to 6. A (5 wide) and C (5 wide)
    // are now too narrow, so A2 (6 wide, rows 80-89) is the target of
    // sub-region 12: reported at its sixth row 85, start 136 - 6 = 130
    col_udtp1 = 4'd6;
    run_frame();
    check_reports('{'{12, OBJ_PERSON, 130, 85}, '{45, OBJ_CAR, 262, 217}});
    // frame 4: car height limit 11 is taller than B (10 rows): only people
    col_udtp1 = COL_UDTP1_DEF; row_udtp2 = 4'd11;
    run_frame();
    check_reports('{'{7, OBJ_PERSON, 366, 15}, '{12, OBJ_PERSON, 121, 65}});
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
