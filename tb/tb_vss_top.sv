// tb_vss_top: end-to-end test of the whole FPGA at full size (512 x 512
// window, 640 clocks per line, 625 lines per frame, 10 x 10 sub-regions),
// with two SRAM chip models, a sync and ADC model and a robot arm model.
//
// The scene is a fixed textured background (grey levels 40-69) with:
//   - a person, 6 x 12 pixels of level 220, walking 25 columns per frame
//     to the right so that it crosses sub-region borders;
//   - a parked car, 16 x 10 pixels of level 230;
//   - clutter: a 2-pixel-wide streak (too narrow for any class) and a
//     staircase that shifts 3 columns per row (too skewed to track).
// Frame 0 is grabbed in capture mode, which stores the empty scene as the
// background. Frames 1-5 run the background filter, frame 6 holds the
// background. The testbench checks, from its own model of the scene:
//   - the stored background after capture, the filtered value under the
//     car after each frame, and that hold mode freezes it;
//   - the threshold of every frame, the mean of the previous frame's
//     sampled pixels;
//   - every reported target: class, sub-region and coordinates;
//   - the target count of each completed frame's list;
//   - that every arm move goes to a sub-region of the previous frame's list,
//     in row-major order from the previous move, and that every sub-region
//     of that list is viewed during the frame;
//   - that the DAC shows the live video.
// It counts how often each mechanism happened and fails on any that never
// did: capture, filter and hold modes, person and car detection, object
// start, extension and drop, short-run rejection, one target per
// sub-region, list bank swaps, threshold updates, writes to both SRAM chips
// and arm moves.
module tb_vss_top;
  import vss_pkg::*;
  localparam int HS = 112, VS = 56;
  localparam int NFRAMES = 7;

  logic clk = 0, rst_n = 0, hsync = 0, vsync = 0;
  logic [PIX_W-1:0] adc_data;
  logic adc_en, dac_blank;
  logic [PIX_W-1:0] dac_data;
  logic [1:0][16:0] sram_addr;
  logic [1:0] sram_cs_n, sram_oe_n, sram_we_n, sram_dq_oe;
  logic [1:0][PIX_W-1:0] sram_dq_out, sram_dq_in;
  logic arm_req, arm_done;
  logic [3:0] arm_x, arm_y;
  bg_mode_e bg_mode;
  logic signed [2:0] f_exp;
  logic [CNT_W-1:0] col_udtp1, row_udtp1, col_udtp2, row_udtp2;
  logic track_en;
  logic [PIX_W-1:0] threshold, mean;
  logic [REG_W-1:0] cam_region;
  logic cam_valid;
  logic target_found;
  logic [REG_W:0] target_count;
  int checks = 0, failures = 0;

  vss_top dut (.*);

  for (genvar c = 0; c < 2; c++) begin : g_chip
    sram_model u_sram (.clk, .addr(sram_addr[c]), .cs_n(sram_cs_n[c]), .oe_n(sram_oe_n[c]),
                       .we_n(sram_we_n[c]), .dq_in(sram_dq_out[c]), .dq_out(sram_dq_in[c]));
  end

  always #50 clk = ~clk;   // 10 MHz

  initial begin
    #(100 * 640 * 625 * (NFRAMES + 3));
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // ---------------------------------------------------------------- scene
  function automatic int person_x(int f);
    return 140 + 25 * (f - 1);
  endfunction

  function automatic int scene(int c, int r, int f);
    int px;
    if (f >= 1) begin
      px = person_x(f);
      if (r >= 60 && r <= 71 && c >= px && c <= px + 5) return 220;
      if (r >= 320 && r <= 329 && c >= 320 && c <= 335) return 230;
      if (r >= 450 && r <= 470 && c >= 460 && c <= 461) return 220;
      if (r >= 400 && r <= 410 && c >= 400 + 3 * (r - 400) && c <= 404 + 3 * (r - 400)) return 220;
    end
    return 40 + ((c + r) >> 4) % 30;
  endfunction

  function automatic int region_of(int c, int r);
    int x = c / 51, y = r / 51;
    if (x > 9) x = 9;
    if (y > 9) y = 9;
    return y * 10 + x;
  endfunction

  // ------------------------------------------------------- sync and ADC
  int hc = 0, lc = 0, frame = -1;
  always @(posedge clk) begin
    if (rst_n) begin
      hc <= (hc == 639) ? 0 : hc + 1;
      if (hc == 639) begin
        lc <= (lc == 624) ? 0 : lc + 1;
        if (lc == 624) frame <= frame + 1;
      end
      hsync <= (hc < 47);
      vsync <= (lc == 0 && hc < 320);
    end
  end

  // the ADC model numbers the samples it is asked for; it does not use the
  // FPGA's own pixel coordinates
  int acol = 0, arow = 0, aframe = -1;
  always @(posedge clk) begin
    if (vsync && !$past(vsync)) begin
      acol <= 0; arow <= 0; aframe <= aframe + 1;
    end else if (adc_en) begin
      acol <= (acol == 511) ? 0 : acol + 1;
      if (acol == 511) arow <= arow + 1;
    end
  end
  assign adc_data = adc_en ? 8'(scene(acol, arow, aframe)) : 8'h00;

  // --------------------------------------------------------- arm model
  int req_age = 0;
  always @(posedge clk) begin
    if (arm_req) req_age <= req_age + 1; else req_age <= 0;
    arm_done <= arm_req && (req_age == 49);
  end

  // ------------------------------------------------------- bookkeeping
  int n_capture = 0, n_filter = 0, n_hold = 0, n_person = 0, n_car = 0;
  int n_start = 0, n_extend = 0, n_drop = 0, n_short = 0, n_swaps = 0;
  int n_thr = 0, n_wr0 = 0, n_wr1 = 0, n_moves = 0, n_second = 0;
  bit prev_list [NREG];
  bit cur_list  [NREG];
  int cur_det = 0;
  longint sample_sum = 0;
  int exp_thr = 128;
  int car_bg = 0;
  int last_det = 0;
  bit visited [NREG];
  always @(posedge clk) if (rst_n && arm_req) visited[int'(arm_y) * 10 + int'(arm_x)] = 1;

  // the list of the frame that just ended is readable one clock after frame_start
  always @(posedge clk) if (rst_n && $past(dut.frame_start) && aframe >= 1) begin
    checks++;
    if (int'(target_count) != last_det) begin
      failures++; $display("list holds %0d targets, want %0d", target_count, last_det);
    end
  end

  always @(posedge clk) if (rst_n) begin
    if (dut.u_det.ev_start)  n_start++;
    if (dut.u_det.ev_extend) n_extend++;
    if (dut.u_det.ev_drop)   n_drop++;
    if (dut.u_det.ev_short)  n_short++;
    if (!sram_we_n[0]) n_wr0++;
    if (!sram_we_n[1]) n_wr1++;
    // a second person below the first one in its sub-region is ignored
    if (dut.u_det.pix_valid && !dut.u_det.pix_bin && dut.u_det.done_in && dut.u_det.run != 0) n_second++;
    if (adc_en && acol % 8 == 0 && arow % 8 == 0) sample_sum += longint'(scene(acol, arow, aframe));
    // the DAC shows the live video one clock later
    if (!$past(adc_en) != dac_blank || (!dac_blank && dac_data != $past(adc_data))) begin
      failures++;
      if (failures < 10) $display("DAC output wrong");
    end
  end

  // reported targets
  always @(posedge clk) if (rst_n && target_found) begin
    int px, wc, wr, wreg;
    obj_class_e wcls;
    checks++;
    if (dut.u_det.det_target.cls == OBJ_CAR) begin
      n_car++;
      wcls = OBJ_CAR; wc = 336 - 12; wr = 327; wreg = region_of(336, 327);
    end else begin
      n_person++;
      px = person_x(aframe);
      wcls = OBJ_PERSON; wc = px + 6 - 4; wr = 65; wreg = region_of(px + 6, 65);
    end
    if (int'(dut.u_det.det_region) != wreg || int'(dut.u_det.det_target.col) != wc ||
        int'(dut.u_det.det_target.row) != wr) begin
      failures++;
      $display("frame %0d: target cls %0d region %0d (%0d,%0d), want region %0d (%0d,%0d)", aframe,
               dut.u_det.det_target.cls, dut.u_det.det_region, dut.u_det.det_target.col,
               dut.u_det.det_target.row, wreg, wc, wr);
    end
    cur_list[dut.u_det.det_region] = 1;
    cur_det++;
  end

  // arm moves: each goes to a sub-region of the last complete list, and,
  // away from list swaps, to the next one after the previous move in
  // row-major order (wrapping), skipping the one already in view
  int last_move = -1;
  bit swapped = 1;
  int n_in_order = 0;
  always @(posedge clk) if (rst_n && arm_req && req_age == 0) begin
    automatic int reg_now = int'(arm_y) * 10 + int'(arm_x);
    n_moves++;
    checks++;
    if (!prev_list[reg_now]) begin
      failures++;
      $display("arm sent to sub-region %0d, which held no target", reg_now);
    end
    if (!swapped && last_move >= 0) begin
      automatic int want = -1;
      for (int k = 1; k <= NREG; k++) begin
        automatic int cand = (last_move + k) % NREG;
        if (want < 0 && prev_list[cand] && cand != last_move) want = cand;
      end
      checks++;
      if (reg_now != want) begin
        failures++;
        $display("arm sent to sub-region %0d after %0d, want %0d", reg_now, last_move, want);
      end else n_in_order++;
    end
    last_move = reg_now;
    swapped = 0;
  end

  // per-frame checks at each frame start
  always @(posedge clk) if (rst_n && dut.frame_start) begin
    // aframe has already moved on to the frame that is starting
    if (aframe >= 1) begin
      // threshold: mean of the sampled pixels of the frame that just ended
      exp_thr = int'(sample_sum / 4096);
      checks++;
      if (int'(threshold) != exp_thr) begin
        failures++; $display("frame %0d threshold %0d, want %0d", aframe - 1, threshold, exp_thr);
      end else n_thr++;
      // list of that frame becomes readable, two targets from frame 1 on
      n_swaps++;
      checks++;
      if (cur_det != ((aframe >= 2) ? 2 : 0)) begin
        failures++; $display("frame %0d: %0d targets", aframe - 1, cur_det);
      end
      last_det = cur_det;
      // the camera must have visited every sub-region of the list in force
      // during the frame that just ended
      for (int i = 0; i < NREG; i++)
        if (prev_list[i] && !visited[i]) begin
          failures++; $display("sub-region %0d held a target but was never viewed", i);
        end
      foreach (visited[i]) visited[i] = 0;
      swapped = 1;
      prev_list = cur_list;
      foreach (cur_list[i]) cur_list[i] = 0;
      cur_det = 0;
    end
    sample_sum = 0;
  end

  // background after each frame
  function automatic int stored_bg(int c, int r);
    logic [7:0] v;
    if (c % 2 == 0) v = g_chip[0].u_sram.mem[{9'(r), 8'(c / 2)}];
    else            v = g_chip[1].u_sram.mem[{9'(r), 8'(c / 2)}];
    return int'(v);
  endfunction

  task automatic check_background(int f);
    if (f == 0) begin
      for (int k = 0; k < 200; k++) begin
        int c = $urandom_range(511), r = $urandom_range(511);
        checks++;
        if (stored_bg(c, r) != scene(c, r, 0)) begin
          failures++;
          if (failures < 10) $display("captured background (%0d,%0d) = %0d, want %0d", c, r, stored_bg(c, r), scene(c, r, 0));
        end
      end
      car_bg = scene(325, 325, 0);
    end else if (f <= 5) begin
      car_bg = car_bg + ((230 - car_bg) >>> 3);
    end
    checks++;
    if (stored_bg(325, 325) != car_bg) begin
      failures++; $display("frame %0d background under car %0d, want %0d", f, stored_bg(325, 325), car_bg);
    end
  endtask

  initial begin
    bg_mode = BG_CAPTURE; f_exp = 0; track_en = 1;
    col_udtp1 = COL_UDTP1_DEF; row_udtp1 = ROW_UDTP1_DEF;
    col_udtp2 = COL_UDTP2_DEF; row_udtp2 = ROW_UDTP2_DEF;
    repeat (5) @(posedge clk);
    rst_n = 1;
    for (int f = 0; f < NFRAMES; f++) begin
      // wait for the start of the window of frame f
      wait (aframe == f);
      bg_mode = (f == 0) ? BG_CAPTURE : (f == NFRAMES - 1) ? BG_HOLD : BG_FILTER;
      case (bg_mode)
        BG_CAPTURE: n_capture++;
        BG_HOLD:    n_hold++;
        default:    n_filter++;
      endcase
      wait (dut.frame_end);
      repeat (3) @(posedge clk);
      check_background(f);
    end
    wait (aframe == NFRAMES);
    repeat (3) @(posedge clk);
    $display("capture %0d filter %0d hold %0d | person %0d car %0d | start %0d extend %0d drop %0d short %0d second %0d",
             n_capture, n_filter, n_hold, n_person, n_car, n_start, n_extend, n_drop, n_short, n_second);
    $display("swaps %0d thresholds %0d | sram writes %0d/%0d | arm moves %0d (%0d checked for order)", n_swaps, n_thr, n_wr0, n_wr1, n_moves, n_in_order);
    if (n_capture == 0 || n_filter == 0 || n_hold == 0 || n_person == 0 || n_car == 0 ||
        n_start == 0 || n_extend == 0 || n_drop == 0 || n_short == 0 || n_second == 0 ||
        n_swaps == 0 || n_thr == 0 || n_wr0 == 0 || n_wr1 == 0 || n_moves == 0 || n_in_order == 0) begin
      failures++;
      $display("a mechanism never happened");
    end
    checks++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
