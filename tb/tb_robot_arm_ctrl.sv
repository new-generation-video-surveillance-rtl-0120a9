// tb_robot_arm_ctrl: serves a target list from the testbench (one clock
// read latency) and models the arm, which answers each request with
// arm_done after a delay. Checks the order of visited sub-regions (row-major
// from the top left, wrapping), that a lone target in the sub-region already
// viewed causes no movement, that a target moving into the next sub-region
// is followed, and that the enable input stops the scan.
module tb_robot_arm_ctrl;
  import vss_pkg::*;
  logic clk = 0, rst_n = 0, enable;
  logic rd_en, rd_hit, arm_req, arm_done, cam_valid;
  logic [REG_W-1:0] rd_region, cam_region;
  logic [3:0] arm_x, arm_y;
  int checks = 0, failures = 0;

  robot_arm_ctrl dut (.*);

  always #5 clk = ~clk;

  initial begin
    #2000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  bit list [NREG];
  always @(posedge clk) if (rd_en) rd_hit <= list[rd_region];

  // arm model: done 20 clocks after a new request
  int req_age = 0;
  int moves [$];
  always @(posedge clk) begin
    if (arm_req) begin
      if (req_age == 0) moves.push_back(int'(arm_y) * 10 + int'(arm_x));
      req_age <= req_age + 1;
    end else req_age <= 0;
    arm_done <= arm_req && (req_age == 19);
  end

  task automatic expect_moves(input int want [$], input int wait_clk);
    moves.delete();
    repeat (wait_clk) @(posedge clk);
    checks++;
    if (moves.size() < want.size()) begin
      failures++; $display("only %0d moves, wanted %0d", moves.size(), want.size());
    end else
      for (int i = 0; i < want.size(); i++) begin
        checks++;
        if (moves[i] != want[i]) begin failures++; $display("move %0d to %0d, wanted %0d", i, moves[i], want[i]); end
      end
  endtask

  initial begin
    foreach (list[i]) list[i] = 0;
    enable = 1; rd_hit = 0; arm_done = 0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    // three targets: visited in raster order, then again
    list[57] = 1; list[3] = 1; list[99] = 1;
    expect_moves('{3, 57, 99, 3, 57, 99}, 1500);
    // one target, already in view: no more moves once there
    foreach (list[i]) list[i] = 0;
    list[57] = 1;
    repeat (400) @(posedge clk);
    moves.delete();
    repeat (1000) @(posedge clk);
    checks++;
    if (moves.size() != 0) begin failures++; $display("%0d moves for a target already in view", moves.size()); end
    checks++;
    if (!cam_valid || cam_region != 57) begin failures++; $display("camera at %0d", cam_region); end
    // the target walks into the next sub-region
    list[57] = 0; list[58] = 1;
    expect_moves('{58}, 600);
    checks++;
    if (moves.size() != 1) begin failures++; $display("%0d moves following one target", moves.size()); end
    // disabled: no list reads, no moves
    enable = 0; list[0] = 1;
    repeat (5) @(posedge clk);
    moves.delete();
    repeat (500) @(posedge clk);
    checks++;
    if (moves.size() != 0 || rd_en) begin failures++; $display("moved while disabled"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
