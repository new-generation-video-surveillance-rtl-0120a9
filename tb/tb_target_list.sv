// tb_target_list: writes targets into the bank being filled, swaps banks
// with frame_start and reads the list back: hits, coordinates, the count of
// targets, clearing of the refilled bank, one-clock read latency, and that
// writes of the current frame are not visible until the swap.
module tb_target_list;
  import vss_pkg::*;
  logic clk = 0, rst_n = 0;
  logic frame_start, wr_en, rd_en, rd_hit;
  logic [REG_W-1:0] wr_region, rd_region;
  target_t wr_data, rd_data;
  logic [REG_W:0] count;
  int checks = 0, failures = 0;

  target_list dut (.*);

  always #5 clk = ~clk;

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  bit      exp_valid [NREG];
  target_t exp_data  [NREG];

  task automatic swap();
    @(negedge clk); frame_start = 1;
    @(negedge clk); frame_start = 0;
  endtask

  task automatic check_all(input bit expect_empty);
    int n = 0;
    for (int i = 0; i < NREG; i++) begin
      @(negedge clk); rd_en = 1; rd_region = 7'(i);
      @(negedge clk); rd_en = 0;
      checks++;
      if (expect_empty) begin
        if (rd_hit) begin failures++; $display("region %0d should be empty", i); end
      end else if (rd_hit != exp_valid[i] || (rd_hit && rd_data != exp_data[i])) begin
        failures++;
        if (failures < 10) $display("region %0d hit %0d data %h, want %0d %h", i, rd_hit, rd_data, exp_valid[i], exp_data[i]);
      end
      if (exp_valid[i]) n++;
    end
    checks++;
    if (!expect_empty && int'(count) != n) begin failures++; $display("count %0d want %0d", count, n); end
  endtask

  initial begin
    frame_start = 0; wr_en = 0; rd_en = 0; wr_region = 0; rd_region = 0; wr_data = '0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int f = 0; f < 4; f++) begin
      foreach (exp_valid[i]) exp_valid[i] = 0;
      // fill one frame's list
      for (int k = 0; k < 12 + f * 5; k++) begin
        automatic int r = $urandom_range(NREG - 1);
        @(negedge clk);
        wr_en = 1; wr_region = 7'(r);
        wr_data = '{cls: obj_class_e'($urandom_range(1)), col: 9'($urandom), row: 9'($urandom)};
        exp_valid[r] = 1; exp_data[r] = wr_data;
      end
      @(negedge clk); wr_en = 0;
      if (f == 0) check_all(1'b1);   // nothing visible before the first swap
      swap();
      check_all(1'b0);
    end
    // an empty frame clears the list
    swap();
    check_all(1'b1);
    checks++;
    if (count != 0) begin failures++; $display("count after empty frame %0d", count); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
