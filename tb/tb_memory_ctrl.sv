// tb_memory_ctrl: connects the controller to two SRAM models and streams
// pixels the way the system does: each clock reads pixel p and writes back
// pixel p-1. It fills a few lines with a known pattern, reads them back and
// checks the data, the chip chosen by column parity, the addresses, and
// that the two chips never see two accesses in one clock.
module tb_memory_ctrl;
  import vss_pkg::*;
  logic clk = 0;
  logic rd_valid, wr_valid;
  logic [COORD_W-1:0] rd_col, rd_row, wr_col, wr_row;
  logic [PIX_W-1:0] rd_data, wr_data;
  logic [1:0][16:0] sram_addr;
  logic [1:0] sram_cs_n, sram_oe_n, sram_we_n, sram_dq_oe;
  logic [1:0][PIX_W-1:0] sram_dq_out, sram_dq_in;
  int checks = 0, failures = 0;

  memory_ctrl dut (.*);

  for (genvar c = 0; c < 2; c++) begin : g_chip
    sram_model u_sram (.clk, .addr(sram_addr[c]), .cs_n(sram_cs_n[c]), .oe_n(sram_oe_n[c]),
                       .we_n(sram_we_n[c]), .dq_in(sram_dq_out[c]), .dq_out(sram_dq_in[c]));
  end

  always #5 clk = ~clk;

  initial begin
    #10000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic logic [7:0] pattern(int c, int r, int pass);
    return 8'(c * 7 + r * 31 + pass * 101);
  endfunction

  // one line: read pixel c while writing pixel c-1; the value written is
  // pattern(pass) and the value read must be pattern(pass-1)
  task automatic do_line(int r, int pass);
    for (int c = 0; c <= 512; c++) begin
      @(negedge clk);
      rd_valid = (c < 512); rd_col = 9'(c); rd_row = 9'(r);
      wr_valid = (c > 0);   wr_col = 9'(c - 1); wr_row = 9'(r);
      wr_data  = pattern(c - 1, r, pass);
      #1;
      if (rd_valid) begin
        int ch = c % 2;
        checks++;
        if (pass > 0 && rd_data != pattern(c, r, pass - 1)) begin
          failures++;
          if (failures < 10) $display("read (%0d,%0d) got %0d want %0d", c, r, rd_data, pattern(c, r, pass - 1));
        end
        if (sram_cs_n[ch] || sram_oe_n[ch] || sram_addr[ch] != 17'({9'(r), 8'(c / 2)})) begin
          failures++;
          if (failures < 10) $display("read (%0d,%0d) chip %0d not addressed", c, r, ch);
        end
      end
      if (wr_valid) begin
        int ch = (c - 1) % 2;
        checks++;
        if (sram_cs_n[ch] || sram_we_n[ch] || !sram_dq_oe[ch] || sram_dq_out[ch] != wr_data ||
            sram_addr[ch] != 17'({9'(r), 8'((c - 1) / 2)}) || !sram_we_n[1 - ch]) begin
          failures++;
          if (failures < 10) $display("write (%0d,%0d) chip %0d wrong", c - 1, r, ch);
        end
      end
    end
    @(negedge clk); rd_valid = 0; wr_valid = 0;
    #1;
    checks++;
    if (sram_cs_n != 2'b11) begin failures++; $display("chips selected while idle"); end
  endtask

  initial begin
    rd_valid = 0; wr_valid = 0; rd_col = 0; rd_row = 0; wr_col = 0; wr_row = 0; wr_data = 0;
    for (int pass = 0; pass < 3; pass++)
      for (int r = 0; r < 512; r += 73)
        do_line(r, pass);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
