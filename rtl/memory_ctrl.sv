// memory_ctrl: access to the background image in two 128K x 8 SRAM chips.
//
// Every pixel of every frame needs one read (the stored background value)
// and one write (the updated value) at the pixel rate, which is the clock
// rate. A single asynchronous SRAM cannot do both in one clock, so the
// image is split over the two chips by column parity: even columns live
// in chip 0, odd columns in chip 1, each chip holding 512 rows x 256
// columns (128K bytes) at address {row, col[8:1]}. The update of a pixel
// is written one clock after it was read, while the next pixel, of the
// other parity, is being read from the other chip, so the two accesses of
// a clock always go to different chips.
//
// Interface and timing: the read request (rd_*) and the write request
// (wr_*) arrive in the same cycle; chip selects, output enables, write
// enables and addresses are decoded from them combinationally and held for
// the whole clock, and the write takes effect at the end of the clock.
// rd_data returns the read chip's data bus in the same cycle (asynchronous
// SRAM). The document gives the two 128K x 8 chips and that this module
// drives the address and the R/W and CS lines; the column-parity split and
// the one-clock write lag are this design's choices. All control lines are
// active low.
module memory_ctrl
  import vss_pkg::*;
#(
  parameter int unsigned ADDR_W = 17
) (
  // read of the pixel now on the video bus
  input  logic                      rd_valid,
  input  logic [COORD_W-1:0]        rd_col,
  input  logic [COORD_W-1:0]        rd_row,
  output logic [PIX_W-1:0]          rd_data,
  // write of the previous pixel's updated background
  input  logic                      wr_valid,
  input  logic [COORD_W-1:0]        wr_col,
  input  logic [COORD_W-1:0]        wr_row,
  input  logic [PIX_W-1:0]          wr_data,
  // the two SRAM chips
  output logic [1:0][ADDR_W-1:0]    sram_addr,
  output logic [1:0]                sram_cs_n,
  output logic [1:0]                sram_oe_n,
  output logic [1:0]                sram_we_n,
  output logic [1:0][PIX_W-1:0]     sram_dq_out,
  output logic [1:0]                sram_dq_oe,  // FPGA drives the data bus
  input  logic [1:0][PIX_W-1:0]     sram_dq_in
);

  function automatic logic [ADDR_W-1:0] chip_addr(input logic [COORD_W-1:0] c,
                                                  input logic [COORD_W-1:0] r);
    return ADDR_W'({r, c[COORD_W-1:1]});
  endfunction

  always_comb begin
    for (int c = 0; c < 2; c++) begin
      sram_addr[c]   = '0;
      sram_cs_n[c]   = 1'b1;
      sram_oe_n[c]   = 1'b1;
      sram_we_n[c]   = 1'b1;
      sram_dq_out[c] = '0;
      sram_dq_oe[c]  = 1'b0;
      if (wr_valid && (wr_col[0] == 1'(c))) begin
        sram_addr[c]  = chip_addr(wr_col, wr_row);
        sram_cs_n[c]  = 1'b0;
        sram_we_n[c]  = 1'b0;
        sram_dq_oe[c] = 1'b1;
        sram_dq_out[c] = wr_data;
      end else if (rd_valid && (rd_col[0] == 1'(c))) begin
        sram_addr[c]  = chip_addr(rd_col, rd_row);
        sram_cs_n[c]  = 1'b0;
        sram_oe_n[c]  = 1'b0;
      end
    end
  end

  assign rd_data = sram_dq_in[rd_col[0]];

  // a read and a write never meet on the same chip
  always_comb begin
    if (rd_valid && wr_valid)
      assert (rd_col[0] != wr_col[0])
        else $error("memory_ctrl: read and write to the same chip in one clock");
  end

endmodule
