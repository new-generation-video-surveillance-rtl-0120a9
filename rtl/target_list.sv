// target_list: the list of detected targets kept in internal RAM.
//
// One entry per sub-region (NREG = 100) holds the class and coordinates of
// the target found there. The list is double-buffered: during a frame the
// detector fills one bank while the robot arm controller reads the other,
// which holds the complete list of the previous frame, so the list seen by
// the arm is renewed once per frame period. A valid bit per entry tells
// which sub-regions held a target; frame_start swaps the banks and clears
// the valid bits of the bank that is about to be filled.
//
// Interface and timing: writes (wr_en, wr_region, wr_data) take effect at
// the clock edge. A read (rd_en, rd_region) returns rd_hit and rd_data one
// clock later (synchronous RAM read). The document gives that target
// co-ordinates are saved in internal memory and that the list is updated
// every frame; the two banks and the valid bits are this design's choices.
module target_list
  import vss_pkg::*;
#(
  parameter int unsigned ENTRIES = NREG
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             frame_start,
  input  logic             wr_en,
  input  logic [REG_W-1:0] wr_region,
  input  target_t          wr_data,
  input  logic             rd_en,
  input  logic [REG_W-1:0] rd_region,
  output logic             rd_hit,
  output target_t          rd_data,
  output logic [REG_W:0]   count        // targets in the readable list
);

  target_t                  mem [2][ENTRIES];
  logic [1:0][ENTRIES-1:0]  valid;
  logic                     wr_bank;   // bank being filled; the other is read
  logic [REG_W:0]           wr_count;

  always_ff @(posedge clk) begin
    if (wr_en && wr_region < REG_W'(ENTRIES))
      mem[wr_bank][wr_region] <= wr_data;
    if (rd_en && rd_region < REG_W'(ENTRIES))
      rd_data <= mem[~wr_bank][rd_region];
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      valid    <= '0;
      wr_bank  <= 1'b0;
      rd_hit   <= 1'b0;
      wr_count <= '0;
      count    <= '0;
    end else begin
      if (frame_start) begin
        wr_bank          <= ~wr_bank;
        valid[~wr_bank]  <= '0;
        count            <= wr_count;
        wr_count         <= '0;
      end else if (wr_en && wr_region < REG_W'(ENTRIES)) begin
        valid[wr_bank][wr_region] <= 1'b1;
        if (!valid[wr_bank][wr_region])
          wr_count <= wr_count + 1'b1;
      end
      if (rd_en)
        rd_hit <= (rd_region < REG_W'(ENTRIES)) && valid[~wr_bank][rd_region];
    end
  end

endmodule
