// sram_model: behavioural model of one 128K x 8 asynchronous SRAM chip,
// for simulation only. Reads are combinational: with CS and OE low the
// addressed byte appears on dq_out in the same cycle. A write (CS and WE
// low) stores dq_in at the rising clock edge that ends the cycle, which
// stands in for the rising edge of the WE pulse. Contents start at zero.
module sram_model #(
  parameter int unsigned ADDR_W = 17
) (
  input  logic              clk,
  input  logic [ADDR_W-1:0] addr,
  input  logic              cs_n,
  input  logic              oe_n,
  input  logic              we_n,
  input  logic [7:0]        dq_in,
  output logic [7:0]        dq_out
);
  logic [7:0] mem [2**ADDR_W];

  initial for (int i = 0; i < 2**ADDR_W; i++) mem[i] = 8'h00;

  assign dq_out = (!cs_n && !oe_n && we_n) ? mem[addr] : 8'h00;

  always @(posedge clk)
    if (!cs_n && !we_n) mem[addr] <= dq_in;
endmodule
