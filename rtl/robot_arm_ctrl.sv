// robot_arm_ctrl: points the slave camera at sub-regions holding targets.
//
// The controller walks the target list of the last complete frame in
// sub-region order (top-left first, left to right, then top to bottom),
// reading one entry every two clocks and wrapping from the last sub-region
// to the first. On a sub-region that holds a target and is not the one the
// camera already views, it commands the arm to that sub-region and waits
// until the arm reports that it has arrived; then it carries on from the
// next sub-region. With one target the camera therefore stays put while the
// target moves inside a sub-region and follows it into the next; with
// several targets it visits them in turn.
//
// Interface and timing: list read port as in target_list (one clock read
// latency). The arm handshake is request/done: arm_req rises with arm_x and
// arm_y (grid column and row, 0..9) held stable, and falls in the clock
// after arm_done is seen high. cam_region is the sub-region the camera was
// last sent to, valid once cam_valid is high. The document gives the
// sub-region pointing and the visiting order; the handshake is this
// design's choice.
module robot_arm_ctrl
  import vss_pkg::*;
(
  input  logic             clk,
  input  logic             rst_n,
  input  logic             enable,
  // target list read port
  output logic             rd_en,
  output logic [REG_W-1:0] rd_region,
  input  logic             rd_hit,
  // robot arm
  output logic             arm_req,
  output logic [3:0]       arm_x,
  output logic [3:0]       arm_y,
  input  logic             arm_done,
  output logic [REG_W-1:0] cam_region,
  output logic             cam_valid
);

  typedef enum logic [1:0] {S_READ, S_CHECK, S_MOVE} state_e;

  state_e           state;
  logic [REG_W-1:0] ptr;
  logic [3:0]       px, py;        // grid position of ptr

  assign rd_en     = (state == S_READ) && enable;
  assign rd_region = ptr;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state      <= S_READ;
      ptr        <= '0;
      px         <= '0;
      py         <= '0;
      arm_req    <= 1'b0;
      arm_x      <= '0;
      arm_y      <= '0;
      cam_region <= '0;
      cam_valid  <= 1'b0;
    end else begin
      unique case (state)
        S_READ: if (enable) state <= S_CHECK;
        S_CHECK: begin
          if (rd_hit && !(cam_valid && cam_region == ptr)) begin
            arm_req    <= 1'b1;
            arm_x      <= px;
            arm_y      <= py;
            cam_region <= ptr;
            cam_valid  <= 1'b1;
            state      <= S_MOVE;
          end else begin
            state <= S_READ;
          end
          // next sub-region in scan order
          if (ptr == REG_W'(NREG - 1)) begin
            ptr <= '0;
            px  <= '0;
            py  <= '0;
          end else begin
            ptr <= ptr + 1'b1;
            if (px == 4'(NREG_X - 1)) begin
              px <= '0;
              py <= py + 1'b1;
            end else begin
              px <= px + 1'b1;
            end
          end
        end
        S_MOVE: if (arm_done) begin
          arm_req <= 1'b0;
          state   <= S_READ;
        end
        default: state <= S_READ;
      endcase
    end
  end

  // the commanded position does not change while the arm is moving
  property p_req_stable;
    @(posedge clk) disable iff (!rst_n)
      (arm_req && !arm_done) |=> (arm_req && $stable(arm_x) && $stable(arm_y));
  endproperty
  assert property (p_req_stable);

endmodule
