// act_layer: a fully unrolled, pipelined activation layer.
//
// LANES copies of act_lut work side by side, so a whole vector of LANES 8-bit
// values is transformed every clock cycle (initiation interval 1, latency 1).
// All lanes use the same table contents (same FUNC, FRAC_BITS, IS_SIGNED).
// The layer sits between two streams with a valid/ready handshake: the
// pipeline register advances when it is empty or its beat is being taken
// (advance = !out_valid || out_ready), and in_ready equals advance, so a
// downstream stall holds the result and stops the input without losing data.
//
// The unrolled lanes fed by a vector stream follow the parallelization scheme
// of the accelerator description; the lane count default and the handshake are
// this design's choices.
module act_layer
  import act_pkg::*;
#(
  parameter act_func_e   FUNC      = ACT_SILU,
  parameter int unsigned FRAC_BITS = 3,
  parameter bit          IS_SIGNED = 1'b1,
  parameter int unsigned LANES     = 4
) (
  input  logic                         clk,
  input  logic                         rst_n,
  input  logic                         in_valid,
  output logic                         in_ready,
  input  logic [LANES-1:0][DATA_W-1:0] in_data,
  output logic                         out_valid,
  input  logic                         out_ready,
  output logic [LANES-1:0][DATA_W-1:0] out_data
);

  logic             advance;
  logic [LANES-1:0] lane_valid;

  assign advance   = !out_valid || out_ready;
  assign in_ready  = advance;
  assign out_valid = lane_valid[0];

  for (genvar l = 0; l < LANES; l++) begin : g_lane
    act_lut #(
      .FUNC     (FUNC),
      .FRAC_BITS(FRAC_BITS),
      .IS_SIGNED(IS_SIGNED)
    ) u_lut (
      .clk      (clk),
      .rst_n    (rst_n),
      .en       (advance),
      .in_valid (in_valid),
      .in_data  (in_data[l]),
      .out_valid(lane_valid[l]),
      .out_data (out_data[l])
    );
  end

  // All lanes move in lock step.
  a_lanes_aligned: assert property (@(posedge clk) disable iff (!rst_n)
                                   lane_valid == {LANES{lane_valid[0]}})
    else $error("act_layer: lanes out of step");
  // A beat that is offered but not taken stays unchanged.
  a_hold: assert property (@(posedge clk) disable iff (!rst_n)
                           out_valid && !out_ready |=> out_valid && $stable(out_data))
    else $error("act_layer: output changed during a stall");

endmodule
