// act_accel_top: parallel LUT-based activation accelerator.
//
// STREAMS independent channels run side by side. Each channel carries beats of
// LANES 8-bit fixed-point values: an input stream FIFO, an activation layer of
// LANES table-lookup units, and an output stream FIFO. Every channel accepts
// and delivers one vector per cycle, so the accelerator applies the activation
// function to STREAMS*LANES values per cycle. The function (sigmoid or SiLU)
// and the position of the binary point are compile-time parameters; the
// output has the same 8-bit format as the input.
//
// Interface, per channel s: in_valid[s]/in_ready[s]/in_data[s] and
// out_valid[s]/out_ready[s]/out_data[s] are valid/ready streams; a beat moves
// when valid and ready are both high at a rising clock edge. in_data[s][l] is
// lane l. Latency from an accepted input beat to out_valid, with no stall:
// 3 cycles (input FIFO, table register, output FIFO). rst_n is synchronous,
// active low.
//
// Following the accelerator description: SiLU as the default function (the
// function the networks were built with), 5 integer and 3 fractional bits as
// the default format, FIFO streams whose vector width matches the parallel
// lanes. This design's own choices: STREAMS=2, LANES=4 and FIFO_DEPTH=2 as
// defaults, the handshake, signed data.
module act_accel_top
  import act_pkg::*;
#(
  parameter act_func_e   FUNC       = ACT_SILU,
  parameter int unsigned FRAC_BITS  = 3,
  parameter bit          IS_SIGNED  = 1'b1,
  parameter int unsigned STREAMS    = 2,
  parameter int unsigned LANES      = 4,
  parameter int unsigned FIFO_DEPTH = 2
) (
  input  logic                                      clk,
  input  logic                                      rst_n,
  input  logic [STREAMS-1:0]                        in_valid,
  output logic [STREAMS-1:0]                        in_ready,
  input  logic [STREAMS-1:0][LANES-1:0][DATA_W-1:0] in_data,
  output logic [STREAMS-1:0]                        out_valid,
  input  logic [STREAMS-1:0]                        out_ready,
  output logic [STREAMS-1:0][LANES-1:0][DATA_W-1:0] out_data
);

  localparam int unsigned BEAT_W = LANES * DATA_W;

  for (genvar s = 0; s < STREAMS; s++) begin : g_stream
    logic                         q_valid, q_ready;
    logic [LANES-1:0][DATA_W-1:0] q_data;
    logic                         r_valid, r_ready;
    logic [LANES-1:0][DATA_W-1:0] r_data;

    stream_fifo #(
      .WIDTH(BEAT_W),
      .DEPTH(FIFO_DEPTH)
    ) u_in_fifo (
      .clk      (clk),
      .rst_n    (rst_n),
      .in_valid (in_valid[s]),
      .in_ready (in_ready[s]),
      .in_data  (in_data[s]),
      .out_valid(q_valid),
      .out_ready(q_ready),
      .out_data (q_data)
    );

    act_layer #(
      .FUNC     (FUNC),
      .FRAC_BITS(FRAC_BITS),
      .IS_SIGNED(IS_SIGNED),
      .LANES    (LANES)
    ) u_layer (
      .clk      (clk),
      .rst_n    (rst_n),
      .in_valid (q_valid),
      .in_ready (q_ready),
      .in_data  (q_data),
      .out_valid(r_valid),
      .out_ready(r_ready),
      .out_data (r_data)
    );

    stream_fifo #(
      .WIDTH(BEAT_W),
      .DEPTH(FIFO_DEPTH)
    ) u_out_fifo (
      .clk      (clk),
      .rst_n    (rst_n),
      .in_valid (r_valid),
      .in_ready (r_ready),
      .in_data  (r_data),
      .out_valid(out_valid[s]),
      .out_ready(out_ready[s]),
      .out_data (out_data[s])
    );
  end

endmodule
