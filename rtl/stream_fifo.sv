// stream_fifo: synchronous FIFO used as a stream channel between blocks.
//
// Each entry holds one beat of WIDTH bits (here a whole vector of activation
// inputs or outputs, so one FIFO feeds all lanes of a layer at once). Writes
// happen when in_valid and in_ready are both high, reads when out_valid and
// out_ready are both high; both can happen in the same cycle. in_ready is low
// while the FIFO holds DEPTH beats, out_valid is high while it holds any.
// out_data is the oldest beat, read straight from the storage array. A beat
// written in cycle t can be read in cycle t+1, so an empty FIFO adds one cycle
// of latency; with DEPTH >= 2 it sustains one beat per cycle.
//
// The use of FIFO streams to feed the parallel activation lanes follows the
// accelerator description; the depth of 2 (the usual default depth of an HLS
// stream), the valid/ready handshake and the synchronous active-low reset are
// this design's choices.
module stream_fifo #(
  parameter int unsigned WIDTH = 32,
  parameter int unsigned DEPTH = 2
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             in_valid,
  output logic             in_ready,
  input  logic [WIDTH-1:0] in_data,
  output logic             out_valid,
  input  logic             out_ready,
  output logic [WIDTH-1:0] out_data
);

  localparam int unsigned PTR_W = (DEPTH > 1) ? $clog2(DEPTH) : 1;
  localparam int unsigned CNT_W = $clog2(DEPTH + 1);

  logic [WIDTH-1:0] mem [DEPTH];
  logic [PTR_W-1:0] wr_ptr, rd_ptr;
  logic [CNT_W-1:0] count;
  logic             push, pop;

  assign in_ready  = (count != CNT_W'(DEPTH));
  assign out_valid = (count != '0);
  assign push      = in_valid && in_ready;
  assign pop       = out_valid && out_ready;
  assign out_data  = mem[rd_ptr];

  function automatic logic [PTR_W-1:0] next_ptr(logic [PTR_W-1:0] ptr);
    return (ptr == PTR_W'(DEPTH - 1)) ? '0 : ptr + 1'b1;
  endfunction

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      wr_ptr <= '0;
      rd_ptr <= '0;
      count  <= '0;
    end else begin
      if (push) wr_ptr <= next_ptr(wr_ptr);
      if (pop)  rd_ptr <= next_ptr(rd_ptr);
      case ({push, pop})
        2'b10:   count <= count + 1'b1;
        2'b01:   count <= count - 1'b1;
        default: count <= count;
      endcase
    end
  end

  // Storage has no reset; only entries that were written are ever read.
  always_ff @(posedge clk) begin
    if (push) mem[wr_ptr] <= in_data;
  end

  // The occupancy never leaves 0..DEPTH.
  a_count_range: assert property (@(posedge clk) disable iff (!rst_n) count <= CNT_W'(DEPTH))
    else $error("stream_fifo: occupancy out of range");

endmodule
