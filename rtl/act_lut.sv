// act_lut: one LUT-based activation unit (one value per clock).
//
// The 8-bit fixed-point input is used unchanged as the address of a 256-entry
// table holding the 8-bit quantized samples of the activation function, so
// every possible input has its own precomputed result and no arithmetic is done
// at run time. FUNC selects the function (sigmoid or SiLU) and FRAC_BITS the
// binary point of the data (0..8 fractional bits): of the 9 possible tables
// only the one these parameters name is built. The table contents come from
// act_pkg::lut_entry() at elaboration time and map to distributed (LUT) memory.
// Changing the function means changing only the table contents.
//
// Interface: in_valid/in_data are sampled on a rising clock edge when en is
// high; out_valid/out_data appear one cycle later and hold while en is low.
// Latency 1 cycle, initiation interval 1. rst_n is synchronous, active low.
//
// From the accelerator description: direct addressing by the input bits, 256
// entries of 8 bits, 9 precision-specific tables of which one is instantiated,
// output in the input's format, one registered stage. This design's own
// choices: the valid/enable signals, the reset, signed data by default
// (IS_SIGNED), rounding to nearest.
module act_lut
  import act_pkg::*;
#(
  parameter act_func_e   FUNC      = ACT_SIGMOID,
  parameter int unsigned FRAC_BITS = 3,
  parameter bit          IS_SIGNED = 1'b1
) (
  input  logic      clk,
  input  logic      rst_n,
  input  logic      en,
  input  logic      in_valid,
  input  act_data_t in_data,
  output logic      out_valid,
  output act_data_t out_data
);

  // Elaboration-time check of the precision parameter.
  if (FRAC_BITS >= N_PRECISIONS) begin : g_bad_frac
    $error("act_lut: FRAC_BITS must be in 0..%0d", DATA_W);
  end

  // The one table this instance needs.
  act_data_t table_q [LUT_DEPTH];
  for (genvar a = 0; a < LUT_DEPTH; a++) begin : g_table
    localparam act_data_t ENTRY = lut_entry(FUNC, FRAC_BITS, IS_SIGNED, DATA_W'(a));
    assign table_q[a] = ENTRY;
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      out_valid <= 1'b0;
      out_data  <= '0;
    end else if (en) begin
      out_valid <= in_valid;
      out_data  <= table_q[in_data];
    end
  end

endmodule
