// tb_act_lut: self-checking testbench of act_lut.
//
// Builds 20 instances: sigmoid and SiLU at each of the 9 binary-point
// positions for signed data, plus one unsigned sigmoid and one unsigned SiLU.
// All share the same stimulus. Every one of the 256 addresses is applied and
// each output is compared with a reference computed here in floating point
// ($exp): inside the output range the result must be within 1/2 LSB of the
// exact function value, outside it the output must be saturated. It also
// checks the 1-cycle latency, that out_valid follows in_valid, that en low
// freezes the output, and that reset clears it.
module tb_act_lut;
  import act_pkg::*;

  localparam int N_DUT = 20;

  // Configuration of instance i.
  function automatic act_func_e cfg_func(int i);
    if (i < 18) return (i % 2 == 0) ? ACT_SIGMOID : ACT_SILU;
    return (i == 18) ? ACT_SIGMOID : ACT_SILU;
  endfunction
  function automatic int cfg_frac(int i);
    if (i < 18) return i / 2;
    return (i == 18) ? 8 : 4;
  endfunction
  function automatic bit cfg_signed(int i);
    return i < 18;
  endfunction

  logic      clk = 1'b0;
  logic      rst_n;
  logic      en;
  logic      in_valid;
  act_data_t in_data;
  logic      out_valid [N_DUT];
  act_data_t out_data  [N_DUT];

  int checks = 0;
  int failures = 0;

  always #5 clk = ~clk;

  for (genvar i = 0; i < N_DUT; i++) begin : g_dut
    act_lut #(
      .FUNC     (cfg_func(i)),
      .FRAC_BITS(cfg_frac(i)),
      .IS_SIGNED(cfg_signed(i))
    ) u_dut (
      .clk      (clk),
      .rst_n    (rst_n),
      .en       (en),
      .in_valid (in_valid),
      .in_data  (in_data),
      .out_valid(out_valid[i]),
      .out_data (out_data[i])
    );
  end

  // Independent floating-point reference; returns 1 if `got` is acceptable.
  function automatic bit ref_ok(int i, act_data_t addr, act_data_t got);
    real x, s, ideal, lo, hi, g;
    int k;
    k     = cfg_signed(i) ? int'($signed(addr)) : int'(addr);
    x     = real'(k) / (2.0 ** cfg_frac(i));
    s     = 1.0 / (1.0 + $exp(-x));
    ideal = (cfg_func(i) == ACT_SIGMOID) ? s : x * s;
    ideal = ideal * (2.0 ** cfg_frac(i));
    lo    = cfg_signed(i) ? -128.0 : 0.0;
    hi    = cfg_signed(i) ? 127.0 : 255.0;
    g     = cfg_signed(i) ? real'($signed(got)) : real'(got);
    if (ideal >= hi) return g == hi;
    if (ideal <= lo) return g == lo;
    return (g - ideal <= 0.5 + 1e-9) && (ideal - g <= 0.5 + 1e-9);
  endfunction

  task automatic check(bit cond, string what);
    checks++;
    if (!cond) begin
      failures++;
      if (failures <= 20) $display("FAIL: %s", what);
    end
  endtask

  initial begin
    rst_n    = 1'b0;
    en       = 1'b1;
    in_valid = 1'b1;
    in_data  = 8'h5a;
    repeat (2) @(posedge clk);
    #1;
    for (int i = 0; i < N_DUT; i++) begin
      check(!out_valid[i] && out_data[i] == '0, $sformatf("reset state dut %0d", i));
    end
    @(negedge clk);
    rst_n = 1'b1;

    // Full sweep: drive an address, one clock later the result must be there.
    for (int a = 0; a < LUT_DEPTH; a++) begin
      @(negedge clk);
      in_data  = act_data_t'(a);
      in_valid = a[0];
      @(posedge clk);
      #1;
      for (int i = 0; i < N_DUT; i++) begin
        check(out_valid[i] == a[0], $sformatf("valid dut %0d addr %0d", i, a));
        check(ref_ok(i, act_data_t'(a), out_data[i]),
              $sformatf("value dut %0d (func %0d frac %0d signed %0d) addr %02h got %02h",
                        i, cfg_func(i), cfg_frac(i), cfg_signed(i), a, out_data[i]));
      end
    end

    // Spot values worked out by hand (signed, 3 fractional bits):
    // sigmoid(0) = 0.5 -> 4/8; SiLU(-16) = -16*1.1e-7 -> 0; SiLU(15.875) -> 127.
    check(lut_entry(ACT_SIGMOID, 3, 1'b1, 8'h00) == 8'd4, "sigmoid(0) at F=3");
    check(lut_entry(ACT_SILU, 3, 1'b1, 8'h80) == 8'd0, "silu(-16) at F=3");
    check(lut_entry(ACT_SILU, 3, 1'b1, 8'h7f) == 8'd127, "silu(15.875) at F=3");
    // SiLU(1.0) = 0.7311 -> 5.85 -> 6 (0x06) at F=3.
    check(lut_entry(ACT_SILU, 3, 1'b1, 8'h08) == 8'd6, "silu(1) at F=3");

    // en low: output frozen although the input changes.
    @(negedge clk);
    in_data  = 8'h10;
    in_valid = 1'b1;
    @(posedge clk);
    #1;
    begin
      act_data_t held [N_DUT];
      for (int i = 0; i < N_DUT; i++) held[i] = out_data[i];
      @(negedge clk);
      en       = 1'b0;
      in_data  = 8'hf3;
      in_valid = 1'b0;
      repeat (3) @(posedge clk);
      #1;
      for (int i = 0; i < N_DUT; i++) begin
        check(out_data[i] == held[i] && out_valid[i], $sformatf("stall hold dut %0d", i));
      end
      @(negedge clk);
      en = 1'b1;
      @(posedge clk);
      #1;
      for (int i = 0; i < N_DUT; i++) begin
        check(!out_valid[i] && ref_ok(i, 8'hf3, out_data[i]), $sformatf("after stall dut %0d", i));
      end
    end

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // Watchdog.
  initial begin
    repeat (2000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
