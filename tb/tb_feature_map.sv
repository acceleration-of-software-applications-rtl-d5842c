// tb_feature_map: one activation layer of a CIFAR-10 ResNet through the
// accelerator at its default parameters.
//
// A feature map of 32 x 32 pixels x 16 channels (16384 signed 8-bit values
// with 3 fractional bits, the size of the first-stage activations of a CIFAR-10
// ResNet) is generated here with a pseudo-random spread centred near zero, as
// a convolution's output would be. It is split over the 2 streams as vectors
// of 4 lanes (2048 beats per stream) and sent at full rate while the
// consumer is always ready. Every output value is compared with the
// floating-point SiLU reference (within 1/2 LSB) and the total time is checked:
// 2048 beats per stream at one per cycle plus the 3-cycle latency.
module tb_feature_map;
  import act_pkg::*;
  import act_ref_pkg::*;

  localparam int S = 2;
  localparam int L = 4;
  localparam int F = 3;
  localparam int H = 32, W = 32, C = 16;
  localparam int N_VALUES = H * W * C;
  localparam int N_BEATS = N_VALUES / (S * L);

  logic                            clk = 1'b0;
  logic                            rst_n;
  logic [S-1:0]                    in_valid, in_ready, out_valid, out_ready;
  logic [S-1:0][L-1:0][DATA_W-1:0] in_data, out_data;

  act_data_t fmap [N_VALUES];
  int        checks = 0, failures = 0, received = 0;
  int        max_err_x1000 = 0;

  always #5 clk = ~clk;

  act_accel_top u_dut (
    .clk(clk), .rst_n(rst_n),
    .in_valid(in_valid), .in_ready(in_ready), .in_data(in_data),
    .out_valid(out_valid), .out_ready(out_ready), .out_data(out_data));

  task automatic check(bit cond, string what);
    checks++;
    if (!cond) begin
      failures++;
      if (failures <= 20) $display("FAIL: %s", what);
    end
  endtask

  // Value index of lane l of beat b of stream s.
  function automatic int idx(int s, int b, int l);
    return (b * S + s) * L + l;
  endfunction

  int out_beat [S];
  int cycle = 0, first_in = -1, last_out = -1;

  always @(posedge clk) begin
    if (rst_n) begin
      if (first_in < 0 && |(in_valid & in_ready)) first_in = cycle;
      if (|(out_valid & out_ready)) last_out = cycle;
      for (int s = 0; s < S; s++) begin
        if (out_valid[s] && out_ready[s]) begin
          for (int l = 0; l < L; l++) begin
            act_data_t x;
            real err;
            x   = fmap[idx(s, out_beat[s], l)];
            err = real'($signed(out_data[s][l])) - act_ideal(ACT_SILU, F, 1'b1, x);
            if (err < 0.0) err = -err;
            if (int'(err * 1000.0) > max_err_x1000) max_err_x1000 = int'(err * 1000.0);
            check(act_ok(ACT_SILU, F, 1'b1, x, out_data[s][l]),
                  $sformatf("value %0d in %02h got %02h", idx(s, out_beat[s], l), x, out_data[s][l]));
          end
          out_beat[s]++;
          received++;
        end
      end
    end
    cycle++;
  end

  initial begin
    // Sum of three uniform values: a bell-shaped spread over [-12, 12).
    for (int i = 0; i < N_VALUES; i++) begin
      int v;
      v = int'($urandom_range(64)) + int'($urandom_range(64)) + int'($urandom_range(64)) - 96;
      fmap[i] = act_data_t'(v);
    end
    rst_n = 1'b0;
    in_valid = '0; out_ready = '1; in_data = '0;
    out_beat = '{default: 0};
    repeat (3) @(posedge clk);
    @(negedge clk);
    rst_n = 1'b1;
    @(negedge clk);

    in_valid = '1;
    for (int b = 0; b < N_BEATS; b++) begin
      for (int s = 0; s < S; s++)
        for (int l = 0; l < L; l++) in_data[s][l] = fmap[idx(s, b, l)];
      @(posedge clk);
      check(in_ready == '1, $sformatf("input refused at beat %0d", b));
      @(negedge clk);
    end
    in_valid = '0;
    while (received < N_BEATS * S) @(posedge clk);
    #1;
    // First beat accepted at edge 0, delivered at edge 3; the last one N_BEATS-1 edges later.
    $display("feature map %0dx%0dx%0d: %0d values, first input to last output %0d cycles, max error %0d/1000 LSB",
             H, W, C, N_VALUES, last_out - first_in, max_err_x1000);
    check(last_out - first_in == N_BEATS - 1 + 3,
          $sformatf("cycle count %0d, expected %0d", last_out - first_in, N_BEATS + 2));
    check(max_err_x1000 <= 500, "error above 1/2 LSB");

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (N_BEATS + 1000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
