// tb_act_accel_top: end-to-end testbench of act_accel_top at its default
// parameters (SiLU, signed data with 3 fractional bits, 2 streams of 4 lanes,
// FIFOs of depth 2).
//
// Each stream gets its own random traffic. A per-stream queue of accepted
// input vectors is the scoreboard: every delivered vector is compared lane by
// lane with the floating-point SiLU reference (within 1/2 LSB). The test runs
// phases of free flow, random back-pressure, a long output stall and a sweep of
// all 256 input codes, then checks:
//   - the 3-cycle latency from an accepted input to out_valid;
//   - one vector per cycle per stream when both ends are always ready;
//   - that every accepted vector came out, in order.
// It counts each mechanism of the design and fails if one never happened:
// a stall of the activation layer (its result held while the output FIFO is
// full), an input FIFO refusing a beat (in_ready low), both streams delivering
// in the same cycle, and a negative input giving a negative, non-zero SiLU
// output (the small negative values SiLU lets through, unlike ReLU).
module tb_act_accel_top;
  import act_pkg::*;
  import act_ref_pkg::*;

  localparam int S = 2;
  localparam int L = 4;
  localparam int F = 3;

  logic                           clk = 1'b0;
  logic                           rst_n;
  logic [S-1:0]                   in_valid, in_ready, out_valid, out_ready;
  logic [S-1:0][L-1:0][DATA_W-1:0] in_data, out_data;

  int checks = 0;
  int failures = 0;
  int cycle = 0;
  int n_layer_stall = 0, n_in_refused = 0, n_both_streams = 0, n_neg_pass = 0;
  int delivered [S];

  always #5 clk = ~clk;
  always @(posedge clk) cycle++;

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

  logic [L-1:0][DATA_W-1:0] sb [S][$];
  int                       sb_cycle [S][$];
  int                       last_latency [S];

  always @(posedge clk) begin
    if (rst_n) begin
      if (&(out_valid & out_ready)) n_both_streams++;
      if (u_dut.g_stream[0].u_layer.out_valid && !u_dut.g_stream[0].u_layer.out_ready)
        n_layer_stall++;
      for (int s = 0; s < S; s++) begin
        if (in_valid[s] && !in_ready[s]) n_in_refused++;
        if (out_valid[s] && out_ready[s]) begin
          logic [L-1:0][DATA_W-1:0] x;
          if (sb[s].size() == 0) begin
            check(1'b0, $sformatf("stream %0d delivered a beat nobody sent", s));
          end else begin
            x = sb[s].pop_front();
            last_latency[s] = cycle - sb_cycle[s].pop_front();
            delivered[s]++;
            for (int l = 0; l < L; l++) begin
              check(act_ok(ACT_SILU, F, 1'b1, x[l], out_data[s][l]),
                    $sformatf("stream %0d lane %0d in %02h got %02h", s, l, x[l], out_data[s][l]));
              if ($signed(x[l]) < 0 && $signed(out_data[s][l]) < 0) n_neg_pass++;
            end
          end
        end
        if (in_valid[s] && in_ready[s]) begin
          sb[s].push_back(in_data[s]);
          sb_cycle[s].push_back(cycle);
        end
      end
    end
  end

  // One cycle of random traffic; a refused beat is kept until it is taken.
  task automatic traffic(int pct_valid, int pct_ready);
    @(negedge clk);
    for (int s = 0; s < S; s++) begin
      if (!(in_valid[s] && !in_ready[s])) begin
        in_valid[s] = ($urandom_range(99) < pct_valid);
        for (int l = 0; l < L; l++) in_data[s][l] = DATA_W'($urandom);
      end
      out_ready[s] = ($urandom_range(99) < pct_ready);
    end
  endtask

  task automatic drain();
    @(negedge clk);
    in_valid  = '0;
    out_ready = '1;
    repeat (10) @(posedge clk);
    #1;
    for (int s = 0; s < S; s++) check(sb[s].size() == 0, $sformatf("stream %0d not drained", s));
  endtask

  initial begin
    rst_n = 1'b0;
    in_valid = '0; out_ready = '0; in_data = '0;
    delivered = '{default: 0};
    last_latency = '{default: 0};
    repeat (3) @(posedge clk);
    @(negedge clk);
    rst_n = 1'b1;

    // Latency of a single beat through an idle accelerator: 3 cycles.
    @(negedge clk);
    in_valid = 2'b01; out_ready = '1;
    in_data[0] = {8'h08, 8'hf8, 8'h00, 8'h7f};  // SiLU: 1.0, -1.0, 0, 15.875
    @(negedge clk);
    in_valid = '0;
    repeat (2) @(negedge clk);
    check(out_valid[0], "output after 3 cycles");
    // Hand-computed: SiLU(1)=0.731 -> 6, SiLU(-1)=-0.269 -> -2 (0xfe), 0 -> 0, 15.875 -> 127.
    check(out_data[0] == {8'h06, 8'hfe, 8'h00, 8'h7f}, $sformatf("hand vector got %08h", out_data[0]));
    @(posedge clk); #1;
    check(last_latency[0] == 3, $sformatf("latency %0d, expected 3", last_latency[0]));
    drain();

    // Free flow: both ends always ready, one vector per cycle per stream.
    begin
      int n_start [S];
      @(negedge clk);
      for (int s = 0; s < S; s++) n_start[s] = delivered[s];
      in_valid = '1; out_ready = '1;
      for (int c = 0; c < 200; c++) begin
        for (int s = 0; s < S; s++)
          for (int l = 0; l < L; l++) in_data[s][l] = DATA_W'($urandom);
        @(negedge clk);
      end
      for (int s = 0; s < S; s++) begin
        check(delivered[s] - n_start[s] >= 197,
              $sformatf("stream %0d throughput %0d in 200 cycles", s, delivered[s] - n_start[s]));
        check(in_ready[s], $sformatf("stream %0d refused input in free flow", s));
      end
    end
    drain();

    // Random back-pressure.
    repeat (1500) traffic(70, 50);
    // Output held off: the FIFOs and the layer fill, in_ready must drop.
    repeat (20) traffic(100, 0);
    for (int s = 0; s < S; s++) check(!in_ready[s], $sformatf("stream %0d accepted while full", s));
    repeat (500) traffic(90, 80);
    drain();

    // Every input code through every lane.
    @(negedge clk);
    out_ready = '1;
    for (int v = 0; v < 256; v++) begin
      in_valid = '1;
      for (int s = 0; s < S; s++)
        for (int l = 0; l < L; l++) in_data[s][l] = DATA_W'(v + 64 * l + 17 * s);
      @(negedge clk);
    end
    drain();

    $display("mechanisms: layer_stall=%0d input_refused=%0d both_streams=%0d negative_silu=%0d",
             n_layer_stall, n_in_refused, n_both_streams, n_neg_pass);
    $display("delivered: stream0=%0d stream1=%0d", delivered[0], delivered[1]);
    check(n_layer_stall > 0, "activation layer never stalled");
    check(n_in_refused > 0, "input FIFO never refused a beat");
    check(n_both_streams > 0, "streams never delivered together");
    check(n_neg_pass > 0, "no negative SiLU output seen");

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
