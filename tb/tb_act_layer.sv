// tb_act_layer: self-checking testbench of act_layer.
//
// Two layers are tested: a sigmoid layer with 4 lanes and 8 fractional bits
// (inputs in [-0.5, 0.496]; sigmoid values of 0.5 and above exceed the
// largest code, 127/256, and must saturate)
// and an unsigned SiLU layer with 3 lanes and 4 fractional bits. Random input
// vectors are offered with random valid and ready patterns; a queue of the
// accepted vectors is the scoreboard and every lane of every delivered vector
// is checked against the floating-point reference. The testbench also checks
// the 1-cycle latency, one vector per cycle with a ready consumer, and that a
// stalled output holds.
module tb_act_layer;
  import act_pkg::*;
  import act_ref_pkg::*;

  localparam int L0 = 4;
  localparam int L1 = 3;

  logic clk = 1'b0;
  logic rst_n;
  int   checks = 0;
  int   failures = 0;
  int   stalls = 0;
  int   saturated = 0;

  always #5 clk = ~clk;

  task automatic check(bit cond, string what);
    checks++;
    if (!cond) begin
      failures++;
      if (failures <= 20) $display("FAIL: %s", what);
    end
  endtask

  logic                      a_in_valid, a_in_ready, a_out_valid, a_out_ready;
  logic [L0-1:0][DATA_W-1:0] a_in_data, a_out_data;
  logic                      b_in_valid, b_in_ready, b_out_valid, b_out_ready;
  logic [L1-1:0][DATA_W-1:0] b_in_data, b_out_data;

  act_layer #(.FUNC(ACT_SIGMOID), .FRAC_BITS(8), .IS_SIGNED(1'b1), .LANES(L0)) u_a (
    .clk(clk), .rst_n(rst_n),
    .in_valid(a_in_valid), .in_ready(a_in_ready), .in_data(a_in_data),
    .out_valid(a_out_valid), .out_ready(a_out_ready), .out_data(a_out_data));

  act_layer #(.FUNC(ACT_SILU), .FRAC_BITS(4), .IS_SIGNED(1'b0), .LANES(L1)) u_b (
    .clk(clk), .rst_n(rst_n),
    .in_valid(b_in_valid), .in_ready(b_in_ready), .in_data(b_in_data),
    .out_valid(b_out_valid), .out_ready(b_out_ready), .out_data(b_out_data));

  logic [L0-1:0][DATA_W-1:0] qa [$];
  logic [L1-1:0][DATA_W-1:0] qb [$];
  int                        a_delivered, b_delivered;

  // Compare and retire delivered beats at each rising edge.
  always @(posedge clk) begin
    if (rst_n) begin
      if (a_out_valid && !a_out_ready) stalls++;
      if (a_out_valid && a_out_ready) begin
        logic [L0-1:0][DATA_W-1:0] x;
        x = qa.pop_front();
        a_delivered++;
        for (int l = 0; l < L0; l++) begin
          check(act_ok(ACT_SIGMOID, 8, 1'b1, x[l], a_out_data[l]),
                $sformatf("sigmoid lane %0d in %02h got %02h", l, x[l], a_out_data[l]));
          if (act_ideal(ACT_SIGMOID, 8, 1'b1, x[l]) >= 127.0) saturated++;
        end
      end
      if (b_out_valid && b_out_ready) begin
        logic [L1-1:0][DATA_W-1:0] x;
        x = qb.pop_front();
        b_delivered++;
        for (int l = 0; l < L1; l++) begin
          check(act_ok(ACT_SILU, 4, 1'b0, x[l], b_out_data[l]),
                $sformatf("silu lane %0d in %02h got %02h", l, x[l], b_out_data[l]));
        end
      end
      if (a_in_valid && a_in_ready) qa.push_back(a_in_data);
      if (b_in_valid && b_in_ready) qb.push_back(b_in_data);
    end
  end

  task automatic drive(int cycles, int pct_valid, int pct_ready);
    for (int c = 0; c < cycles; c++) begin
      @(negedge clk);
      if (!(a_in_valid && !a_in_ready)) begin
        a_in_valid = ($urandom_range(99) < pct_valid);
        for (int l = 0; l < L0; l++) a_in_data[l] = DATA_W'($urandom);
      end
      if (!(b_in_valid && !b_in_ready)) begin
        b_in_valid = ($urandom_range(99) < pct_valid);
        for (int l = 0; l < L1; l++) b_in_data[l] = DATA_W'($urandom);
      end
      a_out_ready = ($urandom_range(99) < pct_ready);
      b_out_ready = ($urandom_range(99) < pct_ready);
    end
  endtask

  initial begin
    rst_n = 1'b0;
    a_in_valid = 1'b0; b_in_valid = 1'b0; a_out_ready = 1'b0; b_out_ready = 1'b0;
    a_in_data = '0; b_in_data = '0;
    a_delivered = 0; b_delivered = 0;
    repeat (2) @(posedge clk);
    @(negedge clk);
    rst_n = 1'b1;

    // Latency: one beat in, visible exactly one cycle later.
    a_in_valid = 1'b1; a_in_data = {8'h7f, 8'h80, 8'h00, 8'h40}; a_out_ready = 1'b0;
    @(posedge clk); #1;
    check(a_out_valid, "latency: out_valid one cycle after input");
    check(!a_in_ready, "stalled output blocks input");
    // Expected codes worked out by hand, 8 fractional bits (range [-0.5, 0.496]):
    // sigmoid(0.496)*256 = 159.1 -> saturates to 127 (0x7f), sigmoid(-0.5)*256 = 96.65 -> 97 (0x61),
    // sigmoid(0)*256 = 128 -> 127 (0x7f), sigmoid(0.25)*256 = 143.9 -> 127 (0x7f).
    check(a_out_data == {8'h7f, 8'h61, 8'h7f, 8'h7f},
          $sformatf("hand-computed vector got %08h", a_out_data));
    @(negedge clk);
    a_in_valid = 1'b0; a_out_ready = 1'b1;
    @(negedge clk);

    drive(600, 60, 60);
    drive(300, 100, 30);
    drive(300, 100, 100);
    // Sweep the sigmoid layer through every input value, to reach saturation.
    for (int v = 0; v < 256; v += L0) begin
      @(negedge clk);
      a_in_valid = 1'b1; a_out_ready = 1'b1;
      for (int l = 0; l < L0; l++) a_in_data[l] = DATA_W'(v + l);
    end
    // Throughput: with both sides always ready the layer moves one beat per cycle.
    @(negedge clk);
    a_in_valid = 1'b1; a_out_ready = 1'b1;
    begin
      int n_start;
      n_start = a_delivered;
      repeat (100) @(posedge clk);
      #1;
      check(a_delivered - n_start == 100, $sformatf("throughput %0d/100", a_delivered - n_start));
    end
    @(negedge clk);
    a_in_valid = 1'b0; b_in_valid = 1'b0; a_out_ready = 1'b1; b_out_ready = 1'b1;
    repeat (3) @(posedge clk);
    check(qa.size() == 0 && qb.size() == 0, "all accepted beats delivered");
    check(stalls > 0, "no output stall happened");
    check(saturated > 0, "no saturated output happened");
    check(b_delivered > 100, "too few SiLU beats");

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
