// tb_stream_fifo: self-checking testbench of stream_fifo.
//
// Two instances, DEPTH 2 and DEPTH 5 (not a power of two), are driven with
// random valid/ready patterns. A queue model predicts the data order and
// occupancy; the testbench checks out_data on every read, in_ready and
// out_valid every cycle, that a full FIFO refuses writes, and that with both
// sides always ready one beat passes per cycle after a 1-cycle latency.
module tb_stream_fifo;

  localparam int W = 16;

  logic clk = 1'b0;
  logic rst_n;
  int   checks = 0;
  int   failures = 0;
  int   full_seen = 0;

  always #5 clk = ~clk;

  task automatic check(bit cond, string what);
    checks++;
    if (!cond) begin
      failures++;
      if (failures <= 20) $display("FAIL: %s", what);
    end
  endtask

  logic         in_valid [2];
  logic         in_ready [2];
  logic [W-1:0] in_data  [2];
  logic         out_valid[2];
  logic         out_ready[2];
  logic [W-1:0] out_data [2];

  stream_fifo #(.WIDTH(W), .DEPTH(2)) u_d2 (
    .clk(clk), .rst_n(rst_n),
    .in_valid(in_valid[0]), .in_ready(in_ready[0]), .in_data(in_data[0]),
    .out_valid(out_valid[0]), .out_ready(out_ready[0]), .out_data(out_data[0]));

  stream_fifo #(.WIDTH(W), .DEPTH(5)) u_d5 (
    .clk(clk), .rst_n(rst_n),
    .in_valid(in_valid[1]), .in_ready(in_ready[1]), .in_data(in_data[1]),
    .out_valid(out_valid[1]), .out_ready(out_ready[1]), .out_data(out_data[1]));

  localparam int DEPTHS [2] = '{2, 5};

  logic [W-1:0] model [2][$];
  int           next_val [2];

  // Run `cycles` cycles; valid/ready are high with the given percentages.
  task automatic run(int cycles, int pct_valid, int pct_ready);
    for (int c = 0; c < cycles; c++) begin
      @(negedge clk);
      for (int f = 0; f < 2; f++) begin
        in_valid[f]  = ($urandom_range(99) < pct_valid);
        out_ready[f] = ($urandom_range(99) < pct_ready);
        in_data[f]   = W'(next_val[f]);
      end
      #1;
      for (int f = 0; f < 2; f++) begin
        check(in_ready[f] == (model[f].size() < DEPTHS[f]), $sformatf("in_ready f%0d", f));
        check(out_valid[f] == (model[f].size() > 0), $sformatf("out_valid f%0d", f));
        if (model[f].size() == DEPTHS[f]) full_seen++;
        if (out_valid[f] && out_ready[f]) begin
          check(out_data[f] == model[f][0],
                $sformatf("data f%0d got %0h exp %0h", f, out_data[f], model[f][0]));
        end
      end
      @(posedge clk);
      for (int f = 0; f < 2; f++) begin
        if (out_valid[f] && out_ready[f]) void'(model[f].pop_front());
        if (in_valid[f] && in_ready[f]) begin
          model[f].push_back(in_data[f]);
          next_val[f]++;
        end
      end
    end
  endtask

  initial begin
    rst_n = 1'b0;
    for (int f = 0; f < 2; f++) begin
      in_valid[f] = 1'b0; out_ready[f] = 1'b0; in_data[f] = '0; next_val[f] = 1;
    end
    repeat (2) @(posedge clk);
    @(negedge clk);
    rst_n = 1'b1;

    run(400, 50, 50);
    run(200, 90, 20);   // mostly full
    run(200, 20, 90);   // mostly empty
    run(20, 0, 100);    // drain

    // Streaming: both sides ready every cycle; after the first beat, one per cycle.
    begin
      int got [2];
      got = '{0, 0};
      for (int c = 0; c < 50; c++) begin
        @(negedge clk);
        for (int f = 0; f < 2; f++) begin
          in_valid[f] = 1'b1; out_ready[f] = 1'b1; in_data[f] = W'(next_val[f]);
        end
        #1;
        for (int f = 0; f < 2; f++) begin
          if (c == 0) check(!out_valid[f], $sformatf("latency f%0d", f));
          if (out_valid[f]) begin
            check(out_data[f] == model[f][0], $sformatf("stream data f%0d", f));
            got[f]++;
          end
        end
        @(posedge clk);
        for (int f = 0; f < 2; f++) begin
          if (out_valid[f]) void'(model[f].pop_front());
          if (in_ready[f]) begin model[f].push_back(in_data[f]); next_val[f]++; end
        end
      end
      for (int f = 0; f < 2; f++) check(got[f] == 49, $sformatf("throughput f%0d: %0d", f, got[f]));
    end
    check(full_seen > 0, "FIFO never became full");

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
