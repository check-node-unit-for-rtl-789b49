// tb_min1_index: first-minimum index at the default degree (72 inputs).
// Random magnitudes, often with several inputs sharing the minimum; min1 is
// the true minimum found by the testbench, and the expected index is the
// lowest input position holding it.
module tb_min1_index;
  logic clk = 1'b0;
  always #5 clk = ~clk;

  int checks = 0, failures = 0, ties = 0;

  localparam int DC = 72;

  logic [2:0] mag [DC];
  logic [2:0] min1;
  logic [6:0] idx;

  min1_index dut (.mag(mag), .min1(min1), .idx(idx));

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int m, e, cnt;
    for (int t = 0; t < 1000; t++) begin
      m = 7;
      for (int j = 0; j < DC; j++) begin
        // t odd: values 4..7 with one or a few small ones planted
        mag[j] = (t % 2 == 0) ? 3'($urandom) : 3'(4 + $urandom % 4);
      end
      if (t % 2 == 1) begin
        for (int k = 0; k < 1 + t % 3; k++) mag[$urandom % DC] = 3'($urandom % 4);
      end
      for (int j = 0; j < DC; j++) if (int'(mag[j]) < m) m = int'(mag[j]);
      e = -1;
      cnt = 0;
      for (int j = 0; j < DC; j++) if (int'(mag[j]) == m) begin
        cnt++;
        if (e < 0) e = j;
      end
      if (cnt > 1) ties++;
      min1 = 3'(m);
      @(posedge clk);
      checks++;
      if (int'(idx) != e) begin
        failures++;
        $display("FAIL t=%0d min1=%0d idx=%0d exp %0d", t, m, idx, e);
      end
    end
    checks++;
    if (ties == 0) begin
      failures++;
      $display("FAIL no tied minimum was exercised");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
