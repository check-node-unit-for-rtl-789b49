// tb_lzc_min2: exhaustive check of the modified leading zero counter for
// q = 3. The expected min1/min2 are found by listing the set bit positions
// in ascending order: min1 is the first, min2 the second, or min1 again when
// only one bit is set (both 0 for an empty vector).
module tb_lzc_min2;
  logic clk = 1'b0;
  always #5 clk = ~clk;

  int checks = 0, failures = 0;

  logic [7:0] vec;
  logic [2:0] min1, min2;

  lzc_min2 #(.Q(3)) dut (.vec(vec), .min1(min1), .min2(min2));

  initial begin
    repeat (2000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int pos[$];
    int e1, e2;
    for (int v = 0; v < 256; v++) begin
      vec = 8'(v);
      pos.delete();
      for (int b = 0; b < 8; b++) if (v[b]) pos.push_back(b);
      e1 = (pos.size() > 0) ? pos[0] : 0;
      e2 = (pos.size() > 1) ? pos[1] : e1;
      @(posedge clk);
      checks++;
      if (int'(min1) != e1 || int'(min2) != e2) begin
        failures++;
        $display("FAIL vec=%b min1=%0d min2=%0d exp %0d %0d", vec, min1, min2, e1, e2);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
