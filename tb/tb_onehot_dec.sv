// tb_onehot_dec: exhaustive check of the q-to-2^q decoder for q = 3 and
// q = 4: every magnitude must give the vector with exactly that bit set.
module tb_onehot_dec;
  logic clk = 1'b0;
  always #5 clk = ~clk;

  int checks = 0, failures = 0;

  logic [2:0]  mag3;
  logic [7:0]  oh3;
  logic [3:0]  mag4;
  logic [15:0] oh4;

  onehot_dec #(.Q(3)) dut3 (.mag(mag3), .onehot(oh3));
  onehot_dec #(.Q(4)) dut4 (.mag(mag4), .onehot(oh4));

  initial begin
    repeat (2000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int v = 0; v < 8; v++) begin
      mag3 = 3'(v);
      @(posedge clk);
      checks++;
      if (oh3 !== (8'd1 << v)) begin
        failures++;
        $display("FAIL q=3 mag=%0d onehot=%b", v, oh3);
      end
    end
    for (int v = 0; v < 16; v++) begin
      mag4 = 4'(v);
      @(posedge clk);
      checks++;
      if (oh4 !== (16'd1 << v)) begin
        failures++;
        $display("FAIL q=4 mag=%0d onehot=%b", v, oh4);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
