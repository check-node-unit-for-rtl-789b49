// tb_sign_comp: sign computation at the default degree (72 inputs). The
// expected sign for input j is the XOR of the signs of every other input,
// computed by a loop that skips j.
module tb_sign_comp;
  logic clk = 1'b0;
  always #5 clk = ~clk;

  int checks = 0, failures = 0;

  localparam int DC = 72;

  logic [DC-1:0] sgn, beta;

  sign_comp dut (.sgn(sgn), .beta_sign(beta));

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [DC-1:0] exp_b;
    for (int t = 0; t < 600; t++) begin
      case (t % 4)
        0: sgn = {$urandom, $urandom, $urandom};
        1: sgn = DC'(1) << ($urandom % DC);
        2: sgn = '0;
        default: sgn = ~(DC'(1) << ($urandom % DC));
      endcase
      for (int j = 0; j < DC; j++) begin
        exp_b[j] = 1'b0;
        for (int k = 0; k < DC; k++) if (k != j) exp_b[j] ^= sgn[k];
      end
      @(posedge clk);
      checks++;
      if (beta !== exp_b) begin
        failures++;
        $display("FAIL t=%0d sgn=%h beta=%h exp %h", t, sgn, beta, exp_b);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
