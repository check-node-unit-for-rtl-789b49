// tb_or_tree: random check of the OR tree at the default degree (72 inputs)
// and at an odd degree (5 inputs), against a sequential OR of the inputs.
module tb_or_tree;
  logic clk = 1'b0;
  always #5 clk = ~clk;

  int checks = 0, failures = 0;

  localparam int W = 8;

  logic [W-1:0] a_in [72];
  logic [W-1:0] a_out;
  logic [W-1:0] b_in [5];
  logic [W-1:0] b_out;

  or_tree #(.W(W))           dut_a (.in_vec(a_in), .or_out(a_out));
  or_tree #(.W(W), .DC(5))   dut_b (.in_vec(b_in), .or_out(b_out));

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic logic [W-1:0] rand_onehot();
    return W'(1) << ($urandom % W);
  endfunction

  initial begin
    logic [W-1:0] ref_a, ref_b;
    for (int t = 0; t < 500; t++) begin
      ref_a = '0;
      ref_b = '0;
      for (int j = 0; j < 72; j++) begin
        // mostly one-hot, sometimes arbitrary patterns or zero
        a_in[j] = (t % 3 == 0) ? W'($urandom) : ((t % 7 == 1) ? '0 : rand_onehot());
        ref_a |= a_in[j];
      end
      for (int j = 0; j < 5; j++) begin
        b_in[j] = (t % 2 == 0) ? rand_onehot() : W'($urandom);
        ref_b |= b_in[j];
      end
      @(posedge clk);
      checks += 2;
      if (a_out !== ref_a) begin
        failures++;
        $display("FAIL DC=72 t=%0d got %b exp %b", t, a_out, ref_a);
      end
      if (b_out !== ref_b) begin
        failures++;
        $display("FAIL DC=5 t=%0d got %b exp %b", t, b_out, ref_b);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
