// cnu_deg_check: drives one check node unit of degree DC with random input
// sets, one at a time, and checks each result two cycles later against a
// sorting reference model. Used by tb_cnu_degrees to run every check node
// degree of the evaluated codes. Reports its totals through its ports once
// done is high.
module cnu_deg_check #(
  parameter int DC   = 10,
  parameter int SETS = 200
) (
  input  logic clk,
  output logic done,
  output int   checks,
  output int   failures,
  output int   imprecise
);
  localparam int Q  = 3;
  localparam int IW = (DC > 1) ? $clog2(DC) : 1;

  logic          rst_n;
  logic          in_valid;
  logic [Q:0]    alpha [DC];
  logic          out_valid;
  logic [Q-1:0]  min1, min2;
  logic [IW-1:0] min1_idx;
  logic [DC-1:0] beta_sign;

  cnu_top #(.Q(Q), .DC(DC)) dut (
    .clk, .rst_n, .in_valid, .alpha,
    .out_valid, .min1, .min2, .min1_idx, .beta_sign
  );

  initial begin
    int m[$], u[$];
    int e1, e2, ei;
    logic [DC-1:0] es;
    done = 1'b0;
    checks = 0;
    failures = 0;
    imprecise = 0;
    // drive a falling reset edge so the asynchronous reset takes effect
    rst_n = 1'b1;
    in_valid = 1'b0;
    for (int j = 0; j < DC; j++) alpha[j] = '0;
    #1 rst_n = 1'b0;
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    for (int t = 0; t < SETS; t++) begin
      // uniform magnitudes, or large ones with a few small ones planted
      for (int j = 0; j < DC; j++)
        alpha[j] = (t % 2 == 0) ? (Q+1)'($urandom) : {1'($urandom), 3'(4 + $urandom % 4)};
      if (t % 2 == 1)
        for (int k = 0; k < 1 + t % 3; k++) alpha[$urandom % DC] = {1'($urandom), 3'($urandom % 4)};
      m.delete();
      for (int j = 0; j < DC; j++) m.push_back(int'(alpha[j][Q-1:0]));
      m.sort();
      u = m.unique();
      u.sort();
      e1 = m[0];
      e2 = (u.size() > 1) ? u[1] : u[0];
      if (e2 != m[1]) imprecise++;
      ei = -1;
      for (int j = 0; j < DC; j++) if (ei < 0 && int'(alpha[j][Q-1:0]) == e1) ei = j;
      for (int j = 0; j < DC; j++) begin
        es[j] = 1'b0;
        for (int k = 0; k < DC; k++) if (k != j) es[j] ^= alpha[k][Q];
      end
      in_valid = 1'b1;
      @(negedge clk);
      in_valid = 1'b0;
      checks++;
      if (out_valid) begin
        failures++;
        $display("FAIL DC=%0d set %0d: result one cycle early", DC, t);
      end
      @(negedge clk);
      checks++;
      if (!out_valid || int'(min1) != e1 || int'(min2) != e2 ||
          int'(min1_idx) != ei || beta_sign !== es) begin
        failures++;
        $display("FAIL DC=%0d set %0d: valid=%b min1=%0d min2=%0d idx=%0d exp %0d %0d %0d",
                 DC, t, out_valid, min1, min2, min1_idx, e1, e2, ei);
      end
    end
    done = 1'b1;
  end
endmodule
