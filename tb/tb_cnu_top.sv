// tb_cnu_top: end-to-end test of the one-hot check node unit at its default
// size (q = 3, 72 inputs).
//
// Streams input sets with random gaps and back-to-back runs and checks for
// every set, two cycles after it is presented:
//   min1      the smallest magnitude (exact),
//   min2      the second smallest distinct magnitude, or min1 when all
//             magnitudes are equal (the unit's documented imprecision),
//   min1_idx  the lowest input position holding min1,
//   beta_sign for each input the XOR of the other inputs' signs.
// The expected values come from sorting the magnitudes, not from any
// one-hot logic. Also covered: the worked examples of the design notes
// (inputs 1,2,4,5 and 1,2,1,5,4), sets shorter than 72 inputs padded with
// magnitude 7, an asynchronous reset in mid-stream, and counts of how often
// each mechanism occurred (each must occur at least once).
module tb_cnu_top;
  localparam int Q  = 3;
  localparam int DC = 72;
  localparam int IW = 7;

  logic clk = 1'b0;
  always #5 clk = ~clk;

  logic          rst_n;
  logic          in_valid;
  logic [Q:0]    alpha [DC];
  logic          out_valid;
  logic [Q-1:0]  min1, min2;
  logic [IW-1:0] min1_idx;
  logic [DC-1:0] beta_sign;

  cnu_top dut (
    .clk, .rst_n, .in_valid, .alpha,
    .out_valid, .min1, .min2, .min1_idx, .beta_sign
  );

  typedef struct {
    int            due;
    int            min1, min2, idx;
    logic [DC-1:0] signs;
  } exp_t;

  exp_t exp_q[$];

  int checks = 0, failures = 0;
  int cyc = 0;
  int n_imprecise = 0, n_all_equal = 0, n_min1_tie = 0, n_exact_distinct = 0;
  int n_bubble = 0, n_back_to_back = 0, n_padded = 0, n_reset = 0, n_examples = 0;
  logic prev_valid = 1'b0;

  always @(posedge clk) cyc++;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("FAIL watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // Reference model for one input set.
  function automatic exp_t model(input logic [Q:0] a [DC]);
    exp_t e;
    int m[$];
    int u[$];
    int exact2;
    for (int j = 0; j < DC; j++) m.push_back(int'(a[j][Q-1:0]));
    m.sort();
    u = m.unique();
    u.sort();
    e.min1 = m[0];
    e.min2 = (u.size() > 1) ? u[1] : u[0];
    exact2 = m[1];
    e.idx = -1;
    for (int j = 0; j < DC; j++) if (e.idx < 0 && int'(a[j][Q-1:0]) == e.min1) e.idx = j;
    for (int j = 0; j < DC; j++) begin
      e.signs[j] = 1'b0;
      for (int k = 0; k < DC; k++) if (k != j) e.signs[j] ^= a[k][Q];
    end
    // coverage of the mechanisms
    if (u.size() == 1) n_all_equal++;
    else if (e.min2 != exact2) n_imprecise++;
    else n_exact_distinct++;
    if (m[1] == m[0]) n_min1_tie++;
    e.due = 0;
    return e;
  endfunction

  // Output checker, at the falling edge.
  always @(negedge clk) begin
    if (rst_n) begin
      if (out_valid) begin
        exp_t e;
        checks++;
        if (exp_q.size() == 0) begin
          failures++;
          $display("FAIL cycle %0d: unexpected out_valid", cyc);
        end else begin
          e = exp_q.pop_front();
          if (e.due != cyc) begin
            failures++;
            $display("FAIL cycle %0d: result due in cycle %0d", cyc, e.due);
          end else if (int'(min1) != e.min1 || int'(min2) != e.min2 ||
                       int'(min1_idx) != e.idx || beta_sign !== e.signs) begin
            failures++;
            $display("FAIL cycle %0d: got min1=%0d min2=%0d idx=%0d signs=%h exp %0d %0d %0d %h",
                     cyc, min1, min2, min1_idx, beta_sign, e.min1, e.min2, e.idx, e.signs);
          end
        end
      end else if (exp_q.size() != 0 && exp_q[0].due <= cyc) begin
        checks++;
        failures++;
        $display("FAIL cycle %0d: missing result due in cycle %0d", cyc, exp_q[0].due);
        void'(exp_q.pop_front());
      end
    end
  end

  // Present one set (called at a falling edge); idle when v = 0.
  task automatic present(input logic v);
    exp_t e;
    in_valid = v;
    if (v) begin
      e = model(alpha);
      e.due = cyc + 2;
      exp_q.push_back(e);
      if (prev_valid) n_back_to_back++;
    end else if (prev_valid) begin
      n_bubble++;
    end
    prev_valid = v;
    @(negedge clk);
  endtask

  task automatic fill_uniform();
    for (int j = 0; j < DC; j++) alpha[j] = (Q+1)'($urandom);
  endtask

  // Mostly large magnitudes with a few small ones planted.
  task automatic fill_sparse(input int planted);
    for (int j = 0; j < DC; j++) alpha[j] = {1'($urandom), 3'(4 + $urandom % 4)};
    for (int k = 0; k < planted; k++) alpha[$urandom % DC] = {1'($urandom), 3'($urandom % 4)};
  endtask

  task automatic fill_list(input int vals[$]);
    for (int j = 0; j < DC; j++) alpha[j] = {1'b0, 3'd7};
    foreach (vals[j]) alpha[j] = {1'($urandom), 3'(vals[j])};
  endtask

  initial begin
    // drive a falling reset edge so the asynchronous reset takes effect
    rst_n    = 1'b1;
    in_valid = 1'b0;
    for (int j = 0; j < DC; j++) alpha[j] = '0;
    #1 rst_n = 1'b0;
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    @(negedge clk);

    // Worked examples: OR of 1,2,4,5 gives 00110110 -> min1 1, min2 2;
    // 1,2,1,5,4 gives min1 1 and min2 2 although the exact second minimum
    // is 1. The other inputs hold the largest magnitude.
    fill_list('{1, 2, 4, 5}); present(1'b1); n_examples++;
    fill_list('{1, 2, 1, 5, 4}); present(1'b1); n_examples++;
    present(1'b0);

    // All inputs equal.
    for (int v = 0; v < 8; v++) begin
      for (int j = 0; j < DC; j++) alpha[j] = {1'($urandom), 3'(v)};
      present(1'b1);
    end

    // Random stream with gaps.
    for (int t = 0; t < 3000; t++) begin
      case ($urandom % 5)
        0: fill_uniform();
        1: fill_sparse(1);
        2: fill_sparse(2 + $urandom % 4);
        3: begin
          // a code of lower degree, padded to 72 inputs
          int d;
          int vals[$];
          d = 6 + $urandom % 60;
          for (int j = 0; j < d; j++) vals.push_back($urandom % 8);
          fill_list(vals);
          n_padded++;
        end
        default: fill_sparse(1 + $urandom % 2);
      endcase
      present(($urandom % 4) != 0);
    end

    // Reset in mid-stream: results in flight are dropped.
    fill_uniform(); present(1'b1);
    fill_uniform(); in_valid = 1'b1;
    #2 rst_n = 1'b0;
    exp_q.delete();
    prev_valid = 1'b0;
    in_valid = 1'b0;
    n_reset++;
    @(negedge clk);
    checks++;
    if (out_valid !== 1'b0) begin
      failures++;
      $display("FAIL out_valid high during reset");
    end
    rst_n = 1'b1;
    @(negedge clk);
    for (int t = 0; t < 50; t++) begin
      fill_uniform();
      present(1'b1);
    end
    present(1'b0);
    present(1'b0);
    present(1'b0);

    checks++;
    if (exp_q.size() != 0) begin
      failures++;
      $display("FAIL %0d results never appeared", exp_q.size());
    end

    $display("mechanisms: imprecise_min2=%0d all_equal=%0d exact_min2=%0d min1_tie=%0d",
             n_imprecise, n_all_equal, n_exact_distinct, n_min1_tie);
    $display("            bubbles=%0d back_to_back=%0d padded=%0d reset=%0d examples=%0d",
             n_bubble, n_back_to_back, n_padded, n_reset, n_examples);
    checks++;
    if (n_imprecise == 0 || n_all_equal == 0 || n_exact_distinct == 0 || n_min1_tie == 0 ||
        n_bubble == 0 || n_back_to_back == 0 || n_padded == 0 || n_reset == 0 ||
        n_examples == 0) begin
      failures++;
      $display("FAIL a mechanism was never exercised");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
