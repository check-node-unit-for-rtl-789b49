// tb_prio_enc: priority encoder at N = 72 and N = 10 with random and sparse
// request vectors; the expected index is the lowest set bit, found by a
// linear search, and valid must equal "any bit set".
module tb_prio_enc;
  logic clk = 1'b0;
  always #5 clk = ~clk;

  int checks = 0, failures = 0;

  logic [71:0] req_a;
  logic [6:0]  idx_a;
  logic        val_a;
  logic [9:0]  req_b;
  logic [3:0]  idx_b;
  logic        val_b;

  prio_enc            dut_a (.req(req_a), .idx(idx_a), .valid(val_a));
  prio_enc #(.N(10))  dut_b (.req(req_b), .idx(idx_b), .valid(val_b));

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic int lowest(input logic [71:0] r, input int n);
    for (int i = 0; i < n; i++) if (r[i]) return i;
    return -1;
  endfunction

  initial begin
    int ea, eb;
    for (int t = 0; t < 1000; t++) begin
      if (t == 0) begin
        req_a = '0;
        req_b = '0;
      end else if (t % 2 == 0) begin
        // a single bit, or a single bit plus bits above it
        req_a = 72'd1 << ($urandom % 72);
        req_a |= {$urandom, $urandom, $urandom} & ~((req_a << 1) - 72'd1) & {72{t % 4 == 0}};
        req_b = 10'd1 << ($urandom % 10);
      end else begin
        req_a = {$urandom, $urandom, $urandom};
        req_b = 10'($urandom);
      end
      ea = lowest(req_a, 72);
      eb = lowest({62'd0, req_b}, 10);
      @(posedge clk);
      checks += 2;
      if (val_a !== (ea >= 0) || (ea >= 0 && int'(idx_a) != ea)) begin
        failures++;
        $display("FAIL N=72 req=%h idx=%0d valid=%b exp %0d", req_a, idx_a, val_a, ea);
      end
      if (val_b !== (eb >= 0) || (eb >= 0 && int'(idx_b) != eb)) begin
        failures++;
        $display("FAIL N=10 req=%b idx=%0d valid=%b exp %0d", req_b, idx_b, val_b, eb);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
