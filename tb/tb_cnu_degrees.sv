// tb_cnu_degrees: runs the check node unit at every check node degree of
// the evaluated codes: d_c = 10, 15, 20, 32, 40, 64, 72 (the synthesis
// sweep) and d_c = 6, 9, 12, 18, 30 (regular d_v = 3 codes of rate 1/2,
// 2/3, 3/4, 5/6 and 9/10). Each degree gets its own unit with random input
// sets, checked for value and for the two-cycle latency.
module tb_cnu_degrees;
  logic clk = 1'b0;
  always #5 clk = ~clk;

  localparam int NDEG = 12;
  localparam int DEGS [NDEG] = '{6, 9, 10, 12, 15, 18, 20, 30, 32, 40, 64, 72};

  logic [NDEG-1:0] done;
  int c [NDEG];
  int f [NDEG];
  int imp [NDEG];

  for (genvar g = 0; g < NDEG; g++) begin : g_deg
    cnu_deg_check #(.DC(DEGS[g])) u_chk (
      .clk, .done(done[g]), .checks(c[g]), .failures(f[g]), .imprecise(imp[g])
    );
  end

  int checks = 0, failures = 0;

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("FAIL watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    wait (&done);
    for (int g = 0; g < NDEG; g++) begin
      $display("d_c=%0d checks=%0d failures=%0d imprecise_min2=%0d", DEGS[g], c[g], f[g], imp[g]);
      checks += c[g] + 1;
      failures += f[g];
      if (imp[g] == 0) begin
        failures++;
        $display("FAIL d_c=%0d: imprecise second minimum never exercised", DEGS[g]);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
