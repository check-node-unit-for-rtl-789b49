// min1_index: index of the input that holds the first minimum.
//
// Two stages, as the design description gives them: DC equality comparators
// compare each input magnitude with the first minimum, then a priority
// encoder turns the resulting match vector into an index. When several
// inputs hold the minimum the lowest index is reported (this design's
// choice). Purely combinational.
//
// Ports: mag[DC] (Q bits each) and min1 (Q bits) in; idx (ceil(log2 DC)
// bits) out.
module min1_index #(
  parameter int unsigned Q  = cnu_pkg::CNU_Q,
  parameter int unsigned DC = cnu_pkg::CNU_DC
) (
  input  logic [Q-1:0]                   mag [DC],
  input  logic [Q-1:0]                   min1,
  output logic [cnu_pkg::idx_w(DC)-1:0]  idx
);

  logic [DC-1:0] match;  // inputs whose magnitude equals min1

  // Stage 1: one comparator per input.
  for (genvar j = 0; j < DC; j++) begin : g_comp
    assign match[j] = (mag[j] == min1);
  end

  // Stage 2: priority encoder.
  logic found;

  prio_enc #(.N(DC)) u_penc (
    .req   (match),
    .idx   (idx),
    .valid (found)
  );

  // The first minimum is always one of the inputs, so found is always high
  // in the check node unit.
  always_comb begin
    assert (found) else $error("min1_index: no input equals min1");
  end

endmodule
