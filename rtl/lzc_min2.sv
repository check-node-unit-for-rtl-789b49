// lzc_min2: modified leading zero counter that returns the positions of the
// two least significant ones of a W = 2^Q bit vector.
//
// A conventional counter gives only the position of the least significant
// one; here that position is min1, the set bit is then masked off and the
// position of the next one is min2. Applied to the OR of one-hot magnitudes,
// min1 is the exact first minimum and min2 the second smallest *distinct*
// magnitude, which is why the unit is imprecise when the two minimums are
// equal. This design's choices: when only one bit is set (all inputs have
// the same magnitude) min2 is made equal to min1, which is then the exact
// answer; an all-zero vector, which the unit never produces, gives 0 for
// both. Purely combinational.
//
// Ports: vec (W bits) in; min1, min2 (Q bits) out.
module lzc_min2 #(
  parameter int unsigned Q = cnu_pkg::CNU_Q
) (
  input  logic [2**Q-1:0] vec,
  output logic [Q-1:0]    min1,
  output logic [Q-1:0]    min2
);

  localparam int unsigned W = 2**Q;

  logic [W-1:0] first_oh;  // isolated least significant one
  logic [W-1:0] rest;      // vec with that one removed

  // First stage: priority scan for the least significant one.
  always_comb begin
    first_oh = '0;
    min1     = '0;
    for (int i = W-1; i >= 0; i--) begin
      if (vec[i]) begin
        first_oh = '0;
        first_oh[i] = 1'b1;
        min1 = Q'(i);
      end
    end
  end

  assign rest = vec & ~first_oh;

  // Second stage: the same scan on what is left.
  always_comb begin
    min2 = min1;
    for (int i = W-1; i >= 0; i--) begin
      if (rest[i]) min2 = Q'(i);
    end
  end

endmodule
