// onehot_dec: q-to-2^q decoder.
//
// Turns a q-bit magnitude into a 2^q-bit vector in which only the bit whose
// position equals the magnitude is set (value 2 with q = 3 gives 00000100).
// This one-hot form is what lets the check node unit find its minimums with
// OR gates instead of carry-based comparators. Purely combinational.
//
// Ports: mag (Q bits) in, onehot (2^Q bits) out.
module onehot_dec #(
  parameter int unsigned Q = cnu_pkg::CNU_Q
) (
  input  logic [Q-1:0]      mag,
  output logic [2**Q-1:0]   onehot
);

  always_comb begin
    onehot = '0;
    for (int unsigned i = 0; i < 2**Q; i++)
      onehot[i] = (mag == Q'(i));
  end

endmodule
