// sign_comp: sign computation for a min-sum check node.
//
// The sign sent back to input j is the product of the signs of all other
// inputs. With sign bits (1 = negative) this is the XOR of all signs, the
// total sign, XORed once more with input j's own sign. The XOR rule is the
// standard min-sum sign update; the design description names the block and
// its DC-bit output but not its insides. Purely combinational.
//
// Ports: sgn (DC bits) in; beta_sign (DC bits) out.
module sign_comp #(
  parameter int unsigned DC = cnu_pkg::CNU_DC
) (
  input  logic [DC-1:0] sgn,
  output logic [DC-1:0] beta_sign
);

  logic total_sign;

  assign total_sign = ^sgn;

  for (genvar j = 0; j < DC; j++) begin : g_sign
    assign beta_sign[j] = total_sign ^ sgn[j];
  end

endmodule
