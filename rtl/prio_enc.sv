// prio_enc: priority encoder, lowest request index wins.
//
// Returns the index of the least significant set bit of req and a valid flag
// that is low when no bit is set (idx is then 0). Giving priority to the
// lowest index is this design's choice. Purely combinational.
//
// Ports: req (N bits) in; idx (ceil(log2 N) bits, at least 1), valid out.
module prio_enc #(
  parameter int unsigned N = cnu_pkg::CNU_DC
) (
  input  logic [N-1:0]                   req,
  output logic [cnu_pkg::idx_w(N)-1:0]   idx,
  output logic                           valid
);

  localparam int unsigned IW = cnu_pkg::idx_w(N);

  always_comb begin
    idx   = '0;
    valid = |req;
    for (int i = N-1; i >= 0; i--) begin
      if (req[i]) idx = IW'(i);
    end
  end

endmodule
