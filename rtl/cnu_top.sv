// cnu_top: check node unit for min-sum LDPC decoding built on a one-hot
// representation of message magnitudes.
//
// Each of the DC input messages is Q+1 bits, sign in the MSB and a Q-bit
// magnitude below it. Every magnitude goes through a q-to-2^q decoder; the
// DC one-hot vectors are ORed together, and a modified leading zero counter
// reads the first and second least significant ones of the result as the
// first and second minimum. No carry-based comparator is used for the
// minimums. The first minimum is exact; the second is the second smallest
// *distinct* magnitude, so it is wrong (too large) whenever the two smallest
// magnitudes are equal. The index of the first minimum comes from DC
// equality comparators against min1 followed by a priority encoder, and the
// sign computation block gives each input the XOR of all other signs.
//
// Timing: one pipeline stage with latched inputs and outputs, as in the
// reported implementation. Inputs are registered on one clock edge, and the
// results of that set appear on the outputs after the next edge: out_valid
// follows in_valid by two cycles and a new set can be accepted every cycle.
// The valid pair, the active-low asynchronous reset and the lowest-index
// rule for ties are this design's choices.
//
// Outputs, the compressed check node message: min1, min2 (Q bits each),
// min1_idx (ceil(log2 DC) bits) and beta_sign (DC bits, one per input).
// A code of lower degree than DC can use the unit by holding the unused
// inputs at sign 0 and the largest magnitude.
module cnu_top #(
  parameter int unsigned Q  = cnu_pkg::CNU_Q,
  parameter int unsigned DC = cnu_pkg::CNU_DC
) (
  input  logic                           clk,
  input  logic                           rst_n,
  input  logic                           in_valid,
  input  logic [Q:0]                     alpha [DC],
  output logic                           out_valid,
  output logic [Q-1:0]                   min1,
  output logic [Q-1:0]                   min2,
  output logic [cnu_pkg::idx_w(DC)-1:0]  min1_idx,
  output logic [DC-1:0]                  beta_sign
);

  localparam int unsigned W  = 2**Q;
  localparam int unsigned IW = cnu_pkg::idx_w(DC);

  typedef logic [Q:0] msg_t;

  // ---------------------------------------------------------------- inputs
  msg_t alpha_q [DC];
  logic valid_q;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      valid_q <= 1'b0;
      for (int j = 0; j < DC; j++) alpha_q[j] <= '0;
    end else begin
      valid_q <= in_valid;
      if (in_valid) alpha_q <= alpha;
    end
  end

  // ---------------------------------------------------------- split fields
  logic [Q-1:0] mag [DC];
  logic [DC-1:0] sgn;

  for (genvar j = 0; j < DC; j++) begin : g_split
    assign mag[j] = alpha_q[j][Q-1:0];
    assign sgn[j] = alpha_q[j][Q];
  end

  // ----------------------------------------------------- one-hot decoders
  logic [W-1:0] oh [DC];

  for (genvar j = 0; j < DC; j++) begin : g_dec
    onehot_dec #(.Q(Q)) u_dec (
      .mag    (mag[j]),
      .onehot (oh[j])
    );
  end

  // --------------------------------------------------- OR tree and the LZC
  logic [W-1:0] or_vec;
  logic [Q-1:0] min1_c, min2_c;

  or_tree #(.W(W), .DC(DC)) u_or (
    .in_vec (oh),
    .or_out (or_vec)
  );

  lzc_min2 #(.Q(Q)) u_lzc (
    .vec  (or_vec),
    .min1 (min1_c),
    .min2 (min2_c)
  );

  // ------------------------------------------------ first minimum index
  logic [IW-1:0] idx_c;

  min1_index #(.Q(Q), .DC(DC)) u_idx (
    .mag   (mag),
    .min1  (min1_c),
    .idx   (idx_c)
  );

  // ----------------------------------------------------------- signs
  logic [DC-1:0] beta_sign_c;

  sign_comp #(.DC(DC)) u_sign (
    .sgn        (sgn),
    .beta_sign  (beta_sign_c)
  );

  // ----------------------------------------------------------- outputs
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      out_valid <= 1'b0;
      min1      <= '0;
      min2      <= '0;
      min1_idx  <= '0;
      beta_sign <= '0;
    end else begin
      out_valid <= valid_q;
      if (valid_q) begin
        min1      <= min1_c;
        min2      <= min2_c;
        min1_idx  <= idx_c;
        beta_sign <= beta_sign_c;
      end
    end
  end

  // The modified LZC never reports a second minimum below the first.
  // (out_valid is low throughout reset.)
  a_min_order: assert property (@(posedge clk) out_valid |-> min2 >= min1)
    else $error("cnu_top: min2 < min1");

endmodule
