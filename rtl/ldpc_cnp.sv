// Check node processor for the block rows that are stored uncompressed
// (block rows 2..C).
//
// In the check node phase one such processor handles one parity check row
// per clock cycle. It receives the T variable-to-check messages of the row
// (already scaled by the variable nodes) and returns the T check-to-variable
// messages of the min-sum rule: the sign of message j is the product of
// the other T-1 input signs, its magnitude the minimum of the other T-1
// input magnitudes (the second minimum for the edge that holds the
// minimum). It also returns the parity of the row's hard decisions, used
// to test the check equation. The min-sum rule follows the design; this
// processor is combinational because the design pipelines only the
// processor of the first block row.
module ldpc_cnp #(
  parameter int unsigned T = 6
) (
  input  ldpc_pkg::msg_t [T-1:0] l_in,    // variable-to-check messages
  input  logic [T-1:0]           hd_in,   // hard decisions of the row's variables
  output ldpc_pkg::msg_t [T-1:0] r_out,   // check-to-variable messages
  output logic                   syn      // 1: check equation not satisfied
);
  import ldpc_pkg::*;

  localparam int unsigned IDX_W = (T > 1) ? $clog2(T) : 1;

  logic [T-1:0][MAG_W-1:0] mag;
  logic [T-1:0]            sgn;
  logic [MAG_W-1:0]        min1, min2;
  logic [IDX_W-1:0]        idx;

  logic                    par;

  always_comb begin
    par = 1'b0;
    for (int j = 0; j < T; j++) begin
      mag[j] = l_in[j].mag;
      par    = par ^ l_in[j].sign;
    end
    // Product of the other signs = product of all signs times the own sign.
    for (int j = 0; j < T; j++) sgn[j] = par ^ l_in[j].sign;
  end

  ldpc_min_tree #(.T(T)) u_tree (.mag(mag), .min1(min1), .min2(min2), .idx(idx));

  ldpc_cmsg_expand #(.T(T)) u_exp (
    .sgn(sgn), .idx(idx), .min1(min1), .min2(min2), .msg(r_out)
  );

  assign syn = ^hd_in;
endmodule
