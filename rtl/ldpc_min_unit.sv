// MIN unit of the check node processor.
//
// Merges two partial results of a minimum search, each holding the smallest
// magnitude (min1), the second smallest (min2) and the index of the smallest
// (idx), into the result for the union of both input sets. Check node
// processors build a binary tree of these units over the magnitudes of one
// parity check row. On a tie the A side wins, so the lowest index is kept.
// The unit's function follows the design; the tie rule is this
// implementation's choice. Purely combinational.
module ldpc_min_unit #(
  parameter int unsigned IDX_W = 3
) (
  input  logic [ldpc_pkg::MAG_W-1:0] a_min1, a_min2,
  input  logic [IDX_W-1:0]           a_idx,
  input  logic [ldpc_pkg::MAG_W-1:0] b_min1, b_min2,
  input  logic [IDX_W-1:0]           b_idx,
  output logic [ldpc_pkg::MAG_W-1:0] o_min1, o_min2,
  output logic [IDX_W-1:0]           o_idx
);
  always_comb begin
    if (a_min1 <= b_min1) begin
      o_min1 = a_min1;
      o_idx  = a_idx;
      o_min2 = (a_min2 <= b_min1) ? a_min2 : b_min1;
    end else begin
      o_min1 = b_min1;
      o_idx  = b_idx;
      o_min2 = (b_min2 <= a_min1) ? b_min2 : a_min1;
    end
  end
endmodule
