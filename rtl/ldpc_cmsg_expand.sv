// Expansion of a compressed check node row.
//
// The check-to-variable messages of one row of the shadowed (first) block
// row are stored compressed: the signs of the T outgoing messages, the
// index of the smallest input magnitude and the two smallest magnitudes.
// Message j gets sign sgn[j] and magnitude min2 when j is the index of the
// minimum, min1 otherwise (the min-sum rule of excluding the edge's own
// input). The stored fields follow the design; storing the outgoing signs
// rather than the incoming ones is this implementation's choice.
// Purely combinational.
module ldpc_cmsg_expand #(
  parameter int unsigned T     = 6,
  parameter int unsigned IDX_W = (T > 1) ? $clog2(T) : 1
) (
  input  logic [T-1:0]                 sgn,
  input  logic [IDX_W-1:0]             idx,
  input  logic [ldpc_pkg::MAG_W-1:0]   min1,
  input  logic [ldpc_pkg::MAG_W-1:0]   min2,
  output ldpc_pkg::msg_t [T-1:0]       msg
);
  always_comb begin
    for (int j = 0; j < T; j++) begin
      msg[j].mag  = (idx == IDX_W'(j)) ? min2 : min1;
      msg[j].sign = sgn[j];
    end
  end
endmodule
