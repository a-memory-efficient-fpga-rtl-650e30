// Minimum-search tree of a check node processor.
//
// Finds, over the T magnitudes of one parity check row, the smallest
// magnitude, the second smallest and the index of the smallest, using
// ceil(log2(T)) levels of ldpc_min_unit. The T inputs are padded with
// maximum-magnitude leaves up to a power of two; padding sits at the high
// indices and loses ties, so it never becomes the reported index.
// The log2(T)-level tree of MIN cells follows the design; the padding is
// this implementation's way of handling a row weight that is not a power
// of two. Purely combinational.
module ldpc_min_tree #(
  parameter int unsigned T     = 6,
  parameter int unsigned IDX_W = (T > 1) ? $clog2(T) : 1
) (
  input  logic [T-1:0][ldpc_pkg::MAG_W-1:0] mag,
  output logic [ldpc_pkg::MAG_W-1:0]        min1,
  output logic [ldpc_pkg::MAG_W-1:0]        min2,
  output logic [IDX_W-1:0]                  idx
);
  import ldpc_pkg::*;

  localparam int unsigned LV = (T > 1) ? $clog2(T) : 1;
  localparam int unsigned NL = 1 << LV;

  for (genvar l = 0; l <= LV; l++) begin : g_lvl
    localparam int unsigned NN = NL >> l;
    logic [MAG_W-1:0] m1 [NN];
    logic [MAG_W-1:0] m2 [NN];
    logic [IDX_W-1:0] ix [NN];
    if (l == 0) begin : g_leaf
      for (genvar n = 0; n < NN; n++) begin : g_n
        if (n < T) begin : g_real
          assign m1[n] = mag[n];
          assign ix[n] = IDX_W'(n);
        end else begin : g_pad
          assign m1[n] = MAG_W'(MAG_MAX);
          assign ix[n] = '0;
        end
        assign m2[n] = MAG_W'(MAG_MAX);
      end
    end else begin : g_node
      for (genvar n = 0; n < NN; n++) begin : g_n
        ldpc_min_unit #(.IDX_W(IDX_W)) u_min (
          .a_min1(g_lvl[l-1].m1[2*n]),   .a_min2(g_lvl[l-1].m2[2*n]),
          .a_idx (g_lvl[l-1].ix[2*n]),
          .b_min1(g_lvl[l-1].m1[2*n+1]), .b_min2(g_lvl[l-1].m2[2*n+1]),
          .b_idx (g_lvl[l-1].ix[2*n+1]),
          .o_min1(m1[n]), .o_min2(m2[n]), .o_idx(ix[n])
        );
      end
    end
  end

  assign min1 = g_lvl[LV].m1[0];
  assign min2 = g_lvl[LV].m2[0];
  assign idx  = g_lvl[LV].ix[0];
endmodule
