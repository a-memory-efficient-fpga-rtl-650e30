// Check node processor of the shadowed block row (CNP1), pipelined.
//
// The variable node schedule is arranged so that in every cycle the T
// variable node processors produce the T variable-to-check messages of one
// and the same row of the first block row. CNP1 therefore processes that
// row right away, without storing the variable-to-check messages, and
// returns the row's check-to-variable messages in compressed form: the T
// outgoing signs, the index of the smallest input magnitude and the two
// smallest magnitudes. It also returns the parity of the row's hard
// decisions (1 = check equation not satisfied).
//
// Timing: two pipeline register levels, one on the inputs and one on the
// outputs of the ceil(log2 T)-level minimum tree, so a row presented in
// cycle n appears on the outputs in cycle n+2. The two-level pipelining
// follows the design; where the registers sit is this implementation's
// choice. The row number travels with the data. Registers reset to invalid.
//
// Compressed word layout (CW = T + IDX_W + 2*3 bits):
//   {sgn[T-1:0], idx[IDX_W-1:0], min1[2:0], min2[2:0]}
module ldpc_cnp1 #(
  parameter int unsigned T     = 6,
  parameter int unsigned ROW_W = 8,
  parameter int unsigned IDX_W = (T > 1) ? $clog2(T) : 1,
  parameter int unsigned CW    = T + IDX_W + 2 * ldpc_pkg::MAG_W
) (
  input  logic                   clk,
  input  logic                   rst_n,
  input  logic                   in_valid,
  input  logic [ROW_W-1:0]       in_row,
  input  ldpc_pkg::msg_t [T-1:0] l_in,
  input  logic [T-1:0]           hd_in,
  output logic                   out_valid,
  output logic [ROW_W-1:0]       out_row,
  output logic [CW-1:0]          out_cmsg,
  output logic                   out_syn
);
  import ldpc_pkg::*;

  // Stage 1: input registers.
  logic                   s1_valid;
  logic [ROW_W-1:0]       s1_row;
  msg_t [T-1:0]           s1_l;
  logic [T-1:0]           s1_hd;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      s1_valid <= 1'b0;
      s1_row   <= '0;
      s1_l     <= '0;
      s1_hd    <= '0;
    end else begin
      s1_valid <= in_valid;
      s1_row   <= in_row;
      s1_l     <= l_in;
      s1_hd    <= hd_in;
    end
  end

  // Minimum tree and sign product between the two register levels.
  logic [T-1:0][MAG_W-1:0] mag;
  logic [T-1:0]            sgn;
  logic                    par;
  logic [MAG_W-1:0]        min1, min2;
  logic [IDX_W-1:0]        idx;

  always_comb begin
    par = 1'b0;
    for (int j = 0; j < T; j++) begin
      mag[j] = s1_l[j].mag;
      par    = par ^ s1_l[j].sign;
    end
    for (int j = 0; j < T; j++) sgn[j] = par ^ s1_l[j].sign;
  end

  ldpc_min_tree #(.T(T), .IDX_W(IDX_W)) u_tree (
    .mag(mag), .min1(min1), .min2(min2), .idx(idx)
  );

  // Stage 2: output registers.
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      out_valid <= 1'b0;
      out_row   <= '0;
      out_cmsg  <= '0;
      out_syn   <= 1'b0;
    end else begin
      out_valid <= s1_valid;
      out_row   <= s1_row;
      out_cmsg  <= {sgn, idx, min1, min2};
      out_syn   <= s1_valid & (^s1_hd);
    end
  end
endmodule
