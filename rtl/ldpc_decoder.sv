// Partially parallel decoder for regular (C,T) quasi-cyclic LDPC codes,
// with min-sum decoding and a compressed store for the first block row.
//
// Code: the M x N parity check matrix is a C x T array of P x P circulant
// permutation matrices; sub-matrix H(i,j) has its 1 of row r in column
// (r + SHIFT[i*T+j]) mod P. N = T*P, M = C*P. Defaults: the (3,6) code with
// P = 256 (N = 1536, rate 1/2), 4-bit messages, at most 15 iterations.
//
// Structure (i = block row 0..C-1, j = block column 0..T-1):
//   * T channel memories (ldpc_spram, P x 4 bits), one per block column;
//   * for every block row i >= 1 and column j a message memory MEM(i,j)
//     (ldpc_pmem, P x 5 bits: a 4-bit message and the hard decision of the
//     variable on that edge), addressed by the row of H(i,j);
//   * one memory MEM1 (ldpc_pmem, P x CW bits) holding the check-to-variable
//     messages of block row 0 in compressed form, one word per row;
//   * an address generator (ldpc_addr_gen) per memory;
//   * T variable node processors (ldpc_vnp), the pipelined check node
//     processor CNP1 of block row 0 (ldpc_cnp1), C-1 check node processors
//     (ldpc_cnp) and the controller (ldpc_ctrl).
//
// Schedule. In the variable node phase VNP j handles, in cycle k, column
// (k + SHIFT[0,j]) mod P of block column j, which is the column that row k
// of H(0,j) touches. So in each cycle all T VNPs produce the T messages of
// row k of block row 0 together, CNP1 turns them into that row's compressed
// check-to-variable word right away, and those variable-to-check messages
// are never stored. For i >= 1 the VNP reads and rewrites MEM(i,j) at row
// (k + SHIFT[0,j] - SHIFT[i,j]) mod P. In the check node phase CNP i reads
// row k of MEM(i,0..T-1) and writes the new check-to-variable messages back
// in place. Reads are issued in cycle k, data returns in k+1; MEM(i,j) is
// written in k+1 and MEM1, behind the two pipeline levels of CNP1, in k+3.
// Both delays are odd, so the even/odd partition of each memory always
// serves the read and the write from different single-port halves.
//
// Interface. Loading: P words on in_llr with in_valid/in_ready; word k holds
// the channel values of variables j*P + k, j = 0..T-1, as sign-magnitude
// numbers (sign 1 = bit more likely 1). Output: P cycles with out_valid,
// out_col = k and out_bits[j] = decoded bit of variable j*P + k, with the
// number of iterations used (out_iter) and whether all checks held
// (out_converged). done pulses after the last output word.
//
// Timing: P load cycles, then 2P+2 cycles per iteration, then P+1 output
// cycles; the next codeword is accepted after done.
//
// What follows the design: the memory organisation, the compressed first
// block row, the shifted variable node schedule, counter address
// generators, even/odd partitioned single-port memories, two-level CNP1
// pipeline, 4-bit quantization and the scale rule. This implementation's
// own choices: the load/output interface, the hard-decision bit stored with
// each message (used for the check test and for the output), the drain
// cycles between phases and the default shift values.
module ldpc_decoder #(
  parameter int unsigned          C        = 3,
  parameter int unsigned          T        = 6,
  parameter int unsigned          P        = 256,
  parameter int unsigned          MAX_ITER = 15,
  parameter ldpc_pkg::shift_tab_t SHIFT    = ldpc_pkg::gen_shifts(C, T, P, 13),
  parameter int unsigned          ROW_W    = $clog2(P),
  parameter int unsigned          IT_W     = $clog2(MAX_ITER + 1)
) (
  input  logic                   clk,
  input  logic                   rst_n,
  // channel values in
  input  logic                   in_valid,
  output logic                   in_ready,
  input  ldpc_pkg::msg_t [T-1:0] in_llr,
  // decoded codeword out
  output logic                   out_valid,
  output logic [ROW_W-1:0]       out_col,
  output logic [T-1:0]           out_bits,
  output logic [IT_W-1:0]        out_iter,
  output logic                   out_converged,
  output logic                   done
);
  import ldpc_pkg::*;

  localparam int unsigned IDX_W = (T > 1) ? $clog2(T) : 1;
  localparam int unsigned CW    = T + IDX_W + 2 * MAG_W;
  localparam int unsigned MW    = MSG_W + 1;              // {hd, msg}
  localparam int unsigned K_W   = $clog2(P + 1);

  function automatic int unsigned sh(int unsigned i, int unsigned j);
    return int'(SHIFT[i*T+j]) % P;
  endfunction

  // (a - b) mod P for rows
  function automatic logic [ROW_W-1:0] rsub(int unsigned a, int unsigned b);
    return ROW_W'((a + P - b) % P);
  endfunction

  // ------------------------------------------------------------ control
  phase_t           phase, load_phase;
  logic [K_W-1:0]   k;
  logic             rd_en, first_iter, load, syn_in;
  logic [IT_W-1:0]  iter;
  logic             converged;

  ldpc_ctrl #(.P(P), .MAX_ITER(MAX_ITER)) u_ctrl (
    .clk, .rst_n, .in_valid, .in_ready, .syn_in,
    .phase, .k, .rd_en, .first_iter, .load, .load_phase,
    .iter, .converged, .done
  );

  // Signals of the cycle in which read data returns.
  logic             rd_en_q, first_iter_q;
  phase_t           phase_q;
  logic [ROW_W-1:0] k_q;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      rd_en_q      <= 1'b0;
      phase_q      <= PH_LOAD;
      first_iter_q <= 1'b0;
      k_q          <= '0;
    end else begin
      rd_en_q      <= rd_en;
      phase_q      <= phase;
      first_iter_q <= first_iter;
      k_q          <= ROW_W'(k);
    end
  end

  logic vn_rd, vn_d, cn_d, out_d;
  assign vn_rd  = rd_en && phase == PH_VN;
  assign vn_d   = rd_en_q && phase_q == PH_VN;
  assign cn_d   = rd_en_q && phase_q == PH_CN;
  assign out_d  = rd_en_q && phase_q == PH_OUT;

  logic in_acc;
  assign in_acc = in_valid && in_ready;

  // ------------------------------------------------- channel memories
  msg_t [T-1:0] intr;

  for (genvar j = 0; j < T; j++) begin : g_chan
    logic [ROW_W-1:0] row, start;
    logic [ROW_W-2:0] unused_addr;
    logic             unused_bank;
    assign start = (load_phase == PH_VN) ? ROW_W'(sh(0, j)) : '0;
    ldpc_addr_gen #(.P(P)) u_ag (
      .clk, .rst_n, .load, .start, .inc(in_acc || vn_rd),
      .row, .addr(unused_addr), .bank(unused_bank)
    );
    ldpc_spram #(.DEPTH(P), .WIDTH(MSG_W)) u_mem (
      .clk, .en(in_acc || vn_rd), .we(in_acc), .addr(row),
      .wdata(in_llr[j]), .rdata(intr[j])
    );
  end

  // ------------------------------------ MEM1: compressed block row 0
  logic [ROW_W-1:0] m1_row, m1_row_q;
  logic [CW-1:0]    m1_q;
  logic [ROW_W-2:0] m1_unused_addr;
  logic             m1_unused_bank;
  logic             c1_valid, c1_syn;
  logic [ROW_W-1:0] c1_row;
  logic [CW-1:0]    c1_cmsg;
  msg_t [T-1:0]     r0;

  ldpc_addr_gen #(.P(P)) u_m1_ag (
    .clk, .rst_n, .load, .start('0), .inc(vn_rd),
    .row(m1_row), .addr(m1_unused_addr), .bank(m1_unused_bank)
  );

  always_ff @(posedge clk) m1_row_q <= m1_row;

  ldpc_pmem #(.DEPTH(P), .WIDTH(CW)) u_mem1 (
    .clk,
    .rd_en(vn_rd), .rd_row(m1_row), .rd_data(m1_q),
    .wr_en(c1_valid), .wr_row(c1_row), .wr_data(c1_cmsg)
  );

  ldpc_cmsg_expand #(.T(T)) u_expand (
    .sgn (m1_q[CW-1 -: T]),
    .idx (m1_q[2*MAG_W +: IDX_W]),
    .min1(m1_q[MAG_W +: MAG_W]),
    .min2(m1_q[0 +: MAG_W]),
    .msg (r0)
  );

  // -------------------------------- MEM(i,j), i >= 1: uncompressed banks
  logic [MW-1:0]    mq    [C][T];   // read data {hd, msg}
  logic [MW-1:0]    mwd   [C][T];   // write data
  msg_t [T-1:0]     l_vn  [C];      // VNP outputs per block row
  logic [T-1:0]     hd;             // hard decisions of this VN cycle
  msg_t [T-1:0]     r_cn  [C];      // CNP outputs per block row
  logic [C-1:0]     syn_cn;

  for (genvar i = 1; i < C; i++) begin : g_row
    for (genvar j = 0; j < T; j++) begin : g_col
      logic [ROW_W-1:0] row, row_q, start;
      logic [ROW_W-2:0] unused_addr;
      logic             unused_bank;
      always_comb begin
        unique case (load_phase)
          PH_VN:   start = rsub(sh(0, j), sh(i, j));
          PH_OUT:  start = rsub(0, sh(i, j));
          default: start = '0;
        endcase
      end
      ldpc_addr_gen #(.P(P)) u_ag (
        .clk, .rst_n, .load, .start, .inc(rd_en),
        .row, .addr(unused_addr), .bank(unused_bank)
      );
      always_ff @(posedge clk) row_q <= row;
      assign mwd[i][j] = vn_d ? {hd[j], l_vn[i][j]}
                              : {mq[i][j][MW-1], r_cn[i][j]};
      ldpc_pmem #(.DEPTH(P), .WIDTH(MW)) u_mem (
        .clk,
        .rd_en(rd_en), .rd_row(row), .rd_data(mq[i][j]),
        .wr_en(vn_d || cn_d), .wr_row(row_q), .wr_data(mwd[i][j])
      );
    end

    // ----------------------------------------------- CNP of block row i
    msg_t [T-1:0] l_cn;
    logic [T-1:0] hd_cn;
    for (genvar j = 0; j < T; j++) begin : g_in
      assign l_cn[j]  = mq[i][j][MSG_W-1:0];
      assign hd_cn[j] = mq[i][j][MW-1];
    end
    ldpc_cnp #(.T(T)) u_cnp (
      .l_in(l_cn), .hd_in(hd_cn), .r_out(r_cn[i]), .syn(syn_cn[i])
    );
  end

  // Block row 0 has no uncompressed bank and no separate CNP.
  assign r_cn[0]   = '0;
  assign syn_cn[0] = 1'b0;

  // --------------------------------------------------------------- VNPs
  for (genvar j = 0; j < T; j++) begin : g_vnp
    msg_t [C-1:0] r_in, l_out;
    assign r_in[0] = r0[j];
    for (genvar i = 1; i < C; i++) begin : g_r
      assign r_in[i] = mq[i][j][MSG_W-1:0];
    end
    ldpc_vnp #(.C(C)) u_vnp (
      .intr(intr[j]), .r_in(r_in), .r_zero(first_iter_q),
      .l_out(l_out), .hd(hd[j])
    );
    for (genvar i = 0; i < C; i++) begin : g_l
      assign l_vn[i][j] = l_out[i];
    end
  end

  // --------------------------------------------------------------- CNP1
  ldpc_cnp1 #(.T(T), .ROW_W(ROW_W)) u_cnp1 (
    .clk, .rst_n,
    .in_valid(vn_d), .in_row(m1_row_q), .l_in(l_vn[0]), .hd_in(hd),
    .out_valid(c1_valid), .out_row(c1_row), .out_cmsg(c1_cmsg), .out_syn(c1_syn)
  );

  assign syn_in = c1_syn || (cn_d && (|syn_cn));

  // ------------------------------------------------------------- output
  for (genvar j = 0; j < T; j++) begin : g_out
    assign out_bits[j] = mq[1][j][MW-1];
  end
  assign out_valid     = out_d;
  assign out_col       = k_q;
  assign out_iter      = iter;
  assign out_converged = converged;

  initial begin
    if (C < 2) $error("ldpc_decoder: C must be at least 2");
    if (P % 2 != 0) $error("ldpc_decoder: P must be even");
    if (C * T > SHIFT_TAB_N) $error("ldpc_decoder: shift table too small");
  end
endmodule
