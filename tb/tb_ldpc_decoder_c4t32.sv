// End-to-end testbench of ldpc_decoder configured for a (4,32) regular
// code, the high-rate code used to size the compressed row storage
// (32 signs + 5 index bits + 2 x 3 magnitude bits = 43 bits per row), here
// with P = 64 (N = 2048, rate 7/8, no length-4 cycles with the default
// shift rule). The compressed word width is checked as well.
//
// The testbench builds the parity check matrix from the shift rule
// shift(i,j) = 13*(i+1)*(j+1) mod P on its own, brings it to reduced row
// echelon form over GF(2) and draws random codewords from its null space.
// Each codeword is sent over a simulated noisy channel (+/-3 plus the sum
// of four uniform integers in [-w, w] half-steps, halved and clipped to the
// 4-bit range +/-7; the finer noise suits the high code rate) and decoded.
// A bit-exact software model of the same quantized flooding min-sum
// algorithm (scale rule on the variable-to-check magnitudes, hard decision
// = sign of the a-posteriori sum, stop when all checks hold or after
// MAX_ITER iterations) predicts the decoded bits, the iteration count and
// the convergence flag; the decoder must match it exactly. The latency
// from the last input word to the first output word must be
// iterations * (2P+2) + 2 cycles.
// Mechanisms that must each occur at least once: a frame that converges
// before the iteration limit, a frame that stops at the limit without
// converging, a stalled input handshake (in_valid low while the decoder is
// ready) and a decoded word that differs from the channel's hard decisions
// (an actual correction).
module tb_ldpc_decoder_c4t32;
  import ldpc_pkg::*;

  localparam int C = 4, T = 32, P = 64, MAX_ITER = 15;
  localparam int N = T * P, M = C * P;
  localparam int NFRAMES = 8;
  localparam int RES = 2;   // noise steps per LLR unit

  logic clk = 1'b0;
  logic rst_n = 1'b0;
  always #5 clk = ~clk;

  logic             in_valid;
  logic             in_ready;
  msg_t [T-1:0]     in_llr;
  logic             out_valid;
  logic [$clog2(P)-1:0] out_col;
  logic [T-1:0]     out_bits;
  logic [3:0]       out_iter;
  logic             out_converged;
  logic             done;

  ldpc_decoder #(.C(C), .T(T), .P(P), .MAX_ITER(MAX_ITER)) dut (
    .clk, .rst_n, .in_valid, .in_ready, .in_llr,
    .out_valid, .out_col, .out_bits, .out_iter, .out_converged, .done
  );

  int checks = 0, failures = 0;
  int n_early = 0, n_maxiter = 0, n_stall = 0, n_corrected = 0;
  int cycle = 0;
  always @(posedge clk) cycle <= cycle + 1;

  // ----------------------------------------------------------- the code
  int sh [C][T];
  bit [N-1:0] hrow [M];
  bit [N-1:0] rref [M];
  int piv_col [M];
  int rank;
  bit is_piv [N];

  function automatic int var_of(int m, int j);
    int i, r;
    i = m / P; r = m % P;
    return j * P + (r + sh[i][j]) % P;
  endfunction

  task automatic build_code();
    bit [N-1:0] tmp;
    for (int i = 0; i < C; i++)
      for (int j = 0; j < T; j++) sh[i][j] = (13 * (i + 1) * (j + 1)) % P;
    for (int m = 0; m < M; m++) begin
      hrow[m] = '0;
      for (int j = 0; j < T; j++) hrow[m][var_of(m, j)] = 1'b1;
      rref[m] = hrow[m];
    end
    rank = 0;
    for (int v = 0; v < N; v++) is_piv[v] = 1'b0;
    for (int col = 0; col < N && rank < M; col++) begin
      int p;
      p = -1;
      for (int r = rank; r < M; r++) if (rref[r][col]) begin p = r; break; end
      if (p < 0) continue;
      tmp = rref[p]; rref[p] = rref[rank]; rref[rank] = tmp;
      for (int r = 0; r < M; r++)
        if (r != rank && rref[r][col]) rref[r] ^= rref[rank];
      piv_col[rank] = col;
      is_piv[col] = 1'b1;
      rank++;
    end
  endtask

  function automatic bit syndrome_ok(bit [N-1:0] x);
    for (int m = 0; m < M; m++) if (^(hrow[m] & x)) return 1'b0;
    return 1'b1;
  endfunction

  task automatic random_codeword(output bit [N-1:0] x);
    x = '0;
    for (int v = 0; v < N; v++) if (!is_piv[v]) x[v] = $urandom_range(0, 1);
    for (int r = 0; r < rank; r++) x[piv_col[r]] = ^(rref[r] & x);
  endtask

  // ----------------------------------------------------- reference model
  function automatic int scale_ref(int a);
    if (a >= 8) return 7;
    if (a >= 4) return a - 1;
    return a;
  endfunction

  int llr [N];            // channel values, -7..7
  int rmsg [M][T];        // check-to-variable, signed
  int lmsg [M][T];        // variable-to-check, signed (scaled)
  bit [N-1:0] ref_hd;
  int ref_iter;
  bit ref_conv;

  task automatic ref_decode();
    int app [N];
    int ext;
    for (int m = 0; m < M; m++) for (int j = 0; j < T; j++) rmsg[m][j] = 0;
    ref_conv = 1'b0;
    for (int it = 1; it <= MAX_ITER; it++) begin
      for (int v = 0; v < N; v++) app[v] = llr[v];
      for (int m = 0; m < M; m++)
        for (int j = 0; j < T; j++) app[var_of(m, j)] += rmsg[m][j];
      for (int v = 0; v < N; v++) ref_hd[v] = (app[v] < 0);
      for (int m = 0; m < M; m++)
        for (int j = 0; j < T; j++) begin
          ext = app[var_of(m, j)] - rmsg[m][j];
          lmsg[m][j] = (ext < 0) ? -scale_ref(-ext) : scale_ref(ext);
        end
      for (int m = 0; m < M; m++)
        for (int j = 0; j < T; j++) begin
          int mn, sg;
          mn = 7; sg = 0;
          for (int q = 0; q < T; q++) if (q != j) begin
            int a;
            a = (lmsg[m][q] < 0) ? -lmsg[m][q] : lmsg[m][q];
            if (a < mn) mn = a;
            if (lmsg[m][q] < 0) sg ^= 1;
          end
          rmsg[m][j] = sg ? -mn : mn;
        end
      ref_iter = it;
      if (syndrome_ok(ref_hd)) begin ref_conv = 1'b1; break; end
    end
  endtask

  // ------------------------------------------------------------ stimulus
  function automatic msg_t to_sm(int x);
    msg_t s;
    s.sign = (x < 0);
    s.mag  = 3'((x < 0) ? -x : x);
    return s;
  endfunction

  bit [N-1:0] cw, got, chan_hd;
  int got_iter, got_conv, ncols;
  int t_last_in, t_first_out;

  // output collector
  always @(posedge clk) begin
    if (out_valid) begin
      if (ncols == 0) t_first_out = cycle;
      for (int j = 0; j < T; j++) got[j * P + int'(out_col)] = out_bits[j];
      got_iter = int'(out_iter);
      got_conv = int'(out_converged);
      ncols++;
    end
  end

  task automatic run_frame(int w);
    int k;
    random_codeword(cw);
    checks++;
    if (!syndrome_ok(cw)) begin failures++; $display("FAIL: generated word is not a codeword"); end
    for (int v = 0; v < N; v++) begin
      int y;
      y = cw[v] ? -3 * RES : 3 * RES;
      for (int q = 0; q < 4; q++) y += $urandom_range(0, 2 * w) - w;
      y = y / RES;
      if (y > 7) y = 7;
      if (y < -7) y = -7;
      llr[v] = y;
      chan_hd[v] = (y < 0);
    end
    ref_decode();
    ncols = 0;
    got = '0;
    // load with random gaps in in_valid
    k = 0;
    while (k < P) begin
      @(negedge clk);
      if ($urandom_range(0, 7) == 0) begin
        in_valid = 1'b0;
        if (in_ready) n_stall++;
      end else begin
        in_valid = 1'b1;
        for (int j = 0; j < T; j++) in_llr[j] = to_sm(llr[j * P + k]);
        @(posedge clk);
        if (in_ready) begin
          k++;
          if (k == P) t_last_in = cycle;
        end
      end
    end
    @(negedge clk);
    in_valid = 1'b0;
    while (!done) @(posedge clk);
    // compare
    checks++;
    if (ncols != P) begin failures++; $display("FAIL: %0d output words", ncols); end
    checks++;
    if (got !== ref_hd) begin failures++; $display("FAIL: decoded bits differ from model (w=%0d)", w); end
    checks++;
    if (got_iter != ref_iter || got_conv != int'(ref_conv)) begin
      failures++;
      $display("FAIL: iter/conv %0d/%0d expected %0d/%0d", got_iter, got_conv, ref_iter, ref_conv);
    end
    checks++;
    if (t_first_out - t_last_in != ref_iter * (2 * P + 2) + 2) begin
      failures++;
      $display("FAIL: latency %0d expected %0d", t_first_out - t_last_in, ref_iter * (2 * P + 2) + 2);
    end
    if (ref_conv && ref_iter < MAX_ITER) n_early++;
    if (!ref_conv && ref_iter == MAX_ITER) n_maxiter++;
    if (got != chan_hd && ref_conv) n_corrected++;
    $display("frame w=%0d: iterations=%0d converged=%0d equals_sent=%0d channel_errors=%0d latency=%0d",
             w, got_iter, got_conv, got == cw, $countones(chan_hd ^ cw), t_first_out - t_last_in);
  endtask

  initial begin
    in_valid = 1'b0;
    in_llr   = '0;
    build_code();
    $display("code: N=%0d M=%0d rank=%0d", N, M, rank);
    checks++;
    if ($bits(dut.c1_cmsg) != 43) begin failures++; $display("FAIL: compressed word is %0d bits", $bits(dut.c1_cmsg)); end
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    repeat (2) @(posedge clk);
    run_frame(0);
    run_frame(2);
    run_frame(3);
    run_frame(3);
    run_frame(4);
    run_frame(3);
    run_frame(2);
    run_frame(3);
    checks++; if (n_early == 0)     begin failures++; $display("FAIL: no early-terminated frame"); end
    checks++; if (n_maxiter == 0)   begin failures++; $display("FAIL: no frame reached the iteration limit"); end
    checks++; if (n_stall == 0)     begin failures++; $display("FAIL: no input stall"); end
    checks++; if (n_corrected == 0) begin failures++; $display("FAIL: no corrected frame"); end
    $display("mechanisms: early_stop=%0d iteration_limit=%0d input_stalls=%0d corrected=%0d",
             n_early, n_maxiter, n_stall, n_corrected);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (NFRAMES * (MAX_ITER * (2 * P + 2) + 4 * P) + 1000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
