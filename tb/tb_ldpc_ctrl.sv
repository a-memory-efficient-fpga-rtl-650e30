// Testbench of ldpc_ctrl (P = 8, MAX_ITER = 4). Frames are loaded with gaps
// in in_valid; syn_in is driven to fail chosen iterations. Checked: the
// phase sequence and its cycle counts (P+1 cycles per VN, CN and OUT phase),
// rd_en only for k < P, the iteration count, first_iter only in iteration
// 1, the converged flag, stopping at the first clean iteration or at
// MAX_ITER, and the done pulse.
module tb_ldpc_ctrl;
  import ldpc_pkg::*;
  localparam int P = 8, MAX_ITER = 4;

  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  logic       in_valid, in_ready, syn_in, rd_en, first_iter, load, converged, done;
  phase_t     phase, load_phase;
  logic [3:0] k;
  logic [2:0] iter;
  int checks = 0, failures = 0;

  ldpc_ctrl #(.P(P), .MAX_ITER(MAX_ITER)) dut (
    .clk, .rst_n, .in_valid, .in_ready, .syn_in, .phase, .k, .rd_en,
    .first_iter, .load, .load_phase, .iter, .converged, .done
  );

  task automatic chk(bit cond, string what);
    checks++;
    if (!cond) begin failures++; $display("FAIL: %s (phase=%0d k=%0d iter=%0d)", what, phase, k, iter); end
  endtask

  // bad_iter: bitmask of iterations in which the checks fail
  task automatic frame(int bad_mask);
    int n, exp_iters;
    exp_iters = MAX_ITER;
    for (int it = 1; it <= MAX_ITER; it++)
      if (!bad_mask[it]) begin exp_iters = it; break; end
    // load
    n = 0;
    while (n < P) begin
      @(negedge clk);
      chk(phase == PH_LOAD && in_ready && !rd_en, "load phase");
      in_valid = ($urandom_range(0, 2) != 0);
      if (in_valid) n++;
    end
    for (int it = 1; it <= exp_iters; it++) begin
      @(negedge clk);
      in_valid = 0;
      for (int c = 0; c <= P; c++) begin
        if (c > 0) @(negedge clk);
        chk(phase == PH_VN && int'(k) == c && int'(iter) == it, "vn phase");
        chk(rd_en == (c < P) && first_iter == (it == 1) && !in_ready, "vn controls");
        syn_in = bad_mask[it] && (c == 3);
      end
      for (int c = 0; c <= P; c++) begin
        @(negedge clk);
        chk(phase == PH_CN && int'(k) == c, "cn phase");
        syn_in = 1'b0;
        if (c == P) chk(load && load_phase == ((it == exp_iters) ? PH_OUT : PH_VN), "phase decision");
      end
    end
    for (int c = 0; c <= P; c++) begin
      @(negedge clk);
      chk(phase == PH_OUT && int'(k) == c && rd_en == (c < P), "out phase");
      chk(int'(iter) == exp_iters && converged == !bad_mask[exp_iters], "status");
    end
    @(negedge clk);
    chk(done && phase == PH_LOAD, "done");
  endtask

  initial begin
    in_valid = 0; syn_in = 0;
    repeat (2) @(posedge clk);
    rst_n = 1'b1;
    frame('b0);          // clean: 1 iteration
    frame('b0110);       // iterations 1,2 fail, 3 clean
    frame('b11110);      // all fail: stops at MAX_ITER, not converged
    frame('b0010);       // iteration 1 fails
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
