// Testbench of ldpc_min_unit: random pairs of partial results (min1 <= min2)
// merged and compared with sorting the four magnitudes; on a tie of the two
// minima the A index must win.
module tb_ldpc_min_unit;
  logic [2:0] a_min1, a_min2, b_min1, b_min2, o_min1, o_min2;
  logic [2:0] a_idx, b_idx, o_idx;
  int checks = 0, failures = 0;

  ldpc_min_unit dut (.a_min1, .a_min2, .a_idx, .b_min1, .b_min2, .b_idx,
                     .o_min1, .o_min2, .o_idx);

  initial begin
    for (int n = 0; n < 4000; n++) begin
      int x [4], e1, e2, ei;
      x[0] = $urandom_range(0, 7); x[1] = $urandom_range(x[0], 7);
      x[2] = $urandom_range(0, 7); x[3] = $urandom_range(x[2], 7);
      a_min1 = 3'(x[0]); a_min2 = 3'(x[1]); a_idx = 3'($urandom_range(0, 7));
      b_min1 = 3'(x[2]); b_min2 = 3'(x[3]); b_idx = 3'($urandom_range(0, 7));
      #1;
      x.sort();
      e1 = x[0]; e2 = x[1];
      ei = (a_min1 <= b_min1) ? int'(a_idx) : int'(b_idx);
      checks++;
      if (int'(o_min1) != e1 || int'(o_min2) != e2 || int'(o_idx) != ei) begin
        failures++;
        $display("FAIL: got %0d %0d %0d expected %0d %0d %0d", o_min1, o_min2, o_idx, e1, e2, ei);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
