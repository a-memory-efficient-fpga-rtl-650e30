// Testbench of ldpc_cnp (T = 6): random rows of variable-to-check messages
// and hard decisions; every output message is compared with the min-sum
// rule computed directly (product of the other signs, minimum of the other
// magnitudes), the parity output with the XOR of the decisions.
module tb_ldpc_cnp;
  import ldpc_pkg::*;
  localparam int T = 6;

  msg_t [T-1:0] l_in, r_out;
  logic [T-1:0] hd_in;
  logic         syn;
  int checks = 0, failures = 0;

  ldpc_cnp #(.T(T)) dut (.l_in, .hd_in, .r_out, .syn);

  initial begin
    for (int n = 0; n < 4000; n++) begin
      l_in  = (T*4)'({$urandom, $urandom});
      if (n % 4 == 0)  // many equal magnitudes
        for (int j = 0; j < T; j++) l_in[j].mag = 3'($urandom_range(2, 3));
      hd_in = T'($urandom);
      #1;
      for (int j = 0; j < T; j++) begin
        int mn, sg;
        mn = 7; sg = 0;
        for (int q = 0; q < T; q++) if (q != j) begin
          if (int'(l_in[q].mag) < mn) mn = int'(l_in[q].mag);
          sg ^= int'(l_in[q].sign);
        end
        checks++;
        if (int'(r_out[j].mag) != mn || (mn != 0 && int'(r_out[j].sign) != sg)) begin
          failures++;
          $display("FAIL: j=%0d got %0d/%0d expected %0d/%0d", j, r_out[j].sign, r_out[j].mag, sg, mn);
        end
      end
      checks++;
      if (syn != ^hd_in) begin failures++; $display("FAIL: syn"); end
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
