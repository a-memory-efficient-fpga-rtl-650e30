// Testbench of ldpc_scale: all 32 input magnitudes of the default 5-bit
// input against the piecewise rule (>=8 -> 7, 4..7 -> minus 1, else same).
module tb_ldpc_scale;
  logic [4:0] mag_in;
  logic [2:0] mag_out;
  int checks = 0, failures = 0;

  ldpc_scale dut (.mag_in, .mag_out);

  initial begin
    for (int a = 0; a < 32; a++) begin
      int exp_v;
      mag_in = 5'(a);
      #1;
      exp_v = (a >= 8) ? 7 : (a >= 4) ? a - 1 : a;
      checks++;
      if (int'(mag_out) != exp_v) begin
        failures++;
        $display("FAIL: in=%0d out=%0d expected %0d", a, mag_out, exp_v);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #10000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
