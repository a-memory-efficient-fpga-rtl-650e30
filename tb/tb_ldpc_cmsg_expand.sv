// Testbench of ldpc_cmsg_expand (T = 6): random compressed words; message
// j must carry sgn[j] and min2 at the stored index, min1 elsewhere.
module tb_ldpc_cmsg_expand;
  import ldpc_pkg::*;
  localparam int T = 6;

  logic [T-1:0] sgn;
  logic [2:0]   idx, min1, min2;
  msg_t [T-1:0] msg;
  int checks = 0, failures = 0;

  ldpc_cmsg_expand #(.T(T)) dut (.sgn, .idx, .min1, .min2, .msg);

  initial begin
    for (int n = 0; n < 2000; n++) begin
      sgn  = T'($urandom);
      idx  = 3'($urandom_range(0, T - 1));
      min1 = 3'($urandom_range(0, 7));
      min2 = 3'($urandom_range(int'(min1), 7));
      #1;
      for (int j = 0; j < T; j++) begin
        checks++;
        if (msg[j].sign != sgn[j] || msg[j].mag != ((j == int'(idx)) ? min2 : min1)) begin
          failures++;
          $display("FAIL: j=%0d got %0d/%0d", j, msg[j].sign, msg[j].mag);
        end
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
