// Testbench of ldpc_vnp (C = 3): random sign-magnitude inputs; outputs are
// compared with an integer model: APP = I + sum(R), L_i = scale(APP - R_i)
// with the sign of APP - R_i, hard decision = APP < 0; with r_zero the R
// inputs count as zero.
module tb_ldpc_vnp;
  import ldpc_pkg::*;
  localparam int C = 3;

  msg_t         intr;
  msg_t [C-1:0] r_in, l_out;
  logic         r_zero, hd;
  int checks = 0, failures = 0;

  ldpc_vnp #(.C(C)) dut (.intr, .r_in, .r_zero, .l_out, .hd);

  function automatic int val(msg_t m);
    return m.sign ? -int'(m.mag) : int'(m.mag);
  endfunction

  function automatic int scl(int a);
    return (a >= 8) ? 7 : (a >= 4) ? a - 1 : a;
  endfunction

  initial begin
    for (int n = 0; n < 5000; n++) begin
      int app, e, em, r [C];
      intr   = msg_t'($urandom_range(0, 15));
      r_in   = (C*4)'($urandom);
      r_zero = ($urandom_range(0, 7) == 0);
      #1;
      app = val(intr);
      for (int i = 0; i < C; i++) begin
        r[i] = r_zero ? 0 : val(r_in[i]);
        app += r[i];
      end
      checks++;
      if (hd != (app < 0)) begin failures++; $display("FAIL: hd app=%0d", app); end
      for (int i = 0; i < C; i++) begin
        e  = app - r[i];
        em = scl((e < 0) ? -e : e);
        checks++;
        if (int'(l_out[i].mag) != em || (em != 0 && l_out[i].sign != (e < 0))) begin
          failures++;
          $display("FAIL: l[%0d]=%0d/%0d expected ext %0d -> %0d", i, l_out[i].sign, l_out[i].mag, e, em);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
