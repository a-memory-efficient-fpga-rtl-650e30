// Testbench of ldpc_spram (default 128 x 4): random writes and reads
// against an array model; read data is checked one cycle after each read
// and must hold while no further read is made.
module tb_ldpc_spram;
  logic clk = 1'b0;
  always #5 clk = ~clk;

  logic       en, we;
  logic [6:0] addr;
  logic [3:0] wdata, rdata;
  logic [3:0] model [128];
  int checks = 0, failures = 0;
  int expect_q;

  ldpc_spram dut (.clk, .en, .we, .addr, .wdata, .rdata);

  initial begin
    en = 1; we = 1;
    for (int a = 0; a < 128; a++) begin
      @(negedge clk);
      addr = 7'(a); wdata = 4'($urandom); model[a] = wdata;
    end
    @(negedge clk);
    en = 0; we = 0;
    expect_q = -1;
    for (int n = 0; n < 4000; n++) begin
      @(negedge clk);
      if (expect_q >= 0) begin
        checks++;
        if (int'(rdata) != expect_q) begin
          failures++;
          $display("FAIL: n=%0d rdata=%0d expected %0d", n, rdata, expect_q);
        end
      end
      en    = ($urandom_range(0, 3) != 0);
      we    = ($urandom_range(0, 1) == 0);
      addr  = 7'($urandom);
      wdata = 4'($urandom);
      if (en && we) model[addr] = wdata;
      else if (en) expect_q = int'(model[addr]);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
