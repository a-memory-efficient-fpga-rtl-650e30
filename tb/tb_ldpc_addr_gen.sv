// Testbench of ldpc_addr_gen: a P = 256 instance and a P = 10 instance are
// loaded with random start rows and counted with random enables; the row,
// the partition address (row >> 1) and the bank bit (row bit 0) are
// compared with a modulo-P model every cycle.
module tb_ldpc_addr_gen;
  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  logic       load, inc;
  logic [7:0] start_a, row_a;
  logic [6:0] addr_a;
  logic       bank_a;
  logic [3:0] start_b, row_b;
  logic [2:0] addr_b;
  logic       bank_b;
  int checks = 0, failures = 0;
  int ma, mb;

  ldpc_addr_gen #(.P(256)) dut_a (.clk, .rst_n, .load, .start(start_a), .inc,
                                  .row(row_a), .addr(addr_a), .bank(bank_a));
  ldpc_addr_gen #(.P(10))  dut_b (.clk, .rst_n, .load, .start(start_b), .inc,
                                  .row(row_b), .addr(addr_b), .bank(bank_b));

  initial begin
    load = 0; inc = 0; start_a = '0; start_b = '0;
    ma = 0; mb = 0;
    repeat (2) @(posedge clk);
    rst_n = 1'b1;
    for (int n = 0; n < 3000; n++) begin
      @(negedge clk);
      checks++;
      if (int'(row_a) != ma || int'(addr_a) != ma / 2 || bank_a != ma[0] ||
          int'(row_b) != mb || int'(addr_b) != mb / 2 || bank_b != mb[0]) begin
        failures++;
        $display("FAIL: n=%0d row_a=%0d exp %0d row_b=%0d exp %0d", n, row_a, ma, row_b, mb);
      end
      load    = ($urandom_range(0, 99) == 0);
      inc     = ($urandom_range(0, 3) != 0);
      start_a = 8'($urandom_range(0, 255));
      start_b = 4'($urandom_range(0, 9));
      if (load) begin ma = int'(start_a); mb = int'(start_b); end
      else if (inc) begin ma = (ma + 1) % 256; mb = (mb + 1) % 10; end
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
