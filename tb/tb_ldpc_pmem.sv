// Testbench of ldpc_pmem (DEPTH = 256, WIDTH = 5) with the two access
// patterns of the decoder: consecutive rows read from a random start row,
// each written back (changed) one cycle later (uncompressed message banks)
// or three cycles later (compressed bank). Every read is compared with an
// array model; a bank conflict would also fire the module's assertion.
module tb_ldpc_pmem;
  localparam int P = 256;
  logic clk = 1'b0;
  always #5 clk = ~clk;

  logic       rd_en, wr_en;
  logic [7:0] rd_row, wr_row;
  logic [4:0] rd_data, wr_data;
  logic [4:0] model [P];
  int checks = 0, failures = 0;

  ldpc_pmem #(.DEPTH(P), .WIDTH(5)) dut (.clk, .rd_en, .rd_row, .rd_data,
                                          .wr_en, .wr_row, .wr_data);

  task automatic sweep(int delay, int start);
    int rows [$];
    int prev;
    prev = -1;
    for (int c = 0; c < P + delay + 1; c++) begin
      @(negedge clk);
      if (prev >= 0) begin
        checks++;
        if (rd_data != model[prev]) begin
          failures++;
          $display("FAIL: delay %0d row %0d read %0d expected %0d", delay, prev, rd_data, model[prev]);
        end
      end
      // read
      rd_en = (c < P);
      rd_row = 8'((start + c) % P);
      prev = rd_en ? int'(rd_row) : -1;
      // write back the row read 'delay' cycles ago
      wr_en = (c >= delay && c < P + delay);
      wr_row = 8'((start + c - delay + P) % P);
      wr_data = 5'($urandom);
      if (wr_en) model[wr_row] = wr_data;
    end
    @(negedge clk);
    rd_en = 0; wr_en = 0;
  endtask

  initial begin
    rd_en = 0; wr_en = 1; rd_row = '0;
    for (int a = 0; a < P; a++) begin
      @(negedge clk);
      wr_row = 8'(a); wr_data = 5'($urandom); model[a] = wr_data;
    end
    @(negedge clk);
    wr_en = 0;
    for (int s = 0; s < 4; s++) begin
      sweep(1, $urandom_range(0, P - 1));
      sweep(3, $urandom_range(0, P - 1));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
