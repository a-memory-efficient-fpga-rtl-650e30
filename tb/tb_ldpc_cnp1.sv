// Testbench of ldpc_cnp1 (T = 6): a stream of random rows with gaps in
// in_valid. Each output must appear exactly two cycles after its input and
// carry the row number, the outgoing signs (product of the other input
// signs), the index of the smallest magnitude (lowest index on a tie), the
// two smallest magnitudes and the hard-decision parity.
module tb_ldpc_cnp1;
  import ldpc_pkg::*;
  localparam int T = 6, ROW_W = 8;

  logic               clk = 1'b0, rst_n = 1'b0;
  logic               in_valid, out_valid, out_syn;
  logic [ROW_W-1:0]   in_row, out_row;
  msg_t [T-1:0]       l_in;
  logic [T-1:0]       hd_in;
  logic [T+3+6-1:0]   out_cmsg;
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  ldpc_cnp1 #(.T(T), .ROW_W(ROW_W)) dut (
    .clk, .rst_n, .in_valid, .in_row, .l_in, .hd_in,
    .out_valid, .out_row, .out_cmsg, .out_syn
  );

  typedef struct packed {
    logic             v;
    logic [ROW_W-1:0] row;
    logic [T-1:0]     sgn;
    logic [2:0]       idx, m1, m2;
    logic             syn;
  } exp_t;

  exp_t pipe [3];

  function automatic exp_t model(logic v, logic [ROW_W-1:0] row, msg_t [T-1:0] l, logic [T-1:0] hd);
    exp_t e;
    int m1, m2, ix, par;
    m1 = 8; m2 = 8; ix = 0; par = 0;
    for (int j = 0; j < T; j++) begin
      par ^= int'(l[j].sign);
      if (int'(l[j].mag) < m1) begin m2 = m1; m1 = int'(l[j].mag); ix = j; end
      else if (int'(l[j].mag) < m2) m2 = int'(l[j].mag);
    end
    e.v = v; e.row = row; e.idx = 3'(ix); e.m1 = 3'(m1); e.m2 = 3'(m2);
    for (int j = 0; j < T; j++) e.sgn[j] = 1'(par) ^ l[j].sign;
    e.syn = v & (^hd);
    return e;
  endfunction

  initial begin
    in_valid = 0; in_row = '0; l_in = '0; hd_in = '0;
    for (int s = 0; s < 3; s++) pipe[s] = '0;
    repeat (2) @(posedge clk);
    rst_n = 1'b1;
    for (int n = 0; n < 3000; n++) begin
      @(negedge clk);
      // check the output of the row presented two cycles earlier
      if (n >= 2) begin
        exp_t e;
        e = pipe[1];
        checks++;
        if (out_valid != e.v ||
            (e.v && (out_row != e.row || out_cmsg != {e.sgn, e.idx, e.m1, e.m2} || out_syn != e.syn))) begin
          failures++;
          $display("FAIL: n=%0d got v=%0d row=%0d cmsg=%h syn=%0d expected v=%0d row=%0d cmsg=%h syn=%0d",
                   n, out_valid, out_row, out_cmsg, out_syn, e.v, e.row, {e.sgn, e.idx, e.m1, e.m2}, e.syn);
        end
      end
      in_valid = ($urandom_range(0, 3) != 0);
      in_row   = ROW_W'($urandom);
      l_in     = (T*4)'({$urandom, $urandom});
      if (n % 5 == 0) for (int j = 0; j < T; j++) l_in[j].mag = 3'($urandom_range(1, 2));
      hd_in    = T'($urandom);
      pipe[1]  = pipe[0];
      pipe[0]  = model(in_valid, in_row, l_in, hd_in);
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
