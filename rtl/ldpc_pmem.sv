// Partitioned message memory bank.
//
// A message memory that must be read and written in the same clock cycle,
// built from two single-port RAMs instead of one dual-port RAM: bank A holds
// the even rows and bank B the odd rows, told apart by the lowest bit of
// the row number. The decoder always reads consecutive rows and writes back
// a row an odd number of cycles later (1 cycle for the uncompressed banks,
// 3 cycles for the compressed bank of the first block row), so in every
// cycle the read and the write fall on different banks. An assertion checks
// this. The even/odd partition follows the design.
//
// Ports: rd_en/rd_row request a read, whose data is on rd_data in the next
// cycle; wr_en/wr_row/wr_data write in the same cycle. DEPTH (the number of
// rows, P) must be even.
module ldpc_pmem #(
  parameter int unsigned DEPTH = 256,
  parameter int unsigned WIDTH = 5,
  parameter int unsigned ROW_W = (DEPTH > 1) ? $clog2(DEPTH) : 1
) (
  input  logic             clk,
  input  logic             rd_en,
  input  logic [ROW_W-1:0] rd_row,
  output logic [WIDTH-1:0] rd_data,
  input  logic             wr_en,
  input  logic [ROW_W-1:0] wr_row,
  input  logic [WIDTH-1:0] wr_data
);
  localparam int unsigned HD = DEPTH / 2;
  localparam int unsigned AW = (HD > 1) ? $clog2(HD) : 1;

  logic             en   [2];
  logic             we   [2];
  logic [AW-1:0]    addr [2];
  logic [WIDTH-1:0] q    [2];
  logic             rd_bank_q;

  always_comb begin
    for (int b = 0; b < 2; b++) begin
      we[b]   = wr_en && (wr_row[0] == b[0]);
      en[b]   = we[b] || (rd_en && (rd_row[0] == b[0]));
      addr[b] = we[b] ? AW'(wr_row >> 1) : AW'(rd_row >> 1);
    end
  end

  for (genvar b = 0; b < 2; b++) begin : g_bank
    ldpc_spram #(.DEPTH(HD), .WIDTH(WIDTH)) u_ram (
      .clk(clk), .en(en[b]), .we(we[b]), .addr(addr[b]),
      .wdata(wr_data), .rdata(q[b])
    );
  end

  always_ff @(posedge clk) if (rd_en) rd_bank_q <= rd_row[0];

  assign rd_data = q[rd_bank_q];

  // A read and a write in the same cycle must use different banks.
  a_no_bank_conflict: assert property (@(posedge clk)
    !(rd_en && wr_en && (rd_row[0] == wr_row[0])))
    else $error("ldpc_pmem: read and write of the same bank in one cycle");

  initial begin
    if (DEPTH % 2 != 0) $error("ldpc_pmem: DEPTH must be even");
  end
endmodule
