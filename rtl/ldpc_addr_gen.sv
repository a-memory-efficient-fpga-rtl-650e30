// Address generator of one memory bank.
//
// Thanks to the circulant sub-matrices every memory bank is accessed at
// consecutive rows modulo P, starting at a row that depends on the shift
// values and on the decoding phase. The generator is a counter modulo P
// that is loaded with that start row and then counts once per enabled
// cycle. Its output row is split into the address inside a partition bank
// (row >> 1) and the bank select (row bit 0, 0 = even bank A, 1 = odd bank
// B), the {ADDR, bank} form of the partitioned memories. A counter per
// bank follows the design; the load/increment interface is this
// implementation's choice. Synchronous load has priority over counting.
module ldpc_addr_gen #(
  parameter int unsigned P     = 256,
  parameter int unsigned ROW_W = (P > 1) ? $clog2(P) : 1
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             load,
  input  logic [ROW_W-1:0] start,
  input  logic             inc,
  output logic [ROW_W-1:0] row,
  output logic [ROW_W-2:0] addr,
  output logic             bank
);
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)
      row <= '0;
    else if (load)
      row <= start;
    else if (inc)
      row <= (row == ROW_W'(P - 1)) ? '0 : row + ROW_W'(1);
  end

  assign addr = row[ROW_W-1:1];
  assign bank = row[0];
endmodule
