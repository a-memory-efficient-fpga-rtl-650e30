// Single-port synchronous RAM.
//
// One access per cycle: a write when en and we are high, otherwise a read
// when en is high. Read data appears in the cycle after the read and holds
// until the next read. This is the memory primitive of the decoder: the
// channel value memories are one such RAM each, and every message memory
// bank is two of them (see ldpc_pmem). Single-port memories follow the
// design, which uses them to save area; read-data hold behaviour is this
// implementation's choice. Contents are not reset.
module ldpc_spram #(
  parameter int unsigned DEPTH = 128,
  parameter int unsigned WIDTH = 4,
  parameter int unsigned AW    = (DEPTH > 1) ? $clog2(DEPTH) : 1
) (
  input  logic             clk,
  input  logic             en,
  input  logic             we,
  input  logic [AW-1:0]    addr,
  input  logic [WIDTH-1:0] wdata,
  output logic [WIDTH-1:0] rdata
);
  logic [WIDTH-1:0] mem [DEPTH];

  always_ff @(posedge clk) begin
    if (en) begin
      if (we) mem[addr] <= wdata;
      else    rdata     <= mem[addr];
    end
  end
endmodule
