// Translation table memory.
//
// The dedicated high-speed memory that holds the hash table of the address
// translator: 2^CELL_AW cells of CELL_W bits. Each cell holds a key field
// (the virtual page number), a link field, a read-only bit, the flags (valid
// and end of chain) and a main memory page frame number; the memory itself
// does not interpret them.
//
// It has one synchronous read port and one write port. A read issued in
// cycle t (re high) returns the cell in cycle t+1 and holds it until the
// next read. A write in the same cycle as a read of the same cell returns the
// old contents. The memory is not cleared by reset; the maintenance
// sequencer clears it after reset.
module xlat_table #(
  parameter int unsigned CELL_AW = 13,
  parameter int unsigned CELL_W  = 75
) (
  input  logic               clk,
  input  logic               re,
  input  logic [CELL_AW-1:0] raddr,
  output logic [CELL_W-1:0]  rdata,
  input  logic               we,
  input  logic [CELL_AW-1:0] waddr,
  input  logic [CELL_W-1:0]  wdata
);

  logic [CELL_W-1:0] mem [2**CELL_AW];

  always_ff @(posedge clk) begin
    if (we) mem[waddr] <= wdata;
    if (re) rdata <= mem[raddr];
  end

endmodule
