// Hash generator of the address translator.
//
// Turns a virtual page number into the address of a cell in the translation
// table. The hash must be evaluated on every translation, so it is a single
// level of exclusive OR: the page number is cut into CELL_AW-bit slices
// (the top slice padded with zeros) and the slices are XORed together. Every
// page number bit therefore affects the cell address, and the low slice,
// which holds the low page-number bits, spreads consecutive pages of one
// address space over consecutive cells.
//
// Using an XOR of page number bits follows the translator's description; the
// choice of which bits are combined (here all of them, slice by slice) is this
// design's own.
//
// Interface: purely combinational, vpn in, cell out, no clock.
module hash_gen #(
  parameter int unsigned VPN_W   = 48,
  parameter int unsigned CELL_AW = 13
) (
  input  logic [VPN_W-1:0]   vpn,
  output logic [CELL_AW-1:0] idx
);

  localparam int unsigned NSLICE = (VPN_W + CELL_AW - 1) / CELL_AW;

  logic [NSLICE*CELL_AW-1:0] padded;

  always_comb begin
    padded            = '0;
    padded[VPN_W-1:0] = vpn;
    idx              = '0;
    for (int unsigned i = 0; i < NSLICE; i++) begin
      idx ^= padded[i*CELL_AW +: CELL_AW];
    end
  end

endmodule
