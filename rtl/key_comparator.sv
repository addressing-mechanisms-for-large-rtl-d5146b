// Key comparator of the address translator.
//
// Compares the key field of the cell just read from the translation table
// with the virtual page number being translated and classifies the cell:
//   hit    : the cell is valid and holds this page
//   follow : no match, but the chain goes on at the cell's link field
//   last   : no match and the chain ends here (empty cell or end-of-chain
//            flag set), so the page is not resident
// Exactly one of the three outputs is high. The comparison against the key
// and the use of the end-of-chain bit follow the translator's description;
// treating an empty (not valid) cell as the end of an empty chain is this
// design's choice.
//
// Interface: purely combinational.
module key_comparator #(
  parameter int unsigned VPN_W = 48
) (
  input  logic [VPN_W-1:0] vpn,
  input  logic [VPN_W-1:0] key,
  input  logic             valid,
  input  logic             eoc,
  output logic             hit,
  output logic             follow,
  output logic             last
);

  always_comb begin
    hit    = valid && (key == vpn);
    follow = valid && !hit && !eoc;
    last   = !hit && !follow;
  end

endmodule
