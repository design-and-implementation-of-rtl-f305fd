// tag_equal: bit-by-bit equality check of a stored tag against the tag part
// of an address.
//
// The cache compares the incoming tag with the tag of each of its two ways.
// Instead of a general comparator, each bit pair is compared with an XNOR and
// the results are AND-reduced, which is all an equality test needs. Purely
// combinational; eq is high when every bit of a equals the same bit of b.
// The structure follows the design; the width parameter default (21 bits,
// the tag of a 4 KB, 2-way, 32-byte-line cache on 32-bit addresses) is derived.
module tag_equal #(
  parameter int W = 21
) (
  input  logic [W-1:0] a,
  input  logic [W-1:0] b,
  output logic         eq
);
  logic [W-1:0] bit_eq;
  always_comb begin
    for (int i = 0; i < W; i++) bit_eq[i] = ~(a[i] ^ b[i]);
    eq = &bit_eq;
  end
endmodule
