// gf16_add: GF(2^4) adder.  Addition in a binary field is the bitwise XOR of
// the two nibbles; combinational, four XOR gates.
module gf16_add
  import gf_pkg::*;
(
  input  gf16_t a,
  input  gf16_t b,
  output gf16_t y
);
  always_comb y = a ^ b;
endmodule
