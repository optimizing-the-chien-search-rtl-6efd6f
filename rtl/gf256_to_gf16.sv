// gf256_to_gf16: change of representation from a GF(2^8) byte in polynomial
// basis (bit i = coefficient of alpha^i, field polynomial
// x^8 + x^4 + x^3 + x^2 + 1) to the (C1, C0) pair of GF(2^4) nibbles used by
// every arithmetic unit of the machine.
//
// The map is linear, so the pair is the XOR of the images of the set bits.
// The image of alpha^i is the i-th power of alpha256 = (4'hD, 4'hB) in the
// composite field; the eight columns are
//   alpha^0..7 -> 8'h01, 8'hDB, 8'h74, 8'hDE, 8'hC8, 8'hF3, 8'h7C, 8'h10
// written as {C1, C0}.  The document names this converter in its bus
// diagram but does not give its contents; the matrix is derived here.
// Combinational.
module gf256_to_gf16
  import gf_pkg::*;
(
  input  logic [7:0] b,
  output gf256_t     c
);
  localparam logic [7:0] COL [8] = '{8'h01, 8'hDB, 8'h74, 8'hDE,
                                     8'hC8, 8'hF3, 8'h7C, 8'h10};

  always_comb begin
    logic [7:0] acc;
    acc = 8'h00;
    for (int i = 0; i < 8; i++) begin
      if (b[i]) acc ^= COL[i];
    end
    c = acc;
  end
endmodule
