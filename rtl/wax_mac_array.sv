// wax_mac_array: the 24 multipliers of a WAX tile.
//
// Byte i of the activation register A is multiplied with byte i of the
// weight register W, giving 24 pair-wise products per cycle. Operands are
// signed 8-bit two's complement and each product is sign-extended into a
// 16-bit value, the width of the tile's adders. The array is purely
// combinational; the accumulation that completes each MAC happens in the
// adder tree and the P register in the same cycle.
module wax_mac_array
  import wax_pkg::*;
(
  input  row_t  a,
  input  row_t  w,
  output prod_t prod [ROW_BYTES]
);

  always_comb begin
    for (int i = 0; i < int'(ROW_BYTES); i++) begin
      prod[i] = {{8{a[i][7]}}, a[i]} * {{8{w[i][7]}}, w[i]};  // low 16 bits of the signed product
    end
  end

endmodule
