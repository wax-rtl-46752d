// wax_adder_tree: the aggregation adders of a WAX tile (WAXFlow-3).
//
// In convolution mode the 24 products are first summed inside each kernel
// group of each partition (3 products: one kernel row window), and then
// across the 4 partitions (4 input channels), leaving GROUPS = 2 partial
// sums per cycle, one per kernel held in the weight row. In fully-connected
// mode all 24 products belong to the same output neuron and are summed into
// sum[0]; sum[1] is then zero. All adders are 16 bits wide and wrap.
// Purely combinational.
module wax_adder_tree
  import wax_pkg::*;
(
  input  prod_t prod [ROW_BYTES],
  input  logic  fc,
  output prod_t sum  [GROUPS]
);

  prod_t grp [PARTS][GROUPS];   // intra-partition sums
  prod_t total;

  always_comb begin
    for (int p = 0; p < int'(PARTS); p++) begin
      for (int g = 0; g < int'(GROUPS); g++) begin
        grp[p][g] = '0;
        for (int k = 0; k < int'(KW); k++) begin
          grp[p][g] = grp[p][g] + prod[p*PART_W + g*KW + k];
        end
      end
    end
    total = '0;
    for (int p = 0; p < int'(PARTS); p++)
      for (int g = 0; g < int'(GROUPS); g++)
        total = total + grp[p][g];
    for (int g = 0; g < int'(GROUPS); g++) begin
      sum[g] = '0;
      for (int p = 0; p < int'(PARTS); p++) sum[g] = sum[g] + grp[p][g];
    end
    if (fc) begin
      sum[0] = total;
      for (int g = 1; g < int'(GROUPS); g++) sum[g] = '0;
    end
  end

endmodule
