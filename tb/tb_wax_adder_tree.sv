// tb_wax_adder_tree: self-checking test of the WAXFlow-3 aggregation adders.
// Conv mode: sum g must be the sum of products 3g..3g+2 of all 4
// partitions; FC mode: sum 0 is the sum of all 24 products and sum 1 is 0.
module tb_wax_adder_tree;
  import wax_pkg::*;

  prod_t prod [ROW_BYTES];
  prod_t sum  [GROUPS];
  logic  fc;
  int checks = 0, failures = 0;

  wax_adder_tree dut (.prod, .fc, .sum);

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int t = 0; t < 400; t++) begin : trial
      int e0, e1, all;
      e0 = 0; e1 = 0; all = 0;
      for (int i = 0; i < int'(ROW_BYTES); i++) prod[i] = prod_t'($urandom);
      for (int p = 0; p < 4; p++)
        for (int k = 0; k < 3; k++) begin
          e0 += int'(prod[p*6 + k]);
          e1 += int'(prod[p*6 + 3 + k]);
        end
      for (int i = 0; i < int'(ROW_BYTES); i++) all += int'(prod[i]);
      fc = 0; #1;
      checks++; if (sum[0] !== prod_t'(e0)) begin failures++; $display("conv sum0"); end
      checks++; if (sum[1] !== prod_t'(e1)) begin failures++; $display("conv sum1"); end
      fc = 1; #1;
      checks++; if (sum[0] !== prod_t'(all)) begin failures++; $display("fc sum"); end
      checks++; if (sum[1] !== '0) begin failures++; $display("fc sum1"); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
