// tb_wax_mac_array: self-checking test of the 24 signed 8x8 multipliers.
// Random and corner operands; each 16-bit product is compared with integer
// multiplication of the sign-extended bytes.
module tb_wax_mac_array;
  import wax_pkg::*;
  import tb_wax_ref_pkg::*;

  row_t a, w;
  prod_t prod [ROW_BYTES];
  int checks = 0, failures = 0;

  wax_mac_array dut (.a, .w, .prod);

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int t = 0; t < 300; t++) begin
      a = rand_row(); w = rand_row();
      if (t == 0) begin a = '1; w = '1; end
      if (t == 1) begin a = {ROW_BYTES{8'h80}}; w = {ROW_BYTES{8'h80}}; end
      if (t == 2) begin a = {ROW_BYTES{8'h7f}}; w = {ROW_BYTES{8'h80}}; end
      #1;
      for (int i = 0; i < int'(ROW_BYTES); i++) begin
        int e;
        e = int'($signed(a[i])) * int'($signed(w[i]));
        checks++;
        if (prod[i] !== prod_t'(e)) begin
          failures++; $display("byte %0d: %0d*%0d got %h", i, $signed(a[i]), $signed(w[i]), prod[i]);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
