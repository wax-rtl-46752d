// tb_wax_preg: self-checking test of the partial-sum register.
// Checks load, clear, accumulation of two sums into two entries with 8-bit
// truncation, that other entries keep their value, and load priority.
module tb_wax_preg;
  import wax_pkg::*;
  import tb_wax_ref_pkg::*;

  logic clk = 0, rst_n = 0, load = 0, clr = 0;
  row_t din = '0, q, model;
  logic [GROUPS-1:0] acc_en = '0;
  idx_t  idx [GROUPS];
  prod_t sum [GROUPS];
  int checks = 0, failures = 0;

  always #5 clk = ~clk;
  wax_preg dut (.clk, .rst_n, .load, .din, .clr, .acc_en, .idx, .sum, .q);

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    idx[0] = '0; idx[1] = '0; sum[0] = '0; sum[1] = '0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    model = rand_row();
    din <= model; load <= 1; @(posedge clk); load <= 0; @(negedge clk);
    checks++; if (q !== model) begin failures++; $display("load"); end
    for (int t = 0; t < 500; t++) begin
      int i0, i1;
      i0 = $urandom_range(23);
      do i1 = $urandom_range(23); while (i1 == i0);
      acc_en <= 2'($urandom);
      idx[0] <= idx_t'(i0); idx[1] <= idx_t'(i1);
      sum[0] <= prod_t'($urandom); sum[1] <= prod_t'($urandom);
      @(posedge clk);
      if (acc_en[0]) model[i0] = model[i0] + sum[0][7:0];
      if (acc_en[1]) model[i1] = model[i1] + sum[1][7:0];
      @(negedge clk);
      checks++; if (q !== model) begin failures++; $display("acc %0d", t); end
    end
    acc_en <= '0;
    clr <= 1; @(posedge clk); clr <= 0; @(negedge clk);
    checks++; if (q !== '0) begin failures++; $display("clr"); end
    model = rand_row();
    din <= model; load <= 1; clr <= 1; acc_en <= 2'b11; @(posedge clk);
    load <= 0; clr <= 0; acc_en <= '0; @(negedge clk);
    checks++; if (q !== model) begin failures++; $display("priority"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
