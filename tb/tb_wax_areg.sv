// tb_wax_areg: self-checking test of the activation shift register.
// Checks load, per-partition right rotation with wraparound against a
// simple index model, return to the loaded value after 6 shifts, hold when
// idle (the FC use) and load priority over shift.
module tb_wax_areg;
  import wax_pkg::*;
  import tb_wax_ref_pkg::*;

  logic clk = 0, rst_n = 0, load = 0, shift = 0;
  row_t din = '0, q;
  int checks = 0, failures = 0;

  always #5 clk = ~clk;
  wax_areg dut (.clk, .rst_n, .load, .din, .shift, .q);

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // expected byte i after s right shifts: partition base + (j - s) mod 6
  function automatic row_t rot(row_t r, int s);
    row_t o;
    for (int p = 0; p < 4; p++)
      for (int j = 0; j < 6; j++)
        o[p*6 + j] = r[p*6 + ((j - s) % 6 + 6) % 6];
    return o;
  endfunction

  initial begin
    row_t ref_r;
    repeat (2) @(posedge clk);
    rst_n = 1;
    checks++; if (q !== '0) begin failures++; $display("reset"); end
    for (int t = 0; t < 50; t++) begin
      ref_r = rand_row();
      din <= ref_r; load <= 1; @(posedge clk); load <= 0; @(negedge clk);
      checks++; if (q !== ref_r) begin failures++; $display("load"); end
      for (int s = 1; s <= 6; s++) begin
        shift <= 1; @(posedge clk); shift <= 0; @(negedge clk);
        checks++;
        if (q !== rot(ref_r, s)) begin failures++; $display("shift %0d: %h vs %h", s, q, rot(ref_r, s)); end
      end
      checks++; if (q !== ref_r) begin failures++; $display("full turn"); end
      repeat (3) @(posedge clk);
      @(negedge clk);
      checks++; if (q !== ref_r) begin failures++; $display("hold"); end
    end
    ref_r = rand_row();
    din <= ref_r; load <= 1; shift <= 1; @(posedge clk); load <= 0; shift <= 0; @(negedge clk);
    checks++; if (q !== ref_r) begin failures++; $display("priority"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
