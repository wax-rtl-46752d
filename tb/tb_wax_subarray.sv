// tb_wax_subarray: self-checking test of the 6 KB subarray.
// Writes random rows to random addresses, keeps a shadow copy, and reads
// rows back, checking the data and that rvalid follows a read by one cycle.
module tb_wax_subarray;
  import wax_pkg::*;
  import tb_wax_ref_pkg::*;

  logic clk = 0, rst_n = 0;
  logic req = 0, we = 0;
  addr_t addr = '0;
  row_t wdata = '0, rdata;
  logic rvalid;
  int checks = 0, failures = 0;
  row_t shadow [ROWS];
  bit   written [ROWS];

  always #5 clk = ~clk;

  wax_subarray dut (.clk, .rst_n, .req, .we, .addr, .wdata, .rdata, .rvalid);

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2) @(posedge clk);
    rst_n = 1;
    @(posedge clk);
    // fill every row
    for (int i = 0; i < int'(ROWS); i++) begin
      req <= 1; we <= 1; addr <= addr_t'(i); wdata <= rand_row();
      @(posedge clk);
      shadow[i] = wdata; written[i] = 1;
    end
    req <= 0; we <= 0;
    @(posedge clk);
    checks++; if (rvalid) begin failures++; $display("rvalid after writes"); end
    // random reads and rewrites
    for (int n = 0; n < 2000; n++) begin
      int a;
      a = $urandom_range(ROWS - 1);
      if ($urandom_range(3) == 0) begin
        req <= 1; we <= 1; addr <= addr_t'(a); wdata <= rand_row();
        @(posedge clk);
        shadow[a] = wdata;
      end else begin
        req <= 1; we <= 0; addr <= addr_t'(a);
        @(posedge clk);
        req <= 0;
        @(negedge clk);
        checks++;
        if (!rvalid || rdata !== shadow[a]) begin
          failures++; $display("read row %0d mismatch", a);
        end
        @(posedge clk);
      end
    end
    // rdata holds while idle
    req <= 1; we <= 0; addr <= 8'd7; @(posedge clk); req <= 0;
    repeat (3) @(posedge clk);
    checks++; if (rdata !== shadow[7] || rvalid) begin failures++; $display("hold failed"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
