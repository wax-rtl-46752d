// tb_wax_link_if: self-checking test of the 18-bit H-tree port of a tile.
// Sends rows as 11 beats (with gaps) and checks the collected row, address
// and accumulate flag, rx_busy, pop and the overflow flag; loads rows for
// transmission and checks that exactly 11 consecutive beats reproduce them.
module tb_wax_link_if;
  import wax_pkg::*;
  import tb_wax_ref_pkg::*;

  logic clk = 0, rst_n = 0;
  leaf_dn_t dn = '0;
  logic rx_pending, rx_acc, rx_pop = 0, rx_busy, rx_overflow;
  row_t rx_row, tx_row = '0;
  addr_t rx_addr;
  logic tx_load = 0, tx_busy;
  leaf_up_t up;
  int checks = 0, failures = 0;

  always #5 clk = ~clk;
  wax_link_if dut (.clk, .rst_n, .dn, .rx_pending, .rx_row, .rx_addr, .rx_acc, .rx_pop,
                   .rx_busy, .rx_overflow, .tx_load, .tx_row, .up, .tx_busy);

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic send_row(row_t r, addr_t a, logic acc, bit gaps);
    logic [BEATS*LINK_W-1:0] bits;
    bits = (BEATS*LINK_W)'(r);
    for (int b = 0; b < int'(BEATS); b++) begin
      if (gaps && $urandom_range(2) == 0) begin
        dn <= '0; @(posedge clk);
      end
      dn.valid <= 1; dn.data <= bits[b*LINK_W +: LINK_W]; dn.addr <= a; dn.acc <= acc;
      @(posedge clk);
    end
    dn <= '0;
  endtask

  initial begin
    row_t r, got;
    addr_t a;
    int n;
    logic gap;
    logic [BEATS*LINK_W-1:0] bits;
    repeat (2) @(posedge clk);
    rst_n = 1;
    @(posedge clk);
    for (int t = 0; t < 40; t++) begin
      r = rand_row(); a = addr_t'($urandom);
      send_row(r, a, t[0], t > 5);
      @(negedge clk);
      checks++;
      if (!rx_pending || rx_row !== r || rx_addr !== a || rx_acc !== t[0] || !rx_busy) begin
        failures++; $display("rx row %0d wrong", t);
      end
      rx_pop <= 1; @(posedge clk); rx_pop <= 0; @(negedge clk);
      checks++; if (rx_pending || rx_busy) begin failures++; $display("pop"); end
    end
    checks++; if (rx_overflow) begin failures++; $display("spurious overflow"); end
    // two rows without pop: the second is lost
    r = rand_row(); send_row(r, 8'd1, 0, 0);
    send_row(rand_row(), 8'd2, 0, 0);
    @(negedge clk);
    checks++; if (!rx_overflow || rx_row !== r || rx_addr !== 8'd1) begin failures++; $display("overflow"); end
    // transmit
    for (int t = 0; t < 40; t++) begin
      r = rand_row();
      tx_row <= r; tx_load <= 1; @(posedge clk); tx_load <= 0;
      n = 0; bits = '0; gap = 1'b0;
      for (int c = 0; c < 20; c++) begin
        @(negedge clk);
        if (up.valid) begin
          bits[n*LINK_W +: LINK_W] = up.data;
          n++;
        end else if (n > 0 && n < int'(BEATS)) begin
          gap = 1'b1;
        end
      end
      got = row_t'(bits);
      checks++; if (gap) begin failures++; $display("gap in tx beats"); end
      checks++; if (n != int'(BEATS) || got !== r) begin failures++; $display("tx %0d: %0d beats", t, n); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
