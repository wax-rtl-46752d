// tb_wax_tile: self-checking test of a WAX tile driven by hand-written
// micro-ops. Rows are loaded over the H-tree leaf; then a WAXFlow-3 slice
// (read A, W, P; 6 MAC+shift cycles; write P) and a fully-connected pass
// (static A, one kernel row per cycle, 24-to-1 sums) are run, and the psum
// rows read back over the leaf are compared with a direct convolution and
// dot products. Also checks the A register's full turn and the read
// latency (a row read in cycle t is usable in cycle t+2).
module tb_wax_tile;
  import wax_pkg::*;
  import tb_wax_ref_pkg::*;

  logic clk = 0, rst_n = 0;
  tile_op_t op = '0;
  leaf_dn_t dn = '0;
  leaf_up_t up;
  logic rx_busy, rx_overflow, rx_wait, tx_req = 0, tx_ready;
  addr_t tx_addr = '0;
  row_t a_q, w_q, p_q;
  int checks = 0, failures = 0;

  always #5 clk = ~clk;
  wax_tile dut (.clk, .rst_n, .op, .dn, .up, .rx_busy, .rx_overflow, .rx_wait,
                .tx_req, .tx_addr, .tx_ready, .a_q, .w_q, .p_q);

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic send_row(row_t r, addr_t a);
    logic [BEATS*LINK_W-1:0] bits;
    bits = (BEATS*LINK_W)'(r);
    while (rx_busy) @(posedge clk);
    for (int b = 0; b < int'(BEATS); b++) begin
      dn.valid <= 1; dn.data <= bits[b*LINK_W +: LINK_W]; dn.addr <= a; dn.acc <= 0;
      @(posedge clk);
    end
    dn <= '0;
    @(posedge clk);
    while (rx_busy) @(posedge clk);
  endtask

  task automatic read_row(addr_t a, output row_t r);
    logic [BEATS*LINK_W-1:0] bits;
    int n;
    while (!tx_ready) @(posedge clk);
    tx_req <= 1; tx_addr <= a; @(posedge clk); tx_req <= 0;
    n = 0; bits = '0;
    while (n < int'(BEATS)) begin
      @(negedge clk);
      if (up.valid) begin bits[n*LINK_W +: LINK_W] = up.data; n++; end
    end
    r = row_t'(bits);
  endtask

  task automatic mem(mem_op_e m, addr_t a);
    op <= '0; op.mem_op <= m; op.addr <= a; @(posedge clk);
  endtask

  initial begin
    row_t act, wgt, ps, got, fa;
    row_t fw [6];
    repeat (2) @(posedge clk);
    rst_n = 1;
    @(posedge clk);
    for (int t = 0; t < 6; t++) begin
      act = rand_row(); wgt = rand_row(); ps = rand_row();
      send_row(act, 8'd0); send_row(wgt, 8'd1); send_row(ps, 8'd10);
      // slice
      mem(MEM_RD_A, 8'd0);
      mem(MEM_RD_W, 8'd1);
      mem(MEM_RD_P, 8'd10);
      @(negedge clk);
      checks++; if (a_q !== act) begin failures++; $display("A not loaded after 2 cycles"); end
      mem(MEM_NONE, 8'd0);
      for (int s = 0; s < int'(PART_W); s++) begin
        op <= '0; op.mac_en <= 1; op.shift <= 1;
        for (int g = 0; g < int'(GROUPS); g++) begin
          int x;
          x = (g*KW + PART_W - s) % PART_W;
          op.acc_en[g] <= (x <= int'(PART_W - KW));
          op.idx[g] <= idx_t'(t[0]*PART_W*GROUPS + g*PART_W + x);
        end
        @(posedge clk);
      end
      op <= '0;
      @(negedge clk);
      checks++; if (a_q !== act) begin failures++; $display("A after full turn"); end
      mem(MEM_WR_P, 8'd11);
      op <= '0;
      read_row(8'd11, got);
      checks++;
      if (got !== conv_slice(act, wgt, ps, t[0])) begin
        failures++; $display("slice %0d: %h\n   exp %h", t, got, conv_slice(act, wgt, ps, t[0]));
      end
    end
    // fully connected pass over 6 kernel rows
    fa = rand_row();
    send_row(fa, 8'd20);
    for (int i = 0; i < 6; i++) begin fw[i] = rand_row(); send_row(fw[i], addr_t'(30 + i)); end
    op <= '0; op.mem_op <= MEM_RD_A; op.addr <= 8'd20; op.clr_p <= 1; @(posedge clk);
    for (int c = 0; c < 8; c++) begin
      op <= '0;
      if (c < 6) begin op.mem_op <= MEM_RD_W; op.addr <= addr_t'(30 + c); end
      if (c >= 2) begin
        op.mac_en <= 1; op.fc <= 1; op.acc_en <= 2'b01; op.idx[0] <= idx_t'(3 + c - 2);
      end
      @(posedge clk);
    end
    mem(MEM_WR_P, 8'd40);
    op <= '0;
    read_row(8'd40, got);
    for (int i = 0; i < 24; i++) begin
      byte_t e;
      e = (i >= 3 && i < 9) ? dot(fa, fw[i-3]) : 8'h00;
      checks++; if (got[i] !== e) begin failures++; $display("fc entry %0d: %h vs %h", i, got[i], e); end
    end
    checks++; if (rx_overflow) begin failures++; $display("overflow"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
