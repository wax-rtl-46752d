// tb_wax_tile_mem: self-checking test of a subarray with its H-tree port
// (the output tile). Rows written over the leaf are read back over the
// leaf; Y-accumulate rows are added byte-wise; the compute port reads rows
// with one cycle of latency and, while it keeps the port busy, a received
// row waits (rx_wait) and is written once the port frees up. A read-out
// requested right after an accumulating row arrives must return the sum,
// not the row as it was before the add.
module tb_wax_tile_mem;
  import wax_pkg::*;
  import tb_wax_ref_pkg::*;

  logic clk = 0, rst_n = 0;
  logic cp_req = 0, cp_we = 0, cp_rvalid;
  addr_t cp_addr = '0, tx_addr = '0;
  row_t cp_wdata = '0, cp_rdata;
  leaf_dn_t dn = '0;
  leaf_up_t up;
  logic rx_busy, rx_overflow, rx_wait, tx_req = 0, tx_ready;
  int checks = 0, failures = 0, waits = 0;
  row_t shadow [ROWS];

  always #5 clk = ~clk;
  wax_tile_mem dut (.clk, .rst_n, .cp_req, .cp_we, .cp_addr, .cp_wdata, .cp_rdata, .cp_rvalid,
                    .dn, .up, .rx_busy, .rx_overflow, .rx_wait, .tx_req, .tx_addr, .tx_ready);

  always @(posedge clk) if (rx_wait) waits++;

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic send_row(row_t r, addr_t a, logic acc);
    logic [BEATS*LINK_W-1:0] bits;
    bits = (BEATS*LINK_W)'(r);
    while (rx_busy) @(posedge clk);
    for (int b = 0; b < int'(BEATS); b++) begin
      dn.valid <= 1; dn.data <= bits[b*LINK_W +: LINK_W]; dn.addr <= a; dn.acc <= acc;
      @(posedge clk);
    end
    dn <= '0;
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

  initial begin
    row_t r, got;
    int a;
    repeat (2) @(posedge clk);
    rst_n = 1;
    @(posedge clk);
    for (int i = 0; i < 24; i++) begin
      shadow[i] = rand_row(); send_row(shadow[i], addr_t'(i), 0);
    end
    while (rx_busy) @(posedge clk);
    for (int i = 0; i < 24; i++) begin
      read_row(addr_t'(i), got);
      checks++; if (got !== shadow[i]) begin failures++; $display("row %0d", i); end
    end
    // Y-accumulate
    for (int i = 0; i < 8; i++) begin
      r = rand_row(); send_row(r, addr_t'(i), 1);
      shadow[i] = row_add(shadow[i], r);
    end
    while (rx_busy) @(posedge clk);
    for (int i = 0; i < 8; i++) begin
      read_row(addr_t'(i), got);
      checks++; if (got !== shadow[i]) begin failures++; $display("acc row %0d", i); end
    end
    // compute port reads keep the port busy while a row arrives
    fork
      begin
        r = rand_row(); send_row(r, 8'd100, 0); shadow[100] = r;
      end
      begin
        for (int c = 0; c < 30; c++) begin
          a = $urandom_range(23);
          cp_req <= 1; cp_we <= 0; cp_addr <= addr_t'(a);
          @(posedge clk);
          @(negedge clk);
          checks++;
          if (!cp_rvalid || cp_rdata !== shadow[a]) begin failures++; $display("cp read %0d", a); end
        end
        cp_req <= 0;
      end
    join
    checks++; if (waits == 0) begin failures++; $display("no rx_wait seen"); end
    // compute-port write
    r = rand_row(); cp_req <= 1; cp_we <= 1; cp_addr <= 8'd101; cp_wdata <= r; @(posedge clk);
    cp_req <= 0; cp_we <= 0; shadow[101] = r;
    while (rx_busy) @(posedge clk);
    read_row(8'd100, got);
    checks++; if (got !== shadow[100]) begin failures++; $display("delayed row"); end
    read_row(8'd101, got);
    checks++; if (got !== shadow[101]) begin failures++; $display("cp write"); end
    // a read-out requested once an accumulating row has fully arrived, while
    // its read-add-write is still in progress, returns the sum
    for (int d = 0; d < 6; d++) begin
      r = rand_row();
      shadow[d] = row_add(shadow[d], r);
      fork
        send_row(r, addr_t'(d), 1);
        begin
          repeat (int'(BEATS) - 1 + d) @(posedge clk);
          read_row(addr_t'(d), got);
        end
      join
      checks++; if (got !== shadow[d]) begin failures++; $display("read during accumulate, offset %0d", d); end
    end
    checks++; if (rx_overflow) begin failures++; $display("overflow"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
