// tb_wax_bank: self-checking test of one bank (H-tree node and four MAC
// tiles). Loads four rows at once through the 72-bit root, reads each back
// through the root's up lanes, moves rows between sibling subarrays with
// the split-point mux (plain and accumulating), and runs one FC micro-op
// sequence broadcast to all four tiles, checking each tile's result.
module tb_wax_bank;
  import wax_pkg::*;
  import tb_wax_ref_pkg::*;

  logic clk = 0, rst_n = 0;
  tile_op_t op = '0;
  logic root_dn_valid = 0, root_dn_acc = 0;
  logic [ROOT_W-1:0] root_dn_data = '0, root_up_data;
  logic [SUBS-1:0] root_dn_lane_en = '0, steer = '0, root_up_valid;
  addr_t root_dn_addr = '0, tx_addr = '0;
  logic [SUBS-1:0] tx_req = '0, tx_ready, rx_busy, rx_wait, rx_overflow;
  int checks = 0, failures = 0;
  row_t shadow [4][ROWS];

  always #5 clk = ~clk;
  wax_bank dut (.clk, .rst_n, .op, .root_dn_valid, .root_dn_data, .root_dn_lane_en,
                .root_dn_addr, .root_dn_acc, .steer, .root_up_valid, .root_up_data,
                .tx_req, .tx_addr, .tx_ready, .rx_busy, .rx_wait, .rx_overflow);

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic chk(bit ok, string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", msg); end
  endtask

  task automatic load4(addr_t r, row_t v [4]);
    logic [BEATS*LINK_W-1:0] bits [4];
    for (int i = 0; i < 4; i++) begin bits[i] = (BEATS*LINK_W)'(v[i]); shadow[i][r] = v[i]; end
    while (rx_busy != '0) @(posedge clk);
    for (int k = 0; k < int'(BEATS); k++) begin
      root_dn_valid <= 1; root_dn_lane_en <= 4'b1111; root_dn_addr <= r; root_dn_acc <= 0;
      for (int i = 0; i < 4; i++) root_dn_data[i*LINK_W +: LINK_W] <= bits[i][k*LINK_W +: LINK_W];
      @(posedge clk);
    end
    root_dn_valid <= 0;
    @(posedge clk);
    while (rx_busy != '0) @(posedge clk);
  endtask

  task automatic read(int s, addr_t r, output row_t got);
    logic [BEATS*LINK_W-1:0] bits;
    int n;
    while (!tx_ready[s]) @(posedge clk);
    tx_req[s] <= 1; tx_addr <= r; @(posedge clk); tx_req[s] <= 0;
    n = 0;
    while (n < int'(BEATS)) begin
      @(negedge clk);
      if (root_up_valid[s]) begin bits[n*LINK_W +: LINK_W] = root_up_data[s*LINK_W +: LINK_W]; n++; end
    end
    got = row_t'(bits);
  endtask

  task automatic sib_move(int s, addr_t sr, addr_t dr, logic acc);
    int d, n;
    d = s ^ 1;
    while (!tx_ready[s] || rx_busy[d]) @(posedge clk);
    steer[d] <= 1; root_dn_addr <= dr; root_dn_acc <= acc;
    tx_req[s] <= 1; tx_addr <= sr; @(posedge clk); tx_req[s] <= 0;
    n = 0;
    while (n < int'(BEATS)) begin @(negedge clk); if (root_up_valid[s]) n++; end
    @(posedge clk);
    steer[d] <= 0;
    shadow[d][dr] = acc ? row_add(shadow[d][dr], shadow[s][sr]) : shadow[s][sr];
    while (rx_busy[d]) @(posedge clk);
    repeat (3) @(posedge clk);
  endtask

  initial begin
    row_t v [4];
    row_t got;
    repeat (2) @(posedge clk);
    rst_n = 1;
    @(posedge clk);
    for (int r = 0; r < 8; r++) begin
      for (int i = 0; i < 4; i++) v[i] = rand_row();
      load4(addr_t'(r), v);
    end
    for (int i = 0; i < 4; i++)
      for (int r = 0; r < 8; r++) begin
        read(i, addr_t'(r), got);
        chk(got === shadow[i][r], $sformatf("sub %0d row %0d", i, r));
      end
    sib_move(0, 8'd1, 8'd20, 0);
    sib_move(3, 8'd2, 8'd21, 0);
    sib_move(1, 8'd3, 8'd4, 1);
    sib_move(2, 8'd5, 8'd6, 1);
    read(1, 8'd20, got); chk(got === shadow[1][20], "move 0->1");
    read(2, 8'd21, got); chk(got === shadow[2][21], "move 3->2");
    read(0, 8'd4, got);  chk(got === shadow[0][4], "acc move 1->0");
    read(3, 8'd6, got);  chk(got === shadow[3][6], "acc move 2->3");
    read(0, 8'd1, got);  chk(got === shadow[0][1], "source kept");
    // FC step on all tiles: A = row 0, W = rows 1..3, results into P 0..2, P -> row 30
    @(posedge clk);
    op <= '0; op.mem_op <= MEM_RD_A; op.addr <= 8'd0; op.clr_p <= 1; @(posedge clk);
    for (int c = 0; c < 5; c++) begin
      op <= '0;
      if (c < 3) begin op.mem_op <= MEM_RD_W; op.addr <= addr_t'(1 + c); end
      if (c >= 2) begin op.mac_en <= 1; op.fc <= 1; op.acc_en <= 2'b01; op.idx[0] <= idx_t'(c - 2); end
      @(posedge clk);
    end
    op <= '0; op.mem_op <= MEM_WR_P; op.addr <= 8'd30; @(posedge clk);
    op <= '0;
    repeat (2) @(posedge clk);
    for (int i = 0; i < 4; i++) begin
      read(i, 8'd30, got);
      for (int k = 0; k < 3; k++)
        chk(got[k] === dot(shadow[i][0], shadow[i][1 + k]), $sformatf("tile %0d neuron %0d", i, k));
    end
    chk(rx_overflow == '0, "no overflow");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
