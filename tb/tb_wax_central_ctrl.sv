// tb_wax_central_ctrl: self-checking test of the H-tree root controller
// against a simple behavioural model of the four banks (a row store per
// tile that sends a requested row as 11 up-beats two cycles after tx_req and
// collects 11 down-beats per received row). Checks loads (four lanes at
// once, 11 beats), sibling moves (steered at the split point, never through
// the root), moves across banks through the controller, accumulating moves,
// read-out on the output stream, and that a compute command is accepted and
// sequenced while a transfer is still running.
module tb_wax_central_ctrl;
  import wax_pkg::*;
  import tb_wax_ref_pkg::*;

  logic clk = 0, rst_n = 0;
  logic cmd_valid = 0, cmd_ready;
  cmd_t cmd = '0;
  logic in_valid = 0, in_ready, out_valid, busy;
  logic [ROOT_W-1:0] in_data = '0;
  logic [LINK_W-1:0] out_data;
  tile_op_t op;
  logic [BANKS-1:0]  root_dn_valid;
  logic [ROOT_W-1:0] root_dn_data;
  logic [SUBS-1:0]   root_dn_lane_en;
  addr_t             root_dn_addr, tx_addr;
  logic              root_dn_acc;
  logic [SUBS-1:0]   steer [BANKS];
  logic [SUBS-1:0]   root_up_valid [BANKS];
  logic [ROOT_W-1:0] root_up_data [BANKS];
  logic [TILES-1:0]  tx_req, tx_ready, rx_busy;
  int checks = 0, failures = 0;

  always #5 clk = ~clk;
  wax_central_ctrl dut (.clk, .rst_n, .cmd_valid, .cmd, .cmd_ready, .in_valid, .in_data,
    .in_ready, .out_valid, .out_data, .op, .root_dn_valid, .root_dn_data, .root_dn_lane_en,
    .root_dn_addr, .root_dn_acc, .steer, .root_up_valid, .root_up_data, .tx_req, .tx_addr,
    .tx_ready, .rx_busy, .busy);

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

  // ---------------- behavioural banks ----------------
  localparam int SRW = BEATS * LINK_W;
  row_t mem [TILES][ROWS];
  logic [SRW-1:0] tx_sr [TILES], rx_sr [TILES];
  int tx_wait [TILES], tx_left [TILES], rx_cnt [TILES];
  int root_beats_from_sib;   // up-beats seen at the controller while steering
  int dn_beats [BANKS];

  always_comb begin
    for (int t = 0; t < int'(TILES); t++) begin
      tx_ready[t] = (tx_wait[t] == 0) && (tx_left[t] == 0);
      rx_busy[t]  = (rx_cnt[t] != 0);
    end
    for (int b = 0; b < int'(BANKS); b++) begin
      for (int s = 0; s < int'(SUBS); s++) begin
        root_up_valid[b][s] = (tx_left[b*4 + s] != 0);
        root_up_data[b][s*LINK_W +: LINK_W] = tx_sr[b*4 + s][LINK_W-1:0];
      end
    end
  end

  always @(posedge clk) begin
    logic [SUBS-1:0] dv [BANKS];
    logic [LINK_W-1:0] dd [TILES];
    for (int b = 0; b < int'(BANKS); b++)
      for (int s = 0; s < int'(SUBS); s++) begin
        int t;
        t = b*4 + s;
        if (steer[b][s]) begin
          dv[b][s] = root_up_valid[b][s ^ 1];
          dd[t] = root_up_data[b][(s ^ 1)*LINK_W +: LINK_W];
        end else begin
          dv[b][s] = root_dn_valid[b] && root_dn_lane_en[s];
          dd[t] = root_dn_data[s*LINK_W +: LINK_W];
        end
        if (root_dn_valid[b] && root_dn_lane_en[s]) dn_beats[b]++;
      end
    for (int t = 0; t < int'(TILES); t++) begin
      if (dv[t/4][t%4]) begin
        logic [SRW-1:0] nsr;
        nsr = {dd[t], rx_sr[t][SRW-1:LINK_W]};
        rx_sr[t] <= nsr;
        if (rx_cnt[t] == int'(BEATS) - 1) begin
          rx_cnt[t] <= 0;
          mem[t][root_dn_addr] <= root_dn_acc ? row_add(mem[t][root_dn_addr], row_t'(nsr)) : row_t'(nsr);
        end else rx_cnt[t] <= rx_cnt[t] + 1;
      end
      if (tx_req[t]) begin
        tx_wait[t] <= 2; tx_sr[t] <= SRW'(mem[t][tx_addr]);
      end else if (tx_wait[t] > 0) begin
        tx_wait[t] <= tx_wait[t] - 1;
        if (tx_wait[t] == 1) tx_left[t] <= BEATS;
      end else if (tx_left[t] > 0) begin
        tx_left[t] <= tx_left[t] - 1;
        tx_sr[t] <= tx_sr[t] >> LINK_W;
      end
    end
  end

  // ---------------- host side ----------------
  logic [LINK_W-1:0] out_q [$];
  always @(posedge clk) if (out_valid) out_q.push_back(out_data);

  task automatic issue(cmd_t c);
    @(negedge clk);
    cmd = c; cmd_valid = 1;
    #1;
    while (!cmd_ready) begin @(negedge clk); #1; end
    @(posedge clk);
    #1 cmd_valid = 0;
  endtask

  task automatic wait_idle();
    @(posedge clk);
    while (busy) @(posedge clk);
    repeat (2) @(posedge clk);
  endtask

  initial begin
    cmd_t c;
    row_t v [4];
    row_t got, old;
    logic [SRW-1:0] bits [4];
    int nin, nmac;
    for (int t = 0; t < int'(TILES); t++) begin
      tx_wait[t] = 0; tx_left[t] = 0; rx_cnt[t] = 0; tx_sr[t] = '0; rx_sr[t] = '0;
      for (int r = 0; r < 16; r++) mem[t][r] = rand_row();
    end
    for (int b = 0; b < int'(BANKS); b++) dn_beats[b] = 0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    // ---- LOAD bank 2, all lanes, row 40 ----
    for (int i = 0; i < 4; i++) begin v[i] = rand_row(); bits[i] = SRW'(v[i]); end
    c = '0; c.op = CMD_LOAD; c.dst_tile = 4'd8; c.lane_mask = 4'b1111; c.dst_row = 8'd40;
    issue(c);
    nin = 0;
    for (int k = 0; k < int'(BEATS); k++) begin
      @(negedge clk);
      for (int i = 0; i < 4; i++) in_data[i*LINK_W +: LINK_W] = bits[i][k*LINK_W +: LINK_W];
      in_valid = 1;
      #1;
      while (!in_ready) begin @(negedge clk); #1; end
      @(posedge clk);
      nin++;
    end
    @(negedge clk); in_valid = 0;
    wait_idle();
    chk(nin == int'(BEATS), "11 accepted beats");
    chk(!in_ready, "no more beats taken");
    chk(dn_beats[2] == 4 * int'(BEATS) && dn_beats[0] == 0, "beats went to bank 2 only");
    for (int i = 0; i < 4; i++) chk(mem[8 + i][40] === v[i], $sformatf("load lane %0d", i));
    // ---- sibling move 5 -> 4 ----
    c = '0; c.op = CMD_MOVE; c.src_tile = 4'd5; c.src_row = 8'd3; c.dst_tile = 4'd4; c.dst_row = 8'd50;
    issue(c); wait_idle();
    chk(mem[4][50] === mem[5][3], "sibling move");
    chk(dn_beats[1] == 0, "sibling move did not use the root");
    // ---- cross-bank move 2 -> 13, then accumulating move 6 -> 13 ----
    c = '0; c.op = CMD_MOVE; c.src_tile = 4'd2; c.src_row = 8'd7; c.dst_tile = 4'd13; c.dst_row = 8'd60;
    issue(c); wait_idle();
    chk(mem[13][60] === mem[2][7], "cross-bank move");
    chk(dn_beats[3] == int'(BEATS), "cross move sent 11 beats down");
    old = mem[13][60];
    c = '0; c.op = CMD_MOVE; c.src_tile = 4'd6; c.src_row = 8'd8; c.dst_tile = 4'd13; c.dst_row = 8'd60; c.acc = 1;
    issue(c); wait_idle();
    chk(mem[13][60] === row_add(old, mem[6][8]), "accumulating move");
    // accumulating sibling move 14 -> 15
    old = mem[15][9];
    c = '0; c.op = CMD_MOVE; c.src_tile = 4'd14; c.src_row = 8'd9; c.dst_tile = 4'd15; c.dst_row = 8'd9; c.acc = 1;
    issue(c); wait_idle();
    chk(mem[15][9] === row_add(old, mem[14][9]), "accumulating sibling move");
    // ---- read-out ----
    for (int t = 0; t < int'(TILES); t += 3) begin
      logic [SRW-1:0] rb;
      out_q.delete();
      c = '0; c.op = CMD_READ; c.src_tile = 4'(t); c.src_row = 8'(t);
      issue(c); wait_idle();
      chk(out_q.size() == int'(BEATS), "11 out beats");
      for (int k = 0; k < int'(BEATS) && k < out_q.size(); k++) rb[k*LINK_W +: LINK_W] = out_q[k];
      chk(row_t'(rb) === mem[t][t], $sformatf("read tile %0d", t));
    end
    // ---- ordering: a compute command waits for a move, and a move for compute ----
    c = '0; c.op = CMD_MOVE; c.src_tile = 4'd0; c.src_row = 8'd1; c.dst_tile = 4'd9; c.dst_row = 8'd2;
    issue(c);
    c = '0; c.op = CMD_CONV; c.ld_a = 1; c.a_row = 8'd0; c.w_row = 8'd1; c.st_p = 1; c.p_row = 8'd3;
    issue(c);
    chk(dut.xst == dut.X_IDLE && mem[9][2] === mem[0][1], "conv held until the move finished");
    c = '0; c.op = CMD_READ; c.src_tile = 4'd9; c.src_row = 8'd2;
    issue(c);
    chk(!dut.u_seq.busy, "read held until the conv finished");
    wait_idle();
    // ---- a load is accepted while the tiles compute ----
    c = '0; c.op = CMD_CONV; c.ld_a = 1; c.a_row = 8'd0; c.w_row = 8'd1; c.st_p = 1; c.p_row = 8'd3;
    issue(c);
    for (int i = 0; i < 4; i++) begin v[i] = rand_row(); bits[i] = SRW'(v[i]); end
    c = '0; c.op = CMD_LOAD; c.dst_tile = 4'd12; c.lane_mask = 4'b0001; c.dst_row = 8'd41;
    issue(c);
    chk(dut.u_seq.busy && dut.xst != dut.X_IDLE, "load runs alongside compute");
    nmac = 0;
    for (int k = 0; k < int'(BEATS); k++) begin
      @(negedge clk);
      if (op.mac_en) nmac++;
      for (int i = 0; i < 4; i++) in_data[i*LINK_W +: LINK_W] = bits[i][k*LINK_W +: LINK_W];
      in_valid = 1;
      #1;
      while (!in_ready) begin @(negedge clk); if (op.mac_en) nmac++; #1; end
      @(posedge clk);
    end
    @(negedge clk); in_valid = 0;
    while (busy) begin @(negedge clk); if (op.mac_en) nmac++; end
    wait_idle();
    chk(nmac == int'(PART_W), "slice has 6 MAC cycles");
    chk(mem[12][41] === v[0], "load finished alongside compute");
    // ---- a move marked nowait runs alongside compute ----
    c = '0; c.op = CMD_CONV; c.ld_a = 1; c.a_row = 8'd0; c.w_row = 8'd1; c.st_p = 1; c.p_row = 8'd3;
    issue(c);
    c = '0; c.op = CMD_MOVE; c.src_tile = 4'd5; c.src_row = 8'd6; c.dst_tile = 4'd10; c.dst_row = 8'd7;
    c.nowait = 1;
    issue(c);
    chk(dut.u_seq.busy && dut.xst != dut.X_IDLE, "nowait move runs alongside compute");
    wait_idle();
    chk(mem[10][7] === mem[5][6], "nowait move delivered");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
