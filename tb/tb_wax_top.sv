// tb_wax_top: end-to-end test of the WAX accelerator at its full size.
//
// The host loads activation, weight and partial-sum rows into all seven MAC
// tiles over the 72-bit bus (four subarrays per 11-beat load), runs
// WAXFlow-3 slices (with a reused A register, a P register carried across
// slices, and a psum row reloaded from the subarray) and a fully-connected
// pass on all MAC tiles at once, then combines the partial sums of three
// tiles with Y-accumulate moves (one through a bank's split-point mux, one
// across banks through the central controller), copies the result to an
// output tile and reads rows back. Loads are issued while the tiles compute,
// so loading overlaps computation, and a load that arrives during the FC
// pass must wait for the subarray port (link stall). Every result is
// compared with a direct convolution / dot product, and each mechanism is
// counted; a mechanism that never happened counts as a failure. The load
// rate (4 rows in 11 cycles) and the slice length are checked in cycles.
module tb_wax_top;
  import wax_pkg::*;
  import tb_wax_ref_pkg::*;

  logic clk = 0, rst_n = 0;
  logic cmd_valid = 0, cmd_ready;
  cmd_t cmd = '0;
  logic in_valid = 0, in_ready, out_valid, busy, link_stall, rx_overflow;
  logic [ROOT_W-1:0] in_data = '0;
  logic [LINK_W-1:0] out_data;
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  wax_top dut (.clk, .rst_n, .cmd_valid, .cmd, .cmd_ready, .in_valid, .in_data, .in_ready,
               .out_valid, .out_data, .busy, .link_stall, .rx_overflow);

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic chk(bit ok, string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", msg); end
  endtask

  // ---------------- host streams ----------------
  logic [ROOT_W-1:0] in_q [$];
  logic [LINK_W-1:0] out_q [$];
  // the input beat is presented at the falling edge, taken at the rising edge
  always @(negedge clk) begin
    in_valid <= (in_q.size() > 0);
    in_data  <= (in_q.size() > 0) ? in_q[0] : '0;
  end
  int in_beats = 0;
  always @(posedge clk) begin
    if (in_valid && in_ready) begin void'(in_q.pop_front()); in_beats++; end
    if (out_valid) out_q.push_back(out_data);
  end

  // ---------------- mechanism counters ----------------
  int n_load, n_sib, n_cross, n_yacc, n_read, n_conv, n_areuse, n_pcarry, n_pload, n_fc;
  int n_overlap, n_stall;
  always @(posedge clk) begin
    if (rst_n && dut.u_ctrl.u_seq.busy && dut.u_ctrl.xst != dut.u_ctrl.X_IDLE) n_overlap++;
    if (rst_n && link_stall) n_stall++;
  end

  // valid is raised at a falling edge; the command is taken at the first
  // rising edge at which cmd_ready is high
  // length of every sequencer command, and MAC cycles per conv command
  int seq_len [$], mac_len [$];
  int cur_len = 0, cur_mac = 0;
  always @(posedge clk) begin
    if (rst_n && dut.u_ctrl.u_seq.busy) begin
      cur_len++;
      if (dut.u_ctrl.op.mac_en) cur_mac++;
      if (dut.u_ctrl.u_seq.done) begin
        seq_len.push_back(cur_len); mac_len.push_back(cur_mac);
        cur_len = 0; cur_mac = 0;
      end
    end
  end

  task automatic issue(cmd_t c);
    @(negedge clk);
    cmd = c; cmd_valid = 1;
    #1;
    while (!cmd_ready) begin @(negedge clk); #1; end
    @(posedge clk);
    #1 cmd_valid = 0;
    case (c.op)
      CMD_LOAD: n_load++;
      CMD_MOVE: begin
        if (c.src_tile[3:2] == c.dst_tile[3:2] && (c.src_tile[1:0] ^ 2'd1) == c.dst_tile[1:0]) n_sib++;
        else n_cross++;
        if (c.acc) n_yacc++;
      end
      CMD_READ: n_read++;
      CMD_CONV: begin
        n_conv++;
        if (!c.ld_a) n_areuse++;
        if (!c.st_p) n_pcarry++;
        if (c.ld_p) n_pload++;
      end
      CMD_FC: n_fc++;
      default: ;
    endcase
  endtask

  // load rows[i] into row r of subarray i of bank b (lanes in mask)
  task automatic load(int b, logic [3:0] mask, addr_t r, row_t rows [4]);
    cmd_t c;
    logic [BEATS*LINK_W-1:0] bits [4];
    for (int i = 0; i < 4; i++) bits[i] = (BEATS*LINK_W)'(rows[i]);
    for (int k = 0; k < int'(BEATS); k++) begin
      logic [ROOT_W-1:0] w;
      for (int i = 0; i < 4; i++) w[i*LINK_W +: LINK_W] = bits[i][k*LINK_W +: LINK_W];
      in_q.push_back(w);
    end
    c = '0; c.op = CMD_LOAD; c.dst_tile = 4'(b * 4); c.lane_mask = mask; c.dst_row = r;
    issue(c);
  endtask

  task automatic move(int s, addr_t sr, int d, addr_t dr, logic acc);
    cmd_t c;
    c = '0; c.op = CMD_MOVE; c.src_tile = 4'(s); c.src_row = sr; c.dst_tile = 4'(d);
    c.dst_row = dr; c.acc = acc;
    issue(c);
  endtask

  task automatic read(int t, addr_t r, output row_t got);
    cmd_t c;
    logic [BEATS*LINK_W-1:0] bits;
    wait_idle();
    out_q.delete();
    c = '0; c.op = CMD_READ; c.src_tile = 4'(t); c.src_row = r;
    issue(c);
    while (out_q.size() < int'(BEATS)) @(posedge clk);
    for (int k = 0; k < int'(BEATS); k++) bits[k*LINK_W +: LINK_W] = out_q[k];
    got = row_t'(bits);
  endtask

  task automatic wait_idle();
    @(posedge clk);
    while (busy || in_q.size() > 0) @(posedge clk);
    // let received rows settle into their subarrays
    repeat (4) @(posedge clk);
  endtask

  // ---------------- data ----------------
  localparam int NT = MAC_TILES;
  row_t act [NT], w1 [NT], w2 [NT], fa [NT], p50 [NT], p52 [NT], late [NT];
  row_t fw [NT][24];
  byte_t fc_out [NT][24];

  task automatic load_all(addr_t r, row_t v [NT]);
    row_t g0 [4], g1 [4];
    for (int i = 0; i < 4; i++) begin
      g0[i] = v[i];
      g1[i] = (i < 3) ? v[4 + i] : '0;
    end
    load(0, 4'b1111, r, g0);
    load(1, 4'b0111, r, g1);
  endtask

  initial begin
    cmd_t c;
    row_t got, zero_row, y;
    int t0;
    n_load = 0; n_sib = 0; n_cross = 0; n_yacc = 0; n_read = 0; n_conv = 0;
    n_areuse = 0; n_pcarry = 0; n_pload = 0; n_fc = 0; n_overlap = 0; n_stall = 0;
    zero_row = '0;
    for (int t = 0; t < NT; t++) begin
      act[t] = rand_row(); w1[t] = rand_row(); w2[t] = rand_row(); fa[t] = rand_row();
      late[t] = rand_row();
      for (int i = 0; i < 24; i++) fw[t][i] = rand_row();
    end
    repeat (3) @(posedge clk);
    rst_n = 1;
    repeat (2) @(posedge clk);

    // ---- loads, and the 4-rows-in-11-cycles rate ----
    load_all(8'd0, act);
    t0 = in_beats;
    wait_idle();
    chk(in_beats - t0 + int'(BEATS) == 2 * int'(BEATS), "22 beats for two loads");
    load_all(8'd1, w1);
    load_all(8'd2, w2);
    load_all(8'd3, fa);
    for (int i = 0; i < 24; i++) begin
      row_t col [NT];
      for (int t = 0; t < NT; t++) col[t] = fw[t][i];
      load_all(addr_t'(16 + i), col);
    end
    wait_idle();
    begin : rate
      int c0, c1;
      row_t four [4];
      for (int i = 0; i < 4; i++) four[i] = rand_row();
      c0 = -1; c1 = -1;
      fork
        load(2, 4'b1111, 8'd9, four);
        begin
          for (int k = 0; k < 40; k++) begin
            @(posedge clk);
            if (in_valid && in_ready && c0 < 0) c0 = k;
            if (in_valid && in_ready) c1 = k;
          end
        end
      join
      chk(c1 - c0 + 1 == int'(BEATS), $sformatf("4-row load took %0d cycles", c1 - c0 + 1));
      wait_idle();
      for (int i = 0; i < 4; i++) begin
        read(8 + i, 8'd9, got);
        chk(got === four[i], $sformatf("output tile %0d row 9", 8 + i));
      end
    end

    // ---- WAXFlow-3: two slices sharing A and P, with a load overlapped ----
    c = '0; c.op = CMD_CONV; c.a_row = 8'd0; c.w_row = 8'd1; c.ld_a = 1; c.clr_p = 1;
    c.p_slot = 0; c.p_row = 8'd50;
    issue(c);
    load_all(8'd60, late);             // runs while the tiles compute
    c = '0; c.op = CMD_CONV; c.w_row = 8'd2; c.ld_a = 0; c.p_slot = 1; c.st_p = 1; c.p_row = 8'd50;
    issue(c);
    wait_idle();
    chk(seq_len.size() == 2 && seq_len[0] == 9 && seq_len[1] == 9,
        $sformatf("slice lengths %p, expected 9 and 9", seq_len));
    chk(mac_len[0] == int'(PART_W) && mac_len[1] == int'(PART_W), "6 MAC cycles per slice");
    // third slice: reload P from row 50, write to 52
    c = '0; c.op = CMD_CONV; c.a_row = 8'd0; c.w_row = 8'd1; c.ld_a = 1; c.ld_p = 1;
    c.p_slot = 0; c.p_row = 8'd50; c.st_p = 0;
    issue(c);
    c = '0; c.op = CMD_CONV; c.w_row = 8'd2; c.ld_a = 0; c.p_slot = 1; c.st_p = 1; c.p_row = 8'd52;
    issue(c);
    wait_idle();
    for (int t = 0; t < NT; t++) begin
      p50[t] = conv_slice(act[t], w2[t], conv_slice(act[t], w1[t], zero_row, 0), 1);
      p52[t] = conv_slice(act[t], w2[t], conv_slice(act[t], w1[t], p50[t], 0), 1);
    end

    // ---- fully connected pass, with a load that must wait for the port ----
    c = '0; c.op = CMD_FC; c.a_row = 8'd3; c.ld_a = 1; c.clr_p = 1; c.w_row = 8'd16;
    c.n_rows = 24; c.p_base = 5'd0; c.st_p = 1; c.p_row = 8'd51;
    issue(c);
    for (int r = 0; r < 3; r++) load_all(addr_t'(61 + r), late);
    wait_idle();
    for (int t = 0; t < NT; t++) for (int i = 0; i < 24; i++) fc_out[t][i] = dot(fa[t], fw[t][i]);
    chk(seq_len.size() == 5 && seq_len[4] == 28 && mac_len[4] == 24,
        $sformatf("FC pass: %p cycles, expected 28 with 24 MAC cycles", seq_len));

    // ---- check every MAC tile ----
    for (int t = 0; t < NT; t++) begin
      read(t, 8'd50, got);
      chk(got === p50[t], $sformatf("tile %0d conv psums", t));
      read(t, 8'd52, got);
      chk(got === p52[t], $sformatf("tile %0d conv psums after reload", t));
      read(t, 8'd51, got);
      for (int i = 0; i < 24; i++)
        chk(got[i] === fc_out[t][i], $sformatf("tile %0d fc entry %0d", t, i));
      read(t, 8'd60, got);
      chk(got === late[t], $sformatf("tile %0d overlapped load", t));
      read(t, 8'd63, got);
      chk(got === late[t], $sformatf("tile %0d stalled load", t));
    end

    // ---- Y-accumulate: tile 0 -> tile 1 (sibling), tile 4 -> tile 1 (across banks) ----
    move(0, 8'd50, 1, 8'd50, 1);
    move(4, 8'd50, 1, 8'd50, 1);
    // output copy to output tile 12, and a plain sibling move 2 -> 3
    move(1, 8'd50, 12, 8'd5, 0);
    move(2, 8'd51, 3, 8'd70, 0);
    wait_idle();
    y = row_add(row_add(p50[0], p50[1]), p50[4]);
    read(1, 8'd50, got);
    chk(got === y, "Y-accumulated row in tile 1");
    read(12, 8'd5, got);
    chk(got === y, "output copy in tile 12");
    read(3, 8'd70, got);
    for (int i = 0; i < 24; i++)
      chk(got[i] === fc_out[2][i], $sformatf("sibling move entry %0d", i));
    read(0, 8'd50, got);
    chk(got === p50[0], "source row unchanged");

    chk(!rx_overflow, "no row lost at a tile port");
    // ---- every mechanism happened ----
    chk(n_load > 0, "load");
    chk(n_sib > 0, "sibling move");
    chk(n_cross > 0, "move through controller");
    chk(n_yacc > 0, "Y-accumulate");
    chk(n_read > 0, "read-out");
    chk(n_conv > 0, "conv slice");
    chk(n_areuse > 0, "A register reuse");
    chk(n_pcarry > 0, "P carried across slices");
    chk(n_pload > 0, "psum reload");
    chk(n_fc > 0, "fc pass");
    chk(n_overlap > 0, "load overlapped with compute");
    chk(n_stall > 0, "link stall");
    $display("mechanisms: load=%0d sibling=%0d cross=%0d yacc=%0d read=%0d conv=%0d areuse=%0d pcarry=%0d pload=%0d fc=%0d overlap_cycles=%0d stall_cycles=%0d",
             n_load, n_sib, n_cross, n_yacc, n_read, n_conv, n_areuse, n_pcarry, n_pload, n_fc, n_overlap, n_stall);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
