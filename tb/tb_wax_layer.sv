// tb_wax_layer: whole layers run on the WAX accelerator at its full size.
//
// The testbench acts as the host and maps two small layers onto the chip
// with nothing but commands, then checks the outputs against the layer's
// definition (a 3-D convolution and a matrix-vector product, wrapped to
// 8 bits), computed without any of the accelerator's data layout.
//
// Convolution, shaped like a strip of a VGG-16 3x3 layer: 16 input
// channels of 3 x 18 activations, 8 kernels of 3 x 3 x 16, stride 1, no
// padding: one output row of 16 pixels per kernel. Six MAC tiles work in
// parallel, tile 3*s + ky handling kernel row ky of kernels 4s..4s+3 (one
// Z-accumulate pass per tile). For each of four overlapping 6-pixel windows
// a tile runs, per group of 4 channels, two slices on the same A row (the
// second reuses A without reading the subarray), one per kernel pair, into
// the two halves of P; P accumulates over the channel groups and is written
// once per window. The three kernel rows of each window are then combined
// by Y-accumulate moves (a sibling move inside a bank and moves through the
// central controller, within and across banks) and copied to two output
// tiles. These moves run while the next window's slices compute. All
// outputs are read back at the end.
//
// Depthwise 3x3 (as in MobileNet): 4 channels of 3 x 6, one 3x3 kernel per
// channel, 4 output pixels per channel, on three tiles (one per kernel row)
// combined by Y-accumulate. A depthwise kernel covers one channel, so its
// weights fill one partition and the others hold zeros.
//
// Fully connected: 48 inputs, 10 neurons, batch of 2. Two tiles each hold
// half of every neuron's weights (one kernel row per neuron) and run one FC
// pass per input vector with the weights left in place; the two halves are
// combined with a Y-accumulate move. The second input vector is loaded
// while the first pass computes, and the halves of the first pass are
// combined while the second pass computes (a move marked nowait, whose row
// waits for the subarray port that the pass keeps busy).
//
// Every mechanism used is counted and a mechanism that never happened
// counts as a failure. The cycle count of each layer is printed.
module tb_wax_layer;
  import wax_pkg::*;

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
    repeat (100000) @(posedge clk);
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
  always @(negedge clk) begin
    in_valid <= (in_q.size() > 0);
    in_data  <= (in_q.size() > 0) ? in_q[0] : '0;
  end
  always @(posedge clk) begin
    if (in_valid && in_ready) void'(in_q.pop_front());
    if (out_valid) out_q.push_back(out_data);
  end

  int n_dw, n_slice, n_zacc, n_areuse, n_ysib, n_yctrl, n_copy, n_fc, n_wreuse, n_ovl, n_stall;
  int cycles = 0;
  always @(posedge clk) begin
    cycles++;
    if (rst_n && link_stall) n_stall++;
  end

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
    while (busy || in_q.size() > 0) @(posedge clk);
    repeat (4) @(posedge clk);
  endtask

  // rows[i] -> row r of tile i, for tiles 0..5 (all of bank 0, lanes 0-1 of bank 1)
  task automatic load6(addr_t r, row_t rows [6]);
    for (int b = 0; b < 2; b++) begin
      cmd_t c;
      logic [BEATS*LINK_W-1:0] bits [4];
      for (int i = 0; i < 4; i++)
        bits[i] = (BEATS*LINK_W)'((b * 4 + i < 6) ? rows[b * 4 + i] : row_t'('0));
      for (int k = 0; k < int'(BEATS); k++) begin
        logic [ROOT_W-1:0] w;
        for (int i = 0; i < 4; i++) w[i*LINK_W +: LINK_W] = bits[i][k*LINK_W +: LINK_W];
        in_q.push_back(w);
      end
      c = '0; c.op = CMD_LOAD; c.dst_tile = 4'(b * 4); c.dst_row = r;
      c.lane_mask = (b == 0) ? 4'b1111 : 4'b0011;
      issue(c);
    end
  endtask

  task automatic move(int s, addr_t sr, int d, addr_t dr, logic acc, logic nowait = 1'b0);
    cmd_t c;
    c = '0; c.op = CMD_MOVE; c.src_tile = 4'(s); c.src_row = sr; c.dst_tile = 4'(d);
    c.dst_row = dr; c.acc = acc; c.nowait = nowait;
    issue(c);
    if (dut.u_ctrl.u_seq.busy) n_ovl++;
    if (acc && s[3:2] == d[3:2] && (s[1:0] ^ 2'd1) == d[1:0]) n_ysib++;
    else if (acc) n_yctrl++;
    else n_copy++;
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

  // ---------------- the layers ----------------
  localparam int C = 16, CG = C / 4, NW = 4, OW = 4 * NW, W = OW + 2, H = 3, K = 8;
  byte_t ifm [C][H][W];
  byte_t wt  [K][C][3][3];
  byte_t ofm [K][OW];
  byte_t dwi [4][3][6];
  byte_t dww [4][3][3];
  byte_t dwo [4][4];
  localparam int NI = 48, NO = 10;
  byte_t fin [2][NI];
  byte_t fwt [NO][NI];
  byte_t fout [2][NO];

  initial begin
    cmd_t c;
    row_t got, v [6];
    int t0, conv_cycles, fc_cycles, dw_cycles;
    n_dw = 0; n_slice = 0; n_zacc = 0; n_areuse = 0; n_ysib = 0; n_yctrl = 0; n_copy = 0; n_fc = 0; n_wreuse = 0; n_ovl = 0; n_stall = 0;
    for (int ch = 0; ch < C; ch++)
      for (int y = 0; y < H; y++)
        for (int x = 0; x < W; x++) ifm[ch][y][x] = byte_t'($urandom);
    for (int k = 0; k < K; k++)
      for (int ch = 0; ch < C; ch++)
        for (int y = 0; y < 3; y++)
          for (int x = 0; x < 3; x++) wt[k][ch][y][x] = byte_t'($urandom);
    for (int k = 0; k < K; k++)
      for (int ox = 0; ox < OW; ox++) begin
        int acc;
        acc = 0;
        for (int ch = 0; ch < C; ch++)
          for (int y = 0; y < 3; y++)
            for (int x = 0; x < 3; x++)
              acc += int'($signed(ifm[ch][y][ox + x])) * int'($signed(wt[k][ch][y][x]));
        ofm[k][ox] = byte_t'(acc);
      end
    for (int ch = 0; ch < 4; ch++) begin
      for (int y = 0; y < 3; y++) begin
        for (int x = 0; x < 6; x++) dwi[ch][y][x] = byte_t'($urandom);
        for (int x = 0; x < 3; x++) dww[ch][y][x] = byte_t'($urandom);
      end
      for (int ox = 0; ox < 4; ox++) begin
        int acc;
        acc = 0;
        for (int y = 0; y < 3; y++)
          for (int x = 0; x < 3; x++)
            acc += int'($signed(dwi[ch][y][ox + x])) * int'($signed(dww[ch][y][x]));
        dwo[ch][ox] = byte_t'(acc);
      end
    end
    for (int b = 0; b < 2; b++)
      for (int i = 0; i < NI; i++) fin[b][i] = byte_t'($urandom);
    for (int n = 0; n < NO; n++)
      for (int i = 0; i < NI; i++) fwt[n][i] = byte_t'($urandom);
    for (int b = 0; b < 2; b++)
      for (int n = 0; n < NO; n++) begin
        int acc;
        acc = 0;
        for (int i = 0; i < NI; i++) acc += int'($signed(fin[b][i])) * int'($signed(fwt[n][i]));
        fout[b][n] = byte_t'(acc);
      end

    repeat (3) @(posedge clk);
    rst_n = 1;
    repeat (2) @(posedge clk);

    // ======== convolution layer ========
    t0 = cycles;
    // activation rows: row cg*NW + win holds, in partition p, pixels
    // 4*win .. 4*win+5 of channel 4*cg+p, input row ky of the tile
    for (int cg = 0; cg < CG; cg++)
      for (int win = 0; win < NW; win++) begin
        for (int t = 0; t < 6; t++)
          for (int p = 0; p < int'(PARTS); p++)
            for (int j = 0; j < int'(PART_W); j++)
              v[t][p*PART_W + j] = ifm[cg*4 + p][t % 3][win*4 + j];
        load6(addr_t'(cg * NW + win), v);
      end
    // weight rows: row 60 + q*CG + cg holds, in partition p, kernel row ky
    // of kernels 2*(2s+q) (bytes 0-2) and 2*(2s+q)+1 (bytes 3-5), channel 4*cg+p
    for (int q = 0; q < 2; q++)
      for (int cg = 0; cg < CG; cg++) begin
        for (int t = 0; t < 6; t++)
          for (int p = 0; p < int'(PARTS); p++)
            for (int g = 0; g < int'(GROUPS); g++)
              for (int k = 0; k < int'(KW); k++)
                v[t][p*PART_W + g*KW + k] = wt[((t / 3)*2 + q)*2 + g][cg*4 + p][t % 3][k];
        load6(addr_t'(60 + q * CG + cg), v);
      end
    wait_idle();   // loads are not ordered against compute: let them land
    // For each window: every channel group runs two slices on the same A
    // row (the second reuses A), one per kernel pair, into P slots 0 and 1;
    // P is written to row 20+win after the last channel group. The moves
    // that combine window win are issued, marked nowait, between the slices
    // of window win+1, whose rows they do not touch.
    begin : conv_passes
      int mq_s [$], mq_d [$], mq_r [$], mq_acc [$];
      for (int win = 0; win < NW; win++) begin
        for (int cg = 0; cg < CG; cg++)
          for (int q = 0; q < 2; q++) begin
            c = '0; c.op = CMD_CONV;
            c.a_row = addr_t'(cg * NW + win); c.ld_a = (q == 0);
            c.w_row = addr_t'(60 + q * CG + cg);
            c.clr_p = (cg == 0 && q == 0);
            c.p_slot = q[0];
            c.st_p = (cg == CG - 1 && q == 1); c.p_row = addr_t'(20 + win);
            issue(c);
            n_slice++;
            if (q == 1) n_areuse++;
            if (cg > 0 && q == 0) n_zacc++;
            if (win > 0 && cg == 0 && q == 0) begin
              // window win-1 is now in its P row: queue its moves
              int sr [6], dr [6], ar [6];
              sr = '{1, 2, 4, 5, 0, 3}; dr = '{0, 0, 3, 3, 8, 9}; ar = '{1, 1, 1, 1, 0, 0};
              for (int i = 0; i < 6; i++) begin
                mq_s.push_back(sr[i]); mq_d.push_back(dr[i]); mq_r.push_back(win - 1);
                mq_acc.push_back(ar[i]);
              end
            end
            if (mq_s.size() > 0) begin
              int d, r;
              d = mq_d.pop_front(); r = mq_r.pop_front();
              move(mq_s.pop_front(), addr_t'(20 + r), d,
                   (d >= 8) ? addr_t'(r) : addr_t'(20 + r), mq_acc.pop_front()[0], 1'b1);
            end
          end
      end
      // the last window's moves wait for its slices (no nowait)
      begin
        int sr [6], dr [6], ar [6];
        sr = '{1, 2, 4, 5, 0, 3}; dr = '{0, 0, 3, 3, 8, 9}; ar = '{1, 1, 1, 1, 0, 0};
        for (int i = 0; i < 6; i++) begin
          mq_s.push_back(sr[i]); mq_d.push_back(dr[i]); mq_r.push_back(NW - 1);
          mq_acc.push_back(ar[i]);
        end
      end
      while (mq_s.size() > 0) begin
        int d, r;
        d = mq_d.pop_front(); r = mq_r.pop_front();
        move(mq_s.pop_front(), addr_t'(20 + r), d,
             (d >= 8) ? addr_t'(r) : addr_t'(20 + r), mq_acc.pop_front()[0], 1'b0);
      end
    end
    wait_idle();
    conv_cycles = cycles - t0;
    // output tile 8+s, row win: entry q*12 + g*6 + x is kernel 2*(2s+q)+g, pixel 4*win+x
    for (int s = 0; s < 2; s++)
      for (int win = 0; win < NW; win++) begin
        read(8 + s, addr_t'(win), got);
        for (int q = 0; q < 2; q++)
          for (int g = 0; g < int'(GROUPS); g++)
            for (int x = 0; x < int'(PART_W); x++) begin
              byte_t e;
              int kk;
              kk = (2*s + q)*2 + g;
              e = (x <= int'(PART_W - KW)) ? ofm[kk][win*4 + x] : 8'h00;
              chk(got[q*PART_W*GROUPS + g*PART_W + x] === e,
                  $sformatf("conv kernel %0d pixel %0d", kk, win*4 + x));
            end
      end

    // ======== depthwise 3x3 layer (MobileNet style) ========
    // Each kernel sees one channel, so kernel group g of W row q holds the
    // weights of channel 2q+g in partition 2q+g only, zeros elsewhere: the
    // inter-partition adder then passes that channel's sum alone. Tiles 0-2
    // take kernel rows 0-2; A (row 100) is reused by the second slice.
    t0 = cycles;
    for (int t = 0; t < 6; t++)
      for (int p = 0; p < int'(PARTS); p++)
        for (int j = 0; j < int'(PART_W); j++)
          v[t][p*PART_W + j] = dwi[p][t % 3][j];
    load6(8'd100, v);
    for (int q = 0; q < 2; q++) begin
      for (int t = 0; t < 6; t++) begin
        v[t] = '0;
        for (int g = 0; g < int'(GROUPS); g++)
          for (int k = 0; k < int'(KW); k++)
            v[t][(2*q + g)*PART_W + g*KW + k] = dww[2*q + g][t % 3][k];
      end
      load6(addr_t'(101 + q), v);
    end
    wait_idle();
    for (int q = 0; q < 2; q++) begin
      c = '0; c.op = CMD_CONV; c.a_row = 8'd100; c.ld_a = (q == 0); c.w_row = addr_t'(101 + q);
      c.clr_p = (q == 0); c.p_slot = q[0]; c.st_p = (q == 1); c.p_row = 8'd103;
      issue(c);
      n_dw++;
    end
    move(1, 8'd103, 0, 8'd103, 1);
    move(2, 8'd103, 0, 8'd103, 1);
    wait_idle();
    dw_cycles = cycles - t0;
    read(0, 8'd103, got);
    for (int q = 0; q < 2; q++)
      for (int g = 0; g < int'(GROUPS); g++)
        for (int x = 0; x < int'(PART_W); x++)
          chk(got[q*PART_W*GROUPS + g*PART_W + x] === ((x <= int'(PART_W - KW)) ? dwo[2*q + g][x] : 8'h00),
              $sformatf("depthwise channel %0d pixel %0d", 2*q + g, x));

    // ======== fully connected layer, batch of 2 ========
    t0 = cycles;
    // tile t holds inputs 24t..24t+23: input vector b in row 30+b,
    // neuron n's weights in row 32+n
    for (int t = 0; t < 6; t++)
      for (int i = 0; i < int'(ROW_BYTES); i++) v[t][i] = (t < 2) ? fin[0][t*24 + i] : 8'h00;
    load6(8'd30, v);
    for (int n = 0; n < NO; n++) begin
      for (int t = 0; t < 6; t++)
        for (int i = 0; i < int'(ROW_BYTES); i++) v[t][i] = (t < 2) ? fwt[n][t*24 + i] : 8'h00;
      load6(addr_t'(32 + n), v);
    end
    wait_idle();
    // pass 0, with the second input vector loaded while it runs
    c = '0; c.op = CMD_FC; c.a_row = 8'd30; c.w_row = 8'd32;
    c.n_rows = (IDX_W+1)'(NO); c.p_base = '0; c.ld_a = 1; c.clr_p = 1; c.st_p = 1;
    c.p_row = 8'd45;
    issue(c);
    n_fc++;
    for (int t = 0; t < 6; t++)
      for (int i = 0; i < int'(ROW_BYTES); i++) v[t][i] = (t < 2) ? fin[1][t*24 + i] : 8'h00;
    load6(8'd31, v);
    wait_idle();
    // pass 1 reuses the weights; the halves of pass 0 are combined meanwhile
    // (nowait: the move touches only row 45, which pass 1 does not use)
    c.a_row = 8'd31; c.p_row = 8'd46;
    issue(c);
    n_fc++; n_wreuse++;
    move(1, 8'd45, 0, 8'd45, 1, 1'b1);
    move(1, 8'd46, 0, 8'd46, 1);     // waits for pass 1 to write row 46
    wait_idle();
    fc_cycles = cycles - t0;
    for (int b = 0; b < 2; b++) begin
      read(0, addr_t'(45 + b), got);
      for (int n = 0; n < int'(ROW_BYTES); n++)
        chk(got[n] === ((n < NO) ? fout[b][n] : 8'h00),
            $sformatf("fc input %0d neuron %0d", b, n));
    end

    chk(!rx_overflow, "no received row lost");
    $display("conv layer: %0d cycles, depthwise layer: %0d cycles, fc layer: %0d cycles",
             conv_cycles, dw_cycles, fc_cycles);
    $display("mechanisms: slices=%0d zacc=%0d areuse=%0d ysib=%0d yctrl=%0d copy=%0d fc=%0d wreuse=%0d ovl=%0d stall_cycles=%0d",
             n_slice, n_zacc, n_areuse, n_ysib, n_yctrl, n_copy, n_fc, n_wreuse, n_ovl, n_stall);
    chk(n_slice > 0, "slices ran");
    chk(n_zacc > 0, "channel groups accumulated in P");
    chk(n_areuse > 0, "A register reused by a second slice");
    chk(n_ysib > 0, "Y-accumulate through the split-point mux");
    chk(n_yctrl > 0, "Y-accumulate through the controller");
    chk(n_copy > 0, "output copy");
    chk(n_fc > 0, "FC passes");
    chk(n_dw > 0, "depthwise slices");
    chk(n_wreuse > 0, "FC weights reused across the batch");
    chk(n_ovl > 0, "Y-accumulate overlapped with compute");
    chk(n_stall > 0, "received row waited for the compute port");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
