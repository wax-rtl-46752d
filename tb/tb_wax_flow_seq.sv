// tb_wax_flow_seq: self-checking test of the micro-op sequencer.
// For conv slices with every combination of ld_a/ld_p/st_p/clr_p and for FC
// passes of several lengths it records the micro-op stream and checks: the
// cycle count against the stated formula, the order and addresses of the
// subarray accesses, that every MAC cycle comes at least two cycles after
// the read it depends on, the number of shifts (6 per slice, none in FC),
// and that the accumulations of a slice hit each valid output entry of
// each kernel exactly once (8 entries per slice) and FC hits p_base+i.
module tb_wax_flow_seq;
  import wax_pkg::*;

  logic clk = 0, rst_n = 0, cmd_valid = 0, cmd_ready, busy, done;
  cmd_t cmd = '0;
  tile_op_t op;
  int checks = 0, failures = 0;

  always #5 clk = ~clk;
  wax_flow_seq dut (.clk, .rst_n, .cmd_valid, .cmd, .cmd_ready, .op, .busy, .done);

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic chk(bit ok, string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", msg); end
  endtask

  // run one command, record its micro-ops
  tile_op_t ops [64];
  int nops;
  task automatic run(cmd_t c);
    while (!cmd_ready) @(posedge clk);
    cmd <= c; cmd_valid <= 1; @(posedge clk); cmd_valid <= 0;
    nops = 0;
    forever begin
      @(negedge clk);
      if (!busy) break;
      ops[nops] = op; nops++;
      if (done) begin @(posedge clk); break; end
      @(posedge clk);
    end
  endtask

  initial begin
    cmd_t c;
    repeat (2) @(posedge clk);
    rst_n = 1;
    @(posedge clk);
    for (int v = 0; v < 16; v++) begin
      int hits [24];
      int exp_n, last_rd, nshift, nmac, nacc;
      int rd_cycle [3];
      c = '0; c.op = CMD_CONV;
      c.a_row = 8'd5; c.w_row = 8'd9; c.p_row = 8'd77;
      c.ld_a = v[0]; c.ld_p = v[1]; c.st_p = v[2]; c.clr_p = v[3]; c.p_slot = v[0] ^ v[1];
      run(c);
      exp_n = int'(c.ld_a) + 1 + int'(c.ld_p) + 1 + 6 + int'(c.st_p);
      chk(nops == exp_n, $sformatf("conv %0d: %0d cycles, expected %0d", v, nops, exp_n));
      foreach (hits[i]) hits[i] = 0;
      last_rd = -1; nshift = 0; nmac = 0;
      for (int i = 0; i < nops; i++) begin
        if (ops[i].mem_op inside {MEM_RD_A, MEM_RD_W, MEM_RD_P}) begin
          last_rd = i;
          if (ops[i].mem_op == MEM_RD_A) chk(ops[i].addr == c.a_row, "A addr");
          if (ops[i].mem_op == MEM_RD_W) chk(ops[i].addr == c.w_row, "W addr");
          if (ops[i].mem_op == MEM_RD_P) chk(ops[i].addr == c.p_row, "P addr");
          chk(nmac == 0, "read after MAC started");
        end
        if (ops[i].mem_op == MEM_WR_P) chk(i == nops - 1 && ops[i].addr == c.p_row, "WR_P place");
        if (ops[i].mac_en) begin
          nmac++;
          chk(i >= last_rd + 2, "MAC too early");
          chk(!ops[i].fc, "fc in conv");
          for (int g = 0; g < 2; g++) if (ops[i].acc_en[g]) hits[ops[i].idx[g]]++;
        end
        if (ops[i].shift) nshift++;
        if (ops[i].clr_p) chk(i == 0 && !c.ld_p && c.clr_p, "clr_p place");
      end
      chk(nmac == 6 && nshift == 6, "6 MAC/shift cycles");
      nacc = 0;
      for (int e = 0; e < 24; e++) begin
        int slot, g, x;
        slot = e / 12; g = (e % 12) / 6; x = e % 6;
        if (slot == int'(c.p_slot) && x <= 3) chk(hits[e] == 1, $sformatf("entry %0d hit %0d", e, hits[e]));
        else chk(hits[e] == 0, $sformatf("entry %0d should not be hit", e));
      end
    end
    for (int v = 0; v < 12; v++) begin
      int nw, nmac, exp_n;
      c = '0; c.op = CMD_FC;
      c.a_row = 8'd3; c.w_row = 8'd40; c.p_row = 8'd90;
      c.ld_a = v[0]; c.ld_p = v[1]; c.st_p = 1; c.clr_p = !v[1];
      c.n_rows = 6'(1 + v * 2); c.p_base = idx_t'(v % 3);
      if (c.n_rows > 24) c.n_rows = 24;
      run(c);
      exp_n = int'(c.ld_a) + int'(c.ld_p) + int'(c.n_rows) + 2 + 1;
      chk(nops == exp_n, $sformatf("fc %0d: %0d cycles, expected %0d", v, nops, exp_n));
      nw = 0; nmac = 0;
      for (int i = 0; i < nops; i++) begin
        if (ops[i].mem_op == MEM_RD_W) begin
          chk(ops[i].addr == c.w_row + addr_t'(nw), "W row order");
          nw++;
        end
        if (ops[i].mac_en) begin
          chk(nw >= nmac + 1, "MAC before its W read");
          chk(i >= 2 && ops[i-2].mem_op == MEM_RD_W, "W read two cycles before MAC");
          chk(ops[i].fc && ops[i].acc_en == 2'b01 && ops[i].idx[0] == c.p_base + idx_t'(nmac), "fc acc");
          chk(!ops[i].shift, "shift in FC");
          nmac++;
        end
      end
      chk(nw == int'(c.n_rows) && nmac == int'(c.n_rows), "fc row count");
      chk(ops[nops-1].mem_op == MEM_WR_P, "fc WR_P");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
