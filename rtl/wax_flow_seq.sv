// wax_flow_seq: turns compute commands into tile micro-ops (WAXFlow-3 and FC).
//
// One command is accepted when cmd_ready is high; the sequencer then issues
// one tile_op_t per cycle, broadcast to all MAC tiles, and raises done in
// its last cycle. Reads are issued back to back and a read issued in cycle t
// may be used from cycle t+2.
//
// CMD_CONV, one WAXFlow-3 slice: optionally read a_row into A (ld_a; else
// the A left by the previous slice is reused, which is unchanged since a
// slice rotates every partition by a full turn), read w_row into W,
// optionally read p_row into P (ld_p) or clear P (clr_p), then PART_W = 6
// MAC cycles with a shift after each, then optionally write P to p_row
// (st_p). In MAC cycle s, the kernel group g of each partition (weight bytes
// g*KW..g*KW+KW-1) faces activations starting at x = (g*KW - s) mod PART_W;
// the 4-channel sum for kernel g is a valid output only when that window
// does not wrap (x <= PART_W-KW), and is then added to P entry
// p_slot*PART_W*GROUPS + g*PART_W + x. The subarray is idle during the MAC
// cycles, which the link uses to load the next rows.
//
// CMD_FC, fully-connected dataflow: optionally read A (ld_a) and P (ld_p),
// or clear P, then read n_rows consecutive kernel rows from w_row into W,
// one per cycle; each is multiplied with the static A and its 24 products
// summed into P entry p_base+i. The next kernel row is fetched while the
// current one is in the MACs. Optionally write P to p_row at the end.
//
// Cycle counts: CONV = ld_a + 1 + ld_p + 1 + 6 + st_p,
//               FC   = ld_a + ld_p + n_rows + 2 + st_p.
// The slice structure, the mapping of a kernel row per partition and the
// FC flow follow the document; the P entry layout and the exact schedule
// are this design's own.
module wax_flow_seq
  import wax_pkg::*;
(
  input  logic     clk,
  input  logic     rst_n,
  input  logic     cmd_valid,
  input  cmd_t     cmd,
  output logic     cmd_ready,
  output tile_op_t op,
  output logic     busy,
  output logic     done
);

  localparam int unsigned CW = 6;   // cycle counter width (FC needs up to 30)

  cmd_t          c_q;
  logic [CW-1:0] cyc;
  logic [CW-1:0] last;
  logic [CW-1:0] n_pre;   // number of reads before the W stream / MACs

  assign cmd_ready = !busy;

  always_comb begin
    n_pre = CW'(c_q.ld_a) + CW'(c_q.ld_p);
    if (c_q.op == CMD_FC) last = n_pre + CW'(c_q.n_rows) + 2 + CW'(c_q.st_p) - 1;
    else                  last = n_pre + 1 + 1 + CW'(PART_W) + CW'(c_q.st_p) - 1;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      busy <= 1'b0;
      cyc  <= '0;
      c_q  <= '0;
    end else if (!busy) begin
      if (cmd_valid) begin
        busy <= 1'b1;
        cyc  <= '0;
        c_q  <= cmd;
      end
    end else if (cyc == last) begin
      busy <= 1'b0;
    end else begin
      cyc <= cyc + 1'b1;
    end
  end

  assign done = busy && (cyc == last);

  // micro-op for the current cycle
  always_comb begin
    int unsigned s, x, mac0, wcnt;
    op        = '0;
    op.mem_op = MEM_NONE;
    s = 0; x = 0; mac0 = 0; wcnt = 0;
    if (busy) begin
      if (c_q.op == CMD_FC) begin
        // reads: [A] [P] W0 .. W(n-1); MAC i two cycles after W i
        wcnt = int'(c_q.n_rows);
        mac0 = int'(n_pre) + 2;
        if (c_q.ld_a && cyc == 0) begin
          op.mem_op = MEM_RD_A; op.addr = c_q.a_row;
        end else if (c_q.ld_p && cyc == CW'(c_q.ld_a)) begin
          op.mem_op = MEM_RD_P; op.addr = c_q.p_row;
        end else if (int'(cyc) >= int'(n_pre) && int'(cyc) < int'(n_pre) + int'(wcnt)) begin
          op.mem_op = MEM_RD_W;
          op.addr   = c_q.w_row + addr_t'(int'(cyc) - int'(n_pre));
        end else if (c_q.st_p && cyc == last) begin
          op.mem_op = MEM_WR_P; op.addr = c_q.p_row;
        end
        op.clr_p = (cyc == 0) && !c_q.ld_p && c_q.clr_p;
        if (int'(cyc) >= int'(mac0) && int'(cyc) < int'(mac0) + int'(wcnt)) begin
          op.mac_en    = 1'b1;
          op.fc        = 1'b1;
          op.acc_en[0] = 1'b1;
          op.idx[0]    = c_q.p_base + idx_t'(int'(cyc) - int'(mac0));
        end
      end else begin
        // reads: [A] W [P]; MAC cycles start two cycles after the last read
        mac0 = int'(n_pre) + 2;
        if (c_q.ld_a && cyc == 0) begin
          op.mem_op = MEM_RD_A; op.addr = c_q.a_row;
        end else if (cyc == CW'(c_q.ld_a)) begin
          op.mem_op = MEM_RD_W; op.addr = c_q.w_row;
        end else if (c_q.ld_p && cyc == CW'(c_q.ld_a) + 1) begin
          op.mem_op = MEM_RD_P; op.addr = c_q.p_row;
        end else if (c_q.st_p && cyc == last) begin
          op.mem_op = MEM_WR_P; op.addr = c_q.p_row;
        end
        op.clr_p = (cyc == 0) && !c_q.ld_p && c_q.clr_p;
        if (int'(cyc) >= int'(mac0) && int'(cyc) < int'(mac0) + int'(PART_W)) begin
          s = int'(cyc) - int'(mac0);
          op.mac_en = 1'b1;
          op.shift  = 1'b1;
          for (int g = 0; g < int'(GROUPS); g++) begin
            x = (g*KW + PART_W - s) % PART_W;
            op.acc_en[g] = (x <= PART_W - KW);
            op.idx[g]    = idx_t'(int'(c_q.p_slot) * int'(PART_W*GROUPS) + g*int'(PART_W) + int'(x));
          end
        end
      end
    end
  end

  // An FC pass uses 1 to 24 kernel rows (one P entry each).
  a_fc_rows: assert property (@(posedge clk) disable iff (!rst_n)
    cmd_valid && cmd_ready && cmd.op == CMD_FC |-> cmd.n_rows != '0 && cmd.n_rows <= (IDX_W+1)'(ROW_BYTES))
    else $error("FC command with %0d kernel rows", cmd.n_rows);

endmodule
