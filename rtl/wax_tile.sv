// wax_tile: a WAX tile, 24 MACs beside a 6 KB subarray.
//
// The tile executes one micro-op (tile_op_t) per cycle, broadcast by the
// flow sequencer. A micro-op carries one subarray access and one MAC step:
//  - mem_op: read a row into A, W or P, or write P back. A read issued in
//    cycle t reaches its register at the end of cycle t+1, so it can be used
//    from cycle t+2 (subarray read, MAC and write form a pipeline).
//  - mac_en: the 24 products A[i]*W[i] go through the adder tree (conv:
//    2 sums, fc: 1 sum) and sum g is added into P[idx[g]] when acc_en[g].
//  - shift: A rotates inside each partition at the end of the cycle.
//  - clr_p: P is cleared at the end of the cycle.
// A, W and P are each one subarray row wide (24 bytes, one byte per MAC).
// Rows arriving over the H-tree leaf and read-out requests share the
// subarray port with lower priority than the micro-ops (see wax_tile_mem),
// which lets data loading overlap the cycles in which the MACs work only on
// registers. The structure follows the document; the micro-op format and
// the read latency are this design's own.
module wax_tile
  import wax_pkg::*;
(
  input  logic     clk,
  input  logic     rst_n,
  input  tile_op_t op,
  // H-tree leaf
  input  leaf_dn_t dn,
  output leaf_up_t up,
  output logic     rx_busy,
  output logic     rx_overflow,
  output logic     rx_wait,
  input  logic     tx_req,
  input  addr_t    tx_addr,
  output logic     tx_ready,
  // observation of the registers
  output row_t     a_q,
  output row_t     w_q,
  output row_t     p_q
);

  logic    cp_req, cp_we, cp_rvalid;
  row_t    cp_rdata;
  mem_op_e pend_q;             // register that receives the read in flight
  prod_t   prod [ROW_BYTES];
  prod_t   sum  [GROUPS];
  idx_t    idx  [GROUPS];

  assign cp_req = (op.mem_op != MEM_NONE);
  assign cp_we  = (op.mem_op == MEM_WR_P);

  wax_tile_mem u_mem (
    .clk, .rst_n,
    .cp_req, .cp_we, .cp_addr(op.addr), .cp_wdata(p_q),
    .cp_rdata, .cp_rvalid,
    .dn, .up, .rx_busy, .rx_overflow, .rx_wait,
    .tx_req, .tx_addr, .tx_ready
  );

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) pend_q <= MEM_NONE;
    else        pend_q <= (cp_req && !cp_we) ? op.mem_op : MEM_NONE;
  end

  logic ld_a, ld_w, ld_p;
  assign ld_a = cp_rvalid && pend_q == MEM_RD_A;
  assign ld_w = cp_rvalid && pend_q == MEM_RD_W;
  assign ld_p = cp_rvalid && pend_q == MEM_RD_P;

  wax_areg u_a (
    .clk, .rst_n, .load(ld_a), .din(cp_rdata), .shift(op.shift), .q(a_q)
  );

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)    w_q <= '0;
    else if (ld_w) w_q <= cp_rdata;
  end

  wax_mac_array u_mac (.a(a_q), .w(w_q), .prod);

  wax_adder_tree u_add (.prod, .fc(op.fc), .sum);

  always_comb for (int g = 0; g < int'(GROUPS); g++) idx[g] = op.idx[g];

  wax_preg u_p (
    .clk, .rst_n, .load(ld_p), .din(cp_rdata), .clr(op.clr_p),
    .acc_en(op.mac_en ? op.acc_en : '0), .idx, .sum, .q(p_q)
  );

endmodule
