// wax_tile_mem: a subarray with its H-tree port; on its own, an output tile.
//
// Every WAX tile has a 6 KB subarray and an 18-bit H-tree leaf. This module
// holds both and shares the subarray's single port between three users, in
// fixed priority: (1) the tile's compute port (cp_*), used by the MAC
// datapath of a MAC tile and left idle in an output tile; (2) rows arriving
// over the leaf, which are written into the subarray, or for a
// Y-accumulate (acc flag) read, added byte-wise (8-bit wrap) to the
// incoming row and written back; (3) read-out requests (tx_req/tx_addr),
// whose row is sent up the leaf; a read-out also waits while a
// Y-accumulate is between its read and its write, so it never sees the row
// half-updated. A user that loses a cycle to a higher
// priority one simply waits, so link traffic fills the subarray's idle
// cycles while a slice computes. A compute read returns on cp_rdata with
// cp_rvalid one cycle after it is issued. tx_req is taken when tx_ready is
// high. rx_wait counts as high in every cycle a received row waits for the
// port. An output tile is this module alone: the document's output tiles are
// subarrays whose MACs are inactive.
module wax_tile_mem
  import wax_pkg::*;
(
  input  logic     clk,
  input  logic     rst_n,
  // compute port
  input  logic     cp_req,
  input  logic     cp_we,
  input  addr_t    cp_addr,
  input  row_t     cp_wdata,
  output row_t     cp_rdata,
  output logic     cp_rvalid,
  // H-tree leaf
  input  leaf_dn_t dn,
  output leaf_up_t up,
  output logic     rx_busy,
  output logic     rx_overflow,
  output logic     rx_wait,
  // read-out request
  input  logic     tx_req,
  input  addr_t    tx_addr,
  output logic     tx_ready
);

  typedef enum logic [1:0] {RD_NONE, RD_CP, RD_RX, RD_TX} rd_tag_e;
  typedef enum logic [1:0] {RX_IDLE, RX_RD, RX_WR} rx_state_e;

  // subarray port
  logic  s_req, s_we;
  addr_t s_addr;
  row_t  s_wdata, s_rdata;
  logic  s_rvalid;
  rd_tag_e tag_q;

  // link
  logic  rx_pending, rx_acc, rx_pop;
  row_t  rx_row;
  addr_t rx_addr;
  logic  tx_load, tx_busy;
  row_t  rx_sum;
  rx_state_e rx_st;
  logic  tx_pend, tx_inflight;
  addr_t tx_addr_q;

  wax_subarray u_sub (
    .clk, .rst_n, .req(s_req), .we(s_we), .addr(s_addr), .wdata(s_wdata),
    .rdata(s_rdata), .rvalid(s_rvalid)
  );

  wax_link_if u_link (
    .clk, .rst_n, .dn, .rx_pending, .rx_row, .rx_addr, .rx_acc, .rx_pop,
    .rx_busy, .rx_overflow, .tx_load, .tx_row(s_rdata), .up, .tx_busy
  );

  // port arbitration
  logic rx_use, tx_use;
  always_comb begin
    s_req   = 1'b0;
    s_we    = 1'b0;
    s_addr  = cp_addr;
    s_wdata = cp_wdata;
    rx_use  = 1'b0;
    tx_use  = 1'b0;
    rx_pop  = 1'b0;
    if (cp_req) begin
      s_req = 1'b1;
      s_we  = cp_we;
    end else if (rx_st == RX_IDLE && rx_pending) begin
      rx_use  = 1'b1;
      s_req   = 1'b1;
      s_addr  = rx_addr;
      s_we    = !rx_acc;
      s_wdata = rx_row;
      rx_pop  = !rx_acc;
    end else if (rx_st == RX_WR) begin
      rx_use  = 1'b1;
      s_req   = 1'b1;
      s_we    = 1'b1;
      s_addr  = rx_addr;
      s_wdata = rx_sum;
      rx_pop  = 1'b1;
    end else if (tx_pend && !tx_inflight && !tx_busy && rx_st == RX_IDLE) begin
      tx_use = 1'b1;
      s_req  = 1'b1;
      s_addr = tx_addr_q;
    end
  end

  assign rx_wait = cp_req && ((rx_st == RX_IDLE && rx_pending) || rx_st == RX_WR);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      tag_q       <= RD_NONE;
      rx_st       <= RX_IDLE;
      rx_sum      <= '0;
      tx_pend     <= 1'b0;
      tx_inflight <= 1'b0;
      tx_addr_q   <= '0;
    end else begin
      // tag of the read issued this cycle
      if (s_req && !s_we) tag_q <= cp_req ? RD_CP : (rx_use ? RD_RX : RD_TX);
      else                tag_q <= RD_NONE;
      // receive state
      case (rx_st)
        RX_IDLE: if (rx_use && rx_acc) rx_st <= RX_RD;
        RX_RD:   if (s_rvalid && tag_q == RD_RX) begin
                   for (int i = 0; i < int'(ROW_BYTES); i++)
                     rx_sum[i] <= s_rdata[i] + rx_row[i];
                   rx_st <= RX_WR;
                 end
        RX_WR:   if (rx_use) rx_st <= RX_IDLE;
        default: rx_st <= RX_IDLE;
      endcase
      // read-out
      if (tx_req && tx_ready) begin
        tx_pend   <= 1'b1;
        tx_addr_q <= tx_addr;
      end
      if (tx_use) begin
        tx_pend     <= 1'b0;
        tx_inflight <= 1'b1;
      end
      if (s_rvalid && tag_q == RD_TX) tx_inflight <= 1'b0;
    end
  end

  assign tx_load   = s_rvalid && (tag_q == RD_TX);
  assign tx_ready  = !tx_pend && !tx_inflight && !tx_busy;
  assign cp_rdata  = s_rdata;
  assign cp_rvalid = s_rvalid && (tag_q == RD_CP);

  // The sender must respect rx_busy: no row may arrive while the previous
  // one is still waiting for the subarray.
  a_no_lost_row: assert property (@(posedge clk) disable iff (!rst_n) !$rose(rx_overflow))
    else $error("received row lost");

endmodule
