// wax_top: the WAX wire-aware CNN accelerator.
//
// Sixteen 6 KB subarrays in 4 banks of 4 sit on a 72-bit H-tree whose root
// is the central controller. Tiles 0..N_MAC_TILES-1 (7, i.e. 168 MACs) are
// MAC tiles, numbered bank-major (tile t is subarray t%4 of bank t/4); the
// other 9 are output tiles that hold output neurons, partial sums and
// prefetched weights. A host drives the chip with commands (cmd_t, valid /
// ready), feeds off-chip data as 72-bit beats (in_valid/in_data/in_ready)
// and receives read-out rows as 18-bit beats (out_valid/out_data). busy is
// high while any command is in progress; link_stall is high in a cycle in
// which a row received by some tile waits because the MACs hold its
// subarray port; rx_overflow reports a row lost at
// a tile's H-tree port (never expected). The chip-level numbers follow the
// document; which tiles carry MACs is this design's choice.
module wax_top
  import wax_pkg::*;
#(
  parameter int unsigned N_MAC_TILES = MAC_TILES
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              cmd_valid,
  input  cmd_t              cmd,
  output logic              cmd_ready,
  input  logic              in_valid,
  input  logic [ROOT_W-1:0] in_data,
  output logic              in_ready,
  output logic              out_valid,
  output logic [LINK_W-1:0] out_data,
  output logic              busy,
  output logic              link_stall,
  output logic              rx_overflow
);

  tile_op_t          op;
  logic [BANKS-1:0]  root_dn_valid;
  logic [ROOT_W-1:0] root_dn_data;
  logic [SUBS-1:0]   root_dn_lane_en;
  addr_t             root_dn_addr;
  logic              root_dn_acc;
  logic [SUBS-1:0]   steer [BANKS];
  logic [SUBS-1:0]   root_up_valid [BANKS];
  logic [ROOT_W-1:0] root_up_data [BANKS];
  logic [TILES-1:0]  tx_req, tx_ready, rx_busy, rx_wait, rx_ovf;
  addr_t             tx_addr;

  wax_central_ctrl u_ctrl (
    .clk, .rst_n, .cmd_valid, .cmd, .cmd_ready,
    .in_valid, .in_data, .in_ready, .out_valid, .out_data,
    .op, .root_dn_valid, .root_dn_data, .root_dn_lane_en, .root_dn_addr, .root_dn_acc,
    .steer, .root_up_valid, .root_up_data, .tx_req, .tx_addr, .tx_ready, .rx_busy,
    .busy
  );

  for (genvar b = 0; b < int'(BANKS); b++) begin : g_bank
    localparam int unsigned NM =
      (int'(N_MAC_TILES) >= (b + 1) * int'(SUBS)) ? SUBS :
      (int'(N_MAC_TILES) <= b * int'(SUBS))       ? 0    : N_MAC_TILES - b * SUBS;
    wax_bank #(.N_MAC(NM)) u_bank (
      .clk, .rst_n, .op,
      .root_dn_valid(root_dn_valid[b]), .root_dn_data, .root_dn_lane_en,
      .root_dn_addr, .root_dn_acc, .steer(steer[b]),
      .root_up_valid(root_up_valid[b]), .root_up_data(root_up_data[b]),
      .tx_req(tx_req[b*SUBS +: SUBS]), .tx_addr, .tx_ready(tx_ready[b*SUBS +: SUBS]),
      .rx_busy(rx_busy[b*SUBS +: SUBS]), .rx_wait(rx_wait[b*SUBS +: SUBS]),
      .rx_overflow(rx_ovf[b*SUBS +: SUBS])
    );
  end

  assign rx_overflow = |rx_ovf;
  assign link_stall  = |rx_wait;

endmodule
