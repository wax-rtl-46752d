// wax_bank: one bank of WAX, an H-tree node and four tiles.
//
// Subarray positions 0..N_MAC-1 are MAC tiles (wax_tile) that all execute
// the broadcast micro-op; the remaining positions are output tiles
// (wax_tile_mem, a subarray with its H-tree port only). The bank connects
// them to the central controller through wax_htree_bank. Status bits per
// subarray (rx_busy, tx_ready, rx_wait, rx_overflow) go straight to the
// controller. The document's main configuration has 4 banks of 4
// subarrays with 7 MAC tiles in total; how they spread over the banks is
// set by the top level.
module wax_bank
  import wax_pkg::*;
#(
  parameter int unsigned N_MAC = SUBS
) (
  input  logic              clk,
  input  logic              rst_n,
  input  tile_op_t          op,
  input  logic              root_dn_valid,
  input  logic [ROOT_W-1:0] root_dn_data,
  input  logic [SUBS-1:0]   root_dn_lane_en,
  input  addr_t             root_dn_addr,
  input  logic              root_dn_acc,
  input  logic [SUBS-1:0]   steer,
  output logic [SUBS-1:0]   root_up_valid,
  output logic [ROOT_W-1:0] root_up_data,
  input  logic [SUBS-1:0]   tx_req,
  input  addr_t             tx_addr,
  output logic [SUBS-1:0]   tx_ready,
  output logic [SUBS-1:0]   rx_busy,
  output logic [SUBS-1:0]   rx_wait,
  output logic [SUBS-1:0]   rx_overflow
);

  leaf_dn_t leaf_dn [SUBS];
  leaf_up_t leaf_up [SUBS];

  wax_htree_bank u_htree (
    .root_dn_valid, .root_dn_data, .root_dn_lane_en, .root_dn_addr, .root_dn_acc,
    .steer, .leaf_dn, .leaf_up, .root_up_valid, .root_up_data
  );

  for (genvar i = 0; i < int'(SUBS); i++) begin : g_sub
    if (i < int'(N_MAC)) begin : g_mac
      row_t a_q, w_q, p_q;
      wax_tile u_tile (
        .clk, .rst_n, .op, .dn(leaf_dn[i]), .up(leaf_up[i]),
        .rx_busy(rx_busy[i]), .rx_overflow(rx_overflow[i]), .rx_wait(rx_wait[i]),
        .tx_req(tx_req[i]), .tx_addr, .tx_ready(tx_ready[i]),
        .a_q, .w_q, .p_q
      );
    end else begin : g_out
      wax_tile_mem u_tile (
        .clk, .rst_n,
        .cp_req(1'b0), .cp_we(1'b0), .cp_addr('0), .cp_wdata('0),
        .cp_rdata(), .cp_rvalid(),
        .dn(leaf_dn[i]), .up(leaf_up[i]),
        .rx_busy(rx_busy[i]), .rx_overflow(rx_overflow[i]), .rx_wait(rx_wait[i]),
        .tx_req(tx_req[i]), .tx_addr, .tx_ready(tx_ready[i])
      );
    end
  end

endmodule
