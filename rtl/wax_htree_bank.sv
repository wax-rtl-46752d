// wax_htree_bank: the H-tree of one WAX bank.
//
// The 72-bit bus from the central controller splits into four 18-bit
// leaves, one per subarray: lane i of root_dn_data feeds leaf i, and a leaf
// carries a beat when root_dn_valid and its lane_en bit are high. The
// destination row address and the accumulate flag travel with the beats.
// At the split point a mux lets a leaf take its beats from its sibling
// subarray (leaf i^1) instead of from the root, when steer[i] is set; this
// is the subarray-to-subarray path that moves a row to the adjacent
// subarray without visiting the controller. Every leaf's up-going beats are
// also passed to the root as lane i of root_up. Purely combinational. The
// split and the steering mux follow the document; which subarrays count as
// adjacent (0-1 and 2-3) is this design's choice. Being wiring, most of its
// outputs are copies of inputs (the row address and accumulate flag on
// every leaf, and the up-going beats on the root): only the leaf data and
// valid bits pass through logic (the steering mux and the lane enables).
module wax_htree_bank
  import wax_pkg::*;
(
  input  logic              root_dn_valid,
  input  logic [ROOT_W-1:0] root_dn_data,
  input  logic [SUBS-1:0]   root_dn_lane_en,
  input  addr_t             root_dn_addr,
  input  logic              root_dn_acc,
  input  logic [SUBS-1:0]   steer,
  output leaf_dn_t          leaf_dn [SUBS],
  input  leaf_up_t          leaf_up [SUBS],
  output logic [SUBS-1:0]   root_up_valid,
  output logic [ROOT_W-1:0] root_up_data
);

  always_comb begin
    for (int i = 0; i < int'(SUBS); i++) begin
      leaf_dn[i].addr = root_dn_addr;
      leaf_dn[i].acc  = root_dn_acc;
      if (steer[i]) begin
        leaf_dn[i].valid = leaf_up[i ^ 1].valid;
        leaf_dn[i].data  = leaf_up[i ^ 1].data;
      end else begin
        leaf_dn[i].valid = root_dn_valid && root_dn_lane_en[i];
        leaf_dn[i].data  = root_dn_data[i*LINK_W +: LINK_W];
      end
      root_up_valid[i]               = leaf_up[i].valid;
      root_up_data[i*LINK_W +: LINK_W] = leaf_up[i].data;
    end
  end

endmodule
