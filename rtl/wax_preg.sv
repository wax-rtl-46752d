// wax_preg: the partial-sum register P of a WAX tile.
//
// P holds one 24-byte row of partial sums. It can be loaded from a
// subarray row (to continue an accumulation), cleared, or updated by the
// adder tree: each of the GROUPS sums, when its acc_en bit is set, is added
// to entry idx[g] and the 16-bit result is truncated to 8 bits. The
// contents go back to the subarray as one row write. Priority at a rising
// edge: load, then clear, then accumulate. Entries named twice in one cycle
// take the later group's update only (the controller never does this).
module wax_preg
  import wax_pkg::*;
(
  input  logic              clk,
  input  logic              rst_n,
  input  logic              load,
  input  row_t              din,
  input  logic              clr,
  input  logic [GROUPS-1:0] acc_en,
  input  idx_t              idx [GROUPS],
  input  prod_t             sum [GROUPS],
  output row_t              q
);

  row_t nxt;

  always_comb begin
    nxt = q;
    for (int g = 0; g < int'(GROUPS); g++) begin
      if (acc_en[g] && (int'(idx[g]) < int'(ROW_BYTES)))
        nxt[idx[g]] = trunc8(prod_t'({8'h00, q[idx[g]]}) + sum[g]);
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)    q <= '0;
    else if (load) q <= din;
    else if (clr)  q <= '0;
    else           q <= nxt;
  end

endmodule
