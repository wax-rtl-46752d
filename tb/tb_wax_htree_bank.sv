// tb_wax_htree_bank: self-checking test of a bank's H-tree node.
// Random root beats, lane enables and steering: each leaf must carry its
// 18-bit lane of the root bus when enabled, or its sibling's up-going beat
// when steered; the root up bus must carry every leaf's beat.
module tb_wax_htree_bank;
  import wax_pkg::*;

  logic              root_dn_valid;
  logic [ROOT_W-1:0] root_dn_data, root_up_data;
  logic [SUBS-1:0]   root_dn_lane_en, steer, root_up_valid;
  addr_t             root_dn_addr;
  logic              root_dn_acc;
  leaf_dn_t          leaf_dn [SUBS];
  leaf_up_t          leaf_up [SUBS];
  int checks = 0, failures = 0;

  wax_htree_bank dut (.root_dn_valid, .root_dn_data, .root_dn_lane_en, .root_dn_addr,
                      .root_dn_acc, .steer, .leaf_dn, .leaf_up, .root_up_valid, .root_up_data);

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int t = 0; t < 500; t++) begin
      root_dn_valid = 1'($urandom);
      root_dn_data = {$urandom, $urandom, $urandom};
      root_dn_lane_en = 4'($urandom);
      root_dn_addr = 8'($urandom);
      root_dn_acc = 1'($urandom);
      steer = 4'($urandom);
      for (int i = 0; i < 4; i++) begin
        leaf_up[i].valid = 1'($urandom);
        leaf_up[i].data = 18'($urandom);
      end
      #1;
      for (int i = 0; i < 4; i++) begin
        logic ev; logic [17:0] ed;
        if (steer[i]) begin
          ev = leaf_up[i ^ 1].valid; ed = leaf_up[i ^ 1].data;
        end else begin
          ev = root_dn_valid & root_dn_lane_en[i]; ed = root_dn_data[18*i +: 18];
        end
        checks++;
        if (leaf_dn[i].valid !== ev || (ev && leaf_dn[i].data !== ed) ||
            leaf_dn[i].addr !== root_dn_addr || leaf_dn[i].acc !== root_dn_acc) begin
          failures++; $display("leaf %0d down", i);
        end
        checks++;
        if (root_up_valid[i] !== leaf_up[i].valid || root_up_data[18*i +: 18] !== leaf_up[i].data) begin
          failures++; $display("leaf %0d up", i);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
