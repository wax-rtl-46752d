// wax_central_ctrl: the controller at the root of the WAX H-tree.
//
// It takes host commands (cmd_t, valid/ready, in order) and drives the four
// bank H-trees and the MAC tiles. Compute commands (CMD_CONV, CMD_FC) go to
// the flow sequencer, whose micro-ops are broadcast to every MAC tile. Data
// commands go to a transfer engine that runs at the same time, so rows can
// be loaded while the tiles compute. The engine handles one command at a
// time:
//  - CMD_LOAD: 11 beats of 72 bits from the off-chip stream (in_valid /
//    in_ready), lane i of each beat going to subarray i of one bank; up to
//    four rows (lane_mask) are written at once, as in the document's 4 rows
//    in 11 cycles.
//  - CMD_MOVE to the sibling subarray of the same bank: the source sends its
//    row up its leaf and the bank's split-point mux steers it straight into
//    the sibling (11 cycles).
//  - CMD_MOVE to any other tile: the row is gathered into the controller
//    (11 beats) and sent down to the destination (11 beats), since the
//    banks have no links between them.
//  - CMD_READ: the row is forwarded, 18 bits per beat, on out_valid/out_data.
// With acc set, a MOVE adds the row into the destination row (Y-accumulate
// of partial sums from another tile). Before sending a row the engine waits
// for the destination's rx_busy to drop, so a destination whose subarray is
// kept busy by the MACs stalls the transfer rather than losing data.
// Ordering: a MOVE or READ is not started while a compute command runs, and
// a compute command is not started while a MOVE is in flight or its row is
// still being written, so psum rows are never read half-updated. A command
// with nowait set skips this wait: the host then guarantees that it touches
// no row the other engine is using, and a Y-accumulate can run alongside the
// next slices, sharing the subarray's idle cycles. LOADs are never ordered
// against compute; the host must not load a row that a running or queued
// compute command reads.
// The host stream, the command set and the ordering rules are this design's
// own; the document gives the bus widths, the steering and the latencies.
module wax_central_ctrl
  import wax_pkg::*;
(
  input  logic              clk,
  input  logic              rst_n,
  // host commands
  input  logic              cmd_valid,
  input  cmd_t              cmd,
  output logic              cmd_ready,
  // off-chip input stream and read-out stream
  input  logic              in_valid,
  input  logic [ROOT_W-1:0] in_data,
  output logic              in_ready,
  output logic              out_valid,
  output logic [LINK_W-1:0] out_data,
  // MAC tiles
  output tile_op_t          op,
  // banks
  output logic [BANKS-1:0]  root_dn_valid,
  output logic [ROOT_W-1:0] root_dn_data,
  output logic [SUBS-1:0]   root_dn_lane_en,
  output addr_t             root_dn_addr,
  output logic              root_dn_acc,
  output logic [SUBS-1:0]   steer [BANKS],
  input  logic [SUBS-1:0]   root_up_valid [BANKS],
  input  logic [ROOT_W-1:0] root_up_data [BANKS],
  output logic [TILES-1:0]  tx_req,
  output addr_t             tx_addr,
  input  logic [TILES-1:0]  tx_ready,
  input  logic [TILES-1:0]  rx_busy,
  // status
  output logic              busy
);

  typedef enum logic [2:0] {
    X_IDLE, X_LOAD_WAIT, X_LOAD, X_SRC_REQ, X_SIB, X_GATHER, X_DST_WAIT, X_SCATTER
  } xstate_e;

  localparam int unsigned SR_W = BEATS * LINK_W;
  localparam int unsigned SUB_W = $clog2(SUBS);

  xstate_e           xst;
  cmd_t              x_q;
  logic [BEAT_W-1:0] bcnt;
  logic [SR_W-1:0]   buf_q;

  logic is_compute, seq_ready, seq_busy, seq_done;
  logic [1:0]       sbank, dbank;
  logic [SUB_W-1:0] ssub, dsub;
  logic             sibling;
  logic             src_beat;
  logic [LINK_W-1:0] src_data;

  logic mv_block, x_block, x_take;

  // Ordering: a MOVE or READ may read a row that a compute command is still
  // writing, and a compute command may read a row that a MOVE is still
  // writing, so these wait for each other. LOADs are not ordered against
  // compute: that is what lets the next rows arrive while the tiles work.
  assign mv_block   = ((xst != X_IDLE) && (x_q.op != CMD_LOAD)) ||
                      ((x_q.op == CMD_MOVE) && (|rx_busy));
  assign x_block    = (cmd.op != CMD_LOAD) && !cmd.nowait && seq_busy;
  assign is_compute = (cmd.op == CMD_CONV) || (cmd.op == CMD_FC);
  assign x_take     = cmd_valid && !is_compute && !x_block;
  assign cmd_ready  = is_compute ? (seq_ready && !(mv_block && !cmd.nowait)) :
                                   ((xst == X_IDLE) && !x_block);

  wax_flow_seq u_seq (
    .clk, .rst_n, .cmd_valid(cmd_valid && is_compute && !(mv_block && !cmd.nowait)), .cmd, .cmd_ready(seq_ready),
    .op, .busy(seq_busy), .done(seq_done)
  );

  assign sbank   = x_q.src_tile[TILE_W-1 -: 2];
  assign ssub    = x_q.src_tile[SUB_W-1:0];
  assign dbank   = x_q.dst_tile[TILE_W-1 -: 2];
  assign dsub    = x_q.dst_tile[SUB_W-1:0];
  assign sibling = (sbank == dbank) && (dsub == (ssub ^ SUB_W'(1)));
  assign src_beat = root_up_valid[sbank][ssub];
  assign src_data = root_up_data[sbank][ssub*LINK_W +: LINK_W];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      xst   <= X_IDLE;
      x_q   <= '0;
      bcnt  <= '0;
      buf_q <= '0;
    end else begin
      case (xst)
        X_IDLE: if (x_take) begin
          x_q  <= cmd;
          bcnt <= '0;
          xst  <= (cmd.op == CMD_LOAD) ? X_LOAD_WAIT : X_SRC_REQ;
        end
        X_LOAD_WAIT: if ((rx_busy[x_q.dst_tile[TILE_W-1 -: 2]*SUBS +: SUBS] & x_q.lane_mask) == '0)
          xst <= X_LOAD;
        X_LOAD: if (in_valid) begin
          bcnt <= bcnt + 1'b1;
          if (bcnt == BEAT_W'(BEATS - 1)) xst <= X_IDLE;
        end
        X_SRC_REQ: if (tx_ready[x_q.src_tile] &&
                       !(x_q.op == CMD_MOVE && sibling && rx_busy[x_q.dst_tile]))
          xst <= (x_q.op == CMD_MOVE && sibling) ? X_SIB : X_GATHER;
        X_SIB: if (src_beat) begin
          bcnt <= bcnt + 1'b1;
          if (bcnt == BEAT_W'(BEATS - 1)) xst <= X_IDLE;
        end
        X_GATHER: if (src_beat) begin
          buf_q <= {src_data, buf_q[SR_W-1:LINK_W]};
          bcnt  <= bcnt + 1'b1;
          if (bcnt == BEAT_W'(BEATS - 1)) begin
            bcnt <= '0;
            xst  <= (x_q.op == CMD_READ) ? X_IDLE : X_DST_WAIT;
          end
        end
        X_DST_WAIT: if (!rx_busy[x_q.dst_tile]) xst <= X_SCATTER;
        X_SCATTER: begin
          buf_q <= buf_q >> LINK_W;
          bcnt  <= bcnt + 1'b1;
          if (bcnt == BEAT_W'(BEATS - 1)) xst <= X_IDLE;
        end
        default: xst <= X_IDLE;
      endcase
    end
  end

  // bank-side drive
  always_comb begin
    root_dn_valid   = '0;
    root_dn_data    = '0;
    root_dn_lane_en = '0;
    root_dn_addr    = x_q.dst_row;
    root_dn_acc     = x_q.acc;
    for (int b = 0; b < int'(BANKS); b++) steer[b] = '0;
    tx_req  = '0;
    tx_addr = x_q.src_row;
    in_ready = 1'b0;
    case (xst)
      X_LOAD: begin
        in_ready = 1'b1;
        root_dn_valid[dbank] = in_valid;
        root_dn_data         = in_data;
        root_dn_lane_en      = x_q.lane_mask;
      end
      X_SRC_REQ: begin
        if (tx_ready[x_q.src_tile] &&
            !(x_q.op == CMD_MOVE && sibling && rx_busy[x_q.dst_tile]))
          tx_req[x_q.src_tile] = 1'b1;
        if (x_q.op == CMD_MOVE && sibling) steer[dbank][dsub] = 1'b1;
      end
      X_SIB: steer[dbank][dsub] = 1'b1;
      X_SCATTER: begin
        root_dn_valid[dbank] = 1'b1;
        root_dn_data         = {SUBS{buf_q[LINK_W-1:0]}};
        root_dn_lane_en[dsub] = 1'b1;
      end
      default: ;
    endcase
  end

  assign out_valid = (xst == X_GATHER) && (x_q.op == CMD_READ) && src_beat;
  assign out_data  = src_data;
  assign busy      = (xst != X_IDLE) || seq_busy;

  // Host rule: a command, once offered, stays offered and unchanged until
  // it is taken.
  a_cmd_hold: assert property (@(posedge clk) disable iff (!rst_n)
    cmd_valid && !cmd_ready |=> cmd_valid && $stable(cmd))
    else $error("command changed or withdrawn before it was taken");

endmodule
