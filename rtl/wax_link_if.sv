// wax_link_if: the H-tree/subarray interface of a tile (its 18-bit leaf).
//
// A 24-byte row crosses an 18-bit H-tree leaf as BEATS = 11 beats; beat b
// carries row bits [18b+17:18b] (the top 6 bits of the last beat are zero).
// Receive side: beats with valid high are collected; when the 11th arrives
// the row, its destination row address and its accumulate flag move into a
// one-row pending buffer (rx_pending) until the tile writes it into its
// subarray and pulses rx_pop. rx_busy is high while a row is being
// received or waits, and tells the sender not to start another row; a row
// completing while the buffer is still full is dropped and sets the sticky
// rx_overflow flag. Transmit side: tx_load takes a row and sends it as 11
// consecutive beats on the up leaf, one per cycle starting the next cycle;
// tx_busy is high meanwhile. The beat split follows the document's 18-bit
// leaf and 11-cycle row transfer; the buffering and flags are this design's.
module wax_link_if
  import wax_pkg::*;
(
  input  logic     clk,
  input  logic     rst_n,
  // receive
  input  leaf_dn_t dn,
  output logic     rx_pending,
  output row_t     rx_row,
  output addr_t    rx_addr,
  output logic     rx_acc,
  input  logic     rx_pop,
  output logic     rx_busy,
  output logic     rx_overflow,
  // transmit
  input  logic     tx_load,
  input  row_t     tx_row,
  output leaf_up_t up,
  output logic     tx_busy
);

  localparam int unsigned SR_W = BEATS * LINK_W;   // 198

  logic [SR_W-1:0]   rx_sr;
  logic [BEAT_W-1:0] rx_cnt;
  logic [SR_W-1:0]   tx_sr;
  logic [BEAT_W-1:0] tx_cnt;

  // receive: beats enter at the top, so after 11 beats beat 0 is at the bottom
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      rx_sr       <= '0;
      rx_cnt      <= '0;
      rx_pending  <= 1'b0;
      rx_row      <= '0;
      rx_addr     <= '0;
      rx_acc      <= 1'b0;
      rx_overflow <= 1'b0;
    end else begin
      if (rx_pop) rx_pending <= 1'b0;
      if (dn.valid) begin
        rx_sr <= {dn.data, rx_sr[SR_W-1:LINK_W]};
        if (rx_cnt == BEAT_W'(BEATS - 1)) begin
          rx_cnt <= '0;
          if (rx_pending && !rx_pop) begin
            rx_overflow <= 1'b1;
          end else begin
            rx_pending <= 1'b1;
            rx_row     <= row_t'({dn.data, rx_sr[SR_W-1:LINK_W]});
            rx_addr    <= dn.addr;
            rx_acc     <= dn.acc;
          end
        end else begin
          rx_cnt <= rx_cnt + 1'b1;
        end
      end
    end
  end

  assign rx_busy = rx_pending || (rx_cnt != '0);

  // transmit
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      tx_sr  <= '0;
      tx_cnt <= '0;
    end else if (tx_load && tx_cnt == '0) begin
      tx_sr  <= SR_W'(tx_row);
      tx_cnt <= BEAT_W'(BEATS);
    end else if (tx_cnt != '0) begin
      tx_sr  <= tx_sr >> LINK_W;
      tx_cnt <= tx_cnt - 1'b1;
    end
  end

  assign up.valid = (tx_cnt != '0);
  assign up.data  = tx_sr[LINK_W-1:0];
  assign tx_busy  = (tx_cnt != '0);

endmodule
