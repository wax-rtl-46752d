// wax_areg: the activation register A of a WAX tile.
//
// A holds one 24-byte subarray row and is the only register of the tile
// that shifts. The row is split into PARTS partitions (4 of 6 bytes) and a
// shift rotates every partition right by one byte with wraparound inside
// the partition, so each partition's channel cycles past the fixed weight
// bytes; after PART_W shifts A is back in its loaded state. For
// fully-connected layers the controller simply never shifts, and A acts as
// a static register. A load takes priority over a shift in the same cycle.
// Both act at the rising edge. Reset clears the register.
module wax_areg
  import wax_pkg::*;
#(
  parameter int unsigned N_PARTS = PARTS
) (
  input  logic clk,
  input  logic rst_n,
  input  logic load,
  input  row_t din,
  input  logic shift,
  output row_t q
);

  localparam int unsigned PW = ROW_BYTES / N_PARTS;

  row_t shifted;

  // Right shift within a partition: byte j takes byte j-1, byte 0 takes PW-1.
  always_comb begin
    for (int p = 0; p < int'(N_PARTS); p++) begin
      for (int j = 0; j < int'(PW); j++) begin
        shifted[p*PW + j] = q[p*PW + ((j + PW - 1) % PW)];
      end
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)     q <= '0;
    else if (load)  q <= din;
    else if (shift) q <= shifted;
  end

endmodule
