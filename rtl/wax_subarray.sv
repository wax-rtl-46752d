// wax_subarray: one 6 KB SRAM subarray of a WAX tile.
//
// 256 rows of 24 bytes with a single read/write port, as the document
// assumes for the tile's subarray. A request (req, we, addr, wdata) is taken
// on a rising clock edge; a write updates the row at that edge, a read
// returns the row on rdata in the following cycle with rvalid high. rdata
// holds its value until the next read. The contents have no reset (as in a
// real SRAM); the output register is reset to zero. The array is written as
// a plain memory so that synthesis can map it to a macro.
module wax_subarray
  import wax_pkg::*;
#(
  parameter int unsigned N_ROWS = ROWS
) (
  input  logic                      clk,
  input  logic                      rst_n,
  input  logic                      req,
  input  logic                      we,
  input  logic [$clog2(N_ROWS)-1:0] addr,
  input  row_t                      wdata,
  output row_t                      rdata,
  output logic                      rvalid
);

  row_t mem [N_ROWS];

  always_ff @(posedge clk) begin
    if (req && we) mem[addr] <= wdata;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      rdata  <= '0;
      rvalid <= 1'b0;
    end else begin
      rvalid <= req && !we;
      if (req && !we) rdata <= mem[addr];
    end
  end

endmodule
