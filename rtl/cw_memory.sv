// Codeword memory of the protected memory system.
//
// DEPTH words of WIDTH bits held in a plain array. One synchronous write port and one
// synchronous read port (read data appears the cycle after rd_en). The upset port
// flips the bits of upset_mask in the word at upset_addr, which models the soft errors
// (single event upsets) the error-correcting code is there to remove; a write to the
// same address in the same cycle takes precedence over the upset.
//
// The source shows the memory only as a block between encoder and decoder; its depth,
// its ports and the upset port are this design's choices. The array is not reset:
// words must be written before they are read.
module cw_memory #(
  parameter int unsigned DEPTH = 16,
  parameter int unsigned WIDTH = 15,
  localparam int unsigned AW = (DEPTH > 1) ? $clog2(DEPTH) : 1
) (
  input  logic             clk,
  input  logic             wr_en,
  input  logic [AW-1:0]    wr_addr,
  input  logic [WIDTH-1:0] wr_data,
  input  logic             rd_en,
  input  logic [AW-1:0]    rd_addr,
  output logic [WIDTH-1:0] rd_data,
  input  logic             upset_en,
  input  logic [AW-1:0]    upset_addr,
  input  logic [WIDTH-1:0] upset_mask
);

  logic [WIDTH-1:0] mem [DEPTH];

  always_ff @(posedge clk) begin
    if (upset_en && !(wr_en && wr_addr == upset_addr))
      mem[upset_addr] <= mem[upset_addr] ^ upset_mask;
    if (wr_en)
      mem[wr_addr] <= wr_data;
    if (rd_en)
      rd_data <= mem[rd_addr];
  end

endmodule
