// context_memory: stores the SIMD program of the RC array.
//
// Each entry (plane) is N contexts of 32 bits side by side (256 bits for N = 8):
// one context per array row or column. The DMA controller writes one 32-bit
// context per cycle at (plane, slot); the array side reads a whole plane
// combinationally, and the cells' context registers capture it at the next
// edge. The plane width follows the document; the depth (DEPTH planes) is not
// given there and is this design's choice.
module context_memory
  import mgx_pkg::*;
#(
  parameter int unsigned N     = 8,
  parameter int unsigned DEPTH = 64
) (
  input  logic                     clk,
  input  logic                     we,
  input  logic [$clog2(DEPTH)-1:0] wplane,
  input  logic [$clog2(N)-1:0]     wslot,
  input  logic [31:0]              wdata,
  input  logic [$clog2(DEPTH)-1:0] rplane,
  output logic [N-1:0][31:0]       rdata
);

  logic [N-1:0][31:0] mem [DEPTH];

  always_ff @(posedge clk) begin
    if (we) mem[wplane][wslot] <= wdata;
  end

  assign rdata = mem[rplane];

endmodule
