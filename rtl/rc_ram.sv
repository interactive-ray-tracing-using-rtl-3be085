// rc_ram: 512x16-bit RAM of one RC with base+index addressing.
//
// Each RC keeps data here that it addresses on its own (look-up tables, spilled
// temporaries). A base register and an index register form the address:
// an access with tbl = 0 uses base + index and then increments the index
// (auto-increment); an access with tbl = 1 uses base + offset, where offset
// comes from a register, for data-dependent table look-up. set_base loads the
// base and clears the index. Reads are combinational, writes happen at the
// clock edge. A second port (d_*) with its own address gives the DMA
// controller access to the RAM while the cell runs, so that results can leave
// for another core without passing through the frame buffer; if both ports
// write one word in the same cycle, the cell's write wins.
// Size, the base+index auto-increment mode and DMA access follow the
// document; the table mode, the set_base operation, the second port and reset
// values are this design's.
module rc_ram
  import mgx_pkg::*;
(
  input  logic              clk,
  input  logic              rst_n,
  input  logic              set_base,
  input  logic [RAM_AW-1:0] base_in,
  input  logic              en,
  input  logic              we,
  input  logic              tbl,
  input  logic [RAM_AW-1:0] offset,
  input  logic [15:0]       wdata,
  output logic [15:0]       rdata,
  // DMA port
  input  logic              d_we,
  input  logic [RAM_AW-1:0] d_addr,
  input  logic [15:0]       d_wdata,
  output logic [15:0]       d_rdata
);

  logic [15:0]       mem [RAM_WORDS];
  logic [RAM_AW-1:0] base_q, index_q, addr;

  assign addr  = base_q + (tbl ? offset : index_q);
  assign rdata   = mem[addr];
  assign d_rdata = mem[d_addr];

  always_ff @(posedge clk) begin
    if (d_we)     mem[d_addr] <= d_wdata;
    if (en && we) mem[addr]   <= wdata;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      base_q  <= '0;
      index_q <= '0;
    end else if (set_base) begin
      base_q  <= base_in;
      index_q <= '0;
    end else if (en && !tbl) begin
      index_q <= index_q + 1'b1;
    end
  end

endmodule
