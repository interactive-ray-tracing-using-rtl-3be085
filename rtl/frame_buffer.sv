// frame_buffer: two-bank data buffer between main memory and the RC array.
//
// bank_sel chooses the bank the array uses; the DMA port always reaches the
// other bank, so the next block of data can be loaded (or results drained)
// while the array computes. Each bank holds LINES lines of N 16-bit words.
// Array port: combinational read of one line, line write at the clock edge.
// DMA port: 32-bit accesses addressing word pairs, {line, pair}; pair p covers
// words 2p (low half) and 2p+1 (high half); read combinational, write at the
// edge. The two banks and the concurrent DMA follow the document; the
// organisation in lines, the sizes and the DMA word width are this design's.
module frame_buffer #(
  parameter int unsigned N     = 8,
  parameter int unsigned LINES = 128,
  localparam int unsigned LAW  = $clog2(LINES),
  localparam int unsigned DAW  = LAW + $clog2(N / 2)
) (
  input  logic                 clk,
  input  logic                 bank_sel,
  // array side (bank bank_sel)
  input  logic [LAW-1:0]       a_raddr,
  output logic [N-1:0][15:0]   a_rdata,
  input  logic                 a_we,
  input  logic [LAW-1:0]       a_waddr,
  input  logic [N-1:0][15:0]   a_wdata,
  // DMA side (bank !bank_sel)
  input  logic [DAW-1:0]       d_addr,
  input  logic                 d_we,
  input  logic [31:0]          d_wdata,
  output logic [31:0]          d_rdata
);

  logic [N-1:0][15:0] bank0 [LINES];
  logic [N-1:0][15:0] bank1 [LINES];

  logic [LAW-1:0]           d_line;
  logic [$clog2(N/2)-1:0]   d_pair;
  assign d_line = d_addr[DAW-1 -: LAW];
  assign d_pair = d_addr[$clog2(N/2)-1:0];

  assign a_rdata = bank_sel ? bank1[a_raddr] : bank0[a_raddr];
  assign d_rdata = bank_sel ? {bank0[d_line][2*d_pair+1], bank0[d_line][2*d_pair]}
                            : {bank1[d_line][2*d_pair+1], bank1[d_line][2*d_pair]};

  always_ff @(posedge clk) begin
    if (a_we && !bank_sel) bank0[a_waddr] <= a_wdata;
    if (d_we &&  bank_sel) begin
      bank0[d_line][2*d_pair]   <= d_wdata[15:0];
      bank0[d_line][2*d_pair+1] <= d_wdata[31:16];
    end
  end

  always_ff @(posedge clk) begin
    if (a_we &&  bank_sel) bank1[a_waddr] <= a_wdata;
    if (d_we && !bank_sel) begin
      bank1[d_line][2*d_pair]   <= d_wdata[15:0];
      bank1[d_line][2*d_pair+1] <= d_wdata[31:16];
    end
  end

endmodule
