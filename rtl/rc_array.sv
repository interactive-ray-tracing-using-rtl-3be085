// rc_array: the N x N array of reconfigurable cells (8x8 = 64 by default).
//
// One context-memory plane holds N contexts. In column mode (row_mode = 0)
// every cell of column c executes context c; in row mode every cell of row r
// executes context r. Different rows or columns can therefore run different,
// non-communicating instruction streams under one central control.
//
// Interconnect: each cell reads the 16-bit output of its north, south, west and
// east neighbour (the mesh wraps around at the array edges). The frame buffer
// drives an N-word line across the dimension that does not share a context:
// in row mode cell (r,c) sees word c, so the row whose context loads from the
// frame buffer receives a whole line, one word per cell; in column mode it
// sees word r. The array drives back an N-word line in the same way: the
// outputs of row line_sel (row mode) or of column line_sel (column mode).
// The mode is registered with the issued plane, so the frame-buffer word a
// cell sees during execution follows the mode its context was issued in; the
// output-line selection uses the live row_mode input.
//
// DMA port: ram_addr = {cell, word} with cell = row * N + col selects one
// word of one cell's RAM; ram_we writes it at the clock edge and ram_rdata
// returns it combinationally. The cells keep running meanwhile.
//
// 64 cells, 16-bit neighbour buses and row/column context broadcast follow the
// document; the wrap-around, the frame-buffer line mapping and line_sel are
// this design's choices. The quadrant express lanes are not built.
module rc_array
  import mgx_pkg::*;
#(
  parameter int unsigned N = 8
) (
  input  logic                   clk,
  input  logic                   rst_n,
  input  logic                   issue,
  input  logic                   row_mode,
  input  logic [N-1:0][31:0]     ctx_plane,
  input  logic [N-1:0][15:0]     fb_line_in,
  input  logic [$clog2(N)-1:0]   line_sel,
  output logic [N-1:0][15:0]     line_out,
  output logic [N-1:0][N-1:0][15:0] cell_out,   // [row][col] outputs
  output logic [N-1:0][N-1:0]    cell_sleeping,
  output logic [N-1:0][N-1:0]    cell_executed,
  // DMA access to the cell RAMs
  input  logic [$clog2(N*N)+RAM_AW-1:0] ram_addr,
  input  logic                   ram_we,
  input  logic [15:0]            ram_wdata,
  output logic [15:0]            ram_rdata
);

  localparam int unsigned CW_ = $clog2(N * N);

  logic [N-1:0][N-1:0][15:0] ram_d_rdata;
  logic [CW_-1:0]            ram_cell;

  assign ram_cell  = ram_addr[RAM_AW +: CW_];
  assign ram_rdata = ram_d_rdata[ram_cell / CW_'(N)][ram_cell % CW_'(N)];

  logic row_mode_q;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)     row_mode_q <= 1'b0;
    else if (issue) row_mode_q <= row_mode;
  end

  for (genvar r = 0; r < N; r++) begin : g_row
    for (genvar c = 0; c < N; c++) begin : g_col
      localparam int RN = (r + N - 1) % N;
      localparam int RS = (r + 1) % N;
      localparam int CW = (c + N - 1) % N;
      localparam int CE = (c + 1) % N;
      logic [31:0] rout_unused;
      flags_t      flags_unused;
      rc u_rc (
        .clk, .rst_n, .issue,
        .ctx_in  (row_mode ? ctx_plane[r] : ctx_plane[c]),
        .fb_in   (row_mode_q ? fb_line_in[c] : fb_line_in[r]),
        .n_in    (cell_out[RN][c]),
        .s_in    (cell_out[RS][c]),
        .w_in    (cell_out[r][CW]),
        .e_in    (cell_out[r][CE]),
        .out16   (cell_out[r][c]),
        .rout    (rout_unused),
        .sleeping(cell_sleeping[r][c]),
        .executed(cell_executed[r][c]),
        .flags   (flags_unused),
        .ram_d_we   (ram_we && (ram_cell == CW_'(r * N + c))),
        .ram_d_addr (ram_addr[RAM_AW-1:0]),
        .ram_d_wdata(ram_wdata),
        .ram_d_rdata(ram_d_rdata[r][c])
      );
    end
  end

  always_comb begin
    for (int i = 0; i < int'(N); i++)
      line_out[i] = row_mode ? cell_out[line_sel][i] : cell_out[i][line_sel];
  end

endmodule
