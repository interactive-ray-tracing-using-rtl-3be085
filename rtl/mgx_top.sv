// mgx_top: MorphoSys II-G style reconfigurable SIMD core for fixed-point ray
// tracing.
//
// Blocks: an N x N array of reconfigurable cells (rc_array), the context memory
// holding the SIMD program (context_memory), a two-bank frame buffer
// (frame_buffer) and a DMA controller (dma_controller). The control processor
// (a general-purpose RISC) and main memory are outside this module: the
// processor's control of the array, frame buffer and DMA arrives on the ctl_*
// and dma_* ports, and main memory is reached through the mem_* port.
//
// Operation: the processor has the DMA controller load contexts into the
// context memory and data into the frame-buffer bank the array is not using.
// It then issues context-memory planes (ctl_issue with ctl_plane) one per
// cycle; each plane gives each array row (ctl_row_mode = 1) or column its own
// context. Contexts with a frame-buffer operand read the line whose address
// was given on ctl_fb_raddr together with the plane (it is registered like
// the plane itself); ctl_fb_we writes the array's output line
// (selected by ctl_line_sel) back at ctl_fb_waddr. Swapping ctl_bank_sel hands
// the bank just loaded to the array while DMA drains or refills the other.
// The DMA controller also reaches every cell's RAM (local address =
// cell * 512 + word), so that results can be passed to another core, or
// tables loaded, without going through the frame buffer.
//
// Timing: a plane issued in cycle t executes in cycle t+1 (the cells' context
// registers), and its results are visible in the cell outputs from t+2.
module mgx_top
  import mgx_pkg::*;
#(
  parameter int unsigned N        = 8,
  parameter int unsigned CM_DEPTH = 64,
  parameter int unsigned FB_LINES = 128,
  localparam int unsigned CMAW    = $clog2(CM_DEPTH),
  localparam int unsigned LAW     = $clog2(FB_LINES)
) (
  input  logic                   clk,
  input  logic                   rst_n,
  // array control from the control processor
  input  logic                   ctl_issue,
  input  logic [CMAW-1:0]        ctl_plane,
  input  logic                   ctl_row_mode,
  input  logic                   ctl_bank_sel,
  input  logic [LAW-1:0]         ctl_fb_raddr,
  input  logic                   ctl_fb_we,
  input  logic [LAW-1:0]         ctl_fb_waddr,
  input  logic [$clog2(N)-1:0]   ctl_line_sel,
  // DMA command from the control processor
  input  logic                   dma_start,
  input  logic [2:0]             dma_dir,
  input  logic [31:0]            dma_mem_base,
  input  logic [15:0]            dma_local_base,
  input  logic [15:0]            dma_count,
  output logic                   dma_busy,
  output logic                   dma_done,
  // main memory
  output logic                   mem_req,
  output logic                   mem_we,
  output logic [31:0]            mem_addr,
  output logic [31:0]            mem_wdata,
  input  logic                   mem_gnt,
  input  logic                   mem_rvalid,
  input  logic [31:0]            mem_rdata,
  // status
  output logic [N-1:0][N-1:0][15:0] cell_out,
  output logic [N-1:0][N-1:0]    cell_sleeping,
  output logic [N-1:0][N-1:0]    cell_executed
);

  localparam int unsigned DAW = LAW + $clog2(N / 2);

  logic [N-1:0][31:0] ctx_plane;
  logic [N-1:0][15:0] fb_line, line_out;
  logic [15:0]        dma_fb_addr, dma_cm_addr, dma_rr_addr;
  logic               dma_fb_we, dma_cm_we, dma_rr_we;
  logic [15:0]        dma_rr_wdata, dma_rr_rdata;
  logic [31:0]        dma_fb_wdata, dma_cm_wdata, dma_fb_rdata;

  logic [LAW-1:0] fb_raddr_q;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) fb_raddr_q <= '0;
    else        fb_raddr_q <= ctl_fb_raddr;
  end

  dma_controller #(.LAW(16)) u_dma (
    .clk, .rst_n,
    .start(dma_start), .dir(dma_dir), .mem_base(dma_mem_base),
    .local_base(dma_local_base), .count(dma_count),
    .busy(dma_busy), .done(dma_done),
    .mem_req, .mem_we, .mem_addr, .mem_wdata, .mem_gnt, .mem_rvalid, .mem_rdata,
    .fb_addr(dma_fb_addr), .fb_we(dma_fb_we), .fb_wdata(dma_fb_wdata),
    .fb_rdata(dma_fb_rdata),
    .cm_addr(dma_cm_addr), .cm_we(dma_cm_we), .cm_wdata(dma_cm_wdata),
    .rr_addr(dma_rr_addr), .rr_we(dma_rr_we), .rr_wdata(dma_rr_wdata),
    .rr_rdata(dma_rr_rdata)
  );

  context_memory #(.N(N), .DEPTH(CM_DEPTH)) u_cm (
    .clk,
    .we(dma_cm_we),
    .wplane(dma_cm_addr[$clog2(N) +: CMAW]),
    .wslot(dma_cm_addr[$clog2(N)-1:0]),
    .wdata(dma_cm_wdata),
    .rplane(ctl_plane),
    .rdata(ctx_plane)
  );

  frame_buffer #(.N(N), .LINES(FB_LINES)) u_fb (
    .clk, .bank_sel(ctl_bank_sel),
    .a_raddr(fb_raddr_q), .a_rdata(fb_line),
    .a_we(ctl_fb_we), .a_waddr(ctl_fb_waddr), .a_wdata(line_out),
    .d_addr(dma_fb_addr[DAW-1:0]), .d_we(dma_fb_we), .d_wdata(dma_fb_wdata),
    .d_rdata(dma_fb_rdata)
  );

  rc_array #(.N(N)) u_array (
    .clk, .rst_n,
    .issue(ctl_issue), .row_mode(ctl_row_mode),
    .ctx_plane, .fb_line_in(fb_line),
    .line_sel(ctl_line_sel), .line_out,
    .cell_out, .cell_sleeping, .cell_executed,
    .ram_addr(dma_rr_addr[$clog2(N*N)+RAM_AW-1:0]), .ram_we(dma_rr_we),
    .ram_wdata(dma_rr_wdata), .ram_rdata(dma_rr_rdata)
  );

endmodule
