// dma_controller: block transfers between main memory and the on-chip buffers.
//
// The control processor writes a command (direction, main-memory word address,
// local address, word count) with start while busy is low. Directions:
//   0: main memory -> frame buffer (the bank not used by the array)
//   1: frame buffer -> main memory
//   2: main memory -> context memory (local address = plane * N + slot)
//   3: main memory -> RC RAMs (local address = cell * 512 + word; the low
//      16 bits of each memory word)
//   4: RC RAMs -> main memory (zero-extended to 32 bits)
// One word moves per memory transaction; local and memory addresses
// both increment by one per word. done pulses for one cycle after the last word.
//
// Main-memory port: mem_req is held with mem_addr/mem_we/mem_wdata until
// mem_gnt; for a read, the word comes back later with mem_rvalid. Only one
// transaction is outstanding at a time. Local writes happen in the cycle
// mem_rvalid is high.
//
// That a DMA controller moves contexts and data from main memory into the
// context memory and frame buffer, concurrently with processing, follows the
// document, as does DMA out of and into the RCs' RAMs (data passed between
// cores working as pipeline stages); the command format, the memory handshake
// and the RC RAM address layout are this design's.
module dma_controller #(
  parameter int unsigned LAW = 16   // local address width
) (
  input  logic            clk,
  input  logic            rst_n,
  // command
  input  logic            start,
  input  logic [2:0]      dir,
  input  logic [31:0]     mem_base,
  input  logic [LAW-1:0]  local_base,
  input  logic [15:0]     count,
  output logic            busy,
  output logic            done,
  // main memory
  output logic            mem_req,
  output logic            mem_we,
  output logic [31:0]     mem_addr,
  output logic [31:0]     mem_wdata,
  input  logic            mem_gnt,
  input  logic            mem_rvalid,
  input  logic [31:0]     mem_rdata,
  // frame buffer (DMA side)
  output logic [LAW-1:0]  fb_addr,
  output logic            fb_we,
  output logic [31:0]     fb_wdata,
  input  logic [31:0]     fb_rdata,
  // context memory write port
  output logic [LAW-1:0]  cm_addr,
  output logic            cm_we,
  output logic [31:0]     cm_wdata,
  // RC RAM port (through the array)
  output logic [LAW-1:0]  rr_addr,
  output logic            rr_we,
  output logic [15:0]     rr_wdata,
  input  logic [15:0]     rr_rdata
);

  localparam logic [2:0] D_TO_FB = 3'd0, D_FROM_FB = 3'd1, D_TO_CM = 3'd2,
                         D_TO_RR = 3'd3, D_FROM_RR = 3'd4;

  typedef enum logic [1:0] { S_IDLE, S_REQ, S_WAIT } state_e;

  state_e         state_q;
  logic [2:0]     dir_q;
  logic           wr_q;     // direction writes main memory
  logic [31:0]    maddr_q;
  logic [LAW-1:0] laddr_q;
  logic [15:0]    left_q;

  assign busy      = (state_q != S_IDLE);
  assign mem_req   = (state_q == S_REQ);
  assign mem_we    = wr_q;
  assign mem_addr  = maddr_q;
  assign mem_wdata = (dir_q == D_FROM_RR) ? {16'd0, rr_rdata} : fb_rdata;
  assign fb_addr   = laddr_q;
  assign cm_addr   = laddr_q;
  assign rr_addr   = laddr_q;
  assign fb_wdata  = mem_rdata;
  assign cm_wdata  = mem_rdata;
  assign rr_wdata  = mem_rdata[15:0];
  assign fb_we     = (state_q == S_WAIT) && mem_rvalid && (dir_q == D_TO_FB);
  assign cm_we     = (state_q == S_WAIT) && mem_rvalid && (dir_q == D_TO_CM);
  assign rr_we     = (state_q == S_WAIT) && mem_rvalid && (dir_q == D_TO_RR);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state_q <= S_IDLE;
      dir_q   <= '0;
      wr_q    <= 1'b0;
      maddr_q <= '0;
      laddr_q <= '0;
      left_q  <= '0;
      done    <= 1'b0;
    end else begin
      done <= 1'b0;
      unique case (state_q)
        S_IDLE: if (start) begin
          dir_q   <= dir;
          wr_q    <= (dir == D_FROM_FB) || (dir == D_FROM_RR);
          maddr_q <= mem_base;
          laddr_q <= local_base;
          left_q  <= count;
          if (count != 16'd0) state_q <= S_REQ;
          else                done    <= 1'b1;
        end
        S_REQ: if (mem_gnt) begin
          if (wr_q) begin
            maddr_q <= maddr_q + 32'd1;
            laddr_q <= laddr_q + 1'b1;
            left_q  <= left_q - 16'd1;
            if (left_q == 16'd1) begin
              state_q <= S_IDLE;
              done    <= 1'b1;
            end
          end else begin
            state_q <= S_WAIT;
          end
        end
        S_WAIT: if (mem_rvalid) begin
          maddr_q <= maddr_q + 32'd1;
          laddr_q <= laddr_q + 1'b1;
          left_q  <= left_q - 16'd1;
          if (left_q == 16'd1) begin
            state_q <= S_IDLE;
            done    <= 1'b1;
          end else begin
            state_q <= S_REQ;
          end
        end
        default: state_q <= S_IDLE;
      endcase
    end
  end

  // A command may only be given while the controller is idle.
  a_start_idle: assert property (@(posedge clk) disable iff (!rst_n) start |-> !busy);
  // Only the five defined directions.
  a_dir_valid: assert property (@(posedge clk) disable iff (!rst_n) start |-> dir <= D_FROM_RR);

endmodule
