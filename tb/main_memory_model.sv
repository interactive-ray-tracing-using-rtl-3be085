// main_memory_model: behavioural model of the off-chip main memory, for
// testbenches only (not synthesizable design content).
// Word-addressed, 32-bit words. A request is granted after a random 0..3 cycle
// wait; a granted read returns its word LAT cycles later with rvalid. Only one
// transaction is outstanding at a time, as the DMA controller issues them.
// The array mem is reached hierarchically by testbenches to preload and check.
module main_memory_model #(
  parameter int unsigned WORDS = 4096,
  parameter int unsigned LAT   = 2
) (
  input  logic        clk,
  input  logic        req,
  input  logic        we,
  input  logic [31:0] addr,
  input  logic [31:0] wdata,
  output logic        gnt,
  output logic        rvalid,
  output logic [31:0] rdata
);
  logic [31:0] mem [WORDS];
  int          wait_left = 0;
  int          lat_left  = -1;
  logic [31:0] pend_addr;

  initial begin
    gnt = 0; rvalid = 0; rdata = 0;
  end

  always @(posedge clk) begin
    gnt    <= 0;
    rvalid <= 0;
    if (lat_left > 0) lat_left <= lat_left - 1;
    if (lat_left == 0) begin
      rvalid   <= 1;
      rdata    <= mem[pend_addr % WORDS];
      lat_left <= -1;
    end
    if (req && !gnt && lat_left < 0) begin
      if (wait_left == 0) begin
        gnt <= 1;
        wait_left <= $urandom_range(0, 3);
        if (we) mem[addr % WORDS] <= wdata;
        else begin
          pend_addr <= addr;
          lat_left  <= LAT - 1;
        end
      end else wait_left <= wait_left - 1;
    end
  end
endmodule
