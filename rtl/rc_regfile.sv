// rc_regfile: sixteen 16-bit registers, also addressed as eight 32-bit pairs.
//
// Pair k is {R(2k+1), R(2k)}: the odd register holds the upper half. Two 16-bit
// read ports (Mux M and Mux B sides) and two 32-bit pair read ports, all
// combinational. One write port, written at the rising clock edge: 16 bits to
// register waddr, or (wide) 32 bits to the pair waddr[3:1]. A second 16-bit
// write port (we2) serves the background loads of the Multiple Load context;
// when both ports write the same register, the first port wins. All registers reset
// to zero. The register count and pairing follow the document; port count,
// pair order and reset are this design's choices.
module rc_regfile
  import mgx_pkg::*;
(
  input  logic        clk,
  input  logic        rst_n,
  input  logic [3:0]  ra_addr,
  output logic [15:0] ra_data,
  input  logic [3:0]  rb_addr,
  output logic [15:0] rb_data,
  input  logic [2:0]  pa_addr,
  output logic [31:0] pa_data,
  input  logic [2:0]  pb_addr,
  output logic [31:0] pb_data,
  input  logic        we,
  input  logic        wide,
  input  logic [3:0]  waddr,
  input  logic [31:0] wdata,
  input  logic        we2,
  input  logic [3:0]  waddr2,
  input  logic [15:0] wdata2
);

  logic [15:0] r [NREGS];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int i = 0; i < int'(NREGS); i++) r[i] <= '0;
    end else begin
      if (we2) r[waddr2] <= wdata2;
      if (we) begin
        if (wide) begin
          r[{waddr[3:1], 1'b0}] <= wdata[15:0];
          r[{waddr[3:1], 1'b1}] <= wdata[31:16];
        end else begin
          r[waddr] <= wdata[15:0];
        end
      end
    end
  end

  assign ra_data = r[ra_addr];
  assign rb_data = r[rb_addr];
  assign pa_data = {r[{pa_addr, 1'b1}], r[{pa_addr, 1'b0}]};
  assign pb_data = {r[{pb_addr, 1'b1}], r[{pb_addr, 1'b0}]};

endmodule
