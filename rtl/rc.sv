// rc: one reconfigurable cell (processing element) of the SIMD array.
//
// Datapath, one context per clock: the register file (Mux M / Mux B ports) and
// Mux A (frame buffer or a neighbour) supply two 16-bit operands; the 16x16
// multiplier forms their product; Mux C and Mux D choose the two 32-bit ALU
// inputs; the 32-bit shifter scales the ALU result; the result is written to
// the register file (16 bits, or 32 bits into a register pair) and to the
// 32-bit output register, whose low half is what the neighbours and the frame
// buffer see. The 512x16 RAM is reached by LD/ST/LDT/MLD contexts, and by the
// DMA controller through its own port (ram_d_*). A multiply with
// scaling is MUL with a right shift; MAC adds the product to the output
// register (or a register pair) before the shift, so a whole multiply-
// accumulate step takes one cycle.
//
// Timing: the context on ctx_in with issue high is captured by the context
// register at the clock edge, executes in the next cycle, and its results are
// in the register file / output register one edge later.
//
// Follows the document: block set and widths of the cell diagram (16-bit
// operands and neighbour buses, 32-bit ALU, shifter and output register,
// 16x16 multiplier, sixteen 16-bit registers, 512x16 RAM), single-cycle
// contexts, guarded execution, MAC with scaling, CLZ, base+index auto-increment,
// a Multiple Load of up to three RAM words in the background of later contexts
// (loads land one per cycle through a second register-file write port).
// This design's own: the operand-mux input sets, the MAC order (add before the
// shift, as the cell diagram places the shifter after the ALU), the encoding,
// the timing of the Multiple Load.
// Not built: the VX/HX express outputs.
module rc
  import mgx_pkg::*;
(
  input  logic        clk,
  input  logic        rst_n,
  input  logic        issue,
  input  logic [31:0] ctx_in,
  input  logic [15:0] fb_in,
  input  logic [15:0] n_in,
  input  logic [15:0] s_in,
  input  logic [15:0] w_in,
  input  logic [15:0] e_in,
  output logic [15:0] out16,
  output logic [31:0] rout,
  output logic        sleeping,
  output logic        executed,  // the current context was not nullified
  output flags_t      flags,
  // DMA port of the cell RAM
  input  logic        ram_d_we,
  input  logic [RAM_AW-1:0] ram_d_addr,
  input  logic [15:0] ram_d_wdata,
  output logic [15:0] ram_d_rdata
);

  ctrl_t       ctrl;
  logic [15:0] const16;
  flags_t      alu_flags;
  logic [15:0] m_data, b_data, left16, right16, ram_rdata;
  logic [31:0] pa_data, pb_data, product, c_out, d_out, alu_y, sh_q, wdata;
  logic [4:0]  sh_amt;
  logic [31:0] rout_q;

  rc_control u_ctl (
    .clk, .rst_n, .issue, .ctx_in(ctx_t'(ctx_in)), .alu_flags,
    .ctrl, .const16, .flags_q(flags), .sleeping, .executed
  );

  rc_regfile u_rf (
    .clk, .rst_n,
    .ra_addr(ctrl.m_addr), .ra_data(m_data),
    .rb_addr(ctrl.b_addr), .rb_data(b_data),
    .pa_addr(ctrl.m_addr[3:1]), .pa_data,
    .pb_addr(ctrl.pb_addr), .pb_data,
    .we(ctrl.rf_we), .wide(ctrl.rf_wide), .waddr(ctrl.rf_waddr), .wdata,
    .we2(ctrl.mld_we), .waddr2(ctrl.mld_waddr), .wdata2(ram_rdata)
  );

  rc_operand_mux u_mux (
    .left_ext(ctrl.left_ext), .a_sel(ctrl.a_sel),
    .fb_in, .n_in, .s_in, .w_in, .e_in,
    .m_data, .b_data, .pa_data, .pb_data, .product, .rout(rout_q),
    .c_sel(ctrl.c_sel), .d_sel(ctrl.d_sel),
    .left16, .right16, .c_out, .d_out
  );

  rc_multiplier u_mul (.a(left16), .b(right16), .p(product));

  rc_alu u_alu (.op(ctrl.alu_op), .a(c_out), .b(d_out), .y(alu_y), .flags(alu_flags));

  assign sh_amt = ctrl.sh_from_reg ? right16[4:0] : ctrl.sh_amt;
  rc_shifter u_sh (.d(alu_y), .dir(ctrl.sh_dir), .amt(sh_amt), .q(sh_q));

  rc_ram u_ram (
    .clk, .rst_n,
    .set_base(ctrl.set_base), .base_in(left16[RAM_AW-1:0]),
    .en(ctrl.ram_en), .we(ctrl.ram_we), .tbl(ctrl.ram_tbl),
    .offset(left16[RAM_AW-1:0]), .wdata(left16), .rdata(ram_rdata),
    .d_we(ram_d_we), .d_addr(ram_d_addr), .d_wdata(ram_d_wdata), .d_rdata(ram_d_rdata)
  );

  always_comb begin
    unique case (ctrl.rf_wsrc)
      WSRC_RAM:   wdata = {16'd0, ram_rdata};
      WSRC_CONST: wdata = {16'd0, const16};
      default:    wdata = sh_q;
    endcase
  end

  // Output register (Rout)
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)            rout_q <= '0;
    else if (ctrl.rout_we) rout_q <= sh_q;
  end

  assign rout  = rout_q;
  assign out16 = rout_q[15:0];

endmodule
