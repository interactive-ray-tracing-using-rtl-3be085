// rc_control: context register, guard evaluation, pseudo-branch state and
// decoder of one RC.
//
// The broadcast context is captured in the context register at each clock
// edge (a NOP when issue is low) and decoded during the following cycle, so a
// context issued in cycle t executes in cycle t+1 and its results are visible
// from cycle t+2. The flags register (C, Z, S, V) is written by contexts whose
// ext[0] bit is set (and always by CMP).
//
// Guarded execution: ALU, MUL, MAC, SHIFT16 and CLZ contexts execute only when
// their guard condition (gcond) holds on the flags register. LDIMM and the
// memory contexts are unguarded, as their formats carry no guard field.
//
// Pseudo branches: a PBR context whose guard holds puts the cell to sleep with
// the PBR's tag; every following context is nullified until a LABEL context
// with the same tag arrives, which wakes the cell. Contexts inside a
// nullified block, including other PBRs and other labels, are ignored, so
// nested if-then-else blocks with distinct tags work.
//
// Multiple load: an MLD context schedules nsh[1:0] (1..3) loads from the RAM
// at base+index (auto-increment) into registers dst, dst+1, ...; they take
// place one per cycle in the cycles after the MLD executes, through the
// register file's second write port, while the following contexts use the
// ALU. Those contexts must not access the RAM themselves (asserted); if one
// writes the same register, its write wins. That such a context exists
// follows the document; its encoding, timing and the second write port are
// this design's.
//
// Guards on the C/Z/S/V flags and pseudo branches that carry a target tag
// follow the document; the opcode values, the guard codes, the sleep/tag
// mechanism and the one-cycle context register timing are this design's.
module rc_control
  import mgx_pkg::*;
(
  input  logic        clk,
  input  logic        rst_n,
  input  logic        issue,
  input  ctx_t        ctx_in,
  input  flags_t      alu_flags,
  output ctrl_t       ctrl,
  output logic [15:0] const16,
  output flags_t      flags_q,
  output logic        sleeping,
  output logic        executed   // current context executes (not nullified, guard held)
);

  ctx_t       ctx_q;
  logic       sleep_q;
  logic [4:0] tag_q;
  logic       guard_ok;
  logic       active;
  logic       pbr_taken;
  logic [1:0] mld_cnt_q;
  logic [3:0] mld_reg_q;

  function automatic logic guard(gcond_e g, flags_t f);
    unique case (g)
      G_AL:    return 1'b1;
      G_EQ:    return f.z;
      G_NE:    return !f.z;
      G_MI:    return f.s;
      G_PL:    return !f.s;
      G_CS:    return f.c;
      G_CC:    return !f.c;
      G_VS:    return f.v;
      G_VC:    return !f.v;
      G_LT:    return f.s ^ f.v;
      G_GE:    return !(f.s ^ f.v);
      G_GT:    return !f.z && !(f.s ^ f.v);
      G_LE:    return f.z || (f.s ^ f.v);
      default: return 1'b0;
    endcase
  endfunction

  assign guard_ok = guard(ctx_q.gcond, flags_q);
  assign active   = !sleep_q;
  assign sleeping = sleep_q;
  assign pbr_taken = active && guard_ok && (ctx_q.op == OP_PBR);
  assign const16  = ctx_q[15:0];

  always_comb begin
    logic guarded_exec;
    ctrl             = '0;
    ctrl.left_ext    = ctx_q.muxa[4];
    ctrl.a_sel       = ext_src_e'(ctx_q.muxa[2:0]);
    ctrl.m_addr      = (ctx_q.op == OP_ST) ? ctx_q.dst : ctx_q.muxa[3:0];
    ctrl.b_addr      = ctx_q.muxb[3:0];
    ctrl.pb_addr     = ctx_q.muxb[3:1];
    ctrl.c_sel       = ctx_q.ext[1] ? CSEL_PAIRA : CSEL_LEFT;
    ctrl.d_sel       = ctx_q.ext[1] ? DSEL_PAIRB : DSEL_RIGHT;
    ctrl.alu_op      = ALU_PASSA;
    ctrl.sh_dir      = ctx_q.sdir;
    ctrl.sh_amt      = ctx_q.nsh;
    ctrl.rf_wide     = ctx_q.ext[1];
    ctrl.rf_waddr    = ctx_q.dst;
    ctrl.rf_wsrc     = WSRC_RES;
    guarded_exec     = active && guard_ok;
    executed         = 1'b0;

    unique case (ctx_q.op)
      OP_ADD, OP_SUB, OP_AND, OP_OR, OP_XOR, OP_MOV, OP_CMP, OP_SHIFT16, OP_CLZ: begin
        unique case (ctx_q.op)
          OP_ADD:  ctrl.alu_op = ALU_ADD;
          OP_SUB:  ctrl.alu_op = ALU_SUB;
          OP_CMP:  ctrl.alu_op = ALU_SUB;
          OP_AND:  ctrl.alu_op = ALU_AND;
          OP_OR:   ctrl.alu_op = ALU_OR;
          OP_XOR:  ctrl.alu_op = ALU_XOR;
          OP_CLZ:  ctrl.alu_op = ctx_q.ext[1] ? ALU_CLZ32 : ALU_CLZ16;
          default: ctrl.alu_op = ALU_PASSA;
        endcase
        if (ctx_q.op == OP_CLZ) ctrl.rf_wide = 1'b0;
        ctrl.sh_from_reg = (ctx_q.op == OP_SHIFT16);
        ctrl.rf_we       = guarded_exec && (ctx_q.op != OP_CMP);
        ctrl.rout_we     = guarded_exec && (ctx_q.op != OP_CMP);
        ctrl.flags_we    = guarded_exec && (ctx_q.ext[0] || ctx_q.op == OP_CMP);
        executed         = guarded_exec;
      end
      OP_MUL, OP_MAC: begin
        ctrl.c_sel    = CSEL_PROD;
        ctrl.d_sel    = ctx_q.ext[2] ? DSEL_PAIRB : DSEL_ROUT;
        if (ctx_q.ext[2]) ctrl.pb_addr = ctx_q.dst[3:1];
        ctrl.alu_op   = (ctx_q.op == OP_MAC) ? ALU_ADD : ALU_PASSA;
        ctrl.rf_we    = guarded_exec;
        ctrl.rout_we  = guarded_exec;
        ctrl.flags_we = guarded_exec && ctx_q.ext[0];
        executed      = guarded_exec;
      end
      OP_LDIMM: begin
        ctrl.rf_we   = active;
        ctrl.rf_wide = 1'b0;
        ctrl.rf_wsrc = WSRC_CONST;
        executed     = active;
      end
      OP_LD, OP_LDT: begin
        ctrl.ram_en  = active;
        ctrl.ram_tbl = (ctx_q.op == OP_LDT);
        ctrl.rf_we   = active;
        ctrl.rf_wide = 1'b0;
        ctrl.rf_wsrc = WSRC_RAM;
        executed     = active;
      end
      OP_ST: begin
        ctrl.ram_en = active;
        ctrl.ram_we = active;
        executed    = active;
      end
      OP_SETBASE: begin
        ctrl.set_base = active;
        executed      = active;
      end
      OP_MLD:   executed = active;
      OP_PBR:   executed = guarded_exec;
      OP_LABEL: executed = sleep_q && (tag_q == ctx_q.nsh);
      default: ;
    endcase

    // background loads scheduled by an earlier MLD
    if (mld_cnt_q != 2'd0) begin
      ctrl.ram_en    = 1'b1;
      ctrl.ram_we    = 1'b0;
      ctrl.ram_tbl   = 1'b0;
      ctrl.mld_we    = 1'b1;
      ctrl.mld_waddr = mld_reg_q;
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      ctx_q   <= ctx_nop();
      sleep_q <= 1'b0;
      tag_q   <= '0;
      flags_q <= '0;
      mld_cnt_q <= '0;
      mld_reg_q <= '0;
    end else begin
      ctx_q <= issue ? ctx_in : ctx_nop();
      if (ctrl.flags_we) flags_q <= alu_flags;
      if (ctx_q.op == OP_MLD && active) begin
        mld_cnt_q <= ctx_q.nsh[1:0];
        mld_reg_q <= ctx_q.dst;
      end else if (mld_cnt_q != 2'd0) begin
        mld_cnt_q <= mld_cnt_q - 2'd1;
        mld_reg_q <= mld_reg_q + 4'd1;
      end
      if (pbr_taken) begin
        sleep_q <= 1'b1;
        tag_q   <= ctx_q.nsh;
      end else if (ctx_q.op == OP_LABEL && sleep_q && tag_q == ctx_q.nsh) begin
        sleep_q <= 1'b0;
      end
    end
  end

  // No RAM context (nor a new MLD) while background loads are pending.
  a_mld_no_ram: assert property (@(posedge clk) disable iff (!rst_n)
    (mld_cnt_q != 2'd0) |-> !(ctx_q.op inside {OP_LD, OP_ST, OP_LDT, OP_SETBASE, OP_MLD}) || sleep_q);

endmodule
