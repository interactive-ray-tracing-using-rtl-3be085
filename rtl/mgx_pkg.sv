// mgx_pkg: types and constants shared by the MorphoSys II-G style RC array.
//
// The reconfigurable cell (RC) executes one 32-bit context (SIMD instruction)
// per clock. The document fixes the context width (32 bits), the instruction
// classes (ALU, MAC, LDIMM, MEMOP, SHIFT16, MISCEL), the field names of each
// class and the guard on the Carry/Zero/Sign/Overflow flags. It prints no bit
// positions, opcode values or guard codes, so the layout below is this
// design's own:
//
//   [31:27] op     opcode (op_e)
//   [26:23] dst    destination register (source register for ST)
//   [22]    sdir   shift direction, 0 = left, 1 = arithmetic right
//   [21:17] nsh    shift count 0..31; pseudo-branch / label tag for PBR, LABEL
//   [16:12] muxa   left operand: 0_rrrr = register r, 1_0sss = external source
//   [11:7]  muxb   right operand: register muxb[3:0]
//   [6:4]   ext    [0] update flags, [1] 32-bit (register pair) operation,
//                  [2] MAC accumulates the destination register pair
//                      instead of the output register
//   [3:0]   gcond  guard condition (gcond_e)
//   LDIMM uses [15:0] as the constant.
//   MLD uses nsh[1:0] as the number of words to load (1..3).
package mgx_pkg;

  localparam int unsigned NREGS   = 16;   // sixteen 16-bit registers
  localparam int unsigned RAM_WORDS = 512; // 512x16 RAM per RC
  localparam int unsigned RAM_AW  = 9;

  typedef enum logic [4:0] {
    OP_NOP     = 5'd0,
    OP_ADD     = 5'd1,
    OP_SUB     = 5'd2,
    OP_AND     = 5'd3,
    OP_OR      = 5'd4,
    OP_XOR     = 5'd5,
    OP_MOV     = 5'd6,   // pass left operand (register, neighbour or FB)
    OP_CMP     = 5'd7,   // subtract, flags only
    OP_MUL     = 5'd8,   // 16x16 product, scaled by the shifter
    OP_MAC     = 5'd9,   // product + accumulator, scaled by the shifter
    OP_LDIMM   = 5'd10,  // dst = 16-bit constant
    OP_SHIFT16 = 5'd11,  // shift left operand by register muxb[4:0]
    OP_CLZ     = 5'd12,  // count leading zeros (16-bit, or 32-bit pair)
    OP_LD      = 5'd13,  // dst = RAM[base + index], index++
    OP_ST      = 5'd14,  // RAM[base + index] = R[dst], index++
    OP_LDT     = 5'd15,  // dst = RAM[base + left operand] (table look-up)
    OP_SETBASE = 5'd16,  // base = left operand, index = 0
    OP_PBR     = 5'd17,  // pseudo branch: if guard, nullify up to LABEL nsh
    OP_LABEL   = 5'd18,  // pseudo-branch target carrying tag nsh
    OP_MLD     = 5'd19   // multiple load: nsh[1:0] words from RAM[base+index++]
                         // into dst, dst+1, ... in the following cycles
  } op_e;

  typedef enum logic [3:0] {
    G_AL = 4'd0,  G_EQ = 4'd1,  G_NE = 4'd2,  G_MI = 4'd3,
    G_PL = 4'd4,  G_CS = 4'd5,  G_CC = 4'd6,  G_VS = 4'd7,
    G_VC = 4'd8,  G_LT = 4'd9,  G_GE = 4'd10, G_GT = 4'd11,
    G_LE = 4'd12, G_NV = 4'd15
  } gcond_e;

  // External sources of Mux A (muxa = 1_0sss)
  typedef enum logic [2:0] {
    SRC_FB = 3'd0, SRC_N = 3'd1, SRC_S = 3'd2, SRC_W = 3'd3, SRC_E = 3'd4
  } ext_src_e;

  typedef struct packed {
    op_e        op;
    logic [3:0] dst;
    logic       sdir;
    logic [4:0] nsh;
    logic [4:0] muxa;
    logic [4:0] muxb;
    logic [2:0] ext;
    gcond_e     gcond;
  } ctx_t;

  typedef struct packed {
    logic c, z, s, v;
  } flags_t;

  typedef enum logic [2:0] {
    ALU_ADD, ALU_SUB, ALU_AND, ALU_OR, ALU_XOR, ALU_PASSA, ALU_CLZ16, ALU_CLZ32
  } alu_op_e;

  typedef enum logic [1:0] { CSEL_LEFT, CSEL_PROD, CSEL_PAIRA } csel_e;
  typedef enum logic [1:0] { DSEL_RIGHT, DSEL_ROUT, DSEL_PAIRB } dsel_e;
  typedef enum logic [1:0] { WSRC_RES, WSRC_RAM, WSRC_CONST } wsrc_e;

  // Decoded control of one RC for the current context
  typedef struct packed {
    logic       left_ext;    // Mux N: external (Mux A) vs register (Mux M)
    ext_src_e   a_sel;       // Mux A
    logic [3:0] m_addr;      // Mux M register
    logic [3:0] b_addr;      // Mux B register
    logic [2:0] pb_addr;     // register pair read on the D side
    csel_e      c_sel;
    dsel_e      d_sel;
    alu_op_e    alu_op;
    logic       sh_dir;
    logic       sh_from_reg; // SHIFT16: amount from Mux B register
    logic [4:0] sh_amt;
    logic       rf_we;
    logic       rf_wide;
    logic [3:0] rf_waddr;
    wsrc_e      rf_wsrc;
    logic       rout_we;
    logic       flags_we;
    logic       ram_en;      // RAM access this cycle
    logic       ram_we;
    logic       ram_tbl;     // base + operand instead of base + index
    logic       set_base;
    logic       mld_we;      // background (multiple) load writes this cycle
    logic [3:0] mld_waddr;
  } ctrl_t;

  function automatic ctx_t ctx_nop();
    return ctx_t'(32'd0);
  endfunction

  // Build a context word; helpers for test programs and context tables.
  function automatic logic [31:0] mk_ctx(op_e op, logic [3:0] dst, logic [4:0] muxa,
                                         logic [4:0] muxb, logic sdir = 1'b0,
                                         logic [4:0] nsh = 5'd0, logic [2:0] ext = 3'd0,
                                         gcond_e g = G_AL);
    ctx_t c;
    c.op = op; c.dst = dst; c.sdir = sdir; c.nsh = nsh;
    c.muxa = muxa; c.muxb = muxb; c.ext = ext; c.gcond = g;
    return 32'(c);
  endfunction

  function automatic logic [31:0] mk_ldimm(logic [3:0] dst, logic [15:0] k);
    return {OP_LDIMM, dst, 7'd0, k};
  endfunction

endpackage
