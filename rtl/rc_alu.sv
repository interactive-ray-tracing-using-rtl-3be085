// rc_alu: 32-bit ALU of the reconfigurable cell.
//
// Combinational. Operands a (from Mux C) and b (from Mux D) are 32 bits; the
// document gives a 32-bit ALU, the C/Z/S/V flags used by guarded contexts and a
// Count Leading Zeros instruction for normalisation. The operation set and the
// flag rules (carry = carry out of bit 31 for ADD, "no borrow" for SUB; flags
// taken on the 32-bit result) are this design's choice. CLZ16 counts on a[15:0]
// (0..16), CLZ32 on all of a (0..32).
module rc_alu
  import mgx_pkg::*;
(
  input  alu_op_e     op,
  input  logic [31:0] a,
  input  logic [31:0] b,
  output logic [31:0] y,
  output flags_t      flags
);

  logic [32:0] sum;
  logic        ovf;

  function automatic logic [5:0] clz32(logic [31:0] v);
    logic [5:0] n;
    n = 6'd32;
    for (int i = 0; i < 32; i++)
      if (v[i]) n = 6'(31 - i);
    return n;
  endfunction

  always_comb begin
    sum = '0;
    ovf = 1'b0;
    unique case (op)
      ALU_ADD: begin
        sum = {1'b0, a} + {1'b0, b};
        ovf = (a[31] == b[31]) && (sum[31] != a[31]);
      end
      ALU_SUB: begin
        sum = {1'b0, a} + {1'b0, ~b} + 33'd1;
        ovf = (a[31] != b[31]) && (sum[31] != a[31]);
      end
      ALU_AND:   sum = {1'b0, a & b};
      ALU_OR:    sum = {1'b0, a | b};
      ALU_XOR:   sum = {1'b0, a ^ b};
      ALU_PASSA: sum = {1'b0, a};
      ALU_CLZ16: sum = {27'd0, clz32({a[15:0], 16'h8000})};
      ALU_CLZ32: sum = {27'd0, clz32(a)};
      default:   sum = {1'b0, a};
    endcase
    y       = sum[31:0];
    flags.c = sum[32];
    flags.z = (sum[31:0] == 32'd0);
    flags.s = sum[31];
    flags.v = ovf;
  end

endmodule
