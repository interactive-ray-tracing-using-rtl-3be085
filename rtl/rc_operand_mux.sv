// rc_operand_mux: the operand multiplexers of the RC (Mux A, N, C and D).
//
// Mux A picks an external 16-bit word: the frame-buffer word broadcast to this
// cell or the output of the north, south, west or east neighbour. Mux M and
// Mux B are the register-file read ports (rc_regfile). Mux N merges the two
// 16-bit sources into the left operand (external via A, or register via M),
// which feeds the multiplier and Mux C; the right operand is the Mux B
// register, which feeds the multiplier and, sign-extended, Mux D.
// Mux C (32 bits, to ALU input a): sign-extended left operand, the multiplier
// product or a register pair. Mux D (32 bits, to ALU input b): sign-extended
// right operand, the output-register feedback (accumulator) or a register pair.
// Combinational. The mux names and their 16/32-bit widths follow the document's
// cell diagram; the exact input set of each mux is this design's reading of it.
module rc_operand_mux
  import mgx_pkg::*;
(
  input  logic        left_ext,
  input  ext_src_e    a_sel,
  input  logic [15:0] fb_in,
  input  logic [15:0] n_in,
  input  logic [15:0] s_in,
  input  logic [15:0] w_in,
  input  logic [15:0] e_in,
  input  logic [15:0] m_data,
  input  logic [15:0] b_data,
  input  logic [31:0] pa_data,
  input  logic [31:0] pb_data,
  input  logic [31:0] product,
  input  logic [31:0] rout,
  input  csel_e       c_sel,
  input  dsel_e       d_sel,
  output logic [15:0] left16,
  output logic [15:0] right16,
  output logic [31:0] c_out,
  output logic [31:0] d_out
);

  logic [15:0] a_out;

  always_comb begin
    unique case (a_sel)
      SRC_FB:  a_out = fb_in;
      SRC_N:   a_out = n_in;
      SRC_S:   a_out = s_in;
      SRC_W:   a_out = w_in;
      SRC_E:   a_out = e_in;
      default: a_out = '0;
    endcase
    left16  = left_ext ? a_out : m_data;
    right16 = b_data;
    unique case (c_sel)
      CSEL_PROD:  c_out = product;
      CSEL_PAIRA: c_out = pa_data;
      default:    c_out = {{16{left16[15]}}, left16};
    endcase
    unique case (d_sel)
      DSEL_ROUT:  d_out = rout;
      DSEL_PAIRB: d_out = pb_data;
      default:    d_out = {{16{right16[15]}}, right16};
    endcase
  end

endmodule
