// tb_rc_operand_mux: self-checking test of the RC operand multiplexers.
// Every select combination is driven with random inputs; the expected
// operands are picked in the testbench.
module tb_rc_operand_mux;
  import mgx_pkg::*;
  logic        left_ext;
  ext_src_e    a_sel;
  logic [15:0] fb_in, n_in, s_in, w_in, e_in, m_data, b_data, left16, right16;
  logic [31:0] pa_data, pb_data, product, rout, c_out, d_out;
  csel_e       c_sel;
  dsel_e       d_sel;
  int checks = 0, failures = 0;

  rc_operand_mux dut (.*);

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [15:0] el, srcs [5];
    logic [31:0] ec, ed;
    for (int k = 0; k < 2000; k++) begin
      fb_in = $urandom; n_in = $urandom; s_in = $urandom; w_in = $urandom; e_in = $urandom;
      m_data = $urandom; b_data = $urandom; pa_data = $urandom; pb_data = $urandom;
      product = $urandom; rout = $urandom;
      left_ext = k[0];
      a_sel = ext_src_e'((k >> 1) % 5);
      c_sel = csel_e'((k >> 4) % 3);
      d_sel = dsel_e'((k >> 6) % 3);
      srcs = '{fb_in, n_in, s_in, w_in, e_in};
      el = left_ext ? srcs[int'(a_sel)] : m_data;
      ec = (c_sel == CSEL_PROD) ? product : (c_sel == CSEL_PAIRA) ? pa_data
           : 32'($signed(el));
      ed = (d_sel == DSEL_ROUT) ? rout : (d_sel == DSEL_PAIRB) ? pb_data
           : 32'($signed(b_data));
      #1;
      checks++;
      if (left16 !== el || right16 !== b_data || c_out !== ec || d_out !== ed) begin
        failures++;
        $display("FAIL k=%0d left %h/%h c %h/%h d %h/%h", k, left16, el, c_out, ec, d_out, ed);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
