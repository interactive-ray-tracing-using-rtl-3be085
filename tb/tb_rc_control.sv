// tb_rc_control: self-checking test of the RC context decoder.
// Loads every flag combination through CMP, then checks for every guard code
// whether a guarded ADD is executed (register write enabled) against a truth
// table written in the testbench; checks LDIMM/LD/ST/MUL/MAC decode fields and
// the pseudo-branch sleep/wake sequence with tags.
module tb_rc_control;
  import mgx_pkg::*;
  logic clk = 0, rst_n = 0;
  logic        issue;
  ctx_t        ctx_in;
  flags_t      alu_flags, flags_q;
  ctrl_t       ctrl;
  logic [15:0] const16;
  logic        sleeping, executed;
  int checks = 0, failures = 0;

  rc_control dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic put(logic [31:0] c);
    @(negedge clk); issue = 1; ctx_in = ctx_t'(c);
    @(posedge clk); #1; issue = 0; ctx_in = ctx_t'(32'd0);
  endtask

  task automatic chk(logic [31:0] got, logic [31:0] exp, string what);
    checks++;
    if (got !== exp) begin failures++; $display("FAIL %s: got %h exp %h", what, got, exp); end
  endtask

  function automatic logic ref_guard(int g, logic c, logic z, logic s, logic v);
    case (g)
      0: return 1;   1: return z;   2: return !z;  3: return s;   4: return !s;
      5: return c;   6: return !c;  7: return v;   8: return !v;
      9: return s != v; 10: return s == v; 11: return !z && (s == v);
      12: return z || (s != v);
      default: return 0;
    endcase
  endfunction

  initial begin
    issue = 0; ctx_in = ctx_t'(32'd0); alu_flags = '0;
    repeat (2) @(posedge clk); rst_n = 1;
    for (int f = 0; f < 16; f++) begin
      alu_flags = flags_t'(4'(f));
      put(mk_ctx(OP_CMP, 4'd0, 5'd1, 5'd2));
      chk({31'd0, ctrl.flags_we}, 1, "cmp writes flags");
      chk({31'd0, ctrl.rf_we}, 0, "cmp writes no register");
      @(posedge clk); #1;
      chk({28'd0, flags_q}, 32'(f), "flags register");
      for (int g = 0; g < 16; g++) begin
        put(mk_ctx(OP_ADD, 4'd3, 5'd1, 5'd2, 1'b0, 5'd0, 3'b000, gcond_e'(4'(g))));
        chk({31'd0, ctrl.rf_we}, {31'd0, ref_guard(g, f[3], f[2], f[1], f[0])}, $sformatf("guard %0d flags %b", g, f));
        chk({29'd0, ctrl.alu_op}, {29'd0, ALU_ADD}, "add alu op");
      end
    end
    // decode fields
    put(mk_ldimm(4'd9, 16'hBEEF));
    chk({16'd0, const16}, 32'hBEEF, "ldimm constant");
    chk({ctrl.rf_we, ctrl.rf_waddr, 2'(ctrl.rf_wsrc)}, {1'b1, 4'd9, 2'(WSRC_CONST)}, "ldimm decode");
    put(mk_ctx(OP_LD, 4'd4, 5'd0, 5'd0));
    chk({ctrl.ram_en, ctrl.ram_we, ctrl.ram_tbl, ctrl.rf_we, 2'(ctrl.rf_wsrc)}, {4'b1001, 2'(WSRC_RAM)}, "ld decode");
    put(mk_ctx(OP_ST, 4'd6, 5'd0, 5'd0));
    chk({ctrl.ram_en, ctrl.ram_we, ctrl.rf_we, ctrl.m_addr}, {3'b110, 4'd6}, "st decode");
    put(mk_ctx(OP_MAC, 4'd2, 5'd3, 5'd4, 1'b1, 5'd9, 3'b110));
    chk({2'(ctrl.c_sel), 2'(ctrl.d_sel), ctrl.pb_addr, ctrl.sh_dir, ctrl.sh_amt, ctrl.rf_wide},
        {2'(CSEL_PROD), 2'(DSEL_PAIRB), 3'd1, 1'b1, 5'd9, 1'b1}, "mac decode");
    // multiple load: two background loads into R10, R11
    put(mk_ctx(OP_MLD, 4'd10, 5'd0, 5'd0, 1'b0, 5'd2));
    chk({31'd0, ctrl.mld_we}, 0, "mld cycle itself");
    @(posedge clk); #1;
    chk({ctrl.mld_we, ctrl.mld_waddr, ctrl.ram_en, ctrl.ram_tbl}, {1'b1, 4'd10, 1'b1, 1'b0}, "mld load 1");
    @(posedge clk); #1;
    chk({ctrl.mld_we, ctrl.mld_waddr, ctrl.ram_en}, {1'b1, 4'd11, 1'b1}, "mld load 2");
    @(posedge clk); #1;
    chk({31'd0, ctrl.mld_we}, 0, "mld finished");
    // pseudo branch sleep / wake
    alu_flags = '0; put(mk_ctx(OP_CMP, 4'd0, 5'd0, 5'd0));   // Z = 0
    put(mk_ctx(OP_PBR, 4'd0, 5'd0, 5'd0, 1'b0, 5'd9, 3'b000, G_EQ));   // not taken
    @(posedge clk); #1; chk({31'd0, sleeping}, 0, "pbr not taken");
    put(mk_ctx(OP_PBR, 4'd0, 5'd0, 5'd0, 1'b0, 5'd9, 3'b000, G_NE));   // taken
    @(posedge clk); #1; chk({31'd0, sleeping}, 1, "pbr taken");
    put(mk_ldimm(4'd1, 16'h1));
    chk({31'd0, ctrl.rf_we}, 0, "nullified ldimm");
    put(mk_ctx(OP_LABEL, 4'd0, 5'd0, 5'd0, 1'b0, 5'd8));
    @(posedge clk); #1; chk({31'd0, sleeping}, 1, "wrong label ignored");
    put(mk_ctx(OP_LABEL, 4'd0, 5'd0, 5'd0, 1'b0, 5'd9));
    chk({31'd0, executed}, 1, "label executes");
    @(posedge clk); #1; chk({31'd0, sleeping}, 0, "woken by label");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
