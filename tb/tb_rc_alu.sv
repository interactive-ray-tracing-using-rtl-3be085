// tb_rc_alu: self-checking test of the 32-bit RC ALU.
// Drives every operation with directed corner cases and random operands and
// compares result and C/Z/S/V flags with a reference computed in 64-bit
// integer arithmetic in the testbench.
module tb_rc_alu;
  import mgx_pkg::*;
  alu_op_e     op;
  logic [31:0] a, b, y;
  flags_t      f;
  int checks = 0, failures = 0;

  rc_alu dut (.op, .a, .b, .y, .flags(f));

  function automatic int ref_clz(logic [31:0] v, int w);
    int n = 0;
    for (int i = w - 1; i >= 0; i--) begin
      if (v[i]) break;
      n++;
    end
    return n;
  endfunction

  task automatic check_one();
    longint unsigned ua, ub, r64;
    longint sa, sb, s64;
    logic [31:0] ey;
    logic ec, ev;
    ua = longint'(a); ub = longint'(b);
    sa = longint'($signed(a)); sb = longint'($signed(b));
    ec = 0; ev = 0;
    case (op)
      ALU_ADD: begin r64 = ua + ub; ey = r64[31:0]; ec = r64[32];
                     s64 = sa + sb; ev = (s64 > 64'sd2147483647) || (s64 < -64'sd2147483648); end
      ALU_SUB: begin r64 = ua + (~ub & 64'hFFFF_FFFF) + 1; ey = r64[31:0]; ec = r64[32];
                     s64 = sa - sb; ev = (s64 > 64'sd2147483647) || (s64 < -64'sd2147483648); end
      ALU_AND: ey = a & b;
      ALU_OR:  ey = a | b;
      ALU_XOR: ey = a ^ b;
      ALU_PASSA: ey = a;
      ALU_CLZ16: ey = 32'(ref_clz({16'd0, a[15:0]}, 16));
      ALU_CLZ32: ey = 32'(ref_clz(a, 32));
      default: ey = a;
    endcase
    #1;
    checks++;
    if (y !== ey || f.c !== ec || f.z !== (ey == 0) || f.s !== ey[31] || f.v !== ev) begin
      failures++;
      $display("FAIL op=%s a=%h b=%h y=%h exp=%h flags=%b exp c%0b v%0b", op.name(), a, b, y, ey, f, ec, ev);
    end
  endtask

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [31:0] corners [6] = '{32'h0, 32'h1, 32'h7FFF_FFFF, 32'h8000_0000, 32'hFFFF_FFFF, 32'h0000_8000};
    for (int o = 0; o < 8; o++) begin
      op = alu_op_e'(o);
      foreach (corners[i]) foreach (corners[j]) begin
        a = corners[i]; b = corners[j]; check_one();
      end
      repeat (300) begin
        a = $urandom; b = $urandom;
        if ($urandom_range(0, 3) == 0) a = a >> $urandom_range(0, 31);
        check_one();
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
