// tb_rc_multiplier: self-checking test of the 16x16 signed multiplier.
// Reference: 64-bit integer product of the sign-extended operands; also checks
// a Q8.8 x Q8.8 fixed-point product scaled back to Q8.8 (shift right by 8).
module tb_rc_multiplier;
  logic [15:0] a, b;
  logic [31:0] p;
  int checks = 0, failures = 0;

  rc_multiplier dut (.a, .b, .p);

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    longint e;
    logic [15:0] corners [5] = '{16'h0000, 16'h0001, 16'h7FFF, 16'h8000, 16'hFFFF};
    foreach (corners[i]) foreach (corners[j]) begin
      a = corners[i]; b = corners[j]; #1;
      e = longint'($signed(a)) * longint'($signed(b));
      checks++;
      if (p !== e[31:0]) begin failures++; $display("FAIL %h*%h=%h exp %h", a, b, p, e[31:0]); end
    end
    repeat (3000) begin
      a = $urandom; b = $urandom; #1;
      e = longint'($signed(a)) * longint'($signed(b));
      checks++;
      if (p !== e[31:0]) begin failures++; $display("FAIL %h*%h=%h exp %h", a, b, p, e[31:0]); end
    end
    // 2.5 * -1.25 = -3.125 in Q8.8
    a = 16'h0280; b = 16'hFEC0; #1;
    checks++;
    if (16'($signed(p) >>> 8) !== 16'hFCE0) begin failures++; $display("FAIL fixed-point"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
