// tb_rc_shifter: self-checking test of the 32-bit scaling shifter.
// Reference: shifting one bit position at a time in the testbench.
module tb_rc_shifter;
  logic [31:0] d, q, e;
  logic        dir;
  logic [4:0]  amt;
  int checks = 0, failures = 0;

  rc_shifter dut (.d, .dir, .amt, .q);

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int k = 0; k < 2000; k++) begin
      d = $urandom; dir = k[0]; amt = 5'(k < 64 ? k / 2 : $urandom);
      e = d;
      for (int i = 0; i < int'(amt); i++) e = dir ? {e[31], e[31:1]} : {e[30:0], 1'b0};
      #1;
      checks++;
      if (q !== e) begin
        failures++;
        $display("FAIL d=%h dir=%0b amt=%0d q=%h exp=%h", d, dir, amt, q, e);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
