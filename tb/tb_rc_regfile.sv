// tb_rc_regfile: self-checking test of the 16x16 register file with 32-bit
// pair access and the second 16-bit write port (the first port wins on a
// clash). A shadow array in the testbench is the reference.
module tb_rc_regfile;
  logic clk = 0, rst_n = 0;
  logic [3:0]  ra_addr, rb_addr, waddr;
  logic [2:0]  pa_addr, pb_addr;
  logic [15:0] ra_data, rb_data;
  logic [31:0] pa_data, pb_data, wdata;
  logic        we, wide, we2;
  logic [3:0]  waddr2;
  logic [15:0] wdata2;
  logic [15:0] shadow [16];
  int checks = 0, failures = 0;

  rc_regfile dut (.*);

  always #5 clk = ~clk;

  initial begin
    #200000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic chk(logic [31:0] got, logic [31:0] exp, string what);
    checks++;
    if (got !== exp) begin failures++; $display("FAIL %s got %h exp %h", what, got, exp); end
  endtask

  initial begin
    we = 0; wide = 0; waddr = 0; wdata = 0; we2 = 0; waddr2 = 0; wdata2 = 0;
    ra_addr = 0; rb_addr = 0; pa_addr = 0; pb_addr = 0;
    foreach (shadow[i]) shadow[i] = 0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int i = 0; i < 16; i++) begin
      ra_addr = 4'(i); #1; chk({16'd0, ra_data}, 0, "reset");
    end
    repeat (1000) begin
      @(negedge clk);
      we = $urandom_range(0, 1); wide = $urandom_range(0, 1);
      waddr = 4'($urandom); wdata = $urandom;
      we2 = $urandom_range(0, 1); waddr2 = 4'($urandom); wdata2 = 16'($urandom);
      if ($urandom_range(0, 3) == 0) waddr2 = waddr;
      @(posedge clk);
      if (we2) shadow[waddr2] = wdata2;
      if (we) begin
        if (wide) begin
          shadow[{waddr[3:1], 1'b0}] = wdata[15:0];
          shadow[{waddr[3:1], 1'b1}] = wdata[31:16];
        end else shadow[waddr] = wdata[15:0];
      end
      #1;
      we = 0; we2 = 0;
      ra_addr = 4'($urandom); rb_addr = 4'($urandom);
      pa_addr = 3'($urandom); pb_addr = 3'($urandom);
      #1;
      chk({16'd0, ra_data}, {16'd0, shadow[ra_addr]}, "ra");
      chk({16'd0, rb_data}, {16'd0, shadow[rb_addr]}, "rb");
      chk(pa_data, {shadow[2*pa_addr+1], shadow[2*pa_addr]}, "pa");
      chk(pb_data, {shadow[2*pb_addr+1], shadow[2*pb_addr]}, "pb");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
