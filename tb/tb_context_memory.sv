// tb_context_memory: self-checking test of the context memory. Writes random
// contexts one 32-bit slot at a time and reads whole planes back against a
// shadow copy; the plane must be available in the same cycle as its address.
module tb_context_memory;
  localparam int N = 8, DEPTH = 64;
  logic clk = 0;
  logic        we;
  logic [5:0]  wplane, rplane;
  logic [2:0]  wslot;
  logic [31:0] wdata;
  logic [N-1:0][31:0] rdata;
  logic [N-1:0][31:0] shadow [DEPTH];
  int checks = 0, failures = 0;

  context_memory #(.N(N), .DEPTH(DEPTH)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    we = 0; wplane = 0; wslot = 0; wdata = 0; rplane = 0;
    for (int p = 0; p < DEPTH; p++)
      for (int s = 0; s < N; s++) begin
        @(negedge clk); we = 1; wplane = 6'(p); wslot = 3'(s); wdata = $urandom;
        shadow[p][s] = wdata;
      end
    @(negedge clk); we = 0;
    repeat (2000) begin
      @(negedge clk);
      if ($urandom_range(0, 1)) begin
        we = 1; wplane = 6'($urandom); wslot = 3'($urandom); wdata = $urandom;
        @(posedge clk); shadow[wplane][wslot] = wdata; #1; we = 0;
      end
      rplane = 6'($urandom); #1;
      checks++;
      if (rdata !== shadow[rplane]) begin failures++; $display("FAIL plane %0d", rplane); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
