// tb_frame_buffer: self-checking test of the two-bank frame buffer.
// The array side and the DMA side are exercised in the same cycles, each on
// its own bank, with shadow banks in the testbench as the reference; swapping
// bank_sel must hand the DMA-written data to the array side.
module tb_frame_buffer;
  localparam int N = 8, LINES = 128;
  logic clk = 0;
  logic        bank_sel;
  logic [6:0]  a_raddr, a_waddr;
  logic [N-1:0][15:0] a_rdata, a_wdata;
  logic        a_we, d_we;
  logic [8:0]  d_addr;
  logic [31:0] d_wdata, d_rdata;
  logic [N-1:0][15:0] sh [2][LINES];
  int checks = 0, failures = 0;

  frame_buffer #(.N(N), .LINES(LINES)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic chk(logic [127:0] got, logic [127:0] exp, string what);
    checks++;
    if (got !== exp) begin failures++; $display("FAIL %s: got %h exp %h", what, got, exp); end
  endtask

  initial begin
    a_we = 0; d_we = 0; a_raddr = 0; a_waddr = 0; a_wdata = 0; d_addr = 0; d_wdata = 0;
    // fill both banks: array side on bank b, DMA side on the other one
    for (int b = 0; b < 2; b++) begin
      bank_sel = 1'(b);
      for (int l = 0; l < LINES; l++) begin
        @(negedge clk);
        a_we = 1; a_waddr = 7'(l);
        for (int w = 0; w < N; w++) a_wdata[w] = 16'($urandom);
        @(posedge clk); sh[b][l] = a_wdata; #1; a_we = 0;
      end
    end
    repeat (3000) begin
      @(negedge clk);
      bank_sel = 1'($urandom);
      a_we = 1'($urandom); d_we = 1'($urandom);
      a_waddr = 7'($urandom); a_raddr = 7'($urandom); d_addr = 9'($urandom);
      for (int w = 0; w < N; w++) a_wdata[w] = 16'($urandom);
      d_wdata = $urandom;
      #1;
      chk(a_rdata, sh[bank_sel][a_raddr], "array read");
      chk({96'd0, d_rdata}, {96'd0, sh[!bank_sel][d_addr[8:2]][2*d_addr[1:0]+1],
                             sh[!bank_sel][d_addr[8:2]][2*d_addr[1:0]]}, "dma read");
      @(posedge clk);
      if (a_we) sh[bank_sel][a_waddr] = a_wdata;
      if (d_we) begin
        sh[!bank_sel][d_addr[8:2]][2*d_addr[1:0]]   = d_wdata[15:0];
        sh[!bank_sel][d_addr[8:2]][2*d_addr[1:0]+1] = d_wdata[31:16];
      end
      #1; a_we = 0; d_we = 0;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
