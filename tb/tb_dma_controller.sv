// tb_dma_controller: self-checking test of the DMA controller against the
// main-memory model. Runs transfers in all five directions with random
// lengths and addresses; shadow copies of the frame-buffer, context-memory
// and RC RAM ports in the testbench collect what the controller writes, and
// the memory model is read back after transfers towards memory. Also
// checks that done follows the last word and that busy covers the transfer.
module tb_dma_controller;
  logic clk = 0, rst_n = 0;
  logic        start, busy, done;
  logic [2:0]  dir;
  logic [31:0] mem_base;
  logic [15:0] local_base, count;
  logic        mem_req, mem_we, mem_gnt, mem_rvalid;
  logic [31:0] mem_addr, mem_wdata, mem_rdata;
  logic [15:0] fb_addr, cm_addr;
  logic        fb_we, cm_we;
  logic [31:0] fb_wdata, fb_rdata, cm_wdata;
  logic [31:0] fb_sh [1024];
  logic [31:0] cm_sh [1024];
  logic [15:0] rr_addr, rr_wdata, rr_rdata;
  logic        rr_we;
  logic [15:0] rr_sh [1024];
  int checks = 0, failures = 0;

  dma_controller dut (.*);
  main_memory_model #(.WORDS(4096), .LAT(2)) u_mem (
    .clk, .req(mem_req), .we(mem_we), .addr(mem_addr), .wdata(mem_wdata),
    .gnt(mem_gnt), .rvalid(mem_rvalid), .rdata(mem_rdata));

  always #5 clk = ~clk;

  assign fb_rdata = fb_sh[fb_addr[9:0]];
  assign rr_rdata = rr_sh[rr_addr[9:0]];
  always @(posedge clk) begin
    if (fb_we) fb_sh[fb_addr[9:0]] <= fb_wdata;
    if (cm_we) cm_sh[cm_addr[9:0]] <= cm_wdata;
    if (rr_we) rr_sh[rr_addr[9:0]] <= rr_wdata;
  end

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic chk(logic [31:0] got, logic [31:0] exp, string what);
    checks++;
    if (got !== exp) begin failures++; $display("FAIL %s: got %h exp %h", what, got, exp); end
  endtask

  task automatic run(logic [2:0] d, logic [31:0] mb, logic [15:0] lb, logic [15:0] n);
    int cyc = 0;
    @(negedge clk);
    start = 1; dir = d; mem_base = mb; local_base = lb; count = n;
    @(negedge clk);
    start = 0;
    if (n != 0) chk({31'd0, busy}, 1, "busy after start");
    while (!done) begin @(negedge clk); cyc++; end
    @(negedge clk);
    chk({31'd0, busy}, 0, "idle after done");
    // at least one cycle per word, and a read needs a grant and a response
    checks++;
    if (n != 0 && cyc < int'(n)) begin failures++; $display("FAIL too fast"); end
  endtask

  initial begin
    start = 0; dir = 0; mem_base = 0; local_base = 0; count = 0;
    foreach (u_mem.mem[i]) u_mem.mem[i] = $urandom;
    foreach (fb_sh[i]) fb_sh[i] = $urandom;
    foreach (cm_sh[i]) cm_sh[i] = 0;
    foreach (rr_sh[i]) rr_sh[i] = 16'($urandom);
    repeat (2) @(posedge clk); rst_n = 1;
    for (int k = 0; k < 50; k++) begin
      logic [2:0] d;
      logic [31:0] mb;
      logic [15:0] lb, n;
      d  = (k < 5) ? 3'(k) : 3'($urandom_range(0, 4));
      mb = $urandom_range(0, 3000);
      lb = 16'($urandom_range(0, 900));
      n  = 16'($urandom_range(0, 100));
      run(d, mb, lb, n);
      for (int i = 0; i < int'(n); i++) begin
        case (d)
          3'd0: chk(fb_sh[(lb + i) % 1024], u_mem.mem[(mb + i) % 4096], "mem->fb");
          3'd2: chk(cm_sh[(lb + i) % 1024], u_mem.mem[(mb + i) % 4096], "mem->cm");
          3'd3: chk({16'd0, rr_sh[(lb + i) % 1024]}, {16'd0, u_mem.mem[(mb + i) % 4096][15:0]}, "mem->rc ram");
          3'd4: chk(u_mem.mem[(mb + i) % 4096], {16'd0, rr_sh[(lb + i) % 1024]}, "rc ram->mem");
          default: chk(u_mem.mem[(mb + i) % 4096], fb_sh[(lb + i) % 1024], "fb->mem");
        endcase
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
