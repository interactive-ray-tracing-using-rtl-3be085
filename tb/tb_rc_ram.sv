// tb_rc_ram: self-checking test of the 512x16 RC RAM with base+index
// auto-increment and base+offset (table) addressing, with random traffic on
// the DMA port at the same time (the cell's write wins a same-word clash).
// A shadow array and a shadow index in the testbench are the reference.
module tb_rc_ram;
  logic clk = 0, rst_n = 0;
  logic        set_base, en, we, tbl;
  logic [8:0]  base_in, offset;
  logic [15:0] wdata, rdata;
  logic        d_we;
  logic [8:0]  d_addr;
  logic [15:0] d_wdata, d_rdata;
  logic [15:0] shadow [512];
  logic [8:0]  base, index;
  int checks = 0, failures = 0;
  bit dma_on = 0;   // DMA port idle until the RAM has been filled once

  rc_ram dut (.*);

  always #5 clk = ~clk;

  initial begin
    #400000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic step(logic sb, logic e, logic w, logic t);
    logic [8:0] addr;
    @(negedge clk);
    set_base = sb; en = e; we = w; tbl = t;
    base_in = 9'($urandom); offset = 9'($urandom); wdata = 16'($urandom);
    d_we = dma_on & 1'($urandom); d_addr = 9'($urandom); d_wdata = 16'($urandom);
    #1;
    if (dma_on) checks++;
    if (dma_on && d_rdata !== shadow[d_addr]) begin
      failures++; $display("FAIL dma read addr %0d got %h exp %h", d_addr, d_rdata, shadow[d_addr]);
    end
    addr = base + (t ? offset : index);
    if (e && !w) begin
      checks++;
      if (rdata !== shadow[addr]) begin
        failures++; $display("FAIL read addr %0d got %h exp %h", addr, rdata, shadow[addr]);
      end
    end
    if (($urandom_range(0, 7) == 0) && e && !t) d_addr = addr;   // force clashes
    @(posedge clk);
    if (d_we)   shadow[d_addr] = d_wdata;
    if (e && w) shadow[addr] = wdata;
    if (sb) begin base = base_in; index = 0; end
    else if (e && !t) index = index + 1;
    #1;
    set_base = 0; en = 0; we = 0; d_we = 0;
  endtask

  initial begin
    set_base = 0; en = 0; we = 0; tbl = 0; base_in = 0; offset = 0; wdata = 0;
    d_we = 0; d_addr = 0; d_wdata = 0;
    base = 0; index = 0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    // fill the whole RAM through the auto-increment mode
    for (int i = 0; i < 512; i++) step(0, 1, 1, 0);
    dma_on = 1;
    // read it back in sequence
    for (int i = 0; i < 512; i++) step(0, 1, 0, 0);
    repeat (3000) begin
      case ($urandom_range(0, 5))
        0: step(1, 0, 0, 0);
        1: step(0, 1, 1, 0);
        2: step(0, 1, 0, 0);
        3: step(0, 1, 1, 1);
        default: step(0, 1, 0, 1);
      endcase
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
