// tb_rc: self-checking test of one reconfigurable cell executing contexts.
// Covers: LDIMM, 16- and 32-bit ALU operations, multiply with fixed-point
// scaling, MAC accumulation, flags and guarded execution, pseudo branches
// (taken, not taken, nested), CLZ, register-count shifts, RAM store/load with
// base+index auto-increment and table look-up, neighbour and frame-buffer
// operands, and the context-to-result latency of two clock edges.
// Expected values are worked out in the testbench from the operand values.
module tb_rc;
  import mgx_pkg::*;
  logic clk = 0, rst_n = 0;
  logic        issue;
  logic [31:0] ctx_in;
  logic [15:0] fb_in, n_in, s_in, w_in, e_in, out16;
  logic [31:0] rout;
  logic        sleeping, executed;
  flags_t      flags;
  logic        ram_d_we = 0;             // DMA port: tested in tb_rc_ram/tb_rc_array
  logic [8:0]  ram_d_addr = '0;
  logic [15:0] ram_d_wdata = '0, ram_d_rdata;
  int checks = 0, failures = 0;
  int cycles = 0;

  rc dut (.*);

  always #5 clk = ~clk;
  always @(posedge clk) cycles++;

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic logic [4:0] R(int r);   return 5'(r); endfunction
  function automatic logic [4:0] X(ext_src_e s); return {2'b10, s}; endfunction

  // issue one context (captured at the next rising edge)
  task automatic ctx(logic [31:0] c);
    @(negedge clk);
    issue = 1; ctx_in = c;
    @(negedge clk);
    issue = 0; ctx_in = '0;
  endtask

  // wait until the last issued context has written its results
  task automatic settle();
    @(posedge clk); #1;
  endtask

  task automatic chk(logic [31:0] got, logic [31:0] exp, string what);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s: got %h exp %h", what, got, exp);
    end
  endtask

  // read register r through the output register (MOV)
  task automatic rd(int r, logic [15:0] exp, string what);
    ctx(mk_ctx(OP_MOV, 4'd0, R(r), 5'd0));
    // MOV writes R0 too; use a scratch destination R0 only in this task
    settle();
    chk({16'd0, out16}, {16'd0, exp}, what);
  endtask

  initial begin
    logic [31:0] p;
    int t0;
    issue = 0; ctx_in = 0; fb_in = 16'hF00B; n_in = 16'h1111; s_in = 16'h2222;
    w_in = 16'h3333; e_in = 16'h4444;
    repeat (3) @(posedge clk);
    rst_n = 1;

    // ---- constants, add, sub ----
    ctx(mk_ldimm(4'd1, 16'h0280));      // 2.5 in Q8.8
    ctx(mk_ldimm(4'd2, 16'hFEC0));      // -1.25 in Q8.8
    ctx(mk_ctx(OP_ADD, 4'd4, R(1), R(2)));
    settle(); chk({16'd0, out16}, 32'h0140, "add");
    ctx(mk_ctx(OP_SUB, 4'd4, R(2), R(1)));
    settle(); chk(rout, 32'hFFFF_FC40, "sub");

    // ---- multiply with scaling (Q8.8 x Q8.8 >> 8) ----
    ctx(mk_ctx(OP_MUL, 4'd3, R(1), R(2), 1'b1, 5'd8));
    settle(); chk(rout, 32'hFFFF_FCE0, "mul scaled");
    rd(3, 16'hFCE0, "mul dst");

    // ---- MAC accumulation ----
    ctx(mk_ldimm(4'd5, 16'd3));
    ctx(mk_ldimm(4'd6, 16'd4));
    ctx(mk_ctx(OP_MUL, 4'd7, R(5), R(6)));
    ctx(mk_ctx(OP_MAC, 4'd7, R(5), R(6)));
    settle(); chk(rout, 32'd24, "mac 1");
    ctx(mk_ctx(OP_MAC, 4'd7, R(5), R(6)));
    settle(); chk(rout, 32'd36, "mac 2");

    // ---- 32-bit pair operations ----
    ctx(mk_ldimm(4'd10, 16'h7FFF));
    ctx(mk_ctx(OP_MUL, 4'd8, R(10), R(10), 1'b0, 5'd0, 3'b010));   // pair 4
    ctx(mk_ctx(OP_ADD, 4'd8, R(8), R(8), 1'b0, 5'd0, 3'b010));
    settle(); chk(rout, 32'h7FFE_0002, "add32 of pair");
    rd(9, 16'h7FFE, "pair high half");
    // MAC accumulating the destination pair: (0x7FFE0002 + 3*4) >> 1
    ctx(mk_ctx(OP_MAC, 4'd8, R(5), R(6), 1'b1, 5'd1, 3'b110));
    settle(); chk(rout, 32'h3FFF_0007, "mac pair");
    rd(9, 16'h3FFF, "mac pair written back");
    ctx(mk_ctx(OP_MUL, 4'd8, R(10), R(10), 1'b0, 5'd0, 3'b010));
    ctx(mk_ctx(OP_ADD, 4'd8, R(8), R(8), 1'b0, 5'd0, 3'b010));

    // ---- flags and guards ----
    ctx(mk_ldimm(4'd11, 16'd5));
    ctx(mk_ctx(OP_CMP, 4'd0, R(11), R(1)));                          // 5 - 640 < 0
    settle(); chk({28'd0, flags}, {28'd0, 4'b0010}, "flags after cmp");
    ctx(mk_ldimm(4'd13, 16'd0));
    ctx(mk_ctx(OP_ADD, 4'd13, R(11), R(11), 1'b0, 5'd0, 3'b000, G_LT));
    ctx(mk_ctx(OP_ADD, 4'd14, R(11), R(11), 1'b0, 5'd0, 3'b000, G_GE));
    rd(13, 16'd10, "guard true executes");
    ctx(mk_ldimm(4'd14, 16'hAAAA));
    ctx(mk_ctx(OP_ADD, 4'd14, R(11), R(11), 1'b0, 5'd0, 3'b000, G_GE));
    rd(14, 16'hAAAA, "guard false nullifies");
    // ADD with flag update: 0x7FFF + 0x7FFF in 32 bits: no overflow, positive
    ctx(mk_ctx(OP_ADD, 4'd15, R(10), R(10), 1'b0, 5'd0, 3'b001));
    settle(); chk({28'd0, flags}, {28'd0, 4'b0000}, "flags after add");
    // 32-bit overflow sets V and S
    ctx(mk_ctx(OP_ADD, 4'd8, R(8), R(8), 1'b0, 5'd0, 3'b011));   // 0x7FFE0002*2
    settle(); chk({28'd0, flags}, {28'd0, 4'b0011}, "overflow flags");

    // ---- pseudo branch taken: if (LT) skip block ----
    ctx(mk_ctx(OP_CMP, 4'd0, R(11), R(1)));
    ctx(mk_ldimm(4'd12, 16'h0));
    ctx(mk_ctx(OP_PBR, 4'd0, 5'd0, 5'd0, 1'b0, 5'd3, 3'b000, G_LT));
    ctx(mk_ldimm(4'd12, 16'h1111));                                  // nullified
    settle(); chk({31'd0, sleeping}, 1, "sleeping after taken PBR");
    ctx(mk_ctx(OP_LABEL, 4'd0, 5'd0, 5'd0, 1'b0, 5'd4));              // other tag
    ctx(mk_ldimm(4'd12, 16'h2222));                                  // nullified
    ctx(mk_ctx(OP_LABEL, 4'd0, 5'd0, 5'd0, 1'b0, 5'd3));
    settle(); chk({31'd0, sleeping}, 0, "awake after label");
    rd(12, 16'h0, "block skipped");
    // ---- pseudo branch not taken ----
    ctx(mk_ctx(OP_CMP, 4'd0, R(11), R(1)));
    ctx(mk_ctx(OP_PBR, 4'd0, 5'd0, 5'd0, 1'b0, 5'd5, 3'b000, G_GE));
    ctx(mk_ldimm(4'd12, 16'h3333));
    ctx(mk_ctx(OP_LABEL, 4'd0, 5'd0, 5'd0, 1'b0, 5'd5));
    rd(12, 16'h3333, "block executed");
    // ---- nested if-then-else: if (GE) {A} else { if (LT) {B} else {C} } ----
    // flags: LT holds, so only B (R12 = 0x0B) executes
    ctx(mk_ctx(OP_CMP, 4'd0, R(11), R(1)));
    ctx(mk_ctx(OP_PBR, 4'd0, 5'd0, 5'd0, 1'b0, 5'd1, 3'b000, G_LT));   // to else
    ctx(mk_ldimm(4'd12, 16'h000A));
    ctx(mk_ctx(OP_PBR, 4'd0, 5'd0, 5'd0, 1'b0, 5'd2, 3'b000, G_AL));   // to end
    ctx(mk_ctx(OP_LABEL, 4'd0, 5'd0, 5'd0, 1'b0, 5'd1));
    ctx(mk_ctx(OP_PBR, 4'd0, 5'd0, 5'd0, 1'b0, 5'd6, 3'b000, G_GE));   // inner else
    ctx(mk_ldimm(4'd12, 16'h000B));
    ctx(mk_ctx(OP_PBR, 4'd0, 5'd0, 5'd0, 1'b0, 5'd7, 3'b000, G_AL));
    ctx(mk_ctx(OP_LABEL, 4'd0, 5'd0, 5'd0, 1'b0, 5'd6));
    ctx(mk_ldimm(4'd12, 16'h000C));
    ctx(mk_ctx(OP_LABEL, 4'd0, 5'd0, 5'd0, 1'b0, 5'd7));
    ctx(mk_ctx(OP_LABEL, 4'd0, 5'd0, 5'd0, 1'b0, 5'd2));
    rd(12, 16'h000B, "nested if-then-else");

    // ---- CLZ ----
    ctx(mk_ldimm(4'd13, 16'h0010));
    ctx(mk_ctx(OP_CLZ, 4'd14, R(13), 5'd0));
    settle(); chk(rout, 32'd11, "clz16");
    ctx(mk_ctx(OP_CLZ, 4'd14, R(8), 5'd0, 1'b0, 5'd0, 3'b010));   // pair 4 = 0xFFFC0004
    settle(); chk(rout, 32'd0, "clz32");
    ctx(mk_ldimm(4'd13, 16'h0000));
    ctx(mk_ctx(OP_CLZ, 4'd14, R(13), 5'd0));
    settle(); chk(rout, 32'd16, "clz16 of zero");

    // ---- SHIFT16: amount from a register ----
    ctx(mk_ldimm(4'd13, 16'h0013));
    ctx(mk_ldimm(4'd14, 16'd3));
    ctx(mk_ctx(OP_SHIFT16, 4'd15, R(13), R(14), 1'b0));
    settle(); chk(rout, 32'h98, "shift16 left");
    ctx(mk_ctx(OP_SHIFT16, 4'd15, R(2), R(14), 1'b1));
    settle(); chk(rout, 32'hFFFF_FFD8, "shift16 right arithmetic");

    // ---- RAM: base+index auto-increment and table look-up ----
    ctx(mk_ldimm(4'd13, 16'h0100));
    ctx(mk_ctx(OP_SETBASE, 4'd0, R(13), 5'd0));
    ctx(mk_ctx(OP_ST, 4'd1, 5'd0, 5'd0));
    ctx(mk_ctx(OP_ST, 4'd2, 5'd0, 5'd0));
    ctx(mk_ctx(OP_ST, 4'd11, 5'd0, 5'd0));
    ctx(mk_ctx(OP_SETBASE, 4'd0, R(13), 5'd0));
    ctx(mk_ctx(OP_LD, 4'd15, 5'd0, 5'd0));
    ctx(mk_ctx(OP_LD, 4'd14, 5'd0, 5'd0));
    rd(15, 16'h0280, "ld 1");
    rd(14, 16'hFEC0, "ld 2");
    ctx(mk_ldimm(4'd13, 16'd2));
    ctx(mk_ctx(OP_LDT, 4'd15, R(13), 5'd0));
    rd(15, 16'd5, "table look-up");

    // ---- multiple load: three words in the background of ALU contexts ----
    ctx(mk_ldimm(4'd13, 16'h0100));
    ctx(mk_ctx(OP_SETBASE, 4'd0, R(13), 5'd0));
    ctx(mk_ctx(OP_MLD, 4'd12, 5'd0, 5'd0, 1'b0, 5'd3));          // R12..R14
    ctx(mk_ctx(OP_ADD, 4'd15, R(5), R(6)));                       // concurrent
    ctx(mk_ctx(OP_SUB, 4'd4, R(6), R(5)));                        // concurrent
    settle(); chk(rout, 32'd1, "alu during multiple load");
    rd(12, 16'h0280, "mld word 0");
    rd(13, 16'hFEC0, "mld word 1");
    rd(14, 16'd5,    "mld word 2");
    rd(15, 16'd7,    "alu result beside mld");
    // back to back: the k-th loaded register is readable k+1 contexts later
    ctx(mk_ldimm(4'd12, 16'd0));
    ctx(mk_ldimm(4'd13, 16'd0));
    ctx(mk_ldimm(4'd14, 16'd0));
    ctx(mk_ldimm(4'd11, 16'h0100));
    ctx(mk_ctx(OP_SETBASE, 4'd0, R(11), 5'd0));
    @(negedge clk);
    issue = 1;
    ctx_in = mk_ctx(OP_MLD, 4'd12, 5'd0, 5'd0, 1'b0, 5'd3); @(negedge clk);
    ctx_in = ctx_nop();                                      @(negedge clk);
    ctx_in = mk_ctx(OP_MOV, 4'd7, R(12), 5'd0);             @(negedge clk);
    ctx_in = mk_ctx(OP_MOV, 4'd8, R(13), 5'd0);             @(negedge clk);
    ctx_in = mk_ctx(OP_MOV, 4'd9, R(14), 5'd0);             @(negedge clk);
    issue = 0; ctx_in = '0;
    rd(7, 16'h0280, "mld word 0, two contexts later");
    rd(8, 16'hFEC0, "mld word 1, three contexts later");
    rd(9, 16'd5,    "mld word 2, four contexts later");

    // ---- neighbour and frame-buffer operands ----
    ctx(mk_ctx(OP_MOV, 4'd0, X(SRC_FB), 5'd0)); settle(); chk({16'd0, out16}, 32'hF00B, "fb operand");
    ctx(mk_ctx(OP_MOV, 4'd0, X(SRC_N), 5'd0));  settle(); chk({16'd0, out16}, 32'h1111, "north");
    ctx(mk_ctx(OP_MOV, 4'd0, X(SRC_S), 5'd0));  settle(); chk({16'd0, out16}, 32'h2222, "south");
    ctx(mk_ctx(OP_MOV, 4'd0, X(SRC_W), 5'd0));  settle(); chk({16'd0, out16}, 32'h3333, "west");
    ctx(mk_ctx(OP_MAC, 4'd0, X(SRC_E), R(5), 1'b0, 5'd0));
    settle(); chk(rout, 32'h3333 + 32'h4444 * 3, "east operand in MAC");

    // ---- latency: issued before edge k, result at edge k+1, not at edge k ----
    @(negedge clk);
    fb_in = 16'h5A5A; issue = 1; ctx_in = mk_ctx(OP_MOV, 4'd0, X(SRC_FB), 5'd0);
    t0 = cycles;
    @(posedge clk); #1; issue = 0; ctx_in = 0;
    chk({16'd0, out16}, 32'h4444 * 3 + 32'h3333 & 32'hFFFF, "not yet at first edge");
    @(posedge clk); #1;
    chk({16'd0, out16}, 32'h5A5A, "result at second edge");
    chk(32'(cycles - t0), 2, "latency in cycles");

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
