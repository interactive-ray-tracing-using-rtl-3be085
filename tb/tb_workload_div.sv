// tb_workload_div: integer division Q = N / D on all 64 cells of the RC array,
// as a normalise / reciprocal / multiply / denormalise sequence.
//
// Each cell gets its own N in [0, 32767] and D in [1, 32767], written into
// words 0 and 1 of its RAM through the array's DMA port. The kernel, the same
// context for every cell:
//   k  = CLZ16(D)                  (1..15 for a positive D)
//   Dn = D << (k - 1)              (Dn in [1/2, 1) as Q1.15; register shift)
//   x  = 1/Dn in Q3.13             (seed 1.YYY with YYY = NOT XXX, two
//                                   Newton-Raphson steps x <- x(2 - x*Dn))
//   t  = (N * x) >> 14             (multiply with scaling)
//   Q  = t >> (15 - k)             (register shift back)
// Q is stored at word 2 of the cell's RAM and read back through the DMA
// port. Checks: every quotient against the same fixed-point steps computed
// here, and against N / D within 1 + (N / D) / 512; reports the kernel
// length in contexts and the largest error.
module tb_workload_div;
  import mgx_pkg::*;
  localparam int N = 8;
  logic clk = 0, rst_n = 0;
  logic issue, row_mode;
  logic [N-1:0][31:0] ctx_plane;
  logic [N-1:0][15:0] fb_line_in, line_out;
  logic [2:0] line_sel;
  logic [N-1:0][N-1:0][15:0] cell_out;
  logic [N-1:0][N-1:0] cell_sleeping, cell_executed;
  logic [$clog2(N*N)+RAM_AW-1:0] ram_addr;
  logic        ram_we;
  logic [15:0] ram_wdata, ram_rdata;
  int checks = 0, failures = 0, kernel_len = 0;
  logic [15:0] nv [N][N], dv [N][N];

  rc_array #(.N(N)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic logic [4:0] R(int r); return 5'(r); endfunction

  // one context for every cell
  task automatic all(logic [31:0] c);
    @(negedge clk); issue = 1; row_mode = 0;
    for (int i = 0; i < N; i++) ctx_plane[i] = c;
    @(negedge clk); issue = 0; ctx_plane = '0;
    kernel_len++;
  endtask

  // reference: the same fixed-point steps
  function automatic int clz16(logic [15:0] v);
    for (int i = 15; i >= 0; i--) if (v[i]) return 15 - i;
    return 16;
  endfunction

  function automatic logic [15:0] ref_div(logic [15:0] n, logic [15:0] d);
    int k;
    logic [15:0] dn, x, t;
    k  = clz16(d);
    dn = 16'(d << (k - 1));
    x  = 16'h2000 | (((dn ^ 16'h3800) & 16'h3800) >> 1);
    for (int it = 0; it < 2; it++) begin
      t = 16'((longint'($signed(x)) * longint'($signed(dn))) >>> 15);
      t = 16'h4000 - t;
      x = 16'((longint'($signed(x)) * longint'($signed(t))) >>> 13);
    end
    t = 16'((longint'($signed(n)) * longint'($signed(x))) >>> 14);
    return 16'($signed(t) >>> (15 - k));
  endfunction

  real worst = 0.0;

  initial begin
    issue = 0; row_mode = 0; ctx_plane = '0; line_sel = 0; fb_line_in = '0;
    ram_addr = '0; ram_we = 0; ram_wdata = '0;
    for (int r = 0; r < N; r++)
      for (int c = 0; c < N; c++) begin
        nv[r][c] = 16'($urandom_range(0, 32767));
        case ($urandom_range(0, 2))
          0: dv[r][c] = 16'($urandom_range(1, 15));
          1: dv[r][c] = 16'($urandom_range(16, 1023));
          default: dv[r][c] = 16'($urandom_range(1024, 32767));
        endcase
      end
    dv[0][0] = 16'd1;     nv[0][0] = 16'd32767;   // largest quotient
    dv[0][1] = 16'd32767; nv[0][1] = 16'd32767;   // largest divisor
    dv[0][2] = 16'd3;     nv[0][2] = 16'd0;
    repeat (2) @(posedge clk); rst_n = 1;

    // operands into the cells' RAMs by DMA
    for (int r = 0; r < N; r++)
      for (int c = 0; c < N; c++)
        for (int w = 0; w < 2; w++) begin
          @(negedge clk);
          ram_we = 1; ram_addr = {6'(r * N + c), 9'(w)}; ram_wdata = (w == 1) ? dv[r][c] : nv[r][c];
        end
    @(negedge clk); ram_we = 0;

    all(mk_ldimm(4'd3, 16'd0));
    all(mk_ctx(OP_SETBASE, 4'd0, R(3), 5'd0));
    all(mk_ctx(OP_LD, 4'd1, 5'd0, 5'd0));                          // N
    all(mk_ctx(OP_LD, 4'd2, 5'd0, 5'd0));                          // D
    all(mk_ctx(OP_CLZ, 4'd4, R(2), 5'd0));                         // k
    all(mk_ldimm(4'd5, 16'd1));
    all(mk_ctx(OP_SUB, 4'd6, R(4), R(5)));                         // k - 1
    all(mk_ctx(OP_SHIFT16, 4'd7, R(2), R(6), 1'b0));               // Dn
    all(mk_ldimm(4'd8, 16'h3800));
    all(mk_ctx(OP_XOR, 4'd9, R(7), R(8)));
    all(mk_ctx(OP_AND, 4'd9, R(9), R(8), 1'b1, 5'd1));             // ~XXX >> 1
    all(mk_ldimm(4'd10, 16'h2000));
    all(mk_ctx(OP_OR, 4'd11, R(9), R(10)));                        // x0 = 1.YYY
    all(mk_ldimm(4'd12, 16'h4000));                                // 2.0
    for (int it = 0; it < 2; it++) begin
      all(mk_ctx(OP_MUL, 4'd13, R(11), R(7), 1'b1, 5'd15));        // x*Dn
      all(mk_ctx(OP_SUB, 4'd13, R(12), R(13)));                    // 2 - x*Dn
      all(mk_ctx(OP_MUL, 4'd11, R(11), R(13), 1'b1, 5'd13));       // x(2 - x*Dn)
    end
    all(mk_ctx(OP_MUL, 4'd13, R(1), R(11), 1'b1, 5'd14));          // N*x
    all(mk_ldimm(4'd5, 16'd15));
    all(mk_ctx(OP_SUB, 4'd6, R(5), R(4)));                         // 15 - k
    all(mk_ctx(OP_SHIFT16, 4'd14, R(13), R(6), 1'b1));             // Q
    all(mk_ldimm(4'd3, 16'd2));
    all(mk_ctx(OP_SETBASE, 4'd0, R(3), 5'd0));
    all(mk_ctx(OP_ST, 4'd14, 5'd0, 5'd0));
    repeat (2) @(posedge clk);
    $display("division kernel: %0d contexts for 64 quotients", kernel_len);

    // quotients back through the DMA port
    for (int r = 0; r < N; r++)
      for (int c = 0; c < N; c++) begin
        logic [15:0] q, e;
        real err;
        @(negedge clk);
        ram_addr = {6'(r * N + c), 9'd2};
        #1;
        q = ram_rdata;
        e = ref_div(nv[r][c], dv[r][c]);
        checks++;
        if (q !== e) begin
          failures++;
          $display("FAIL cell(%0d,%0d) %0d/%0d = %0d, steps give %0d", r, c, nv[r][c], dv[r][c], q, e);
        end
        err = real'(q) - real'(nv[r][c]) / real'(dv[r][c]);
        if (err < 0.0) err = -err;
        if (err > worst) worst = err;
        checks++;
        if (err > 1.0 + real'(nv[r][c]) / real'(dv[r][c]) / 512.0) begin
          failures++;
          $display("FAIL accuracy %0d/%0d = %0d", nv[r][c], dv[r][c], q);
        end
      end
    $display("largest quotient error %f", worst);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
