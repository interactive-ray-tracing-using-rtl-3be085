// tb_workload_sqrt: square root on all 64 cells of the RC array, by
// Newton-Raphson on the reciprocal square root, with a table-based first step.
//
// Each cell gets its own z in [1/4, 1) as Q1.15 (row-mode loads from the
// frame-buffer line). The four bits z[14:11] index two 16-entry tables held in
// every cell's RAM: 1.5*x0 and 0.5*x0^3 (Q3.13), where x0 = 1/sqrt of the
// middle of the table interval. The first step is x1 = 1.5*x0 - z*(0.5*x0^3);
// two more steps x = 1.5x - 0.5*z*x^3 follow (multiplies scaled by the
// shifter, z*x first to stay in range); finally sqrt(z) = z*x as Q1.15.
// The tables are written into the RAMs by LDIMM/ST contexts; the kernel uses
// table look-up (LDT), the data-dependent RAM addressing of each cell.
// Checks: every result against the same fixed-point steps computed here and
// against sqrt(z) within 8 LSB; reports the kernel length in contexts.
module tb_workload_sqrt;
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
  logic [15:0] zv [N][N];
  logic [15:0] t1 [16], t2 [16];

  rc_array #(.N(N)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic logic [4:0] R(int r); return 5'(r); endfunction

  task automatic plane(logic rm, logic [N-1:0][31:0] p);
    @(negedge clk); issue = 1; row_mode = rm; ctx_plane = p;
    @(negedge clk); issue = 0; ctx_plane = '0;
  endtask

  task automatic all(logic [31:0] c, bit count = 1);
    logic [N-1:0][31:0] p;
    for (int i = 0; i < N; i++) p[i] = c;
    plane(1'b0, p);
    if (count) kernel_len++;
  endtask

  function automatic logic [15:0] mulq(logic [15:0] a, logic [15:0] b, int sh);
    return 16'((longint'($signed(a)) * longint'($signed(b))) >>> sh);
  endfunction

  // one step x = 1.5x - 0.5*z*x^3, in the order the kernel uses
  function automatic logic [15:0] step(logic [15:0] x, logic [15:0] z);
    logic [15:0] c;
    c = mulq(z, x, 15);          // z*x      Q3.13
    c = mulq(c, x, 13);          // z*x^2    Q3.13
    c = mulq(c, x, 14);          // 0.5*z*x^3
    return 16'(x + 16'($signed(x) >>> 1) - c);
  endfunction

  function automatic logic [15:0] ref_sqrt(logic [15:0] z);
    logic [15:0] x;
    int i = int'(z[14:11]);
    x = 16'(t1[i] - mulq(z, t2[i], 15));
    x = step(x, z);
    x = step(x, z);
    return mulq(z, x, 13);
  endfunction

  initial begin
    logic [N-1:0][31:0] p;
    real mid, x0, err;
    int worst = 0;
    issue = 0; row_mode = 0; ctx_plane = '0; line_sel = 0; fb_line_in = '0;
    for (int i = 0; i < 16; i++) begin
      mid = (i + 0.5) / 16.0;
      if (i < 4) mid = 0.25;    // unused: z >= 1/4
      x0 = 1.0 / $sqrt(mid);
      t1[i] = 16'($rtoi(1.5 * x0 * 8192.0));
      t2[i] = 16'($rtoi(0.5 * x0 * x0 * x0 * 8192.0));
    end
    for (int r = 0; r < N; r++) for (int c = 0; c < N; c++)
      zv[r][c] = 16'($urandom_range(16'h2000, 16'h7FFF));
    zv[0][0] = 16'h2000; zv[0][1] = 16'h7FFF; zv[0][2] = 16'h4000;
    ram_addr = '0; ram_we = 0; ram_wdata = '0;   // DMA port of the cell RAMs unused
    repeat (2) @(posedge clk); rst_n = 1;

    // tables into every cell's RAM: T1 at 0..15, T2 at 16..31
    all(mk_ldimm(4'd0, 16'd0), 0);
    all(mk_ctx(OP_SETBASE, 4'd0, R(0), 5'd0), 0);
    for (int i = 0; i < 16; i++) begin
      all(mk_ldimm(4'd1, t1[i]), 0); all(mk_ctx(OP_ST, 4'd1, 5'd0, 5'd0), 0);
    end
    for (int i = 0; i < 16; i++) begin
      all(mk_ldimm(4'd1, t2[i]), 0); all(mk_ctx(OP_ST, 4'd1, 5'd0, 5'd0), 0);
    end
    // z into R1, one row per plane
    for (int r = 0; r < N; r++) begin
      for (int c = 0; c < N; c++) fb_line_in[c] = zv[r][c];
      for (int s = 0; s < N; s++) p[s] = (s == r) ? mk_ctx(OP_MOV, 4'd1, {2'b10, SRC_FB}, 5'd0) : 32'd0;
      plane(1'b1, p);
      @(posedge clk);     // the load executes in the cycle after the issue
      @(negedge clk);     // change the line only after it has been taken
    end

    // kernel
    all(mk_ldimm(4'd2, 16'h7800));
    all(mk_ctx(OP_AND, 4'd3, R(1), R(2), 1'b1, 5'd11));          // index
    all(mk_ldimm(4'd0, 16'd0));
    all(mk_ctx(OP_SETBASE, 4'd0, R(0), 5'd0));
    all(mk_ctx(OP_LDT, 4'd4, R(3), 5'd0));                        // 1.5*x0
    all(mk_ldimm(4'd0, 16'd16));
    all(mk_ctx(OP_SETBASE, 4'd0, R(0), 5'd0));
    all(mk_ctx(OP_LDT, 4'd5, R(3), 5'd0));                        // 0.5*x0^3
    all(mk_ctx(OP_MUL, 4'd5, R(1), R(5), 1'b1, 5'd15));
    all(mk_ctx(OP_SUB, 4'd6, R(4), R(5)));                        // x1
    for (int it = 0; it < 2; it++) begin
      all(mk_ctx(OP_MUL, 4'd7, R(1), R(6), 1'b1, 5'd15));         // z*x
      all(mk_ctx(OP_MUL, 4'd7, R(7), R(6), 1'b1, 5'd13));         // z*x^2
      all(mk_ctx(OP_MUL, 4'd7, R(7), R(6), 1'b1, 5'd14));         // 0.5*z*x^3
      all(mk_ctx(OP_MOV, 4'd8, R(6), 5'd0, 1'b1, 5'd1));          // 0.5*x
      all(mk_ctx(OP_ADD, 4'd8, R(6), R(8)));                      // 1.5*x
      all(mk_ctx(OP_SUB, 4'd6, R(8), R(7)));
    end
    all(mk_ctx(OP_MUL, 4'd9, R(1), R(6), 1'b1, 5'd13));           // sqrt(z) = z*x
    @(posedge clk); #1;

    for (int r = 0; r < N; r++) for (int c = 0; c < N; c++) begin
      int e;
      checks++;
      if (cell_out[r][c] !== ref_sqrt(zv[r][c])) begin
        failures++;
        $display("FAIL cell(%0d,%0d) z=%h sqrt %h exp %h", r, c, zv[r][c], cell_out[r][c], ref_sqrt(zv[r][c]));
      end
      err = $sqrt(real'(zv[r][c]) / 32768.0) * 32768.0 - real'(cell_out[r][c]);
      e = $rtoi(err < 0 ? -err : err);
      if (e > worst) worst = e;
      checks++;
      if (e > 8) begin failures++; $display("FAIL accuracy z=%h got %h", zv[r][c], cell_out[r][c]); end
    end
    $display("sqrt kernel: %0d contexts for 64 square roots, largest error %0d LSB of 2^-15", kernel_len, worst);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
