// tb_mgx_top: end-to-end test of the whole core at its default size (8x8
// cells, 64 context planes, 2 x 128 frame-buffer lines), with the control
// processor played by this testbench and main memory by main_memory_model.
//
// Workload: the fixed-point reciprocal 1/D used for division in ray-object
// intersection, for 64 divisors per batch, one per cell, two batches.
// D is in [1/2, 1) as Q1.15; the seed 1.YYY (Q3.13) takes YYY as the one's
// complement of the three bits of D after the leading 0.1; two Newton-Raphson
// steps x = x * (2 - x*D) follow, each product scaled by the shifter. Then
// every cell compares D with 0.75 and, through a pseudo-branched
// if-then-else, sets a flag to 1 (D < 0.75) or 2; a guarded add runs only
// where D < 0.75; each cell then fetches its east neighbour's flag.
//
// Sequence: DMA loads the program into context memory and batch 1 into the
// frame-buffer bank the array is not using; the banks are swapped; batch 2 is
// loaded by DMA while the array runs batch 1 (row-mode planes load one row
// each from the frame buffer, column-mode planes broadcast the kernel);
// results are written back to the frame buffer line by line; after a swap
// they are drained to main memory by DMA while batch 2 runs.
//
// Checks: every reciprocal against the same fixed-point steps computed in the
// testbench and against 2^28/D within 8 LSB; every neighbour flag; and that
// each mechanism happened: DMA in all three directions, DMA overlapping
// array execution, bank swaps, row-mode and column-mode planes, guard
// nullification, divergent pseudo-branch paths, frame-buffer line writes,
// DMA out of and into the cells' RAMs (x and D read out of every cell, a
// block written into one cell and read back), and multiple loads (each cell parks x and D in its RAM and reads both back
// with one multiple load while the next contexts run; the output is then
// formed from the loaded copies, so a lost load shows as a wrong result).
module tb_mgx_top;
  import mgx_pkg::*;
  localparam int N = 8;
  localparam logic [31:0] DATA1 = 32'h400, DATA2 = 32'h500, RES1 = 32'h800, RES2 = 32'hA00;
  localparam logic [31:0] RRX = 32'hC00, RRS = 32'hD00, RRB = 32'hD10;

  logic clk = 0, rst_n = 0;
  logic        ctl_issue, ctl_row_mode, ctl_bank_sel, ctl_fb_we;
  logic [5:0]  ctl_plane;
  logic [6:0]  ctl_fb_raddr, ctl_fb_waddr;
  logic [2:0]  ctl_line_sel;
  logic        dma_start, dma_busy, dma_done;
  logic [2:0]  dma_dir;
  logic [31:0] dma_mem_base;
  logic [15:0] dma_local_base, dma_count;
  logic        mem_req, mem_we, mem_gnt, mem_rvalid;
  logic [31:0] mem_addr, mem_wdata, mem_rdata;
  logic [N-1:0][N-1:0][15:0] cell_out;
  logic [N-1:0][N-1:0] cell_sleeping, cell_executed;

  int checks = 0, failures = 0;
  int n_row_planes = 0, n_col_planes = 0, n_overlap = 0, n_swaps = 0;
  int n_dma_cm = 0, n_dma_in = 0, n_dma_out = 0, n_guard_null = 0;
  int n_diverge = 0, n_fb_writes = 0, n_dma_rr_in = 0, n_dma_rr_out = 0;
  int guard_plane, mld_plane, n_mld = 0;

  mgx_top dut (.*);
  main_memory_model #(.WORDS(4096), .LAT(2)) u_mem (
    .clk, .req(mem_req), .we(mem_we), .addr(mem_addr), .wdata(mem_wdata),
    .gnt(mem_gnt), .rvalid(mem_rvalid), .rdata(mem_rdata));

  always #5 clk = ~clk;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // mechanism monitors
  int exec_plane = -1;      // plane the cells execute in this cycle
  int exp_guard_null = 0;
  always @(posedge clk) begin
    if (ctl_issue && dma_busy) n_overlap++;
    if (cell_sleeping != '0 && cell_sleeping != '1) n_diverge++;
    exec_plane <= ctl_issue ? int'(ctl_plane) : -1;
  end
  always @(negedge clk)
    if (exec_plane == guard_plane)
      for (int r = 0; r < N; r++) for (int c = 0; c < N; c++)
        if (!cell_executed[r][c]) n_guard_null++;
  always @(negedge clk)
    if (exec_plane == mld_plane)
      for (int r = 0; r < N; r++) for (int c = 0; c < N; c++)
        if (cell_executed[r][c]) n_mld++;

  // ---------------- program ----------------
  logic [31:0] prog [$];    // broadcast (column-mode) kernel contexts
  function automatic logic [4:0] R(int r); return 5'(r); endfunction

  task automatic build_program();
    prog.push_back(mk_ldimm(4'd2, 16'h3800));
    prog.push_back(mk_ctx(OP_XOR, 4'd3, R(1), R(2)));
    prog.push_back(mk_ctx(OP_AND, 4'd3, R(3), R(2), 1'b1, 5'd1));   // ~XXX >> 1
    prog.push_back(mk_ldimm(4'd4, 16'h2000));
    prog.push_back(mk_ctx(OP_OR, 4'd5, R(3), R(4)));                // x0 = 1.YYY
    prog.push_back(mk_ldimm(4'd6, 16'h4000));                       // 2.0
    for (int it = 0; it < 2; it++) begin
      prog.push_back(mk_ctx(OP_MUL, 4'd7, R(5), R(1), 1'b1, 5'd15)); // x*D
      prog.push_back(mk_ctx(OP_SUB, 4'd7, R(6), R(7)));              // 2 - x*D
      prog.push_back(mk_ctx(OP_MUL, 4'd5, R(5), R(7), 1'b1, 5'd13)); // x*(2-x*D)
    end
    // round trip through the cell RAM: store x and D, read both back with
    // one multiple load while the next contexts run
    prog.push_back(mk_ldimm(4'd13, 16'h0040));
    prog.push_back(mk_ctx(OP_SETBASE, 4'd0, R(13), 5'd0));
    prog.push_back(mk_ctx(OP_ST, 4'd5, 5'd0, 5'd0));
    prog.push_back(mk_ctx(OP_ST, 4'd1, 5'd0, 5'd0));
    prog.push_back(mk_ctx(OP_SETBASE, 4'd0, R(13), 5'd0));
    mld_plane = 8 + prog.size();
    prog.push_back(mk_ctx(OP_MLD, 4'd12, 5'd0, 5'd0, 1'b0, 5'd2));  // R12 = x, R13 = D
    prog.push_back(mk_ldimm(4'd9, 16'h6000));                       // 0.75
    prog.push_back(mk_ctx(OP_CMP, 4'd0, R(1), R(9)));
    guard_plane = 8 + prog.size();
    prog.push_back(mk_ctx(OP_ADD, 4'd11, R(1), R(9), 1'b0, 5'd0, 3'b000, G_LT));
    prog.push_back(mk_ctx(OP_PBR, 4'd0, 5'd0, 5'd0, 1'b0, 5'd1, 3'b000, G_GE));
    prog.push_back(mk_ldimm(4'd8, 16'd1));
    prog.push_back(mk_ctx(OP_PBR, 4'd0, 5'd0, 5'd0, 1'b0, 5'd2, 3'b000, G_AL));
    prog.push_back(mk_ctx(OP_LABEL, 4'd0, 5'd0, 5'd0, 1'b0, 5'd1));
    prog.push_back(mk_ldimm(4'd8, 16'd2));
    prog.push_back(mk_ctx(OP_LABEL, 4'd0, 5'd0, 5'd0, 1'b0, 5'd2));
    prog.push_back(mk_ctx(OP_MOV, 4'd8, R(8), 5'd0));               // flag to output
    prog.push_back(mk_ctx(OP_MOV, 4'd10, {2'b10, SRC_E}, 5'd0));    // east's flag
    prog.push_back(mk_ctx(OP_ADD, 4'd5, R(12), R(13)));             // x + D
    prog.push_back(mk_ctx(OP_SUB, 4'd5, R(5), R(1)));               // x, to output
    // planes 0..7: row r loads frame-buffer line r; kernel from plane 8
    for (int p = 0; p < N; p++)
      for (int s = 0; s < N; s++)
        u_mem.mem[p * N + s] = (s == p) ? mk_ctx(OP_MOV, 4'd1, {2'b10, SRC_FB}, 5'd0) : 32'd0;
    foreach (prog[i])
      for (int s = 0; s < N; s++) u_mem.mem[(8 + i) * N + s] = prog[i];
  endtask

  // ---------------- control-processor actions ----------------
  task automatic issue(int plane, logic rm, int fb_line);
    @(negedge clk);
    ctl_issue = 1; ctl_plane = 6'(plane); ctl_row_mode = rm; ctl_fb_raddr = 7'(fb_line);
    if (rm) n_row_planes++; else n_col_planes++;
    @(negedge clk);
    ctl_issue = 0;
  endtask

  task automatic write_line(int row, int line);
    @(negedge clk);
    ctl_row_mode = 1; ctl_line_sel = 3'(row); ctl_fb_we = 1; ctl_fb_waddr = 7'(line);
    n_fb_writes++;
    @(negedge clk);
    ctl_fb_we = 0;
  endtask

  task automatic dma(logic [2:0] d, logic [31:0] mb, int lb, int n);
    while (dma_busy) @(negedge clk);
    @(negedge clk);
    dma_start = 1; dma_dir = d; dma_mem_base = mb; dma_local_base = 16'(lb); dma_count = 16'(n);
    case (d)
      3'd0: n_dma_in++;
      3'd1: n_dma_out++;
      3'd2: n_dma_cm++;
      3'd3: n_dma_rr_in++;
      default: n_dma_rr_out++;
    endcase
    @(negedge clk);
    dma_start = 0;
  endtask

  task automatic dma_wait();
    @(negedge clk);
    while (dma_busy) @(negedge clk);
  endtask

  task automatic swap(logic b);
    @(negedge clk);
    ctl_bank_sel = b; n_swaps++;
  endtask

  // run the kernel on the array's bank; results to lines 8..15 (reciprocal)
  // and 16..23 (neighbour flag)
  task automatic run_batch();
    for (int r = 0; r < N; r++) issue(r, 1'b1, r);
    for (int i = 0; i < prog.size() - 1; i++) begin
      issue(8 + i, 1'b0, 0);
      if (i == prog.size() - 3)   // right after the east-flag MOV
        begin @(negedge clk); for (int r = 0; r < N; r++) write_line(r, 16 + r); end
    end
    issue(8 + prog.size() - 1, 1'b0, 0);
    @(negedge clk);
    for (int r = 0; r < N; r++) write_line(r, 8 + r);
  endtask

  // ---------------- reference ----------------
  function automatic logic [15:0] ref_recip(logic [15:0] d);
    logic [15:0] x, t;
    x = 16'h2000 | (((d ^ 16'h3800) & 16'h3800) >> 1);
    for (int it = 0; it < 2; it++) begin
      t = 16'((longint'($signed(x)) * longint'($signed(d))) >>> 15);
      t = 16'h4000 - t;
      x = 16'((longint'($signed(x)) * longint'($signed(t))) >>> 13);
    end
    return x;
  endfunction

  logic [15:0] dv [2][N][N];

  task automatic check_batch(int b, logic [31:0] res);
    int err, worst = 0;
    for (int r = 0; r < N; r++)
      for (int c = 0; c < N; c++) begin
        logic [15:0] got_x, got_f, exp_f;
        logic [31:0] w;
        w = u_mem.mem[res + 32'(r * 4 + c / 2)];
        got_x = c[0] ? w[31:16] : w[15:0];
        w = u_mem.mem[res + 32'(32 + r * 4 + c / 2)];
        got_f = c[0] ? w[31:16] : w[15:0];
        exp_f = (dv[b][r][(c + 1) % N] < 16'h6000) ? 16'd1 : 16'd2;
        checks++;
        if (got_x !== ref_recip(dv[b][r][c])) begin
          failures++;
          $display("FAIL batch %0d cell(%0d,%0d) D=%h recip %h exp %h", b, r, c, dv[b][r][c], got_x, ref_recip(dv[b][r][c]));
        end
        err = int'(got_x) - int'((64'd1 << 28) / dv[b][r][c]);
        if (err < 0) err = -err;
        if (err > worst) worst = err;
        checks++;
        if (err > 8) begin failures++; $display("FAIL accuracy D=%h x=%h", dv[b][r][c], got_x); end
        checks++;
        if (got_f !== exp_f) begin
          failures++;
          $display("FAIL batch %0d cell(%0d,%0d) flag %0d exp %0d", b, r, c, got_f, exp_f);
        end
      end
    $display("batch %0d: largest reciprocal error %0d LSB of 2^-13", b, worst);
  endtask

  task automatic mech(string what, int n);
    checks++;
    $display("mechanism %-28s %0d", what, n);
    if (n == 0) begin failures++; $display("FAIL mechanism never happened: %s", what); end
  endtask

  initial begin
    ctl_issue = 0; ctl_row_mode = 0; ctl_bank_sel = 0; ctl_fb_we = 0; ctl_plane = 0;
    ctl_fb_raddr = 0; ctl_fb_waddr = 0; ctl_line_sel = 0;
    dma_start = 0; dma_dir = 0; dma_mem_base = 0; dma_local_base = 0; dma_count = 0;
    foreach (u_mem.mem[i]) u_mem.mem[i] = 32'd0;
    dv[0][0][0] = 16'h4000; dv[0][0][1] = 16'h7FFF; dv[0][0][2] = 16'h6000;
    for (int b = 0; b < 2; b++)
      for (int r = 0; r < N; r++)
        for (int c = 0; c < N; c++) begin
          if (!(b == 0 && r == 0 && c < 3)) dv[b][r][c] = 16'($urandom_range(16'h4000, 16'h7FFF));
          if (dv[b][r][c] >= 16'h6000) exp_guard_null++;
          if (c[0]) u_mem.mem[(b ? DATA2 : DATA1) + 32'(r * 4 + c / 2)][31:16] = dv[b][r][c];
          else      u_mem.mem[(b ? DATA2 : DATA1) + 32'(r * 4 + c / 2)][15:0]  = dv[b][r][c];
        end
    build_program();
    repeat (3) @(posedge clk);
    rst_n = 1;

    dma(3'd2, 32'd0, 0, (8 + prog.size()) * N);   // program -> context memory
    dma_wait();
    dma(3'd0, DATA1, 0, N * N / 2);              // batch 1 -> bank 1
    dma_wait();
    swap(1'b1);                                  // array: bank 1
    dma(3'd0, DATA2, 0, N * N / 2);              // batch 2 -> bank 0, in background
    run_batch();
    dma_wait();
    swap(1'b0);                                  // array: bank 0
    dma(3'd1, RES1, 8 * 4, 2 * N * 4);           // drain batch 1 results, in background
    run_batch();
    dma_wait();
    swap(1'b1);
    dma(3'd1, RES2, 8 * 4, 2 * N * 4);
    dma_wait();
    // the cells' RAMs still hold x and D of the last batch at words 0x40/0x41:
    // read them out by DMA, cell by cell
    for (int k = 0; k < N * N; k++) begin
      dma(3'd4, RRX + 32'(2 * k), k * 512 + 'h40, 2);
      dma_wait();
    end
    // memory -> one cell's RAM and back
    for (int i = 0; i < 6; i++) u_mem.mem[RRS + 32'(i)] = 32'($urandom);
    dma(3'd3, RRS, 37 * 512 + 'h80, 6);
    dma_wait();
    dma(3'd4, RRB, 37 * 512 + 'h80, 6);
    dma_wait();

    check_batch(0, RES1);
    check_batch(1, RES2);
    for (int r = 0; r < N; r++)
      for (int c = 0; c < N; c++) begin
        checks++;
        if (u_mem.mem[RRX + 32'(2 * (r * N + c))] !== {16'd0, ref_recip(dv[1][r][c])} ||
            u_mem.mem[RRX + 32'(2 * (r * N + c)) + 1] !== {16'd0, dv[1][r][c]}) begin
          failures++; $display("FAIL RC RAM of cell(%0d,%0d) read by DMA: %h %h", r, c,
                               u_mem.mem[RRX + 32'(2 * (r * N + c))], u_mem.mem[RRX + 32'(2 * (r * N + c)) + 1]);
        end
      end
    for (int i = 0; i < 6; i++) begin
      checks++;
      if (u_mem.mem[RRB + 32'(i)] !== {16'd0, u_mem.mem[RRS + 32'(i)][15:0]}) begin
        failures++; $display("FAIL memory -> RC RAM -> memory word %0d", i);
      end
    end
    mech("DMA memory->context memory", n_dma_cm);
    mech("DMA memory->frame buffer", n_dma_in);
    mech("DMA frame buffer->memory", n_dma_out);
    mech("DMA memory->RC RAM", n_dma_rr_in);
    mech("DMA RC RAM->memory", n_dma_rr_out);
    mech("DMA during array execution", n_overlap);
    mech("frame-buffer bank swaps", n_swaps);
    mech("row-mode planes", n_row_planes);
    mech("column-mode planes", n_col_planes);
    mech("guard-nullified cell contexts", n_guard_null);
    checks++;
    if (n_guard_null != exp_guard_null) begin
      failures++; $display("FAIL guard nullified %0d cells, expected %0d", n_guard_null, exp_guard_null);
    end
    mech("divergent pseudo-branch cycles", n_diverge);
    mech("frame-buffer line writes", n_fb_writes);
    mech("cells running a multiple load", n_mld);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
