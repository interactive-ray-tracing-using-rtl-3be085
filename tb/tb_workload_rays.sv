// tb_workload_rays: ray-sphere hit tests on all 64 cells of the RC array,
// with two objects tested side by side in different columns.
//
// Every cell holds one ray from the origin with direction d (Q3.12, each
// component within about [-0.55, 0.55]), written into words 0..2 of its RAM through the
// DMA port. Columns 0..3 test sphere A and columns 4..7 sphere B: the planes
// that load the sphere constants carry different contexts for the two column
// groups, the rest of the kernel is the same for all. With L = C (centre),
// the kernel computes, in Q3.12 with multiply-accumulate and scaling:
//   tca  = C . d                       (MUL + 2 MAC, shift by 12 at the end)
//   dd   = d . d
//   disc = tca^2 - dd * (C . C - r^2)  (flags set by the subtraction)
//   hit  = disc >= 0 and tca > 0       (two guarded MOVs)
// and stores hit and disc to words 3 and 4, read back through the DMA port.
// Checks: hit and disc of every cell against the same fixed-point steps
// computed here; hit against real-valued geometry wherever the real
// discriminant is not within rounding distance of zero; and that both hits and
// misses occur for both spheres.
module tb_workload_rays;
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
  int n_hit [2], n_miss [2];
  logic signed [15:0] dir [N][N][3];
  // sphere constants, Q3.12: centre and C.C - r^2
  logic signed [15:0] cen [2][3];
  logic signed [15:0] cc [2];
  real rad [2];

  rc_array #(.N(N)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic logic [4:0] R(int r); return 5'(r); endfunction

  // a column-mode plane: context a for columns 0..3, b for columns 4..7
  task automatic split(logic [31:0] a, logic [31:0] b);
    @(negedge clk); issue = 1; row_mode = 0;
    for (int i = 0; i < N; i++) ctx_plane[i] = (i < N / 2) ? a : b;
    @(negedge clk); issue = 0; ctx_plane = '0;
    kernel_len++;
  endtask

  task automatic all(logic [31:0] c); split(c, c); endtask

  function automatic logic signed [15:0] q12(real v); return 16'($rtoi(v * 4096.0)); endfunction

  function automatic logic signed [15:0] dot12(logic signed [15:0] a [3], logic signed [15:0] b [3]);
    logic signed [31:0] acc;
    acc = 0;
    for (int i = 0; i < 3; i++) acc += 32'(a[i]) * 32'(b[i]);
    return 16'(acc >>> 12);
  endfunction

  function automatic logic signed [15:0] mul12(logic signed [15:0] a, logic signed [15:0] b);
    return 16'((32'(a) * 32'(b)) >>> 12);
  endfunction

  initial begin
    issue = 0; row_mode = 0; ctx_plane = '0; line_sel = 0; fb_line_in = '0;
    ram_addr = '0; ram_we = 0; ram_wdata = '0;
    n_hit = '{0, 0}; n_miss = '{0, 0};
    cen[0] = '{q12(1.0), q12(0.5), q12(0.75)};  rad[0] = 0.5;
    cen[1] = '{q12(-0.75), q12(1.25), q12(-0.5)}; rad[1] = 0.625;
    for (int s = 0; s < 2; s++) begin
      real c2;
      c2 = 0.0;
      for (int i = 0; i < 3; i++) c2 += (real'(cen[s][i]) / 4096.0) ** 2;
      cc[s] = q12(c2 - rad[s] * rad[s]);
    end
    // half the rays aim near the sphere centre, half anywhere
    for (int r = 0; r < N; r++)
      for (int c = 0; c < N; c++) begin
        int s;
        s = (c < N / 2) ? 0 : 1;
        for (int i = 0; i < 3; i++)
          if (r % 2 == 0) dir[r][c][i] = 16'((int'(cen[s][i]) * 3) / 8 + $urandom_range(0, 600) - 300);
          else            dir[r][c][i] = 16'($urandom_range(0, 4096) - 2048);
      end
    repeat (2) @(posedge clk); rst_n = 1;

    // rays into the cells' RAMs by DMA
    for (int r = 0; r < N; r++)
      for (int c = 0; c < N; c++)
        for (int i = 0; i < 3; i++) begin
          @(negedge clk);
          ram_we = 1; ram_addr = {6'(r * N + c), 9'(i)}; ram_wdata = dir[r][c][i];
        end
    @(negedge clk); ram_we = 0;

    all(mk_ldimm(4'd14, 16'd0));
    all(mk_ctx(OP_SETBASE, 4'd0, R(14), 5'd0));
    all(mk_ctx(OP_LD, 4'd1, 5'd0, 5'd0));                            // dx
    all(mk_ctx(OP_LD, 4'd2, 5'd0, 5'd0));                            // dy
    all(mk_ctx(OP_LD, 4'd3, 5'd0, 5'd0));                            // dz
    for (int i = 0; i < 3; i++)
      split(mk_ldimm(4'(4 + i), cen[0][i]), mk_ldimm(4'(4 + i), cen[1][i]));
    split(mk_ldimm(4'd7, cc[0]), mk_ldimm(4'd7, cc[1]));
    all(mk_ctx(OP_MUL, 4'd8, R(4), R(1)));                           // tca
    all(mk_ctx(OP_MAC, 4'd8, R(5), R(2)));
    all(mk_ctx(OP_MAC, 4'd8, R(6), R(3), 1'b1, 5'd12));
    all(mk_ctx(OP_MUL, 4'd9, R(1), R(1)));                           // dd
    all(mk_ctx(OP_MAC, 4'd9, R(2), R(2)));
    all(mk_ctx(OP_MAC, 4'd9, R(3), R(3), 1'b1, 5'd12));
    all(mk_ctx(OP_MUL, 4'd10, R(8), R(8), 1'b1, 5'd12));             // tca^2
    all(mk_ctx(OP_MUL, 4'd11, R(9), R(7), 1'b1, 5'd12));             // dd * cc
    all(mk_ldimm(4'd13, 16'd0));                                     // hit = 0
    all(mk_ldimm(4'd15, 16'd1));
    all(mk_ctx(OP_SUB, 4'd12, R(10), R(11), 1'b0, 5'd0, 3'b001));    // disc, flags
    all(mk_ctx(OP_MOV, 4'd13, R(15), 5'd0, 1'b0, 5'd0, 3'b000, G_GE));
    all(mk_ctx(OP_CMP, 4'd0, R(8), R(14)));                          // tca vs 0
    all(mk_ctx(OP_MOV, 4'd13, R(14), 5'd0, 1'b0, 5'd0, 3'b000, G_LE));
    all(mk_ldimm(4'd14, 16'd3));
    all(mk_ctx(OP_SETBASE, 4'd0, R(14), 5'd0));
    all(mk_ctx(OP_ST, 4'd13, 5'd0, 5'd0));
    all(mk_ctx(OP_ST, 4'd12, 5'd0, 5'd0));
    repeat (2) @(posedge clk);
    $display("ray-sphere kernel: %0d contexts for 64 rays, 2 spheres", kernel_len);

    for (int r = 0; r < N; r++)
      for (int c = 0; c < N; c++) begin
        int s;
        logic signed [15:0] tca, dd, disc, got_hit, got_disc;
        logic exp_hit;
        real rt, rd, rdisc;
        s = (c < N / 2) ? 0 : 1;
        tca  = dot12(cen[s], dir[r][c]);
        dd   = dot12(dir[r][c], dir[r][c]);
        disc = mul12(tca, tca) - mul12(dd, cc[s]);
        exp_hit = (disc >= 0) && (tca > 0);
        @(negedge clk);
        ram_addr = {6'(r * N + c), 9'd3}; #1; got_hit = ram_rdata;
        ram_addr = {6'(r * N + c), 9'd4}; #1; got_disc = ram_rdata;
        checks++;
        if (got_hit !== 16'(exp_hit) || got_disc !== disc) begin
          failures++;
          $display("FAIL cell(%0d,%0d) hit %0d disc %0d, steps give %0d %0d", r, c, got_hit, got_disc, exp_hit, disc);
        end
        // real-valued geometry
        rt = 0.0; rd = 0.0;
        for (int i = 0; i < 3; i++) begin
          rt += real'(cen[s][i]) * real'(dir[r][c][i]) / 16777216.0;
          rd += real'(dir[r][c][i]) * real'(dir[r][c][i]) / 16777216.0;
        end
        rdisc = rt * rt - rd * (real'(cc[s]) / 4096.0);
        if (rdisc > 0.01 || rdisc < -0.01) begin
          checks++;
          if (got_hit[0] !== ((rdisc > 0.0) && (rt > 0.0))) begin
            failures++; $display("FAIL cell(%0d,%0d) hit %0d against geometry", r, c, got_hit);
          end
        end
        if (got_hit[0]) n_hit[s]++; else n_miss[s]++;
      end
    for (int s = 0; s < 2; s++) begin
      $display("sphere %0d: %0d hits, %0d misses", s, n_hit[s], n_miss[s]);
      checks++;
      if (n_hit[s] == 0 || n_miss[s] == 0) begin
        failures++; $display("FAIL sphere %0d saw no hit or no miss", s);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
