// tb_rc_array: self-checking test of the 8x8 RC array.
// Checks that in column mode every cell of column c runs context c and sees
// frame-buffer word r, and in row mode row r runs context r and sees word c;
// that each cell reads the right north/south/west/east neighbour (with
// wrap-around); that the output line is the selected row or column; and that
// cells in different columns follow different data-dependent paths through a
// pseudo branch; and that the DMA port reaches the right word of each cell's
// RAM in both directions (words written by DMA are loaded by the cells, words
// the cells store are read back by DMA). Expected values are formulas of the
// row and column index.
module tb_rc_array;
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
  int checks = 0, failures = 0;

  rc_array #(.N(N)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic plane(logic rm, logic [N-1:0][31:0] p);
    @(negedge clk); issue = 1; row_mode = rm; ctx_plane = p;
    @(negedge clk); issue = 0; ctx_plane = '0;
  endtask

  // same context everywhere
  task automatic all(logic [31:0] c);
    logic [N-1:0][31:0] p;
    for (int i = 0; i < N; i++) p[i] = c;
    plane(1'b0, p);
  endtask

  task automatic settle(); @(posedge clk); #1; endtask

  task automatic chk_cells(string what, int kind);
    int e;
    for (int r = 0; r < N; r++)
      for (int c = 0; c < N; c++) begin
        case (kind)
          0: e = 16 * c + 1;
          1: e = 256 + r;
          2: e = 16'hA000 + r;
          3: e = 16'hA000 + c;
          4: e = 16 * r + c;
          5: e = 16 * ((r + N - 1) % N) + c;
          6: e = 16 * ((r + 1) % N) + c;
          7: e = 16 * r + (c + N - 1) % N;
          8: e = 16 * r + (c + 1) % N;
          default: e = (c % 2 == 0) ? 16'h00EE : 16'h0D0D;
        endcase
        checks++;
        if (cell_out[r][c] !== 16'(e)) begin
          failures++;
          $display("FAIL %s cell(%0d,%0d) got %h exp %h", what, r, c, cell_out[r][c], 16'(e));
        end
      end
  endtask

  initial begin
    logic [N-1:0][31:0] p;
    issue = 0; row_mode = 0; ctx_plane = '0; line_sel = 0;
    ram_addr = '0; ram_we = 0; ram_wdata = '0;
    for (int i = 0; i < N; i++) fb_line_in[i] = 16'(16'hA000 + i);
    repeat (2) @(posedge clk); rst_n = 1;

    // column mode: column c runs its own context
    for (int c = 0; c < N; c++) p[c] = mk_ldimm(4'd1, 16'(16 * c + 1));
    plane(1'b0, p);
    all(mk_ctx(OP_MOV, 4'd0, 5'd1, 5'd0));
    settle(); chk_cells("column contexts", 0);
    // row mode
    for (int r = 0; r < N; r++) p[r] = mk_ldimm(4'd2, 16'(256 + r));
    plane(1'b1, p);
    all(mk_ctx(OP_MOV, 4'd0, 5'd2, 5'd0));
    settle(); chk_cells("row contexts", 1);
    // frame-buffer word per column / per row
    all(mk_ctx(OP_MOV, 4'd0, {2'b10, SRC_FB}, 5'd0));
    settle(); chk_cells("fb column mode", 2);
    for (int r = 0; r < N; r++) p[r] = mk_ctx(OP_MOV, 4'd0, {2'b10, SRC_FB}, 5'd0);
    plane(1'b1, p);
    settle(); chk_cells("fb row mode", 3);

    // unique value per cell: R3 = 16*r (row mode), R4 = c (column mode)
    for (int r = 0; r < N; r++) p[r] = mk_ldimm(4'd3, 16'(16 * r));
    plane(1'b1, p);
    for (int c = 0; c < N; c++) p[c] = mk_ldimm(4'd4, 16'(c));
    plane(1'b0, p);
    all(mk_ctx(OP_ADD, 4'd5, 5'd3, 5'd4));
    settle(); chk_cells("unique values", 4);
    // output line selection
    for (int k = 0; k < N; k++) begin
      line_sel = 3'(k); row_mode = 1; #1;
      for (int i = 0; i < N; i++) begin
        checks++;
        if (line_out[i] !== 16'(16 * k + i)) begin failures++; $display("FAIL row line %0d", k); end
      end
      row_mode = 0; #1;
      for (int i = 0; i < N; i++) begin
        checks++;
        if (line_out[i] !== 16'(16 * i + k)) begin failures++; $display("FAIL column line %0d", k); end
      end
    end
    row_mode = 0;
    // neighbours
    all(mk_ctx(OP_MOV, 4'd0, {2'b10, SRC_N}, 5'd0)); settle(); chk_cells("north", 5);
    all(mk_ctx(OP_MOV, 4'd0, 5'd5, 5'd0));           settle();
    all(mk_ctx(OP_MOV, 4'd0, {2'b10, SRC_S}, 5'd0)); settle(); chk_cells("south", 6);
    all(mk_ctx(OP_MOV, 4'd0, 5'd5, 5'd0));           settle();
    all(mk_ctx(OP_MOV, 4'd0, {2'b10, SRC_W}, 5'd0)); settle(); chk_cells("west", 7);
    all(mk_ctx(OP_MOV, 4'd0, 5'd5, 5'd0));           settle();
    all(mk_ctx(OP_MOV, 4'd0, {2'b10, SRC_E}, 5'd0)); settle(); chk_cells("east", 8);

    // data-dependent paths: R4 = c; test bit 0 (AND with 1), skip on zero
    all(mk_ldimm(4'd6, 16'd1));
    all(mk_ctx(OP_AND, 4'd7, 5'd4, 5'd6, 1'b0, 5'd0, 3'b001));
    all(mk_ctx(OP_PBR, 4'd0, 5'd0, 5'd0, 1'b0, 5'd1, 3'b000, G_EQ));
    all(mk_ldimm(4'd8, 16'h0D0D));                      // odd columns only
    all(mk_ctx(OP_PBR, 4'd0, 5'd0, 5'd0, 1'b0, 5'd2, 3'b000, G_AL));
    settle();
    checks++;
    for (int r = 0; r < N; r++) for (int c = 0; c < N; c++)
      if (cell_sleeping[r][c] !== 1'b1) begin failures++; $display("FAIL sleep %0d %0d", r, c); end
    all(mk_ctx(OP_LABEL, 4'd0, 5'd0, 5'd0, 1'b0, 5'd1));
    all(mk_ldimm(4'd8, 16'h00EE));                      // even columns only
    all(mk_ctx(OP_LABEL, 4'd0, 5'd0, 5'd0, 1'b0, 5'd2));
    all(mk_ctx(OP_MOV, 4'd0, 5'd8, 5'd0));
    settle(); chk_cells("if-then-else per column", 9);

    // DMA port of the cell RAMs: write word 5 of every cell, let the cells
    // load it; let the cells store it at word 9, read that back by DMA
    for (int r = 0; r < N; r++)
      for (int c = 0; c < N; c++) begin
        @(negedge clk);
        ram_we = 1; ram_addr = {6'(r * N + c), 9'd5}; ram_wdata = 16'(16'h1000 + 16 * r + c);
      end
    @(negedge clk); ram_we = 0;
    all(mk_ldimm(4'd3, 16'd5));
    all(mk_ctx(OP_SETBASE, 4'd0, 5'd3, 5'd0));
    all(mk_ctx(OP_LD, 4'd4, 5'd0, 5'd0));
    all(mk_ldimm(4'd3, 16'd9));
    all(mk_ctx(OP_SETBASE, 4'd0, 5'd3, 5'd0));
    all(mk_ctx(OP_ST, 4'd4, 5'd0, 5'd0));
    all(mk_ctx(OP_MOV, 4'd0, 5'd4, 5'd0));
    settle();
    for (int r = 0; r < N; r++)
      for (int c = 0; c < N; c++) begin
        checks++;
        if (cell_out[r][c] !== 16'(16'h1000 + 16 * r + c)) begin
          failures++; $display("FAIL cell(%0d,%0d) loaded %h after DMA write", r, c, cell_out[r][c]);
        end
        ram_addr = {6'(r * N + c), 9'd9}; #1;
        checks++;
        if (ram_rdata !== 16'(16'h1000 + 16 * r + c)) begin
          failures++; $display("FAIL DMA read of cell(%0d,%0d) word 9: %h", r, c, ram_rdata);
        end
      end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
