// tb_psys_spmv -- sparse matrix-vector product through the whole accelerator
// (default sizes), following the host flow the accelerator is built for:
//   1. a random sparse N x N matrix of 16-bit values is cut into two 8-bit
//      bit-slice matrices (bits 7:0 and 15:8);
//   2. each slice matrix is cut into blocks of PE_COLS rows; inside a block
//      the columns holding a non-zero are packed to the left, PE_ROWS at a
//      time, giving dense PE_COLS x PE_ROWS tiles plus the list of vector
//      indices each tile needs;
//   3. each tile is bound (transposed) into one PE, alternating PEs, the
//      gathered vector is sent, and the host adds the tile's result into
//      y[row] shifted by 8 * slice.
// The final y must equal A*x exactly.  Vector elements are kept below 16 so
// that the 16-bit partial sums of a tile cannot wrap.  Also reports the tile
// density reached by the packing.
module tb_psys_spmv;
  import psys_pkg::*;
  localparam int R = PE_ROWS, C = PE_COLS, NP = NUM_PE;
  localparam int N = 24;
  localparam int DENS_PCT = 12;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  cmd_t cmd; logic cmd_valid, cmd_ready;
  logic [ACC_W-1:0] res [C]; logic [7:0] res_pe; logic res_valid, res_ready;

  psys_top dut (.clk, .rst_n, .cmd, .cmd_valid, .cmd_ready, .res, .res_pe, .res_valid, .res_ready);

  initial begin
    repeat (2000000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  logic [15:0] A [N][N];
  logic [7:0]  x [N];
  longint unsigned y [N], y_ref [N];
  int nnz = 0, tiles = 0, tile_nz = 0;

  task automatic send(cmd_t k);
    @(negedge clk);
    cmd = k; cmd_valid = 1;
    @(posedge clk);
    while (!cmd_ready) @(posedge clk);
    @(negedge clk);
    cmd_valid = 0;
  endtask

  // bind tile T (T[c][r]: output row c, gathered input r) into PE p
  task automatic bind_tile(int p, logic [7:0] T [C][R]);
    cmd_t k;
    for (int r = 0; r < R; r++)
      for (int c = 0; c < C; c++)
        for (int w = 0; w < MULT_XB_ROWS; w++) begin
          k = '0; k.op = OP_PROG; k.pe = 8'(p); k.cell_r = 4'(r); k.cell_c = 4'(c);
          k.xrow = XB_RA_W'(w); k.lit = mult_xbar_lit(w); k.payload = mult_xbar_row(T[c][r], w);
          send(k);
        end
  endtask

  initial begin
    int p;
    cmd = '0; cmd_valid = 0; res_ready = 1;
    for (int i = 0; i < N; i++) x[i] = 8'($urandom_range(0, 15));
    for (int i = 0; i < N; i++) begin
      y[i] = 0; y_ref[i] = 0;
      for (int j = 0; j < N; j++) begin
        A[i][j] = ($urandom_range(0, 99) < DENS_PCT) ? 16'($urandom_range(1, 65535)) : 16'd0;
        if (A[i][j] != 0) nnz++;
        y_ref[i] += longint'(A[i][j]) * longint'(x[j]);
      end
    end
    repeat (3) @(posedge clk);
    rst_n = 1;
    p = 0;
    for (int s = 0; s < 2; s++) begin                 // bit slices
      for (int rb = 0; rb < N; rb += C) begin         // row blocks
        int cols[$];
        cols.delete();
        for (int j = 0; j < N; j++) begin
          bit nz;
          nz = 0;
          for (int i = rb; i < rb + C && i < N; i++) if (A[i][j][8*s +: 8] != 0) nz = 1;
          if (nz) cols.push_back(j);
        end
        for (int t0 = 0; t0 < cols.size(); t0 += R) begin   // packed tiles
          logic [7:0] T [C][R];
          cmd_t k;
          k = '0; k.op = OP_VECTOR; k.pe = 8'(p);
          for (int r = 0; r < R; r++) begin
            bit used;
            used = (t0 + r < cols.size());
            for (int c = 0; c < C; c++) begin
              T[c][r] = (used && rb + c < N) ? A[rb + c][cols[t0 + r]][8*s +: 8] : 8'd0;
              if (T[c][r] != 0) tile_nz++;
            end
            k.payload[r*B_W +: B_W] = used ? x[cols[t0 + r]] : 8'd0;
          end
          bind_tile(p, T);
          send(k);
          @(posedge clk);
          while (!(res_valid && res_ready)) @(posedge clk);
          checks++;
          if (int'(res_pe) != p) begin failures++; $display("result from PE %0d, expected %0d", res_pe, p); end
          for (int c = 0; c < C; c++) if (rb + c < N) y[rb + c] += longint'(res[c]) << (8 * s);
          tiles++;
          p = (p + 1) % NP;
        end
      end
    end
    for (int i = 0; i < N; i++) begin
      checks++;
      if (y[i] != y_ref[i]) begin failures++; $display("y[%0d] = %0d, expected %0d", i, y[i], y_ref[i]); end
    end
    $display("matrix %0dx%0d nnz=%0d (%0d%%), %0d tiles, tile density %0d%%",
             N, N, nnz, 100 * nnz / (N * N), tiles, 100 * tile_nz / (tiles * R * C));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
