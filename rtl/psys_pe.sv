// psys_pe -- processing element: an orthogonal grid of path-based systolic
// array units computing y = A^T-mapped matrix times vector.
//
// Unit (r,c) holds matrix element a[c][r] (the matrix is bound transposed):
// vector element b[r] enters grid row r from the left and moves one unit to
// the right per step, and partial sums run down each grid column, so column
// c delivers y[c] = sum_r a[c][r] * b[r]  (mod 2^ACC_W) at its bottom.
// Row 0 starts from a zero partial sum.
//
// A unit needs LAT = N_SLICES + 1 cycles per step, so the PE skews the
// incoming vector (row r delayed LAT*r cycles) and de-skews the results
// (column c delayed LAT*(COLS-1-c) cycles); a whole result vector then
// leaves in one cycle, LAT*(ROWS+COLS-1) cycles after its input vector.
// A new vector may enter every N_SLICES cycles.  The skew and de-skew delay
// lines are this design's choice; the flows follow the architecture
// description.
//
// Programming (global drivers): prog_we writes crossbar wordline prog_row of
// unit (prog_r, prog_c).  Only idle units may be programmed.
module psys_pe
  import psys_pkg::*;
#(
  parameter int unsigned ROWS  = PE_ROWS,
  parameter int unsigned COLS  = PE_COLS,
  parameter int unsigned XROWS = XB_ROWS,
  parameter int unsigned XCOLS = XB_COLS,
  parameter int unsigned HOPS  = 8
) (
  input  logic                      clk,
  input  logic                      rst_n,
  // programming
  input  logic                      prog_we,
  input  logic [3:0]                prog_r,
  input  logic [3:0]                prog_c,
  input  logic [$clog2(XROWS)-1:0]  prog_row,
  input  logic [XCOLS-1:0]          prog_bits,
  input  lit_t                      prog_lit,
  // input vector
  input  logic [B_W-1:0]            vec   [ROWS],
  input  logic                      vec_vld,
  // result vector
  output logic [ACC_W-1:0]          res   [COLS],
  output logic                      res_vld,
  // any unit computing
  output logic                      busy
);
  localparam int unsigned LAT = N_SLICES + 1;

  logic [B_W-1:0]   b_h  [ROWS][COLS+1];
  logic             bv_h [ROWS][COLS+1];
  logic [ACC_W-1:0] ps_v [ROWS+1][COLS];
  logic             pv_v [ROWS+1][COLS];
  logic [ROWS*COLS-1:0] busy_v;
  logic [COLS-1:0]  col_vld;

  for (genvar r = 0; r < ROWS; r++) begin : g_skew
    psys_delay #(.W(B_W), .DEPTH(LAT * r)) u_skew (
      .clk, .rst_n, .d(vec[r]), .d_vld(vec_vld), .q(b_h[r][0]), .q_vld(bv_h[r][0])
    );
  end

  for (genvar c = 0; c < COLS; c++) begin : g_top
    assign ps_v[0][c] = '0;
    assign pv_v[0][c] = 1'b0;
  end

  for (genvar r = 0; r < ROWS; r++) begin : g_row
    for (genvar c = 0; c < COLS; c++) begin : g_col
      logic sel_we;
      assign sel_we = prog_we && (prog_r == 4'(r)) && (prog_c == 4'(c));
      psys_cell #(.XROWS(XROWS), .XCOLS(XCOLS), .HOPS(HOPS)) u_cell (
        .clk, .rst_n,
        .prog_we(sel_we), .prog_row, .prog_bits, .prog_lit,
        .b_in(b_h[r][c]), .b_vld_in(bv_h[r][c]),
        .b_out(b_h[r][c+1]), .b_vld_out(bv_h[r][c+1]),
        .ps_in(ps_v[r][c]), .ps_out(ps_v[r+1][c]), .ps_vld_out(pv_v[r+1][c]),
        .busy(busy_v[r*COLS+c])
      );
      // partial sum from above arrives with the operand from the left
      if (r > 0) begin : g_align
        a_align: assert property (@(posedge clk) disable iff (!rst_n)
                                  bv_h[r][c] == pv_v[r][c]);
      end
    end
  end

  for (genvar c = 0; c < COLS; c++) begin : g_deskew
    psys_delay #(.W(ACC_W), .DEPTH(LAT * (COLS - 1 - c))) u_deskew (
      .clk, .rst_n, .d(ps_v[ROWS][c]), .d_vld(pv_v[ROWS][c]), .q(res[c]), .q_vld(col_vld[c])
    );
  end

  assign res_vld = col_vld[0];
  assign busy    = |busy_v;

  a_cols_together: assert property (@(posedge clk) disable iff (!rst_n)
                                    col_vld == {COLS{col_vld[0]}});

endmodule
