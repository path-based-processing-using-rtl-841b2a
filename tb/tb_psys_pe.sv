// tb_psys_pe -- checks a full processing element (8 x 8 units, 128 x 256
// crossbars).  Every unit (r,c) is programmed with the multiplier design of
// matrix element A[c][r]; then input vectors are streamed at the maximum
// rate (one per N_SLICES cycles) and with gaps.  Each result vector must equal
// A*b (mod 2^16), arrive in one cycle and leave exactly
// (N_SLICES+1)*(ROWS+COLS-1) cycles after its input vector.  A second
// matrix is then programmed over the first and checked the same way.
module tb_psys_pe;
  import psys_pkg::*;
  localparam int R = PE_ROWS, C = PE_COLS;
  localparam int PE_LAT = (N_SLICES + 1) * (R + C - 1);
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic                prog_we;
  logic [3:0]          prog_r, prog_c;
  logic [XB_RA_W-1:0]  prog_row;
  logic [XB_COLS-1:0]  prog_bits;
  lit_t                prog_lit;
  logic [B_W-1:0]      vec [R];
  logic                vec_vld, res_vld, busy;
  logic [ACC_W-1:0]    res [C];

  psys_pe dut (.clk, .rst_n, .prog_we, .prog_r, .prog_c, .prog_row, .prog_bits, .prog_lit,
               .vec, .vec_vld, .res, .res_vld, .busy);

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  logic [A_W-1:0] A [C][R];
  typedef struct { logic [ACC_W-1:0] y [C]; realtime t; } exp_t;
  exp_t q[$];

  always @(posedge clk) if (rst_n && res_vld) begin
    exp_t e;
    checks++;
    if (q.size() == 0) begin failures++; $display("unexpected result"); end
    else begin
      e = q.pop_front();
      if (int'(($realtime - e.t - 5.0) / 10.0) != PE_LAT) begin
        failures++; $display("latency %0d", int'(($realtime - e.t - 5.0) / 10.0));
      end
      for (int c = 0; c < C; c++) if (res[c] !== e.y[c]) begin
        failures++; $display("y[%0d] got %0d exp %0d", c, res[c], e.y[c]);
      end
    end
  end

  task automatic program_matrix();
    for (int r = 0; r < R; r++)
      for (int c = 0; c < C; c++) begin
        A[c][r] = A_W'($urandom);
        for (int w = 0; w < MULT_XB_ROWS; w++) begin
          @(negedge clk);
          prog_we = 1; prog_r = 4'(r); prog_c = 4'(c); prog_row = XB_RA_W'(w);
          prog_bits = mult_xbar_row(A[c][r], w); prog_lit = mult_xbar_lit(w);
        end
      end
    @(negedge clk);
    prog_we = 0;
  endtask

  task automatic send_vectors(int n);
    for (int k = 0; k < n; k++) begin
      exp_t e;
      @(negedge clk);
      for (int r = 0; r < R; r++) vec[r] = B_W'($urandom);
      vec_vld = 1;
      for (int c = 0; c < C; c++) begin
        e.y[c] = '0;
        for (int r = 0; r < R; r++) e.y[c] += ACC_W'(A[c][r]) * ACC_W'(vec[r]);
      end
      e.t = $realtime;
      q.push_back(e);
      @(negedge clk);
      vec_vld = 0;
      repeat (N_SLICES - 2 + ((k % 4 == 3) ? $urandom_range(0, 9) : 0)) @(negedge clk);
    end
    wait (q.size() == 0);
    repeat (4) @(negedge clk);
  endtask

  initial begin
    prog_we = 0; prog_r = 0; prog_c = 0; prog_row = 0; prog_bits = 0;
    prog_lit = '{kind: LIT_OFF, var_idx: '0};
    vec_vld = 0; for (int r = 0; r < R; r++) vec[r] = '0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    program_matrix();
    send_vectors(24);
    program_matrix();
    send_vectors(16);
    if (busy) begin failures++; $display("busy after drain"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
