// tb_psys_cell -- checks one systolic array unit.
// The crossbar is programmed with the multiplier design of a constant a; a
// stream of operands b with incoming partial sums is applied, back to back
// (one every N_SLICES cycles) and with random gaps.  Checked for each:
// ps_out == ps_in + a*b (mod 2^16), b_out == b, and that the outputs appear
// exactly N_SLICES+1 cycles after the operand.  Repeated for several a,
// reprogramming the same crossbar.
module tb_psys_cell;
  import psys_pkg::*;
  localparam int LAT = N_SLICES + 1;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic                prog_we;
  logic [XB_RA_W-1:0]  prog_row;
  logic [XB_COLS-1:0]  prog_bits;
  lit_t                prog_lit;
  logic [B_W-1:0]      b_in, b_out;
  logic                b_vld_in, b_vld_out, ps_vld_out, busy;
  logic [ACC_W-1:0]    ps_in, ps_out;

  psys_cell dut (.clk, .rst_n, .prog_we, .prog_row, .prog_bits, .prog_lit,
                 .b_in, .b_vld_in, .b_out, .b_vld_out, .ps_in, .ps_out, .ps_vld_out, .busy);

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // expected-output queue
  typedef struct { logic [B_W-1:0] b; logic [ACC_W-1:0] ps; realtime t; } exp_t;
  exp_t q[$];
  logic [A_W-1:0] a;

  always @(posedge clk) if (rst_n) begin
    if (ps_vld_out !== b_vld_out) begin failures++; $display("valid mismatch"); end
    if (ps_vld_out) begin
      exp_t e;
      checks++;
      if (q.size() == 0) begin failures++; $display("unexpected output"); end
      else begin
        e = q.pop_front();
        if (ps_out !== e.ps || b_out !== e.b || int'(($realtime - e.t - 5.0) / 10.0) != LAT) begin
          failures++;
          $display("a=%0d b=%0d ps got %0d exp %0d, lat %0d", a, e.b, ps_out, e.ps, int'(($realtime - e.t - 5.0) / 10.0));
        end
      end
    end
  end

  task automatic program_a(logic [A_W-1:0] av);
    for (int r = 0; r < MULT_XB_ROWS; r++) begin
      @(negedge clk);
      prog_we = 1; prog_row = XB_RA_W'(r); prog_bits = mult_xbar_row(av, r); prog_lit = mult_xbar_lit(r);
    end
    @(negedge clk);
    prog_we = 0;
  endtask

  initial begin
    prog_we = 0; prog_row = 0; prog_bits = 0; prog_lit = '{kind: LIT_OFF, var_idx: '0};
    b_in = 0; b_vld_in = 0; ps_in = 0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int t = 0; t < 6; t++) begin
      a = (t == 0) ? 8'd255 : A_W'($urandom);
      program_a(a);
      for (int n = 0; n < 40; n++) begin
        exp_t e;
        @(negedge clk);
        b_in = (n == 0) ? 8'd255 : B_W'($urandom);
        ps_in = ACC_W'($urandom);
        b_vld_in = 1;
        e.b = b_in; e.ps = ps_in + ACC_W'(a) * ACC_W'(b_in); e.t = $realtime;
        q.push_back(e);
        @(negedge clk);
        b_vld_in = 0;
        repeat (N_SLICES - 2 + ((n % 3 == 2) ? $urandom_range(0, 6) : 0)) @(negedge clk);
      end
      wait (q.size() == 0);
      repeat (LAT + 2) @(negedge clk);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
