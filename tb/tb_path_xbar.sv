// tb_path_xbar -- checks the path-based crossbar evaluator.
//  1. A 3-variable function f = (b1 & ~b2) | b3 built from three gated
//     wordlines, for all 8 input vectors (includes a back-flowing path).
//  2. The multiplier designs of the design library at full crossbar size:
//     for random constants a (and 0, 255) every 2-bit slice s must give a*s.
//  3. Reprogramming one wordline changes the result (non-destructive read,
//     rewritable cells).
module tb_path_xbar;
  import psys_pkg::*;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  // ---- small instance for the Boolean example ----
  logic       s_we;
  logic [2:0] s_row;
  logic [7:0] s_bits;
  lit_t       s_lit;
  logic [2:0] s_vars;
  logic [0:0] s_out;
  path_xbar #(.ROWS(8), .COLS(8), .NVARS(3), .N_OUT(1), .HOPS(4)) u_small (
    .clk, .rst_n, .prog_we(s_we), .prog_row(s_row), .prog_bits(s_bits), .prog_lit(s_lit),
    .vars(s_vars), .out(s_out));

  // ---- full-size instance for multiplication ----
  logic                 m_we;
  logic [XB_RA_W-1:0]   m_row;
  logic [XB_COLS-1:0]   m_bits;
  lit_t                 m_lit;
  logic [SLICE_W-1:0]   m_vars;
  logic [PROD_W-1:0]    m_out;
  path_xbar u_mult (
    .clk, .rst_n, .prog_we(m_we), .prog_row(m_row), .prog_bits(m_bits), .prog_lit(m_lit),
    .vars(m_vars), .out(m_out));

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic small_write(int r, logic [7:0] bits, lit_kind_e k, int v);
    @(negedge clk);
    s_we = 1; s_row = 3'(r); s_bits = bits; s_lit = '{kind: k, var_idx: LIT_VAR_W'(v)};
    @(negedge clk);
    s_we = 0;
  endtask

  task automatic program_mult(logic [A_W-1:0] a);
    for (int r = 0; r < MULT_XB_ROWS; r++) begin
      @(negedge clk);
      m_we = 1; m_row = XB_RA_W'(r); m_bits = mult_xbar_row(a, r); m_lit = mult_xbar_lit(r);
    end
    @(negedge clk);
    m_we = 0;
  endtask

  function automatic bit f_ref(logic [2:0] v);
    return (v[0] & ~v[1]) | v[2];
  endfunction

  initial begin
    logic [A_W-1:0] a;
    s_we = 0; m_we = 0; s_vars = 0; m_vars = 0; s_row = 0; s_bits = 0; m_row = 0; m_bits = 0;
    s_lit = '{kind: LIT_OFF, var_idx: '0}; m_lit = s_lit;
    repeat (3) @(posedge clk);
    rst_n = 1;
    // bitline 0 = input, 1 = output, 2 = internal node
    small_write(0, 8'b0000_0101, LIT_POS, 0);  // in -- node, b1
    small_write(1, 8'b0000_0110, LIT_NEG, 1);  // node -- out, ~b2
    small_write(2, 8'b0000_0011, LIT_POS, 2);  // in -- out, b3
    for (int v = 0; v < 8; v++) begin
      s_vars = 3'(v); #1;
      checks++;
      if (s_out[0] !== f_ref(3'(v))) begin
        failures++; $display("f(%b) got %b", v[2:0], s_out[0]);
      end
    end
    // reprogram: make the b3 branch unconditional -> f = 1 everywhere
    small_write(2, 8'b0000_0011, LIT_ON, 0);
    for (int v = 0; v < 8; v++) begin
      s_vars = 3'(v); #1;
      checks++;
      if (s_out[0] !== 1'b1) begin failures++; $display("f'(%b) got %b", v[2:0], s_out[0]); end
    end

    for (int t = 0; t < 12; t++) begin
      a = (t == 0) ? 8'd0 : (t == 1) ? 8'd255 : A_W'($urandom);
      program_mult(a);
      for (int s = 0; s < 4; s++) begin
        m_vars = 2'(s); #1;
        checks++;
        if (m_out !== PROD_W'(a) * PROD_W'(s)) begin
          failures++; $display("a=%0d s=%0d got %0d", a, s, m_out);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
