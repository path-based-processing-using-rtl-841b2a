// tb_psys_ctrl -- checks the PE controller driving a real PE.
// Programs a matrix with OP_PROG commands, sends bursts of OP_VECTOR
// commands back to back while the result reader is slow (random res_ready),
// and interleaves a reprogramming command with vectors in flight.  Checks
// the results (order and values) and that each admission rule acted:
// the vector spacing, the result credit limit (RES_DEPTH = 4 here) and the
// drain before programming.  Also checks that the spacing between vectors
// is never below N_SLICES cycles and that OP_NOP is consumed.
module tb_psys_ctrl;
  import psys_pkg::*;
  localparam int R = PE_ROWS, C = PE_COLS;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  cmd_t cmd; logic cmd_valid, cmd_ready;
  logic prog_we; logic [3:0] prog_r, prog_c; logic [XB_RA_W-1:0] prog_row;
  logic [XB_COLS-1:0] prog_bits; lit_t prog_lit;
  logic [B_W-1:0] vec [R]; logic vec_vld;
  logic [ACC_W-1:0] pe_res [C]; logic pe_res_vld, pe_busy;
  logic [ACC_W-1:0] res [C]; logic res_valid, res_ready;
  logic stall_drain, stall_credit, stall_rate;

  psys_ctrl #(.RES_DEPTH(4)) dut (.clk, .rst_n, .cmd, .cmd_valid, .cmd_ready,
    .prog_we, .prog_r, .prog_c, .prog_row, .prog_bits, .prog_lit, .vec, .vec_vld,
    .pe_res, .pe_res_vld, .pe_busy, .res, .res_valid, .res_ready,
    .stall_drain, .stall_credit, .stall_rate);
  psys_pe u_pe (.clk, .rst_n, .prog_we, .prog_r, .prog_c, .prog_row, .prog_bits, .prog_lit,
    .vec, .vec_vld, .res(pe_res), .res_vld(pe_res_vld), .busy(pe_busy));

  initial begin
    repeat (300000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  logic [A_W-1:0] A [C][R];
  typedef struct { logic [ACC_W-1:0] y [C]; } yv_t;
  yv_t q[$];
  int n_drain = 0, n_credit = 0, n_rate = 0, last_vec = -100, cyc = 0;

  always @(posedge clk) begin
    cyc++;
    if (rst_n) begin
      if (stall_drain)  n_drain++;
      if (stall_credit) n_credit++;
      if (stall_rate)   n_rate++;
      if (vec_vld) begin
        checks++;
        if (cyc - last_vec < N_SLICES) begin failures++; $display("vectors too close"); end
        last_vec = cyc;
      end
      if (res_valid && res_ready) begin
        yv_t e;
        checks++;
        if (q.size() == 0) begin failures++; $display("unexpected result"); end
        else begin
          e = q.pop_front();
          for (int c = 0; c < C; c++) if (res[c] !== e.y[c]) begin
            failures++; $display("y[%0d] got %0d exp %0d", c, res[c], e.y[c]);
          end
        end
      end
    end
  end

  always @(negedge clk) res_ready <= ($urandom_range(0, 3) == 0);

  task automatic send(cmd_t c);
    @(negedge clk);
    cmd = c; cmd_valid = 1;
    @(posedge clk);
    while (!cmd_ready) @(posedge clk);
    @(negedge clk);
    cmd_valid = 0;
  endtask

  task automatic prog_cell(int r, int c, logic [A_W-1:0] a);
    cmd_t k;
    A[c][r] = a;
    for (int w = 0; w < MULT_XB_ROWS; w++) begin
      k = '0; k.op = OP_PROG; k.cell_r = 4'(r); k.cell_c = 4'(c); k.xrow = XB_RA_W'(w);
      k.lit = mult_xbar_lit(w); k.payload = mult_xbar_row(a, w);
      send(k);
    end
  endtask

  task automatic send_vec();
    cmd_t k; yv_t e;
    k = '0; k.op = OP_VECTOR;
    for (int r = 0; r < R; r++) k.payload[r*B_W +: B_W] = B_W'($urandom);
    for (int c = 0; c < C; c++) begin
      e.y[c] = '0;
      for (int r = 0; r < R; r++) e.y[c] += ACC_W'(A[c][r]) * ACC_W'(k.payload[r*B_W +: B_W]);
    end
    q.push_back(e);
    send(k);
  endtask

  initial begin
    cmd = '0; cmd_valid = 0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int r = 0; r < R; r++) for (int c = 0; c < C; c++) prog_cell(r, c, A_W'($urandom));
    send('0);  // OP_NOP
    for (int n = 0; n < 20; n++) send_vec();
    // reprogram one unit while vectors are still in flight
    prog_cell(3, 5, 8'd77);
    for (int n = 0; n < 10; n++) send_vec();
    wait (q.size() == 0);
    repeat (5) @(negedge clk);
    checks += 3;
    if (n_drain == 0)  begin failures++; $display("no drain stall seen"); end
    if (n_credit == 0) begin failures++; $display("no credit stall seen"); end
    if (n_rate == 0)   begin failures++; $display("no rate stall seen"); end
    $display("stalls: drain=%0d credit=%0d rate=%0d", n_drain, n_credit, n_rate);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
