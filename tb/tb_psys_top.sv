// tb_psys_top -- end-to-end test of the accelerator at its full size
// (2 PEs of 8 x 8 units, 128 x 256 crossbars, 32-entry result queues).
// The host side is modelled here: it binds a random 8 x 8 block of 8-bit
// matrix slices into each PE (OP_PROG, 60 wordlines per unit), streams input
// vectors to both PEs, reads results through the bus with a reader that is
// sometimes stalled for long stretches, and rebinds one unit while vectors
// are in flight.  Every result is compared with A_p * b (mod 2^16) for the
// PE it is tagged with, in per-PE order.
// Mechanisms counted (each must occur): crossbar wordline writes, bit-slice
// steps in the units, vector-rate stalls, result-credit stalls, drain
// stalls before reprogramming, and result-bus conflicts between PEs.
module tb_psys_top;
  import psys_pkg::*;
  localparam int NP = NUM_PE, R = PE_ROWS, C = PE_COLS;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  cmd_t cmd; logic cmd_valid, cmd_ready;
  logic [ACC_W-1:0] res [C]; logic [7:0] res_pe; logic res_valid, res_ready;

  psys_top dut (.clk, .rst_n, .cmd, .cmd_valid, .cmd_ready, .res, .res_pe, .res_valid, .res_ready);

  initial begin
    repeat (400000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  logic [A_W-1:0] A [NP][C][R];
  typedef struct { logic [ACC_W-1:0] y [C]; } yv_t;
  yv_t q [NP][$];
  int n_prog = 0, n_slice = 0, n_rate = 0, n_credit = 0, n_drain = 0, n_conflict = 0;
  bit reader_hold = 0;

  always @(posedge clk) if (rst_n) begin
    if (dut.u_bus.res_conflict) n_conflict++;
    if (dut.g_pe[0].stall_rate   || dut.g_pe[1].stall_rate)   n_rate++;
    if (dut.g_pe[0].stall_credit || dut.g_pe[1].stall_credit) n_credit++;
    if (dut.g_pe[0].stall_drain  || dut.g_pe[1].stall_drain)  n_drain++;
    if (dut.g_pe[0].prog_we || dut.g_pe[1].prog_we) n_prog++;
    if (dut.g_pe[0].u_pe.g_row[0].g_col[0].u_cell.busy) n_slice++;
    if (res_valid && res_ready) begin
      yv_t e;
      checks++;
      if (int'(res_pe) >= NP || q[int'(res_pe)].size() == 0) begin
        failures++; $display("unexpected result from PE %0d", res_pe);
      end else begin
        e = q[int'(res_pe)].pop_front();
        for (int c = 0; c < C; c++) if (res[c] !== e.y[c]) begin
          failures++; $display("PE%0d y[%0d] got %0d exp %0d", res_pe, c, res[c], e.y[c]);
        end
      end
    end
  end

  always @(negedge clk) res_ready <= !reader_hold && ($urandom_range(0, 1) == 1);

  task automatic send(cmd_t k);
    @(negedge clk);
    cmd = k; cmd_valid = 1;
    @(posedge clk);
    while (!cmd_ready) @(posedge clk);
    @(negedge clk);
    cmd_valid = 0;
  endtask

  task automatic bind_unit(int p, int r, int c, logic [A_W-1:0] a);
    cmd_t k;
    A[p][c][r] = a;
    for (int w = 0; w < MULT_XB_ROWS; w++) begin
      k = '0; k.op = OP_PROG; k.pe = 8'(p); k.cell_r = 4'(r); k.cell_c = 4'(c);
      k.xrow = XB_RA_W'(w); k.lit = mult_xbar_lit(w); k.payload = mult_xbar_row(a, w);
      send(k);
    end
  endtask

  task automatic send_vec(int p);
    cmd_t k; yv_t e;
    k = '0; k.op = OP_VECTOR; k.pe = 8'(p);
    for (int r = 0; r < R; r++) k.payload[r*B_W +: B_W] = B_W'($urandom);
    for (int c = 0; c < C; c++) begin
      e.y[c] = '0;
      for (int r = 0; r < R; r++) e.y[c] += ACC_W'(A[p][c][r]) * ACC_W'(k.payload[r*B_W +: B_W]);
    end
    q[p].push_back(e);
    send(k);
  endtask

  initial begin
    cmd = '0; cmd_valid = 0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int p = 0; p < NP; p++)
      for (int r = 0; r < R; r++) for (int c = 0; c < C; c++) bind_unit(p, r, c, A_W'($urandom));
    // interleaved streams, reader running
    for (int n = 0; n < 40; n++) send_vec(n % NP);
    // reader stalled: queues fill, admission stops, then resumes
    reader_hold = 1;
    fork
      begin
        for (int n = 0; n < 70; n++) send_vec(0);
      end
      begin
        repeat (600) @(negedge clk);
        reader_hold = 0;
      end
    join
    // rebind a unit of PE 1 while its vectors are in flight
    for (int n = 0; n < 6; n++) send_vec(1);
    bind_unit(1, 7, 2, 8'd255);
    for (int n = 0; n < 20; n++) send_vec(n % NP);
    wait (q[0].size() == 0 && q[1].size() == 0);
    repeat (5) @(negedge clk);
    $display("mechanisms: prog_writes=%0d slice_cycles=%0d rate_stalls=%0d credit_stalls=%0d drain_stalls=%0d bus_conflicts=%0d",
             n_prog, n_slice, n_rate, n_credit, n_drain, n_conflict);
    checks += 6;
    if (n_prog == 0)     begin failures++; $display("no crossbar writes"); end
    if (n_slice == 0)    begin failures++; $display("no slice steps"); end
    if (n_rate == 0)     begin failures++; $display("no rate stall"); end
    if (n_credit == 0)   begin failures++; $display("no credit stall"); end
    if (n_drain == 0)    begin failures++; $display("no drain stall"); end
    if (n_conflict == 0) begin failures++; $display("no bus conflict"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
