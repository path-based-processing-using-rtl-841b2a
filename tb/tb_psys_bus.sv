// tb_psys_bus -- checks the system bus.
// Commands: each host command must appear, unchanged, as a valid only at
// the addressed PE, and cmd_ready must follow that PE's ready; commands to
// a PE number that does not exist are consumed.
// Results: random PE result streams (valid held until accepted) with a
// random host ready; every result must come out once, tagged with its PE,
// in per-PE order; when several PEs wait, the grant rotates (each PE is
// served within NPE transfers); conflicts must have occurred.
module tb_psys_bus;
  import psys_pkg::*;
  localparam int NP = NUM_PE, C = PE_COLS;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  cmd_t cmd, pe_cmd; logic cmd_valid, cmd_ready;
  logic [NP-1:0] pe_cmd_valid, pe_cmd_ready, pe_res_valid, pe_res_ready;
  logic [ACC_W-1:0] pe_res [NP][C];
  logic [ACC_W-1:0] res [C]; logic [7:0] res_pe; logic res_valid, res_ready, res_conflict;

  psys_bus dut (.clk, .rst_n, .cmd, .cmd_valid, .cmd_ready, .pe_cmd, .pe_cmd_valid, .pe_cmd_ready,
                .pe_res, .pe_res_valid, .pe_res_ready, .res, .res_pe, .res_valid, .res_ready,
                .res_conflict);

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  logic [NP-1:0] taken;
  int sent [NP], got [NP], wait_cnt [NP], n_conflict = 0;
  localparam int PER_PE = 60;

  // result producers: payload word 0 = sequence number, word 1 = PE number
  always @(negedge clk) if (rst_n) begin
    for (int p = 0; p < NP; p++) begin
      if (taken[p]) begin
        pe_res_valid[p] <= 1'b0;
        taken[p] = 1'b0;
      end else if (!pe_res_valid[p] && sent[p] < PER_PE && $urandom_range(0, 1) == 1) begin
        pe_res_valid[p] <= 1'b1;
        pe_res[p][0]    <= ACC_W'(sent[p]);
        pe_res[p][1]    <= ACC_W'(p);
        for (int c = 2; c < C; c++) pe_res[p][c] <= ACC_W'($urandom);
        sent[p]++;
      end
    end
    res_ready <= ($urandom_range(0, 2) != 0);
  end

  always @(posedge clk) if (rst_n) begin
    if (res_conflict) n_conflict++;
    for (int p = 0; p < NP; p++) begin
      if (pe_res_valid[p] && !pe_res_ready[p]) wait_cnt[p]++;
      if (pe_res_ready[p]) begin
        taken[p] = 1'b1;
        wait_cnt[p] = 0;
      end
    end
    if (res_valid && res_ready) begin
      checks++;
      if (int'(res_pe) >= NP || res[1] !== ACC_W'(res_pe) || res[0] !== ACC_W'(got[int'(res_pe)])) begin
        failures++; $display("bad result pe=%0d seq=%0d exp seq %0d", res_pe, res[0], got[int'(res_pe)]);
      end else got[int'(res_pe)]++;
    end
  end

  // fairness: count transfers while a PE waits
  int served_while_waiting [NP];
  always @(posedge clk) if (rst_n) for (int p = 0; p < NP; p++) begin
    if (pe_res_valid[p] && !pe_res_ready[p] && res_valid && res_ready) served_while_waiting[p]++;
    if (pe_res_ready[p]) served_while_waiting[p] = 0;
    if (served_while_waiting[p] > NP - 1) begin
      failures++; $display("PE %0d starved", p); served_while_waiting[p] = 0;
    end
  end

  initial begin
    cmd = '0; cmd_valid = 0; pe_cmd_ready = '0; res_ready = 0; pe_res_valid = '0; taken = '0;
    for (int p = 0; p < NP; p++) begin
      sent[p] = 0; got[p] = 0; wait_cnt[p] = 0; served_while_waiting[p] = 0;
      for (int c = 0; c < C; c++) pe_res[p][c] = '0;
    end
    repeat (3) @(posedge clk);
    rst_n = 1;
    // command routing
    for (int n = 0; n < 200; n++) begin
      @(negedge clk);
      cmd = '0;
      cmd.op = op_e'($urandom_range(0, 2));
      cmd.pe = 8'($urandom_range(0, NP));     // NP itself does not exist
      cmd.payload[31:0] = $urandom;
      cmd_valid = ($urandom_range(0, 3) != 0);
      pe_cmd_ready = NP'($urandom);
      #1;
      checks++;
      if (pe_cmd !== cmd) begin failures++; $display("payload altered"); end
      for (int p = 0; p < NP; p++)
        if (pe_cmd_valid[p] !== (cmd_valid && int'(cmd.pe) == p)) begin
          failures++; $display("valid to wrong PE");
        end
      if (int'(cmd.pe) < NP ? (cmd_ready !== pe_cmd_ready[int'(cmd.pe)]) : (cmd_ready !== 1'b1)) begin
        failures++; $display("ready wrong");
      end
    end
    cmd_valid = 0;
    // result arbitration
    wait (got.sum() == NP * PER_PE);
    repeat (5) @(negedge clk);
    checks++;
    if (n_conflict == 0) begin failures++; $display("no conflict seen"); end
    $display("conflict cycles: %0d", n_conflict);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
