// psys_ctrl -- PE controller and global drivers.
//
// Takes commands from the system bus (valid/ready) and drives one PE:
//   OP_PROG   writes one crossbar wordline of one array unit through the
//             global write drivers.  It waits until no vector is in flight
//             and every unit is idle (program/compute mode switch).
//   OP_VECTOR injects the 8 x 8-bit vector carried on the 64-wire local bus
//             (payload[BUS_W-1:0], element r in bits 8r+7:8r).  Vectors are
//             spaced at least N_SLICES cycles apart (the units' rate).
// Result vectors from the PE are queued in a FIFO of RES_DEPTH entries and
// handed out with valid/ready.  Because the systolic grid cannot stall, a
// vector is only admitted while (vectors in flight + queued results) is
// below RES_DEPTH, so a slow reader back-pressures the command stream
// instead of losing results.
// The command format, the admission rules and the FIFO are this design's
// choices; the existence of a controller with global drivers that programs
// the arrays follows the architecture description.
// Commands are taken in the cycle cmd_valid && cmd_ready; the PE sees the
// resulting write or vector one cycle later.
module psys_ctrl
  import psys_pkg::*;
#(
  parameter int unsigned ROWS      = PE_ROWS,
  parameter int unsigned COLS      = PE_COLS,
  parameter int unsigned XROWS     = XB_ROWS,
  parameter int unsigned XCOLS     = XB_COLS,
  parameter int unsigned RES_DEPTH = 32
) (
  input  logic                      clk,
  input  logic                      rst_n,
  // command stream
  input  cmd_t                      cmd,
  input  logic                      cmd_valid,
  output logic                      cmd_ready,
  // to the PE
  output logic                      prog_we,
  output logic [3:0]                prog_r,
  output logic [3:0]                prog_c,
  output logic [$clog2(XROWS)-1:0]  prog_row,
  output logic [XCOLS-1:0]          prog_bits,
  output lit_t                      prog_lit,
  output logic [B_W-1:0]            vec     [ROWS],
  output logic                      vec_vld,
  input  logic [ACC_W-1:0]          pe_res  [COLS],
  input  logic                      pe_res_vld,
  input  logic                      pe_busy,
  // result stream
  output logic [ACC_W-1:0]          res     [COLS],
  output logic                      res_valid,
  input  logic                      res_ready,
  // status, for observation
  output logic                      stall_drain,   // OP_PROG waiting for drain
  output logic                      stall_credit,  // OP_VECTOR waiting for room
  output logic                      stall_rate     // OP_VECTOR waiting for spacing
);
  localparam int unsigned CW  = $clog2(RES_DEPTH + 1);
  localparam int unsigned AW  = (RES_DEPTH > 1) ? $clog2(RES_DEPTH) : 1;
  localparam int unsigned GW  = $clog2(N_SLICES + 1);

  // one input vector must fit the local bus
  if (ROWS * B_W > BUS_W) begin : g_bus_check
    $error("psys_ctrl: ROWS * B_W exceeds the local bus width");
  end

  logic [CW-1:0] in_flight, fifo_cnt;
  logic [GW-1:0] gap;
  logic          is_prog, is_vec, take, issue_vec, pop, push;

  assign is_prog = cmd_valid && (cmd.op == OP_PROG);
  assign is_vec  = cmd_valid && (cmd.op == OP_VECTOR);

  assign stall_drain  = is_prog && ((in_flight != '0) || pe_busy || vec_vld);
  assign stall_credit = is_vec  && ((32'(in_flight) + 32'(fifo_cnt)) >= RES_DEPTH);
  assign stall_rate   = is_vec  && (gap != '0);

  always_comb begin
    unique case (cmd.op)
      OP_PROG:   cmd_ready = !stall_drain;
      OP_VECTOR: cmd_ready = !stall_credit && !stall_rate;
      default:   cmd_ready = 1'b1;   // OP_NOP and unused codes are dropped
    endcase
  end

  assign take      = cmd_valid && cmd_ready;
  assign issue_vec = take && (cmd.op == OP_VECTOR);

  // ---- drivers -------------------------------------------------------------
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      prog_we   <= 1'b0;
      prog_r    <= '0;
      prog_c    <= '0;
      prog_row  <= '0;
      prog_bits <= '0;
      prog_lit  <= '{kind: LIT_OFF, var_idx: '0};
      vec_vld   <= 1'b0;
      for (int r = 0; r < ROWS; r++) vec[r] <= '0;
      gap       <= '0;
    end else begin
      prog_we <= take && (cmd.op == OP_PROG);
      vec_vld <= issue_vec;
      if (take && cmd.op == OP_PROG) begin
        prog_r    <= cmd.cell_r;
        prog_c    <= cmd.cell_c;
        prog_row  <= cmd.xrow[$clog2(XROWS)-1:0];
        prog_bits <= cmd.payload[XCOLS-1:0];
        prog_lit  <= cmd.lit;
      end
      if (issue_vec) begin
        for (int r = 0; r < ROWS; r++) vec[r] <= cmd.payload[r*B_W +: B_W];
        gap <= GW'(N_SLICES - 1);
      end else if (gap != '0) begin
        gap <= gap - 1'b1;
      end
    end
  end

  // ---- result FIFO and credits ----------------------------------------------
  logic [ACC_W*COLS-1:0] mem [RES_DEPTH];
  logic [AW-1:0]         wp, rp;
  logic [ACC_W*COLS-1:0] pe_res_flat;

  for (genvar c = 0; c < COLS; c++) begin : g_flat
    assign pe_res_flat[c*ACC_W +: ACC_W] = pe_res[c];
    assign res[c] = mem[rp][c*ACC_W +: ACC_W];
  end

  assign push      = pe_res_vld;
  assign res_valid = (fifo_cnt != '0);
  assign pop       = res_valid && res_ready;

  always_ff @(posedge clk) begin
    if (push) mem[wp] <= pe_res_flat;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      wp        <= '0;
      rp        <= '0;
      fifo_cnt  <= '0;
      in_flight <= '0;
    end else begin
      if (push) wp <= (32'(wp) == RES_DEPTH - 1) ? '0 : wp + 1'b1;
      if (pop)  rp <= (32'(rp) == RES_DEPTH - 1) ? '0 : rp + 1'b1;
      fifo_cnt  <= fifo_cnt + CW'(push) - CW'(pop);
      in_flight <= in_flight + CW'(issue_vec) - CW'(push);
    end
  end

  a_no_overflow: assert property (@(posedge clk) disable iff (!rst_n)
                                  push |-> (32'(fifo_cnt) < RES_DEPTH) || pop);
  a_result_expected: assert property (@(posedge clk) disable iff (!rst_n)
                                      push |-> in_flight != '0);
  a_cmd_stable: assert property (@(posedge clk) disable iff (!rst_n)
                                 cmd_valid && !cmd_ready |=> cmd_valid && $stable(cmd));

endmodule
