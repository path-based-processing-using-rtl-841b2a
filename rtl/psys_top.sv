// psys_top -- path-based in-memory systolic MVM accelerator.
//
// NUM_PE processing elements, each a PE_ROWS x PE_COLS grid of hybrid
// NVM/CMOS multiply-accumulate units with its own controller, joined to the
// host side by the system bus.  The host (CPU and DRAM, outside this design)
// programs every unit's crossbar with the multiplier design of its constant
// matrix operand (OP_PROG, one wordline per command), then streams input
// vectors (OP_VECTOR) to the PE holding the matching matrix block and reads
// back one PE_COLS-wide result vector per input vector, tagged with its PE.
// Interface: cmd / cmd_valid / cmd_ready in, res / res_pe / res_valid /
// res_ready out, both valid/ready.  See psys_ctrl for command rules and
// psys_pe for latency (LAT*(ROWS+COLS-1) cycles plus two cycles of
// controller and FIFO).
module psys_top
  import psys_pkg::*;
#(
  parameter int unsigned NPE       = NUM_PE,
  parameter int unsigned ROWS      = PE_ROWS,
  parameter int unsigned COLS      = PE_COLS,
  parameter int unsigned XROWS     = XB_ROWS,
  parameter int unsigned XCOLS     = XB_COLS,
  parameter int unsigned HOPS      = 8,
  parameter int unsigned RES_DEPTH = 32
) (
  input  logic              clk,
  input  logic              rst_n,
  input  cmd_t              cmd,
  input  logic              cmd_valid,
  output logic              cmd_ready,
  output logic [ACC_W-1:0]  res   [COLS],
  output logic [7:0]        res_pe,
  output logic              res_valid,
  input  logic              res_ready
);
  cmd_t             pe_cmd;
  logic [NPE-1:0]   pe_cmd_valid, pe_cmd_ready, pe_res_valid, pe_res_ready;
  logic [ACC_W-1:0] pe_res [NPE][COLS];
  logic             res_conflict;

  psys_bus #(.NPE(NPE), .COLS(COLS)) u_bus (
    .clk, .rst_n,
    .cmd, .cmd_valid, .cmd_ready,
    .pe_cmd, .pe_cmd_valid, .pe_cmd_ready,
    .pe_res, .pe_res_valid, .pe_res_ready,
    .res, .res_pe, .res_valid, .res_ready,
    .res_conflict
  );

  for (genvar p = 0; p < NPE; p++) begin : g_pe
    logic                      prog_we;
    logic [3:0]                prog_r, prog_c;
    logic [$clog2(XROWS)-1:0]  prog_row;
    logic [XCOLS-1:0]          prog_bits;
    lit_t                      prog_lit;
    logic [B_W-1:0]            vec [ROWS];
    logic                      vec_vld;
    logic [ACC_W-1:0]          arr_res [COLS];
    logic                      arr_res_vld, arr_busy;
    logic                      stall_drain, stall_credit, stall_rate;

    psys_ctrl #(.ROWS(ROWS), .COLS(COLS), .XROWS(XROWS), .XCOLS(XCOLS),
                .RES_DEPTH(RES_DEPTH)) u_ctrl (
      .clk, .rst_n,
      .cmd(pe_cmd), .cmd_valid(pe_cmd_valid[p]), .cmd_ready(pe_cmd_ready[p]),
      .prog_we, .prog_r, .prog_c, .prog_row, .prog_bits, .prog_lit,
      .vec, .vec_vld,
      .pe_res(arr_res), .pe_res_vld(arr_res_vld), .pe_busy(arr_busy),
      .res(pe_res[p]), .res_valid(pe_res_valid[p]), .res_ready(pe_res_ready[p]),
      .stall_drain, .stall_credit, .stall_rate
    );

    psys_pe #(.ROWS(ROWS), .COLS(COLS), .XROWS(XROWS), .XCOLS(XCOLS), .HOPS(HOPS)) u_pe (
      .clk, .rst_n,
      .prog_we, .prog_r, .prog_c, .prog_row, .prog_bits, .prog_lit,
      .vec, .vec_vld,
      .res(arr_res), .res_vld(arr_res_vld), .busy(arr_busy)
    );
  end

endmodule
