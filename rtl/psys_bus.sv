// psys_bus -- system interconnect between the host side (CPU / DRAM) and the
// PEs.
//
// Command direction: the single host command stream is routed to the PE
// named in cmd.pe; the handshake is passed straight through, so the host
// waits while that PE's controller is not ready.  Commands for a PE that
// does not exist are consumed and dropped.
// Result direction: the PEs' result streams share one return channel.  A
// round-robin arbiter grants one PE per transfer; the pointer moves past the
// PE that was served, so no PE waits for more than NPE-1 other transfers.
// The returned word carries the number of the PE it came from.
// The architecture description only names a high-speed bus joining CPU, DRAM
// and PEs; this routing and arbitration scheme is this design's choice.
// Combinational paths: cmd_* to pe_cmd_*, pe_res_* to res_*.
module psys_bus
  import psys_pkg::*;
#(
  parameter int unsigned NPE  = NUM_PE,
  parameter int unsigned COLS = PE_COLS
) (
  input  logic              clk,
  input  logic              rst_n,
  // host command stream
  input  cmd_t              cmd,
  input  logic              cmd_valid,
  output logic              cmd_ready,
  // to the PE controllers
  output cmd_t              pe_cmd,
  output logic [NPE-1:0]    pe_cmd_valid,
  input  logic [NPE-1:0]    pe_cmd_ready,
  // from the PE controllers
  input  logic [ACC_W-1:0]  pe_res       [NPE][COLS],
  input  logic [NPE-1:0]    pe_res_valid,
  output logic [NPE-1:0]    pe_res_ready,
  // host result stream
  output logic [ACC_W-1:0]  res          [COLS],
  output logic [7:0]        res_pe,
  output logic              res_valid,
  input  logic              res_ready,
  // arbitration status
  output logic              res_conflict  // more than one PE requesting
);
  localparam int unsigned IW = (NPE > 1) ? $clog2(NPE) : 1;

  // ---- command routing -------------------------------------------------------
  assign pe_cmd = cmd;
  always_comb begin
    pe_cmd_valid = '0;
    cmd_ready    = 1'b1;
    if (32'(cmd.pe) < NPE) begin
      pe_cmd_valid[cmd.pe[IW-1:0]] = cmd_valid;
      cmd_ready                    = pe_cmd_ready[cmd.pe[IW-1:0]];
    end
  end

  // ---- result arbitration ------------------------------------------------------
  logic [IW-1:0] rr;      // PE with the highest priority
  logic [IW-1:0] grant;
  logic          any;

  always_comb begin
    int unsigned idx;
    any   = 1'b0;
    grant = rr;
    for (int unsigned k = 0; k < NPE; k++) begin
      idx = (32'(rr) + k) % NPE;
      if (!any && pe_res_valid[idx]) begin
        any   = 1'b1;
        grant = IW'(idx);
      end
    end
  end

  assign res_valid    = any;
  assign res_pe       = 8'(grant);
  assign res          = pe_res[grant];
  assign res_conflict = ($countones(pe_res_valid) > 1);

  always_comb begin
    pe_res_ready = '0;
    pe_res_ready[grant] = any && res_ready;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) rr <= '0;
    else if (any && res_ready) rr <= (32'(grant) == NPE - 1) ? '0 : grant + 1'b1;
  end

  a_onehot_ready: assert property (@(posedge clk) disable iff (!rst_n)
                                   $onehot0(pe_res_ready));
  a_res_hold: assert property (@(posedge clk) disable iff (!rst_n)
                               res_valid && !res_ready |=> res_valid);

endmodule
