// path_xbar -- path-based in-memory Boolean evaluator on a 1T1M crossbar.
//
// Each cross-point holds a memristor programmed ON (low resistance) or OFF
// (high resistance) and an access transistor.  All transistors of one
// wordline share a selector line, driven by one literal of the input
// variables (always open, always closed, x, or not x).  A function is
// evaluated with a single read: the input bitline (bitline 0) is driven high
// and output bitline 1+k reads 1 when a conducting path connects it to the
// input bitline.  A wordline whose selector is closed shorts together every
// bitline on which it has an ON memristor, so the model computes the set of
// bitlines connected to bitline 0 through closed wordlines.
//
// The electrical read finds a path of any length.  This digital equivalent
// propagates connectivity for HOPS wordline-hops, which gives the same answer
// for every design whose true paths use at most HOPS wordlines; the
// multiplier designs of psys_pkg use two.  HOPS is this design's choice.
//
// Programming: with prog_we high, wordline prog_row takes the memristor
// states prog_bits and the selector literal prog_lit at the clock edge (one
// wordline per cycle, as a write driver would do it).  Reset erases the array
// (all OFF, all selectors open); a real RRAM array keeps its state.
// Evaluation is combinational from vars to out.
module path_xbar
  import psys_pkg::*;
#(
  parameter int unsigned ROWS  = XB_ROWS,
  parameter int unsigned COLS  = XB_COLS,
  parameter int unsigned NVARS = SLICE_W,
  parameter int unsigned N_OUT = PROD_W,
  parameter int unsigned HOPS  = 8
) (
  input  logic                     clk,
  input  logic                     rst_n,
  // programming port (global write drivers)
  input  logic                     prog_we,
  input  logic [$clog2(ROWS)-1:0]  prog_row,
  input  logic [COLS-1:0]          prog_bits,
  input  lit_t                     prog_lit,
  // evaluation
  input  logic [NVARS-1:0]         vars,
  output logic [N_OUT-1:0]         out
);

  logic [COLS-1:0] cell_on [ROWS];
  lit_t            sel     [ROWS];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int r = 0; r < ROWS; r++) begin
        cell_on[r] <= '0;
        sel[r]     <= '{kind: LIT_OFF, var_idx: '0};
      end
    end else if (prog_we) begin
      cell_on[prog_row] <= prog_bits;
      sel[prog_row]     <= prog_lit;
    end
  end

  // value of input variable i; variables beyond NVARS read as 0
  function automatic logic var_val(input logic [LIT_VAR_W-1:0] i);
    logic v;
    v = 1'b0;
    for (int n = 0; n < NVARS; n++) if (int'(i) == n) v = vars[n];
    return v;
  endfunction

  // selector state of every wordline for the present inputs
  logic [ROWS-1:0] closed;
  always_comb begin
    for (int r = 0; r < ROWS; r++) begin
      unique case (sel[r].kind)
        LIT_OFF: closed[r] = 1'b0;
        LIT_ON:  closed[r] = 1'b1;
        LIT_POS: closed[r] = var_val(sel[r].var_idx);
        LIT_NEG: closed[r] = ~var_val(sel[r].var_idx);
      endcase
    end
  end

  // connectivity from the input bitline
  logic [COLS-1:0] reach;
  always_comb begin
    logic [COLS-1:0] nxt;
    reach    = '0;
    reach[0] = 1'b1;
    for (int h = 0; h < HOPS; h++) begin
      nxt = reach;
      for (int r = 0; r < ROWS; r++) begin
        if (closed[r] && |(cell_on[r] & reach)) nxt = nxt | cell_on[r];
      end
      reach = nxt;
    end
  end

  assign out = reach[N_OUT:1];

endmodule
