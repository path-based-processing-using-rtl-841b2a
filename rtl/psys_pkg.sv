// psys_pkg -- shared constants, types and the crossbar-design generator of the
// path-based in-memory systolic MVM accelerator.
//
// Sizes that follow the architecture description: 8-bit known operand (one
// bit-slice of a matrix element), 8-bit unknown operand cut into 2-bit slices,
// a 16-bit adder/partial sum, 128 x 256 crossbars and a 64-wire local bus
// (which carries one 8-element vector of 8-bit operands).  The PE grid size,
// the number of PEs, the literal encoding and the command format are this
// design's own choices.
//
// mult_xbar_row() is the crossbar "design library": for a known constant a it
// returns, wordline by wordline, a crossbar program whose output bitlines
// carry a * s for the 2-bit unknown slice s placed on the selector lines.
// The mapping is a plain sum-of-minterms network (see path_xbar for the node
// / edge convention):
//   bitline 0              : input bitline (driven high)
//   bitline 1+k            : output bitline of product bit k (k < PROD_W)
//   bitline 1+PROD_W+2k+v  : intermediate node of output k for s[1] == v
//   wordline 2k+v          : joins bitline 0 and node (k,v), gated by s[1]==v
//   wordline 2*PROD_W+4k+m : joins node (k,m[1]) and output k, gated by
//                            s[0]==m[0]; programmed only when bit k of a*m is 1
// Each output has its own intermediate nodes, so no sneak path can reach a
// different output.  The path is at most two edges long.
package psys_pkg;

  // ---- operand and datapath widths ---------------------------------------
  localparam int unsigned A_W      = 8;              // known operand slice (n)
  localparam int unsigned B_W      = 8;              // unknown operand (p)
  localparam int unsigned SLICE_W  = 2;              // unknown slice width (m)
  localparam int unsigned N_SLICES = B_W / SLICE_W;  // slices per operand
  localparam int unsigned PROD_W   = A_W + SLICE_W;  // crossbar product width
  localparam int unsigned ACC_W    = 16;             // adder resolution

  // ---- crossbar ------------------------------------------------------------
  localparam int unsigned XB_ROWS  = 128;            // wordlines
  localparam int unsigned XB_COLS  = 256;            // bitlines
  localparam int unsigned XB_RA_W  = $clog2(XB_ROWS);

  // ---- processing element / system -----------------------------------------
  localparam int unsigned PE_ROWS  = 8;              // vector elements per PE
  localparam int unsigned PE_COLS  = 8;              // outputs per PE
  localparam int unsigned NUM_PE   = 2;
  localparam int unsigned BUS_W    = 64;             // local bus wires

  // ---- selector-line literal -----------------------------------------------
  // A wordline's transistors are gated by one literal of the input variables.
  typedef enum logic [1:0] {
    LIT_OFF = 2'd0,   // transistors always open (unused wordline)
    LIT_ON  = 2'd1,   // transistors always closed
    LIT_POS = 2'd2,   // closed when variable == 1
    LIT_NEG = 2'd3    // closed when variable == 0
  } lit_kind_e;

  localparam int unsigned LIT_VAR_W = 4;  // up to 16 input variables

  typedef struct packed {
    lit_kind_e              kind;
    logic [LIT_VAR_W-1:0]   var_idx;
  } lit_t;

  // ---- command / result formats --------------------------------------------
  typedef enum logic [1:0] {
    OP_NOP    = 2'd0,
    OP_PROG   = 2'd1,   // program one wordline of one cell's crossbar
    OP_VECTOR = 2'd2    // stream one input vector (payload[BUS_W-1:0])
  } op_e;

  typedef struct packed {
    op_e                    op;
    logic [7:0]             pe;       // target PE
    logic [3:0]             cell_r;   // cell row in the PE grid
    logic [3:0]             cell_c;   // cell column in the PE grid
    logic [XB_RA_W-1:0]     xrow;     // crossbar wordline
    lit_t                   lit;      // selector literal of that wordline
    logic [XB_COLS-1:0]     payload;  // memristor states, or the vector
  } cmd_t;

  // ---- crossbar design generator -------------------------------------------
  // Memristor states (1 = low resistance, ON) of wordline `row` for constant a.
  function automatic logic [XB_COLS-1:0] mult_xbar_row(input logic [A_W-1:0] a,
                                                       input int unsigned row);
    logic [XB_COLS-1:0] bits;
    int unsigned k, v, m;
    logic [PROD_W-1:0] p;
    bits = '0;
    if (row < 2 * PROD_W) begin
      k = row / 2;
      v = row % 2;
      bits[0] = 1'b1;
      bits[1 + PROD_W + 2*k + v] = 1'b1;
    end else if (row < 6 * PROD_W) begin
      k = (row - 2 * PROD_W) / 4;
      m = (row - 2 * PROD_W) % 4;
      p = PROD_W'(a) * PROD_W'(m);
      if (p[k]) begin
        bits[1 + PROD_W + 2*k + (m / 2)] = 1'b1;
        bits[1 + k] = 1'b1;
      end
    end
    return bits;
  endfunction

  // Selector literal of wordline `row` (independent of a).
  function automatic lit_t mult_xbar_lit(input int unsigned row);
    lit_t l;
    l.kind    = LIT_OFF;
    l.var_idx = '0;
    if (row < 2 * PROD_W) begin
      l.kind    = (row % 2 == 1) ? LIT_POS : LIT_NEG;
      l.var_idx = LIT_VAR_W'(1);
    end else if (row < 6 * PROD_W) begin
      l.kind    = (((row - 2 * PROD_W) % 4) % 2 == 1) ? LIT_POS : LIT_NEG;
      l.var_idx = LIT_VAR_W'(0);
    end
    return l;
  endfunction

  // Number of wordlines the multiplier design occupies.
  localparam int unsigned MULT_XB_ROWS = 6 * PROD_W;
  localparam int unsigned MULT_XB_COLS = 1 + 3 * PROD_W;

endpackage
