// psys_shift_add -- slice shifter (Sh) and CMOS adder of one systolic array
// unit.
//
// The crossbar delivers the partial product of the known operand with one
// SLICE_W-bit slice of the unknown operand.  The shifter moves it to the
// weight of that slice (left by SLICE_W * slice_idx bits) and the adder adds
// it to the running partial sum.  This is one term of
//   a * b = sum_j a * b_j * 2^(SLICE_W * j).
// The adder is ACC_W bits wide and wraps modulo 2^ACC_W (the width follows
// the architecture description; the wrap-around is this design's choice).
// Purely combinational.
module psys_shift_add
  import psys_pkg::*;
#(
  parameter int unsigned P_W     = PROD_W,
  parameter int unsigned S_W     = SLICE_W,
  parameter int unsigned NSL     = N_SLICES,
  parameter int unsigned W       = ACC_W
) (
  input  logic [P_W-1:0]           prod,       // crossbar partial product
  input  logic [$clog2(NSL)-1:0]   slice_idx,  // which slice of the operand
  input  logic [W-1:0]             acc_in,     // running partial sum
  output logic [W-1:0]             acc_out
);
  logic [W-1:0] shifted;
  always_comb begin
    shifted = W'(prod) << (S_W * slice_idx);
    acc_out = acc_in + shifted;
  end
endmodule
