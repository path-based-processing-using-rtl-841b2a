// psys_cell -- one systolic array unit: hybrid NVM/CMOS multiply-accumulate.
//
// The unit holds one known 8-bit matrix operand a, bound into its path-based
// crossbar (path_xbar) as a multiplier design.  For every incoming vector
// operand b it computes  ps_out = ps_in + a * b  (mod 2^ACC_W):
//   * the input register (IR) latches b and the partial sum from the unit
//     above;
//   * for slice j = 0 .. N_SLICES-1 the crossbar evaluates a * b_j with b_j
//     on its selector lines, the shifter aligns it by SLICE_W*j and the
//     adder accumulates it (one slice per clock, a single shifter and adder);
//   * the output register (OR) presents the sum to the unit below while b is
//     passed on to the unit to the right.
//
// Timing: b_vld_in in cycle c gives b_vld_out / ps_vld_out (one-cycle pulses)
// in cycle c + N_SLICES + 1.  A new operand is accepted while the last slice
// is processed, so the unit sustains one operand every N_SLICES cycles.
// Operands arriving faster are a protocol error (asserted).  ps_in is
// sampled together with b_vld_in; the array aligns both streams.
// The per-slice sequencing, handshake and latency are this design's choices;
// the component list (crossbar, IR, OR, shifter, adder) and the flows (vector
// to the right, partial sums downward) follow the architecture description.
module psys_cell
  import psys_pkg::*;
#(
  parameter int unsigned XROWS = XB_ROWS,
  parameter int unsigned XCOLS = XB_COLS,
  parameter int unsigned HOPS  = 8
) (
  input  logic                      clk,
  input  logic                      rst_n,
  // crossbar programming (from the global drivers)
  input  logic                      prog_we,
  input  logic [$clog2(XROWS)-1:0]  prog_row,
  input  logic [XCOLS-1:0]          prog_bits,
  input  lit_t                      prog_lit,
  // vector operand, left to right
  input  logic [B_W-1:0]            b_in,
  input  logic                      b_vld_in,
  output logic [B_W-1:0]            b_out,
  output logic                      b_vld_out,
  // partial sum, top to bottom
  input  logic [ACC_W-1:0]          ps_in,
  output logic [ACC_W-1:0]          ps_out,
  output logic                      ps_vld_out,
  // status
  output logic                      busy
);
  localparam int unsigned CNT_W = $clog2(N_SLICES);

  logic [B_W-1:0]    ir_b;      // IR: operand
  logic [ACC_W-1:0]  acc;       // running sum (IR partial-sum part)
  logic [CNT_W-1:0]  cnt;       // slice being processed
  logic [SLICE_W-1:0] slice;
  logic [PROD_W-1:0] prod;
  logic [ACC_W-1:0]  sum;
  logic              last, start;

  assign slice = ir_b[cnt*SLICE_W +: SLICE_W];
  assign last  = busy && (cnt == CNT_W'(N_SLICES - 1));
  assign start = b_vld_in && (!busy || last);

  path_xbar #(.ROWS(XROWS), .COLS(XCOLS), .NVARS(SLICE_W), .N_OUT(PROD_W), .HOPS(HOPS)) u_xbar (
    .clk, .rst_n,
    .prog_we, .prog_row, .prog_bits, .prog_lit,
    .vars(slice), .out(prod)
  );

  psys_shift_add u_sa (.prod(prod), .slice_idx(cnt), .acc_in(acc), .acc_out(sum));

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      ir_b       <= '0;
      acc        <= '0;
      cnt        <= '0;
      busy       <= 1'b0;
      b_out      <= '0;
      b_vld_out  <= 1'b0;
      ps_out     <= '0;
      ps_vld_out <= 1'b0;
    end else begin
      b_vld_out  <= 1'b0;
      ps_vld_out <= 1'b0;
      if (busy) begin
        if (last) begin
          ps_out     <= sum;          // OR
          ps_vld_out <= 1'b1;
          b_out      <= ir_b;
          b_vld_out  <= 1'b1;
          busy       <= 1'b0;
        end else begin
          acc <= sum;
          cnt <= cnt + 1'b1;
        end
      end
      if (start) begin
        ir_b <= b_in;
        acc  <= ps_in;
        cnt  <= '0;
        busy <= 1'b1;
      end
    end
  end

  // operands may not arrive faster than one per N_SLICES cycles
  property p_no_overrun;
    @(posedge clk) disable iff (!rst_n) b_vld_in |-> (!busy || last);
  endproperty
  a_no_overrun: assert property (p_no_overrun);

  // the crossbar is not reprogrammed while it computes
  a_no_prog_busy: assert property (@(posedge clk) disable iff (!rst_n) prog_we |-> !busy);

endmodule
