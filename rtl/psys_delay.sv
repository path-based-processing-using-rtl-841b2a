// psys_delay -- fixed-length delay line (data plus valid), used to skew the
// vector operands entering a PE and to re-align the results leaving it.
// DEPTH clock cycles of delay; DEPTH = 0 is a plain wire.  Registers reset
// to zero.
module psys_delay #(
  parameter int unsigned W     = 8,
  parameter int unsigned DEPTH = 1
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic [W-1:0] d,
  input  logic         d_vld,
  output logic [W-1:0] q,
  output logic         q_vld
);
  if (DEPTH == 0) begin : g_wire
    assign q     = d;
    assign q_vld = d_vld;
  end else begin : g_reg
    logic [W-1:0] sr   [DEPTH];
    logic         sr_v [DEPTH];
    always_ff @(posedge clk or negedge rst_n) begin
      if (!rst_n) begin
        for (int i = 0; i < DEPTH; i++) begin
          sr[i]   <= '0;
          sr_v[i] <= 1'b0;
        end
      end else begin
        sr[0]   <= d;
        sr_v[0] <= d_vld;
        for (int i = 1; i < DEPTH; i++) begin
          sr[i]   <= sr[i-1];
          sr_v[i] <= sr_v[i-1];
        end
      end
    end
    assign q     = sr[DEPTH-1];
    assign q_vld = sr_v[DEPTH-1];
  end
endmodule
