// tb_psys_shift_add -- checks the slice shifter and adder against
// acc + (prod << 2*idx) mod 2^16 for exhaustive slice indices and random
// products and sums, including sums that wrap.
module tb_psys_shift_add;
  import psys_pkg::*;
  logic [PROD_W-1:0] prod;
  logic [1:0]        idx;
  logic [ACC_W-1:0]  acc_in, acc_out;
  int checks = 0, failures = 0;

  psys_shift_add dut (.prod, .slice_idx(idx), .acc_in, .acc_out);

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    longint unsigned exp;
    for (int n = 0; n < 2000; n++) begin
      prod   = PROD_W'($urandom);
      idx    = 2'(n % 4);
      acc_in = (n < 8) ? 16'hFFFF : ACC_W'($urandom);
      #1;
      exp = (longint'(acc_in) + (longint'(prod) << (2 * idx))) % 65536;
      checks++;
      if (acc_out !== ACC_W'(exp)) begin
        failures++;
        if (failures < 5) $display("mismatch prod=%0d idx=%0d acc=%0d got=%0d exp=%0d",
                                   prod, idx, acc_in, acc_out, exp);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
