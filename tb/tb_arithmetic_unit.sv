// tb_arithmetic_unit -- checks 1 + YAt + YBt + YAapx*YBapx over every pair of
// 7-bit fractions, and that the result stays below 4 (2 integer bits).
module tb_arithmetic_unit;
  import approx_ref_pkg::*;
  logic [6:0] ya, yb;
  logic [9:0] p;
  int checks = 0, failures = 0;

  arithmetic_unit dut (.ya_t(ya), .yb_t(yb), .p(p));

  initial begin
    #1000000 failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 128; i++) begin
      for (int j = 0; j < 128; j++) begin
        longint e;
        ya = 7'(i); yb = 7'(j);
        #1;
        e = ref_arith(longint'(i), longint'(j), 7, 3);
        checks++;
        if (longint'(p) != e || e >= 1024) begin
          failures++;
          if (failures < 10) $display("FAIL ya=%0d yb=%0d p=%0d expected %0d", i, j, p, e);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
