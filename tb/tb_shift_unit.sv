// tb_shift_unit -- checks that the 10-bit value with 8 fraction bits is scaled
// by 2^(kA+kB) and its fraction dropped, for every shift amount.
module tb_shift_unit;
  logic [9:0] p;
  logic [3:0] ka, kb;
  logic [31:0] mag;
  int checks = 0, failures = 0;

  shift_unit dut (.p(p), .ka(ka), .kb(kb), .mag(mag));

  initial begin
    #1000000 failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int a = 0; a < 15; a++) begin
      for (int b = 0; b < 15; b++) begin
        repeat (20) begin
          longint e;
          p = 10'($urandom_range(256, 1023));
          ka = 4'(a); kb = 4'(b);
          #1;
          e = (longint'(p) * (longint'(1) << (a + b))) / 256;
          checks++;
          if (longint'(mag) != e) begin
            failures++;
            if (failures < 10) $display("FAIL p=%0d ka=%0d kb=%0d mag=%0d expected %0d", p, a, b, mag, e);
          end
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
