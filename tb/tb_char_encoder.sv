// tb_char_encoder -- checks the 4 Q8.8 inputs for every 9-bit code: letters
// give their index fields and a presence flag, other codes give zeros.
module tb_char_encoder;
  import ann_pkg::*;
  import approx_ref_pkg::*;
  logic [8:0] data_in;
  q8_8_t x [L1_IN];
  int checks = 0, failures = 0;

  char_encoder dut (.data_in(data_in), .x(x));

  initial begin
    #100000 failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int c = 0; c < 512; c++) begin
      longint e [4];
      data_in = 9'(c);
      #1;
      ref_encode(c, e);
      for (int j = 0; j < 4; j++) begin
        checks++;
        if (longint'(x[j]) != e[j]) begin
          failures++;
          $display("FAIL code %0d input %0d = %0d", c, j, x[j]);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
