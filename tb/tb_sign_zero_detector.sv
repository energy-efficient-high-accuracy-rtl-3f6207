// tb_sign_zero_detector -- checks zero forcing and one's-complement negation.
module tb_sign_zero_detector;
  logic [31:0] mag, prod;
  logic zero, sign;
  int checks = 0, failures = 0;

  sign_zero_detector dut (.mag(mag), .zero(zero), .sign(sign), .prod(prod));

  initial begin
    #100000 failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (1000) begin
      longint e;
      mag = $urandom >> 2; zero = ($urandom % 4) == 0; sign = 1'($urandom);
      #1;
      e = zero ? 0 : (sign ? -longint'(mag) - 1 : longint'(mag));
      checks++;
      if (longint'($signed(prod)) != e) begin
        failures++;
        $display("FAIL mag=%0d zero=%b sign=%b prod=%0d expected %0d", mag, zero, sign, $signed(prod), e);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
