// tb_approx_abs_unit -- checks the approximate magnitudes, the sign and the zero
// flag against the reference model for corner values and random operands.
module tb_approx_abs_unit;
  import approx_ref_pkg::*;
  logic [15:0] a, b;
  logic [14:0] abs_a, abs_b;
  logic zero, sign;
  int checks = 0, failures = 0;

  approx_abs_unit dut (.a(a), .b(b), .abs_a(abs_a), .abs_b(abs_b), .zero(zero), .sign(sign));

  task automatic check();
    longint ma, mb;
    #1;
    ma = ref_abs(longint'($signed(a)), 16);
    mb = ref_abs(longint'($signed(b)), 16);
    checks++;
    if (abs_a !== 15'(ma) || abs_b !== 15'(mb) || sign !== (a[15] ^ b[15]) ||
        zero !== (ma == 0 || mb == 0)) begin
      failures++;
      $display("FAIL a=%h b=%h abs=%h/%h zero=%b sign=%b", a, b, abs_a, abs_b, zero, sign);
    end
  endtask

  initial begin
    #100000 failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [15:0] corners [8] = '{16'h0000, 16'h0001, 16'hFFFF, 16'h7FFF, 16'h8000, 16'hFFFE, 16'h0100, 16'hFF00};
    foreach (corners[i]) foreach (corners[j]) begin a = corners[i]; b = corners[j]; check(); end
    repeat (2000) begin a = 16'($urandom); b = 16'($urandom); check(); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
