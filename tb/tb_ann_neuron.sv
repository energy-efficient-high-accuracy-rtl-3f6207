// tb_ann_neuron -- checks a 4-input neuron against the reference weighted sum,
// ReLU and saturation, and that each of the three output cases occurs.
module tb_ann_neuron;
  import approx_ref_pkg::*;
  logic signed [15:0] x [4], w [4], bias, y;
  int checks = 0, failures = 0, n_clip = 0, n_sat = 0, n_lin = 0;

  ann_neuron #(.NIN(4)) dut (.x(x), .w(w), .bias(bias), .y(y));

  initial begin
    #1000000 failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (4000) begin
      longint xi[], wi[], e;
      bit c, s;
      int sh;
      xi = new[4]; wi = new[4];
      sh = $urandom_range(0, 15);
      for (int i = 0; i < 4; i++) begin
        x[i] = $signed(16'($urandom)) >>> sh;
        w[i] = $signed(16'($urandom)) >>> $urandom_range(0, 15);
        xi[i] = longint'(x[i]); wi[i] = longint'(w[i]);
      end
      bias = $signed(16'($urandom)) >>> $urandom_range(0, 15);
      #1;
      e = ref_neuron(xi, wi, longint'(bias), c, s);
      if (c) n_clip++; else if (s) n_sat++; else n_lin++;
      checks++;
      if (longint'(y) != e) begin
        failures++;
        if (failures < 10) $display("FAIL y=%0d expected %0d", y, e);
      end
    end
    if (n_clip == 0 || n_sat == 0 || n_lin == 0) begin
      failures++;
      $display("FAIL coverage clip=%0d sat=%0d linear=%0d", n_clip, n_sat, n_lin);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
