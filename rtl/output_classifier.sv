// output_classifier -- picks the winning output neuron.
//
// Returns the index of the largest of the NOUT output values (the lowest index
// on a tie) as `cls`, and drives its two bits on led_out1 (bit 0) and
// led_out2 (bit 1). Combinational.
// Four output neurons standing for the classification result and the two LED
// outputs follow the design; the arg-max rule and the LED coding are this
// design's choice.
module output_classifier
  import ann_pkg::*;
(
  input  q8_8_t      y [L3_OUT],
  output logic [1:0] cls,
  output logic       led_out1,
  output logic       led_out2
);

  q8_8_t best;

  always_comb begin
    cls  = '0;
    best = y[0];
    for (int i = 1; i < L3_OUT; i++) begin
      if (y[i] > best) begin
        best = y[i];
        cls  = 2'(i);
      end
    end
    led_out1 = cls[0];
    led_out2 = cls[1];
  end

endmodule
