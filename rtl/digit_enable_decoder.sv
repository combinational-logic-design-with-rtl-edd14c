// digit_enable_decoder: chooses which digit of the display is lit.
//
// A 2-to-4 one-hot decoder. The logical switch value (1 = pressed) picks a
// digit position counted from the left: 0 lights en[3] (leftmost), 1 lights
// en[2], 2 lights en[1] and 3 lights en[0] (rightmost). The enables drive
// the common anodes of the display and are active high. This mapping is
// the truth table of the lab handout.
//
// Interface: sel (switch value, logical), en (one-hot anode enables).
// Timing: purely combinational, no clock.
module digit_enable_decoder
  import lab1_pkg::*;
(
  input  pos_t sel,
  output en_t  en
);

  always_comb begin
    en = '0;
    en[NUM_POS-1-int'(sel)] = 1'b1;
  end

endmodule
