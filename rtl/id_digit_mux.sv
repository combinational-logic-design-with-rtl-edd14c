// id_digit_mux: picks the ID digit that belongs to the selected position.
//
// ID_DIGITS holds the last four digits of a student ID as packed BCD, the
// leftmost digit in the top nibble, so the default 16'h3456 is the handout's
// example ID A00123456. Switch value 0 selects the leftmost digit (top
// nibble), 3 the rightmost (bottom nibble), matching the handout's truth
// table. A 4-way multiplexer on constant data: synthesis folds it into a
// few gates per segment once the decoder follows it.
//
// Interface: sel (switch value, logical), digit (BCD). Combinational.
module id_digit_mux
  import lab1_pkg::*;
#(
  parameter id_t ID_DIGITS = 16'h3456
) (
  input  pos_t sel,
  output bcd_t digit
);

  always_comb digit = ID_DIGITS[NUM_POS-1-int'(sel)];

endmodule
