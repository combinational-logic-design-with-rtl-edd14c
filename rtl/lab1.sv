// lab1: switch-selected display of the last four digits of an ID.
//
// Two pushbuttons x[1:0] read as a 2-bit number choose one of the four
// positions of a multiplexed common-anode 7-segment display; the chosen
// position lights and shows the ID digit that belongs there (value 0: the
// leftmost digit in the leftmost position, value 3: the rightmost digit in
// the rightmost position). Only one digit is lit at a time, so no scanning
// is needed and the whole design is combinational.
//
// Signal levels follow the board wiring: the buttons pull x[i] low when
// pressed (the input pads need their weak pull-ups enabled), so the logical
// switch value is ~x; the anode enables en[3:0] are active high with en[3]
// leftmost; the segment cathodes a..g and dp are active low. dp (tied to
// the colon on this display) is held high, i.e. dark. All of this follows
// the lab handout; the BCD blanking of codes 10-15 in the segment decoder is
// this design's choice.
//
// Interface: 2 inputs and 12 outputs, 14 pins in all. No clock, no reset.
module lab1
  import lab1_pkg::*;
#(
  parameter id_t ID_DIGITS = 16'h3456
) (
  input  logic [1:0] x,
  output logic [3:0] en,
  output logic       a,
  output logic       b,
  output logic       c,
  output logic       d,
  output logic       e,
  output logic       f,
  output logic       g,
  output logic       dp
);

  pos_t  sel;      // logical switch value, 1 = pressed
  bcd_t  digit;    // ID digit for the selected position
  seg7_t seg;      // {a,b,c,d,e,f,g}, active low

  assign sel = ~x;

  digit_enable_decoder u_en (
    .sel (sel),
    .en  (en)
  );

  id_digit_mux #(
    .ID_DIGITS (ID_DIGITS)
  ) u_mux (
    .sel   (sel),
    .digit (digit)
  );

  seg7_decoder u_seg (
    .digit (digit),
    .seg   (seg)
  );

  assign {a, b, c, d, e, f, g} = seg;
  assign dp = 1'b1;

endmodule
