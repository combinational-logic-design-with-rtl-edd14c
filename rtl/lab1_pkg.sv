// lab1_pkg: types and constants shared by the switch-selected ID display.
//
// The display has four digit positions, numbered 0 (leftmost) to 3
// (rightmost); a position is chosen by the logical value of the two
// pushbuttons. Digits travel between blocks as 4-bit BCD codes and leave
// the design as 7-bit active-low segment patterns ordered {a,b,c,d,e,f,g},
// with a in the most significant bit, the order used by the segment table
// of the lab handout.
package lab1_pkg;

  localparam int unsigned NUM_POS = 4;   // digit positions on the display

  typedef logic [1:0] pos_t;             // digit position / switch value
  typedef logic [3:0] bcd_t;             // one decimal digit
  typedef bcd_t [NUM_POS-1:0] id_t;      // four digits, [3] is leftmost
  typedef logic [6:0] seg7_t;            // {a,b,c,d,e,f,g}, 0 = lit
  typedef logic [NUM_POS-1:0] en_t;      // anode enables, [3] is leftmost

  localparam seg7_t SEG_BLANK = 7'h7f;   // every segment dark

endpackage
