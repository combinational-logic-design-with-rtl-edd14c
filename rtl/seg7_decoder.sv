// seg7_decoder: BCD digit to active-low 7-segment pattern.
//
// Output order is {a,b,c,d,e,f,g} with a in bit 6; a 0 lights the segment,
// as needed for the cathodes of a common-anode display. Digits 0-9 use the
// handout's segment codes (6 and 9 are drawn with their tails, 7 without the
// f segment). The codes 10-15 are not decimal digits; this design blanks
// the digit for them.
//
// Interface: digit (BCD), seg (active-low segments). Combinational.
module seg7_decoder
  import lab1_pkg::*;
(
  input  bcd_t  digit,
  output seg7_t seg
);

  always_comb begin
    unique case (digit)
      4'd0:    seg = 7'h01;
      4'd1:    seg = 7'h4f;
      4'd2:    seg = 7'h12;
      4'd3:    seg = 7'h06;
      4'd4:    seg = 7'h4c;
      4'd5:    seg = 7'h24;
      4'd6:    seg = 7'h20;
      4'd7:    seg = 7'h0f;
      4'd8:    seg = 7'h00;
      4'd9:    seg = 7'h04;
      default: seg = SEG_BLANK;
    endcase
  end

endmodule
