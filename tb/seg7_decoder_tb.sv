// seg7_decoder_tb: exhaustive check of the BCD to 7-segment decoder.
//
// Drives all sixteen input codes. For 0-9 the output must equal the pattern
// built by seg_ref_pkg from the list of lit segments; for 10-15 the digit
// must be dark. A watchdog ends the run with a failure if it stalls.
module seg7_decoder_tb;
  import lab1_pkg::*;
  import seg_ref_pkg::*;

  bcd_t  digit;
  seg7_t seg;
  int    checks = 0;
  int    failures = 0;

  seg7_decoder dut (.digit(digit), .seg(seg));

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 16; i++) begin
      logic [6:0] want;
      digit = bcd_t'(i);
      #10;
      want = (i < 10) ? pattern(i) : 7'h7f;
      checks++;
      if (seg !== want) begin
        failures++;
        $display("digit %0d: seg=%b want %b", i, seg, want);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
