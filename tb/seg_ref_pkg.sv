// seg_ref_pkg: reference model of a 7-segment digit for the testbenches.
//
// Each decimal digit is described by the names of the segments that are lit
// when it is drawn, the usual layout with a at the top, b and c on the
// right, d at the bottom, e and f on the left and g in the middle; 6 and 9
// carry their tails, 7 is drawn with a, b and c only. From that description
// the functions build the active-low {a,b,c,d,e,f,g} pattern and map a
// pattern back to a digit, so the checks do not reuse the design's table.
package seg_ref_pkg;

  function automatic string lit_segments(int unsigned digit);
    case (digit)
      0: return "abcdef";
      1: return "bc";
      2: return "abdeg";
      3: return "abcdg";
      4: return "bcfg";
      5: return "acdfg";
      6: return "acdefg";
      7: return "abc";
      8: return "abcdefg";
      9: return "abcdfg";
      default: return "";
    endcase
  endfunction

  // Active-low pattern, bit 6 = a ... bit 0 = g.
  function automatic logic [6:0] pattern(int unsigned digit);
    string s;
    logic [6:0] p;
    s = lit_segments(digit);
    p = 7'h7f;
    for (int i = 0; i < s.len(); i++) p[6 - (int'(s[i]) - int'("a"))] = 1'b0;
    return p;
  endfunction

  // Digit drawn by an active-low pattern; -1 if it is no digit, 10 if dark.
  function automatic int shown_digit(logic [6:0] p);
    if (p == 7'h7f) return 10;
    for (int dgt = 0; dgt < 10; dgt++) if (pattern(dgt) == p) return dgt;
    return -1;
  endfunction

endpackage
