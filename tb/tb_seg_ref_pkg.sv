// tb_seg_ref_pkg: independent reference for the seven-segment patterns.
//
// Each digit is described by the list of segments that must light, written as
// a string of segment numbers (0 top, 1 upper right, 2 lower right, 3 bottom,
// 4 lower left, 5 upper left, 6 middle). ref_pattern turns the list into the
// active-low drive word; decode_pattern maps a drive word back to its digit,
// -1 for the dark display and -2 for anything else.
package tb_seg_ref_pkg;

  function automatic string lit_segments(int unsigned d);
    case (d)
      0: return "012345";
      1: return "12";
      2: return "01346";
      3: return "01236";
      4: return "1256";
      5: return "02356";
      6: return "023456";
      7: return "012";
      8: return "0123456";
      9: return "012356";
      default: return "";
    endcase
  endfunction

  function automatic logic [6:0] ref_pattern(int unsigned d);
    logic [6:0] p;
    string s;
    p = 7'h7f;
    s = lit_segments(d);
    for (int k = 0; k < s.len(); k++) p[3'(s.getc(k) - "0")] = 1'b0;
    return p;
  endfunction

  function automatic int decode_pattern(logic [6:0] p);
    if (p == 7'h7f) return -1;
    for (int unsigned d = 0; d < 10; d++) if (ref_pattern(d) == p) return int'(d);
    return -2;
  endfunction

endpackage
