// tb_seg_pkg: reference seven-segment glyphs for the testbenches.
//
// Each hex digit is described by the letters of the segments it lights
// (a = top, b = top right, c = bottom right, d = bottom, e = bottom left,
// f = top left, g = middle), and lit() turns that list into the G..A bus
// with 1 = lit. Written from the display's geometry, not from the decoder.
package tb_seg_pkg;

  function automatic string glyph(input int unsigned v);
    case (v)
      0:  return "abcdef";
      1:  return "bc";
      2:  return "abdeg";
      3:  return "abcdg";
      4:  return "bcfg";
      5:  return "acdfg";
      6:  return "acdefg";
      7:  return "abc";
      8:  return "abcdefg";
      9:  return "abcfg";
      10: return "abcefg";   // A
      11: return "cdefg";    // b
      12: return "deg";      // c
      13: return "bcdeg";    // d
      14: return "adefg";    // E
      15: return "aefg";     // F
      default: return "";
    endcase
  endfunction

  function automatic logic [6:0] lit(input int unsigned v);
    string s = glyph(v);
    logic [6:0] r = '0;
    for (int i = 0; i < s.len(); i++) r[s[i] - "a"] = 1'b1;
    return r;
  endfunction

endpackage
