// tb_seg_pkg: reference 7-segment character set for the testbenches.
// Each character is described by the letters of its lit segments (a = top,
// b = top right, c = bottom right, d = bottom, e = bottom left,
// f = top left, g = middle) and turned into the active-low {g..a} pattern a
// display driver must produce. decode() maps a pattern back to a character.
package tb_seg_pkg;

  function automatic logic [6:0] pattern_of(input string lit);
    logic [6:0] p = '1;
    for (int i = 0; i < lit.len(); i++) p[3'(lit[i] - "a")] = 1'b0;
    return p;
  endfunction

  function automatic string segs_of(input byte ch);
    case (ch)
      "0": return "abcdef";
      "1": return "bc";
      "2": return "abdeg";
      "3": return "abcdg";
      "4": return "bcfg";
      "5": return "acdfg";
      "6": return "acdefg";
      "7": return "abc";
      "8": return "abcdefg";
      "9": return "abcdfg";
      "-": return "g";
      "F": return "aefg";
      default: return "";
    endcase
  endfunction

  // Character shown by an active-low pattern, "?" if none matches
  function automatic byte decode(input logic [6:0] seg);
    string chars = "0123456789-F ";
    for (int i = 0; i < chars.len(); i++)
      if (pattern_of(segs_of(chars[i])) == seg) return chars[i];
    return "?";
  endfunction

endpackage
