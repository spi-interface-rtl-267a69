// seg7_ref_pkg: reference seven-segment shapes for the testbenches.
//
// Each hex digit is described by the letters of its lit segments, the way
// the shapes are drawn on a display, and turned into an {a..g} bit vector.
package seg7_ref_pkg;

  function automatic logic [6:0] seg_of(input logic [3:0] digit);
    string lit;
    logic [6:0] v;
    case (digit)
      4'h0: lit = "abcdef";  4'h1: lit = "bc";      4'h2: lit = "abdeg";
      4'h3: lit = "abcdg";   4'h4: lit = "bcfg";    4'h5: lit = "acdfg";
      4'h6: lit = "acdefg";  4'h7: lit = "abc";     4'h8: lit = "abcdefg";
      4'h9: lit = "abcdfg";  4'hA: lit = "abcefg";  4'hB: lit = "cdefg";
      4'hC: lit = "adef";    4'hD: lit = "bcdeg";   4'hE: lit = "adefg";
      default: lit = "aefg";
    endcase
    v = '0;
    foreach (lit[i]) v[6 - (lit[i] - "a")] = 1'b1;
    return v;
  endfunction

endpackage
