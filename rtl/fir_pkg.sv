// fir_pkg: word lengths of the Bi-Recoder FIR filter and the group layout of its
// square-root carry-select adders.
//
// The filter takes 8-bit samples and 8-bit fixed coefficients and has three taps; these
// numbers follow the published design. The adder layout follows the 16-bit square-root
// carry-select adder: bits [1:0] form group 0 (a plain ripple-carry adder), and group
// g >= 1 is g+1 bits wide, so a 16-bit adder splits into 2, 2, 3, 4 and 5 bits
// ([1:0], [3:2], [6:4], [10:7], [15:11]). For other widths the same sequence is used and
// the last group is cut to fit; that extension is this design's own choice.
package fir_pkg;

  // Word length of the input samples and of the fixed coefficients (both 8 bits).
  localparam int unsigned DATA_W  = 8;
  localparam int unsigned N_TAPS  = 3;  // number of filter taps

  // Nominal width of group g of a square-root carry-select adder.
  function automatic int unsigned csla_group_width(int unsigned g);
    return (g == 0) ? 2 : g + 1;
  endfunction

  // Lowest bit of group g: 0 for group 0, 2 + (g-1)(g+2)/2 for g >= 1.
  function automatic int unsigned csla_group_lsb(int unsigned g);
    return (g == 0) ? 0 : 2 + ((g - 1) * (g + 2)) / 2;
  endfunction

  // Number of groups needed to cover a word of the given width.
  function automatic int unsigned csla_num_groups(int unsigned width);
    int unsigned g = 1;
    while (csla_group_lsb(g) < width) g++;
    return g;
  endfunction

  // Width actually used by group g in an adder of the given width.
  function automatic int unsigned csla_group_bits(int unsigned width, int unsigned g);
    int unsigned top = csla_group_lsb(g + 1);
    if (top > width) top = width;
    return top - csla_group_lsb(g);
  endfunction

endpackage
