// fss_pkg: types and helper functions shared by the flexibly splittable and
// stretchable register file (FSS register file).
//
// Geometry. The file has 2**R main rows (row j answers thread 0's register
// index j) followed by EXTRA stretched rows that sit physically beyond the
// last main row, at the high end of the buses. NUM_SPLIT split points (pass
// gates on the buses and on the decoder address lines) are spread evenly over
// the upper half of the main rows: split point k lies just below row
//   split_pos(k) = 2**(R-1) + k * 2**(R-1) / NUM_SPLIT,
// so the lower half of the file always stays with thread 0 and the split
// points "exist at most in half of the register spans". With R = 5 and
// NUM_SPLIT = 2 this puts S0 below row 16 and S1 below row 24, which is the
// arrangement of the document's two-split-point example. The even spacing for
// other NUM_SPLIT values (every 8, 4 or 2 rows) is this design's choice.
//
// The rows between two neighbouring split points form a segment; segment m
// holds the rows with m split points below them, and the stretched rows belong
// to the last segment, NUM_SPLIT.
package fss_pkg;

  // Operating mode decoded from the split control lines (1 = gate closed).
  typedef enum logic [1:0] {
    MODE_ONE = 2'd0,  // every gate closed: one task owns the whole file
    MODE_TWO = 2'd1,  // exactly one gate open: two tasks share the file
    MODE_NOP = 2'd2   // two or more gates open: no operation
  } fss_mode_e;

  // Row index of the lowest row above split point k.
  function automatic int split_pos(int k, int r, int num_split);
    return (1 << (r - 1)) + k * ((1 << (r - 1)) / num_split);
  endfunction

  // Segment number of row j (stretched rows are in the last segment).
  function automatic int seg_of_row(int j, int r, int num_split);
    int seg;
    seg = 0;
    if (j >= (1 << r)) return num_split;
    for (int k = 0; k < num_split; k++)
      if (j >= split_pos(k, r, num_split)) seg = k + 1;
    return seg;
  endfunction

  // Segment m reaches the low (thread 0) end when every split point below it
  // is closed.
  function automatic logic seg_to_lo(int m, logic [31:0] s);
    logic c;
    c = 1'b1;
    for (int k = 0; k < m; k++) c &= s[k];
    return c;
  endfunction

  // Segment m reaches the high (thread 1) end when every split point above
  // it is closed.
  function automatic logic seg_to_hi(int m, logic [31:0] s, int num_split);
    logic c;
    c = 1'b1;
    for (int k = m; k < num_split; k++) c &= s[k];
    return c;
  endfunction

endpackage
