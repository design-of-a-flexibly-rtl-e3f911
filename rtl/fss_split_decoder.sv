// fss_split_decoder: one register-index decoder shared by both threads.
//
// A plain decoder has one word line per row and a set of address lines (true
// and complement of each index bit) running past every row. Here the address
// lines are cut by pass gates at the same split points as the data buses and
// are driven from both ends: the segments joined to the low end see thread 0's
// index, the segments joined only to the high end see thread 1's index
// inverted. Because the inverse of index i is 2**R-1-i, thread 1's R0 is the
// top main row and its registers grow downwards, so both threads count from R0
// with one set of decoders, and a thread-1 index that would fall into thread
// 0's rows selects nothing.
//
// Stretched rows (design 2 of the document's stretching section) are selected
// by a small extra decoding circuit from thread 1's inverted index and S: with
// only split point k open, thread 1 owns P1 = 2**R - split_pos(k) main rows,
// and its index P1+e (inverted: split_pos(k)-1-e) selects stretched row e. For
// R=5, NUM_SPLIT=2, EXTRA=1 this is the document's Boolean function
//   Extra1 = (S0'S1 a4'a3 + S0 S1' a4 a3') a2 a1 a0  (a = inverted index).
//
// Interface: s are the split control lines (1 = closed); en0/en1 enable each
// thread's word lines (read or write enable of this port); sel is one-hot or
// zero over the 2**R + EXTRA rows, main rows first. Purely combinational.
module fss_split_decoder
  import fss_pkg::*;
#(
  parameter int unsigned R         = 5,
  parameter int unsigned NUM_SPLIT = 2,
  parameter int unsigned EXTRA     = 16
) (
  input  logic [NUM_SPLIT-1:0]        s,
  input  logic                        en0,
  input  logic [R-1:0]                idx0,
  input  logic                        en1,
  input  logic [R-1:0]                idx1,
  output logic [(1<<R)+EXTRA-1:0]     sel
);

  localparam int unsigned NREG = 1 << R;

  logic [31:0]  s_ext;
  logic [R-1:0] inv1;

  assign s_ext = 32'(s) | ~((32'd1 << NUM_SPLIT) - 32'd1);
  assign inv1  = ~idx1;

  // Address lines of each segment: which end drives them and with what.
  logic [NUM_SPLIT:0] drv_lo, drv_hi;

  always_comb begin
    for (int m = 0; m <= int'(NUM_SPLIT); m++) begin
      drv_lo[m] = en0 && seg_to_lo(m, s_ext);
      drv_hi[m] = en1 && !seg_to_lo(m, s_ext) && seg_to_hi(m, s_ext, NUM_SPLIT);
    end
  end

  // Main rows: AND of the address lines of the row's own segment.
  for (genvar j = 0; j < int'(NREG); j++) begin : g_main
    localparam int SEG = seg_of_row(j, R, NUM_SPLIT);
    assign sel[j] = (drv_lo[SEG] && idx0 == R'(j)) ||
                    (drv_hi[SEG] && inv1 == R'(j));
  end

  // Extra decoding circuit for the stretched rows.
  for (genvar e = 0; e < int'(EXTRA); e++) begin : g_extra
    logic hit;
    always_comb begin
      hit = 1'b0;
      for (int k = 0; k < int'(NUM_SPLIT); k++) begin
        // only split point k open: s == all ones except bit k
        if (s == ~(NUM_SPLIT'(1) << k) && inv1 == R'(split_pos(k, R, NUM_SPLIT) - 1 - e))
          hit = 1'b1;
      end
    end
    assign sel[NREG + e] = en1 && hit;
  end

  // Each end drives at most one word line: one row per thread per port.
  always_comb begin
    assert ($countones(sel) <= int'(en0) + int'(en1))
      else $error("split decoder selected more rows than there are active ends");
  end

endmodule
