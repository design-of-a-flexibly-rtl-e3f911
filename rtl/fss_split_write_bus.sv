// fss_split_write_bus: the write bit lines, cut at the split points and driven
// from both ends.
//
// Thread 0 drives its write data in at the low end and thread 1 at the high
// end. A segment joined to the low end carries thread 0's data; a segment
// joined only to the high end carries thread 1's data; a segment joined to
// neither (two or more gates open) floats and is modelled as zero. With all
// gates closed the low end drives the whole bus and the high-end driver is off.
//
// The split write bus with a driver at each end follows the document; the
// zero value of a floating segment is this model's choice. The bottom
// segment can never be cut off from the low end, so its rows always see
// din_lo directly, which synthesis reports as outputs wired to an input.
//
// Interface: s split lines (1 = closed), din_lo/din_hi the two ends' write
// data, wdata the value each row's write port sees. Combinational.
module fss_split_write_bus
  import fss_pkg::*;
#(
  parameter int unsigned R         = 5,
  parameter int unsigned W         = 32,
  parameter int unsigned NUM_SPLIT = 2,
  parameter int unsigned EXTRA     = 16,
  localparam int unsigned ROWS     = (1 << R) + EXTRA
) (
  input  logic [NUM_SPLIT-1:0] s,
  input  logic [W-1:0]         din_lo,
  input  logic [W-1:0]         din_hi,
  output logic [W-1:0]         wdata [ROWS]
);

  logic [31:0]  s_ext;
  logic [W-1:0] seg_d [NUM_SPLIT+1];

  assign s_ext = 32'(s) | ~((32'd1 << NUM_SPLIT) - 32'd1);

  always_comb begin
    for (int m = 0; m <= int'(NUM_SPLIT); m++) begin
      if (seg_to_lo(m, s_ext))                 seg_d[m] = din_lo;
      else if (seg_to_hi(m, s_ext, NUM_SPLIT)) seg_d[m] = din_hi;
      else                                     seg_d[m] = '0;
    end
    for (int j = 0; j < int'(ROWS); j++)
      wdata[j] = seg_d[seg_of_row(j, R, NUM_SPLIT)];
  end

endmodule
