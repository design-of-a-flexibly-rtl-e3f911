// fss_split_read_bus: the read bit lines of one read port, cut at the split
// points, with a data output (sense point) at each end.
//
// Every row whose read word line is on drives its word onto the bus segment it
// sits in; the bus is modelled as a wired OR, which is what a pre-charged bit
// line with one active row gives. Pass gates between neighbouring segments
// join them when their split control line is 1. The low end (thread 0's R0
// end) sees every segment still joined to it, the high end (thread 1's R0 end,
// where the document adds the second sense amplifier) sees every segment
// joined to the far end. With all gates closed both ends see the whole bus.
//
// Interface: s split lines (1 = closed), sel the read word lines of this
// port over the 2**R + EXTRA rows, rdata the stored rows. Combinational.
module fss_split_read_bus
  import fss_pkg::*;
#(
  parameter int unsigned R         = 5,
  parameter int unsigned W         = 32,
  parameter int unsigned NUM_SPLIT = 2,
  parameter int unsigned EXTRA     = 16,
  localparam int unsigned ROWS     = (1 << R) + EXTRA
) (
  input  logic [NUM_SPLIT-1:0] s,
  input  logic [ROWS-1:0]      sel,
  input  logic [W-1:0]         rdata [ROWS],
  output logic [W-1:0]         dout_lo,
  output logic [W-1:0]         dout_hi
);

  logic [31:0]  s_ext;
  logic [W-1:0] seg_v [NUM_SPLIT+1];

  assign s_ext = 32'(s) | ~((32'd1 << NUM_SPLIT) - 32'd1);

  always_comb begin
    for (int m = 0; m <= int'(NUM_SPLIT); m++) seg_v[m] = '0;
    for (int j = 0; j < int'(ROWS); j++)
      if (sel[j]) seg_v[seg_of_row(j, R, NUM_SPLIT)] |= rdata[j];

    dout_lo = '0;
    dout_hi = '0;
    for (int m = 0; m <= int'(NUM_SPLIT); m++) begin
      if (seg_to_lo(m, s_ext))            dout_lo |= seg_v[m];
      if (seg_to_hi(m, s_ext, NUM_SPLIT)) dout_hi |= seg_v[m];
    end
  end

endmodule
