// fss_regfile: flexibly splittable and stretchable register file (FSS-RF).
//
// One physical register file of 2**R rows (plus EXTRA stretched rows) with
// two read ports and one write port, which can serve either one thread or two
// threads at once without adding ports. The read and write buses and the
// decoder address lines are cut by pass gates at NUM_SPLIT split points. With
// every gate closed the file is an ordinary 2**R-entry file for thread 0.
// With exactly one gate open it falls apart into two independent files:
//   thread 0 - low end, main rows 0 .. P0-1, register i in row i;
//   thread 1 - high end, main rows P0 .. 2**R-1 with register i in row
//              2**R-1-i (its index is inverted before decoding), then the
//              stretched rows: register P1+e is stretched row e.
// Each thread reaches only its own rows, so the partition is enforced by the
// hardware, and each end has its own 2R/1W port, so both threads read and
// write in the same cycle. Two or more gates open is "no operation": neither
// port reads or writes.
//
// Structure: fss_split_ctrl (split lines S and mode), three fss_split_decoder
// instances (read A, read B, write), two fss_split_read_bus instances, one
// fss_split_write_bus and the fss_reg_array rows.
//
// Timing: reads are combinational from the index to the data; writes take
// effect on the rising clock edge, so a read in the same cycle as a write to
// the same register returns the old value (no bypass). A new split setting
// (cfg_we, cfg_s) takes effect from the next cycle; row contents are kept
// across a change, so each thread sees whatever its new rows hold.
//
// The document fixes the splitting, inversion, stretching and Table 3-1
// decoding; the port bundle, enables, the no-operation gating and the fit
// check interface are this design's choices.
module fss_regfile
  import fss_pkg::*;
#(
  parameter int unsigned R         = 5,
  parameter int unsigned W         = 32,
  parameter int unsigned NUM_SPLIT = 2,
  parameter int unsigned EXTRA     = 16
) (
  input  logic                 clk,
  input  logic                 rst_n,
  // split configuration, set by the operating system
  input  logic                 cfg_we,
  input  logic [NUM_SPLIT-1:0] cfg_s,
  input  logic [R:0]           usage0,
  input  logic [R:0]           usage1,
  output fss_mode_e            mode,
  output logic [NUM_SPLIT-1:0] s,
  output logic [R:0]           part0,
  output logic [R:0]           part1,
  output logic                 fits,
  // thread 0 port (low end)
  input  logic [R-1:0]         t0_ra,
  input  logic [R-1:0]         t0_rb,
  input  logic                 t0_we,
  input  logic [R-1:0]         t0_wa,
  input  logic [W-1:0]         t0_wd,
  output logic [W-1:0]         t0_rda,
  output logic [W-1:0]         t0_rdb,
  // thread 1 port (high end)
  input  logic [R-1:0]         t1_ra,
  input  logic [R-1:0]         t1_rb,
  input  logic                 t1_we,
  input  logic [R-1:0]         t1_wa,
  input  logic [W-1:0]         t1_wd,
  output logic [W-1:0]         t1_rda,
  output logic [W-1:0]         t1_rdb
);

  localparam int unsigned ROWS = (1 << R) + EXTRA;

  logic act0, act1;
  logic [ROWS-1:0] sel_a, sel_b, sel_w;
  logic [W-1:0]    row_q  [ROWS];
  logic [W-1:0]    row_wd [ROWS];
  logic [W-1:0]    a_lo, a_hi, b_lo, b_hi;

  fss_split_ctrl #(.R(R), .NUM_SPLIT(NUM_SPLIT), .EXTRA(EXTRA)) u_ctrl (
    .clk, .rst_n, .cfg_we, .cfg_s, .usage0, .usage1,
    .s, .mode, .part0, .part1, .fits
  );

  assign act0 = (mode != MODE_NOP);
  assign act1 = (mode == MODE_TWO);

  fss_split_decoder #(.R(R), .NUM_SPLIT(NUM_SPLIT), .EXTRA(EXTRA)) u_dec_a (
    .s, .en0(act0), .idx0(t0_ra), .en1(act1), .idx1(t1_ra), .sel(sel_a));
  fss_split_decoder #(.R(R), .NUM_SPLIT(NUM_SPLIT), .EXTRA(EXTRA)) u_dec_b (
    .s, .en0(act0), .idx0(t0_rb), .en1(act1), .idx1(t1_rb), .sel(sel_b));
  fss_split_decoder #(.R(R), .NUM_SPLIT(NUM_SPLIT), .EXTRA(EXTRA)) u_dec_w (
    .s, .en0(act0 && t0_we), .idx0(t0_wa), .en1(act1 && t1_we), .idx1(t1_wa), .sel(sel_w));

  fss_split_write_bus #(.R(R), .W(W), .NUM_SPLIT(NUM_SPLIT), .EXTRA(EXTRA)) u_wbus (
    .s, .din_lo(t0_wd), .din_hi(t1_wd), .wdata(row_wd));

  fss_reg_array #(.R(R), .W(W), .EXTRA(EXTRA)) u_array (
    .clk, .wsel(sel_w), .wdata(row_wd), .q(row_q));

  fss_split_read_bus #(.R(R), .W(W), .NUM_SPLIT(NUM_SPLIT), .EXTRA(EXTRA)) u_rbus_a (
    .s, .sel(sel_a), .rdata(row_q), .dout_lo(a_lo), .dout_hi(a_hi));
  fss_split_read_bus #(.R(R), .W(W), .NUM_SPLIT(NUM_SPLIT), .EXTRA(EXTRA)) u_rbus_b (
    .s, .sel(sel_b), .rdata(row_q), .dout_lo(b_lo), .dout_hi(b_hi));

  // The high-end sense outputs belong to thread 1 only in two-task mode; with
  // all gates closed they would show thread 0's bus.
  assign t0_rda = a_lo;
  assign t0_rdb = b_lo;
  assign t1_rda = act1 ? a_hi : '0;
  assign t1_rdb = act1 ? b_hi : '0;

endmodule
