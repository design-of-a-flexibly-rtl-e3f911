// fss_split_ctrl: split-point control of the FSS register file.
//
// The operating system decides whether two threads share the register file and
// where it is cut, and signals the processor; this block holds that decision
// as the split control lines S (one per split point, 1 = pass gate closed) and
// decodes them as in the document's Table 3-1: all lines 1 is one task, exactly
// one line 0 is two tasks, more than one line 0 is "no operation" (the middle
// segment would belong to no port).
//
// It also reports the size of each partition: with split point k open, thread
// 0 owns main rows 0..split_pos(k)-1 and thread 1 owns the 2**R - split_pos(k)
// main rows above plus the EXTRA stretched rows. The document keeps each
// thread's register usage in "a table or special registers" so that the OS
// can decide whether a pair of threads fits; `fits` is that comparison done
// in hardware for the current split (usage0 <= part0 and usage1 <= part1).
// How the usage values get there, and the single-cycle compare, are this
// design's choices.
//
// Timing: cfg_s is loaded on the rising clock edge when cfg_we is high; all
// other outputs follow the stored value combinationally. Reset (active low,
// asynchronous) closes every gate, i.e. one task.
module fss_split_ctrl
  import fss_pkg::*;
#(
  parameter int unsigned R         = 5,   // log2 of the architectural register count
  parameter int unsigned NUM_SPLIT = 2,   // number of split points
  parameter int unsigned EXTRA     = 16   // stretched registers
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic                 cfg_we,
  input  logic [NUM_SPLIT-1:0] cfg_s,
  input  logic [R:0]           usage0,   // registers thread 0 needs
  input  logic [R:0]           usage1,   // registers thread 1 needs
  output logic [NUM_SPLIT-1:0] s,        // split control lines to buses and decoders
  output fss_mode_e            mode,
  output logic [R:0]           part0,    // registers available to thread 0
  output logic [R:0]           part1,    // registers available to thread 1 (stretched included)
  output logic                 fits
);

  localparam int unsigned NREG = 1 << R;

  initial begin
    assert (NUM_SPLIT >= 1 && NUM_SPLIT <= NREG / 2 && (NREG / 2) % NUM_SPLIT == 0)
      else $error("NUM_SPLIT must divide 2**(R-1)");
    assert (EXTRA <= NREG / 2)
      else $error("EXTRA above 2**(R-1) cannot be indexed by thread 1");
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)      s <= '1;
    else if (cfg_we) s <= cfg_s;
  end

  int unsigned n_open;
  int unsigned open_pos;

  always_comb begin
    n_open   = 0;
    open_pos = NREG;
    for (int k = 0; k < int'(NUM_SPLIT); k++) begin
      if (!s[k]) begin
        n_open++;
        open_pos = split_pos(k, R, NUM_SPLIT);
      end
    end

    if (n_open == 0) begin
      mode  = MODE_ONE;
      part0 = (R+1)'(NREG);
      part1 = '0;
    end else if (n_open == 1) begin
      mode  = MODE_TWO;
      part0 = (R+1)'(open_pos);
      part1 = (R+1)'(NREG - open_pos + EXTRA);
    end else begin
      mode  = MODE_NOP;
      part0 = '0;
      part1 = '0;
    end

    fits = (mode != MODE_NOP) && (usage0 <= part0) && (usage1 <= part1);
  end

endmodule
