// fss_reg_array: the storage rows of the FSS register file.
//
// 2**R main rows followed by EXTRA stretched rows, W bits each. Each row has
// one write port fed from its own segment of the split write bus: on the
// rising clock edge a row whose write word line is on takes the value on its
// bus segment. Every row's contents go out continuously to the read buses,
// where the read word lines pick them (two read ports, one write port per
// cell, as in the document's 2-read/1-write cell). Since the split write bus
// gives each partition its own data, the two threads can write one row each in
// the same cycle. The rows are not reset; a register file is normally written
// before it is read.
module fss_reg_array #(
  parameter int unsigned R     = 5,
  parameter int unsigned W     = 32,
  parameter int unsigned EXTRA = 16,
  localparam int unsigned ROWS = (1 << R) + EXTRA
) (
  input  logic            clk,
  input  logic [ROWS-1:0] wsel,
  input  logic [W-1:0]    wdata [ROWS],
  output logic [W-1:0]    q     [ROWS]
);

  logic [W-1:0] mem [ROWS];

  always_ff @(posedge clk) begin
    for (int j = 0; j < int'(ROWS); j++)
      if (wsel[j]) mem[j] <= wdata[j];
  end

  assign q = mem;

endmodule
