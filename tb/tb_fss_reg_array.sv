// tb_fss_reg_array: write/read check of the storage rows.
//
// Fills every row, then applies random multi-row writes (each row with its
// own data, as the split write bus provides) and compares all rows with a
// model after every clock edge. Also checks that rows whose word line is off
// keep their value and that a write shows only after the edge.
module tb_fss_reg_array;
  localparam int R = 5, W = 32, EX = 16, ROWS = 32 + EX;

  int checks = 0, failures = 0;
  logic clk = 0;
  always #5 clk = ~clk;

  logic [ROWS-1:0] wsel;
  logic [W-1:0]    wdata [ROWS];
  logic [W-1:0]    q     [ROWS];
  logic [W-1:0]    model [ROWS];

  fss_reg_array #(.R(R), .W(W), .EXTRA(EX)) dut (.clk, .wsel, .wdata, .q);

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    wsel = '1;
    for (int j = 0; j < ROWS; j++) begin wdata[j] = $urandom; model[j] = wdata[j]; end
    @(posedge clk); #1;
    for (int n = 0; n < 1000; n++) begin
      for (int j = 0; j < ROWS; j++) begin
        wsel[j]  = ($urandom % 5) == 0;
        wdata[j] = $urandom;
      end
      #1;
      // before the edge nothing has changed
      for (int j = 0; j < ROWS; j++) begin
        checks++;
        if (q[j] !== model[j]) failures++;
      end
      for (int j = 0; j < ROWS; j++) if (wsel[j]) model[j] = wdata[j];
      @(posedge clk); #1;
      for (int j = 0; j < ROWS; j++) begin
        checks++;
        if (q[j] !== model[j]) begin
          failures++;
          if (failures < 10) $display("row %0d got %h exp %h", j, q[j], model[j]);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
