// tb_fss_split_ctrl: checks the split control register and its decoding.
//
// Uses the document's two-split-point example with 16 stretched rows:
//   S1 S0 = 11 -> one task,  thread 0 has 32 registers
//   S1 S0 = 10 -> two tasks, 16 + (16 + 16 stretched)
//   S1 S0 = 01 -> two tasks, 24 + (8 + 16 stretched)
//   S1 S0 = 00 -> no operation
// Also checks reset, that cfg_s is taken only with cfg_we and only at the
// clock edge, and the register-usage fit flag for random usages.
module tb_fss_split_ctrl;
  import fss_pkg::*;
  timeunit 1ns;
  timeprecision 1ps;

  int checks = 0, failures = 0;
  logic clk = 0;
  always #5 clk = ~clk;

  logic       rst_n, cfg_we;
  logic [1:0] cfg_s, s;
  logic [5:0] usage0, usage1, part0, part1;
  fss_mode_e  mode;
  logic       fits;

  fss_split_ctrl #(.R(5), .NUM_SPLIT(2), .EXTRA(16)) dut (.*);

  task automatic expect_cfg(logic [1:0] es, fss_mode_e em, int p0, int p1, int n_fits = 40);
    logic ef;
    checks++;
    if (s !== es || mode !== em || int'(part0) != p0 || int'(part1) != p1) begin
      failures++;
      $display("cfg mismatch s=%b mode=%s p0=%0d p1=%0d (exp %b %s %0d %0d)",
               s, mode.name(), part0, part1, es, em.name(), p0, p1);
    end
    for (int n = 0; n < n_fits; n++) begin
      usage0 = 6'($urandom % 40); usage1 = 6'($urandom % 40);
      #0.05;
      ef = (em != MODE_NOP) && int'(usage0) <= p0 && int'(usage1) <= p1;
      checks++;
      if (fits !== ef) begin
        failures++;
        $display("fits mismatch u0=%0d u1=%0d got %b", usage0, usage1, fits);
      end
    end
  endtask

  initial begin
    repeat (1000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    rst_n = 0; cfg_we = 0; cfg_s = 2'b00; usage0 = 0; usage1 = 0;
    #12 rst_n = 1;
    @(negedge clk);
    expect_cfg(2'b11, MODE_ONE, 32, 0);
    // cfg_s without cfg_we is ignored
    cfg_s = 2'b10; @(negedge clk);
    expect_cfg(2'b11, MODE_ONE, 32, 0);
    // S0 = 0, S1 = 1: equal halves, 16 stretched registers to thread 1
    cfg_we = 1; #1;
    expect_cfg(2'b11, MODE_ONE, 32, 0, 0);   // not before the edge
    @(negedge clk); cfg_we = 0;
    expect_cfg(2'b10, MODE_TWO, 16, 32);
    // S0 = 1, S1 = 0
    cfg_s = 2'b01; cfg_we = 1; @(negedge clk); cfg_we = 0;
    expect_cfg(2'b01, MODE_TWO, 24, 24);
    // both open: no operation
    cfg_s = 2'b00; cfg_we = 1; @(negedge clk); cfg_we = 0;
    expect_cfg(2'b00, MODE_NOP, 0, 0);
    cfg_s = 2'b11; cfg_we = 1; @(negedge clk); cfg_we = 0;
    expect_cfg(2'b11, MODE_ONE, 32, 0);
    // asynchronous reset back to one task
    cfg_s = 2'b01; cfg_we = 1; @(negedge clk); cfg_we = 0;
    #2 rst_n = 0; #1;
    expect_cfg(2'b11, MODE_ONE, 32, 0, 2);
    rst_n = 1;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
