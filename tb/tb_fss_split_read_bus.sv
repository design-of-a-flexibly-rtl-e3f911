// tb_fss_split_read_bus: checks the split read bus against a row-range model.
//
// Random row contents and random read word lines are applied under every
// setting of the split lines (default geometry) and under random settings of
// an 8-split-point instance. The low end must show the OR of the selected rows
// below the lowest open split point, the high end the OR of the selected rows
// at or above the highest open split point and of the selected stretched rows
// (all rows when every gate is closed).
module tb_fss_split_read_bus;
  import fss_ref_pkg::*;

  localparam int R = 5, W = 32;
  localparam int NS_A = 2, EX_A = 16, ROWS_A = 32 + EX_A;
  localparam int NS_B = 8, EX_B = 4,  ROWS_B = 32 + EX_B;

  int checks = 0, failures = 0;
  logic clk = 0;
  always #5 clk = ~clk;

  logic [NS_A-1:0]   s_a;
  logic [NS_B-1:0]   s_b;
  logic [ROWS_A-1:0] sel_a;
  logic [ROWS_B-1:0] sel_b;
  logic [W-1:0]      rd_a [ROWS_A];
  logic [W-1:0]      rd_b [ROWS_B];
  logic [W-1:0]      lo_a, hi_a, lo_b, hi_b;

  fss_split_read_bus #(.R(R), .W(W), .NUM_SPLIT(NS_A), .EXTRA(EX_A)) dut_a (
    .s(s_a), .sel(sel_a), .rdata(rd_a), .dout_lo(lo_a), .dout_hi(hi_a));
  fss_split_read_bus #(.R(R), .W(W), .NUM_SPLIT(NS_B), .EXTRA(EX_B)) dut_b (
    .s(s_b), .sel(sel_b), .rdata(rd_b), .dout_lo(lo_b), .dout_hi(hi_b));

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [W-1:0] el, eh;
    int lim, hs;
    for (int n = 0; n < 4000; n++) begin
      // geometry A
      s_a = NS_A'(n % 4);
      for (int j = 0; j < ROWS_A; j++) begin
        rd_a[j]  = $urandom;
        sel_a[j] = ($urandom % 6) == 0;
      end
      #1;
      // with every gate closed the bus is one piece, stretched rows included
      lim = (s_a == '1) ? ROWS_A : lo_limit({30'h3fffffff, s_a}, R, NS_A);
      hs  = hi_start({30'h3fffffff, s_a}, R, NS_A);
      el = '0; eh = '0;
      for (int j = 0; j < ROWS_A; j++) if (sel_a[j]) begin
        if (j < lim) el |= rd_a[j];
        if (j >= hs) eh |= rd_a[j];
      end
      checks += 2;
      if (lo_a !== el) begin failures++; if (failures < 10) $display("A lo s=%b got %h exp %h", s_a, lo_a, el); end
      if (hi_a !== eh) begin failures++; if (failures < 10) $display("A hi s=%b got %h exp %h", s_a, hi_a, eh); end
      // geometry B
      s_b = NS_B'($urandom);
      if (n % 3 == 0) s_b = ~(NS_B'(1) << ($urandom % NS_B));
      if (n % 5 == 0) s_b = '1;
      for (int j = 0; j < ROWS_B; j++) begin
        rd_b[j]  = $urandom;
        sel_b[j] = ($urandom % 8) == 0;
      end
      #1;
      lim = (s_b == '1) ? ROWS_B : lo_limit({24'hffffff, s_b}, R, NS_B);
      hs  = hi_start({24'hffffff, s_b}, R, NS_B);
      el = '0; eh = '0;
      for (int j = 0; j < ROWS_B; j++) if (sel_b[j]) begin
        if (j < lim) el |= rd_b[j];
        if (j >= hs) eh |= rd_b[j];
      end
      checks += 2;
      if (lo_b !== el) begin failures++; if (failures < 10) $display("B lo s=%b got %h exp %h", s_b, lo_b, el); end
      if (hi_b !== eh) begin failures++; if (failures < 10) $display("B hi s=%b got %h exp %h", s_b, hi_b, eh); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
