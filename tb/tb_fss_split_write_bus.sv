// tb_fss_split_write_bus: checks which end's write data each row sees.
//
// Under every split setting of the default geometry and random settings of an
// 8-split-point instance, each row below the lowest open split point must see
// the low-end data, each row at or above the highest open split point (and
// every stretched row) the high-end data when some gate is open, and rows in
// a segment joined to neither end zero. With all gates closed every row sees
// the low-end data.
module tb_fss_split_write_bus;
  import fss_ref_pkg::*;

  localparam int R = 5, W = 32;
  localparam int NS_A = 2, EX_A = 16, ROWS_A = 32 + EX_A;
  localparam int NS_B = 8, EX_B = 4,  ROWS_B = 32 + EX_B;

  int checks = 0, failures = 0;
  logic clk = 0;
  always #5 clk = ~clk;

  logic [NS_A-1:0] s_a;
  logic [NS_B-1:0] s_b;
  logic [W-1:0]    dlo, dhi;
  logic [W-1:0]    wd_a [ROWS_A];
  logic [W-1:0]    wd_b [ROWS_B];

  fss_split_write_bus #(.R(R), .W(W), .NUM_SPLIT(NS_A), .EXTRA(EX_A)) dut_a (
    .s(s_a), .din_lo(dlo), .din_hi(dhi), .wdata(wd_a));
  fss_split_write_bus #(.R(R), .W(W), .NUM_SPLIT(NS_B), .EXTRA(EX_B)) dut_b (
    .s(s_b), .din_lo(dlo), .din_hi(dhi), .wdata(wd_b));

  function automatic logic [W-1:0] expect_row(logic [31:0] s, int ns, int j);
    if (j < 32 && j < lo_limit(s, R, ns)) return dlo;
    if (n_open(s, ns) == 0) return dlo;
    if (j >= hi_start(s, R, ns)) return dhi;
    return '0;
  endfunction

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int n = 0; n < 2000; n++) begin
      s_a = NS_A'(n % 4);
      s_b = NS_B'($urandom);
      if (n % 3 == 0) s_b = ~(NS_B'(1) << ($urandom % NS_B));
      if (n % 5 == 0) s_b = '1;
      dlo = $urandom; dhi = $urandom;
      #1;
      for (int j = 0; j < ROWS_A; j++) begin
        checks++;
        if (wd_a[j] !== expect_row({30'h3fffffff, s_a}, NS_A, j)) begin
          failures++;
          if (failures < 10) $display("A row %0d s=%b got %h", j, s_a, wd_a[j]);
        end
      end
      for (int j = 0; j < ROWS_B; j++) begin
        checks++;
        if (wd_b[j] !== expect_row({24'hffffff, s_b}, NS_B, j)) begin
          failures++;
          if (failures < 10) $display("B row %0d s=%b got %h", j, s_b, wd_b[j]);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
