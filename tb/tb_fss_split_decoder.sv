// tb_fss_split_decoder: exhaustive check of the shared split decoder.
//
// Two instances are tested: the default geometry (32 main rows, 2 split points,
// 16 stretched rows) and one with 8 split points and 4 stretched rows. For
// every split setting, every pair of indices and every enable combination the
// word lines must equal the rows given by the reference mapping. Also checks
// the document's worked example: with S0=0,S1=1 thread 1's R16 selects the
// first stretched row, with S0=1,S1=0 its R8 does.
module tb_fss_split_decoder;
  import fss_ref_pkg::*;

  localparam int R = 5;
  localparam int NS_A = 2, EX_A = 16;
  localparam int NS_B = 8, EX_B = 4;
  localparam int ROWS_A = 32 + EX_A, ROWS_B = 32 + EX_B;

  int checks = 0, failures = 0;
  logic clk = 0;
  always #5 clk = ~clk;

  logic [NS_A-1:0]   s_a;
  logic [NS_B-1:0]   s_b;
  logic              en0, en1;
  logic [R-1:0]      idx0, idx1;
  logic [ROWS_A-1:0] sel_a;
  logic [ROWS_B-1:0] sel_b;

  fss_split_decoder #(.R(R), .NUM_SPLIT(NS_A), .EXTRA(EX_A)) dut_a (
    .s(s_a), .en0, .idx0, .en1, .idx1, .sel(sel_a));
  fss_split_decoder #(.R(R), .NUM_SPLIT(NS_B), .EXTRA(EX_B)) dut_b (
    .s(s_b), .en0, .idx0, .en1, .idx1, .sel(sel_b));

  function automatic logic [63:0] expect_sel(logic [31:0] s, int ns, int ex,
                                             logic e0, int i0, logic e1, int i1);
    logic [63:0] v = '0;
    int r0, r1;
    r0 = row_t0(s, R, ns, i0);
    r1 = row_t1(s, R, ns, ex, i1);
    if (e0 && r0 >= 0) v[r0] = 1'b1;
    if (e1 && r1 >= 0) v[r1] = 1'b1;
    return v;
  endfunction

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [63:0] exp_v;
    // geometry A: all settings of S
    for (int sv = 0; sv < 4; sv++)
      for (int e = 0; e < 4; e++)
        for (int a = 0; a < 32; a++)
          for (int b = 0; b < 32; b++) begin
            s_a = NS_A'(sv); en0 = e[0]; en1 = e[1]; idx0 = R'(a); idx1 = R'(b);
            #1;
            exp_v = expect_sel({30'h3fffffff, s_a}, NS_A, EX_A, en0, a, en1, b);
            checks++;
            if (64'(sel_a) != exp_v) begin
              failures++;
              if (failures < 10)
                $display("A mismatch s=%b en=%b%b i0=%0d i1=%0d sel=%h exp=%h",
                         s_a, en1, en0, a, b, sel_a, exp_v);
            end
          end
    // geometry B: random settings of S
    for (int n = 0; n < 20000; n++) begin
      s_b = NS_B'($urandom);
      if (n % 3 == 0) s_b = ~(NS_B'(1) << ($urandom % NS_B));
      if (n % 7 == 0) s_b = '1;
      en0 = 1'($urandom); en1 = 1'($urandom);
      idx0 = R'($urandom); idx1 = R'($urandom);
      #1;
      exp_v = expect_sel({24'hffffff, s_b}, NS_B, EX_B, en0, int'(idx0), en1, int'(idx1));
      checks++;
      if (64'(sel_b) != exp_v) begin
        failures++;
        if (failures < 10)
          $display("B mismatch s=%b i0=%0d i1=%0d sel=%h exp=%h", s_b, idx0, idx1, sel_b, exp_v);
      end
    end
    // worked example of the document (Table 3-2)
    en0 = 0; en1 = 1;
    s_a = 2'b10; idx1 = 5'd16; #1;
    checks++; if (sel_a != (ROWS_A'(1) << 32)) failures++;
    s_a = 2'b01; idx1 = 5'd8; #1;
    checks++; if (sel_a != (ROWS_A'(1) << 32)) failures++;
    s_a = 2'b11; idx1 = 5'd8; #1;
    checks++; if (sel_a != '0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
