// tb_fss_workloads: two-thread workload mixes on the default FSS register file.
//
// Threads are classed by how many floating-point registers they use: "higher"
// threads use more than 16 (here 17..32), "lower" threads fewer than 16 (here
// 1..15). For higher-higher, higher-lower and lower-lower pairs the test acts
// as the operating system: it tries each single-split setting, reads the fit
// flag, and runs the pair together in the first setting that fits; if none
// does, it runs the two threads one after the other in one-task mode.
//
// Each thread runs a small synthetic program on its own registers R0..Ru-1:
// fill them, then a series of read-read-write operations (dst = f(srcA, srcB),
// with the testbench as the ALU, using both read ports and the write port in
// one cycle), then read every register back. A per-thread architectural
// model checks every read, so any leakage between the two partitions shows.
// The testbench also checks the join decision against the partition sizes
// (16|32 and 24|24 with the default 16 stretched rows) and reports the cycles
// spent, joined against sequential.
module tb_fss_workloads;
  import fss_pkg::*;

  localparam int R = 5, W = 32, NS = 2, EX = 16;
  localparam int NREG = 1 << R;
  localparam int OPS  = 60;

  int checks = 0, failures = 0;
  logic clk = 0;
  always #5 clk = ~clk;

  logic          rst_n, cfg_we;
  logic [NS-1:0] cfg_s, s;
  logic [R:0]    usage0, usage1, part0, part1;
  fss_mode_e     mode;
  logic          fits;
  logic [R-1:0]  t0_ra, t0_rb, t0_wa, t1_ra, t1_rb, t1_wa;
  logic          t0_we, t1_we;
  logic [W-1:0]  t0_wd, t1_wd, t0_rda, t0_rdb, t1_rda, t1_rdb;

  fss_regfile dut (.*);

  logic [W-1:0] arch [2][NREG];   // architectural model per thread
  int n_joined [3], n_seq [3], cyc_joined, cyc_seq;

  function automatic logic [W-1:0] alu(logic [W-1:0] a, logic [W-1:0] b, int n);
    return (a + b) ^ W'(n * 32'h9e3779b9);
  endfunction

  task automatic load_split(logic [NS-1:0] v);
    @(negedge clk);
    cfg_s = v; cfg_we = 1;
    @(negedge clk);
    cfg_we = 0;
  endtask

  task automatic cmp(string what, logic [W-1:0] got, logic [W-1:0] exp_v);
    checks++;
    if (got !== exp_v) begin
      failures++;
      if (failures < 15) $display("%s: got %h exp %h", what, got, exp_v);
    end
  endtask

  // Run thread programs. act[t] says whether thread t runs on port t in this
  // call; in one-task mode only port 0 is used and `who` names the thread.
  task automatic run_prog(logic act0, int u0, logic act1, int u1, int who0, int who1, output int cycles);
    int a0, b0, d0, a1, b1, d1;
    logic [W-1:0] v;
    int umax;
    umax = (act0 && u0 > u1) || !act1 ? u0 : u1;
    cycles = 0;
    // fill
    for (int i = 0; i < umax; i++) begin
      @(negedge clk);
      t0_we = act0 && i < u0; t0_wa = R'(i); t0_wd = $urandom;
      t1_we = act1 && i < u1; t1_wa = R'(i); t1_wd = $urandom;
      if (t0_we) arch[who0][i] = t0_wd;
      if (t1_we) arch[who1][i] = t1_wd;
      cycles++;
    end
    // operations: read two registers, write a third in the same cycle
    for (int n = 0; n < OPS; n++) begin
      @(negedge clk);
      a0 = $urandom % u0; b0 = $urandom % u0; d0 = $urandom % u0;
      a1 = (u1 > 0) ? $urandom % u1 : 0; b1 = (u1 > 0) ? $urandom % u1 : 0;
      d1 = (u1 > 0) ? $urandom % u1 : 0;
      t0_ra = R'(a0); t0_rb = R'(b0); t0_wa = R'(d0); t0_we = act0;
      t1_ra = R'(a1); t1_rb = R'(b1); t1_wa = R'(d1); t1_we = act1;
      #1;
      if (act0) begin
        cmp("t0 srcA", t0_rda, arch[who0][a0]);
        cmp("t0 srcB", t0_rdb, arch[who0][b0]);
        t0_wd = alu(t0_rda, t0_rdb, n);
        arch[who0][d0] = alu(arch[who0][a0], arch[who0][b0], n);
      end
      if (act1) begin
        cmp("t1 srcA", t1_rda, arch[who1][a1]);
        cmp("t1 srcB", t1_rdb, arch[who1][b1]);
        t1_wd = alu(t1_rda, t1_rdb, n + 1000);
        arch[who1][d1] = alu(arch[who1][a1], arch[who1][b1], n + 1000);
      end
      cycles++;
    end
    // read back
    @(negedge clk);
    t0_we = 0; t1_we = 0;
    for (int i = 0; i < umax; i += 2) begin
      t0_ra = R'(i); t0_rb = R'(i + 1); t1_ra = R'(i); t1_rb = R'(i + 1);
      #1;
      if (act0 && i < u0)     cmp("t0 final", t0_rda, arch[who0][i]);
      if (act0 && i + 1 < u0) cmp("t0 final", t0_rdb, arch[who0][i + 1]);
      if (act1 && i < u1)     cmp("t1 final", t1_rda, arch[who1][i]);
      if (act1 && i + 1 < u1) cmp("t1 final", t1_rdb, arch[who1][i + 1]);
      @(negedge clk);
      cycles++;
    end
  endtask

  task automatic run_pair(int cls, int u0, int u1);
    int chosen, cyc, cyc2, p0;
    logic exp_fit;
    chosen = -1;
    usage0 = (R+1)'(u0); usage1 = (R+1)'(u1);
    for (int k = 0; k < NS && chosen < 0; k++) begin
      load_split(~(NS'(1) << k));
      p0 = NREG / 2 + k * (NREG / 2 / NS);
      exp_fit = (u0 <= p0) && (u1 <= NREG - p0 + EX);
      cmp("fit flag", {31'd0, fits}, {31'd0, exp_fit});
      if (fits) chosen = k;
    end
    if (chosen >= 0) begin
      run_prog(1'b1, u0, 1'b1, u1, 0, 1, cyc);
      n_joined[cls]++;
      cyc_joined += cyc;
    end else begin
      load_split('1);
      run_prog(1'b1, u0, 1'b0, 0, 0, 0, cyc);
      run_prog(1'b1, u1, 1'b0, 0, 1, 0, cyc2);
      n_seq[cls]++;
      cyc_seq += cyc + cyc2;
    end
  endtask

  function automatic int pick_h();
    return 17 + $urandom % 16;
  endfunction
  function automatic int pick_l();
    return 1 + $urandom % 15;
  endfunction

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int c = 0; c < 3; c++) begin n_joined[c] = 0; n_seq[c] = 0; end
    cyc_joined = 0; cyc_seq = 0;
    rst_n = 0; cfg_we = 0; cfg_s = '1; t0_we = 0; t1_we = 0;
    t0_ra = 0; t0_rb = 0; t0_wa = 0; t1_ra = 0; t1_rb = 0; t1_wa = 0;
    t0_wd = 0; t1_wd = 0; usage0 = 0; usage1 = 0;
    repeat (2) @(posedge clk);
    #1 rst_n = 1;
    // class 0: higher-higher, including one pair that must share (24|24) and
    // one that cannot (both above 24)
    run_pair(0, 24, 20);
    run_pair(0, 30, 28);
    for (int n = 0; n < 8; n++) run_pair(0, pick_h(), pick_h());
    // class 1: higher-lower (the higher thread on the stretched side)
    for (int n = 0; n < 10; n++) run_pair(1, pick_l(), pick_h());
    // class 2: lower-lower
    for (int n = 0; n < 10; n++) run_pair(2, pick_l(), pick_l());

    $display("H-H joined %0d sequential %0d | H-L joined %0d sequential %0d | L-L joined %0d sequential %0d",
             n_joined[0], n_seq[0], n_joined[1], n_seq[1], n_joined[2], n_seq[2]);
    $display("cycles: joined pairs %0d, sequential pairs %0d", cyc_joined, cyc_seq);
    // with 16 stretched rows every higher-lower and lower-lower pair fits
    checks++; if (n_seq[1] != 0 || n_seq[2] != 0) failures++;
    checks++; if (n_joined[0] == 0 || n_seq[0] == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
