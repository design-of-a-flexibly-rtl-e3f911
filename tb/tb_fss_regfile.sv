// tb_fss_regfile: end-to-end test of the FSS register file at its default
// size (32 main registers, 32-bit words, 2 split points, 16 stretched rows).
//
// The test walks through the operating modes - one task, two tasks cut at
// each split point, no operation - and back, switching the split setting
// through the configuration port. In every cycle both threads issue random
// reads on both read ports and random writes; indices are biased towards each
// thread's own range but also go past it. A model of the physical rows
// (fss_ref_pkg gives the index-to-row mapping) predicts every read result and
// the fit flag. Reads of rows never written are not compared.
//
// Mechanisms counted, each of which must occur: one-task accesses, two-task
// accesses at each split point, accesses to stretched rows, both threads
// writing in the same cycle, thread-1 writes outside its partition that must
// not land, no-operation cycles with write attempts, mode switches with data
// kept across the switch, and fit checks that pass and that fail.
module tb_fss_regfile;
  import fss_pkg::*;
  import fss_ref_pkg::*;

  localparam int R = 5, W = 32, NS = 2, EX = 16;
  localparam int NREG = 1 << R, ROWS = NREG + EX;

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

  logic [W-1:0] model [ROWS];
  logic         valid [ROWS];
  logic [31:0]  cur_s;
  int           cur_cfg_id;   // which configuration the last writes were made in
  int           row_cfg [ROWS];

  // mechanism counters
  int n_one, n_two [NS], n_extra, n_dual_wr, n_protect, n_nop, n_switch,
      n_kept, n_fit_yes, n_fit_no;

  function automatic int map_t0(int i);
    if (n_open(cur_s, NS) > 1) return -1;
    return row_t0(cur_s, R, NS, i);
  endfunction

  function automatic int map_t1(int i);
    if (n_open(cur_s, NS) != 1) return -1;
    return row_t1(cur_s, R, NS, EX, i);
  endfunction

  task automatic check_read(string what, int row, logic [W-1:0] got);
    logic [W-1:0] exp_v;
    if (row >= 0 && !valid[row]) return;
    exp_v = (row >= 0) ? model[row] : '0;
    checks++;
    if (got !== exp_v) begin
      failures++;
      if (failures < 15)
        $display("%s: s=%b row=%0d got %h exp %h", what, cur_s[NS-1:0], row, got, exp_v);
    end
    if (row >= NREG) n_extra++;
    if (row >= 0 && row_cfg[row] != cur_cfg_id) n_kept++;
  endtask

  function automatic logic [R-1:0] pick_idx(int lim);
    if (lim > 0 && ($urandom % 4) != 0) return R'($urandom % lim);
    return R'($urandom);
  endfunction

  task automatic run_cycles(int n);
    int lim0, lim1, r0w, r1w, no;
    logic efit;
    for (int c = 0; c < n; c++) begin
      @(negedge clk);
      no   = n_open(cur_s, NS);
      lim0 = (no == 0) ? NREG : lo_limit(cur_s, R, NS);
      lim1 = (no == 1) ? NREG - hi_start(cur_s, R, NS) + EX : 0;
      t0_ra = pick_idx(lim0); t0_rb = pick_idx(lim0); t0_wa = pick_idx(lim0);
      t1_ra = pick_idx(lim1); t1_rb = pick_idx(lim1); t1_wa = pick_idx(lim1);
      t0_we = ($urandom % 3) != 0; t1_we = ($urandom % 3) != 0;
      t0_wd = $urandom; t1_wd = $urandom;
      usage0 = (R+1)'($urandom % (NREG + 4));
      usage1 = (R+1)'($urandom % (NREG + 4));
      #1;
      check_read("t0 A", map_t0(int'(t0_ra)), t0_rda);
      check_read("t0 B", map_t0(int'(t0_rb)), t0_rdb);
      check_read("t1 A", map_t1(int'(t1_ra)), t1_rda);
      check_read("t1 B", map_t1(int'(t1_rb)), t1_rdb);
      // fit flag
      efit = (no <= 1) && int'(usage0) <= ((no == 0) ? NREG : lim0) && int'(usage1) <= lim1;
      checks++;
      if (fits !== efit) begin
        failures++;
        $display("fits: s=%b u0=%0d u1=%0d got %b", cur_s[NS-1:0], usage0, usage1, fits);
      end
      if (efit) n_fit_yes++; else n_fit_no++;
      // mechanism bookkeeping
      if (no == 0) n_one++;
      if (no == 1) for (int k = 0; k < NS; k++) if (!cur_s[k]) n_two[k]++;
      if (no > 1 && (t0_we || t1_we)) n_nop++;
      r0w = t0_we ? map_t0(int'(t0_wa)) : -1;
      r1w = t1_we ? map_t1(int'(t1_wa)) : -1;
      if (no == 1 && t1_we && r1w < 0) n_protect++;
      if (r0w >= 0 && r1w >= 0) n_dual_wr++;
      if (r1w >= NREG) n_extra++;
      @(posedge clk);
      if (r0w >= 0) begin model[r0w] = t0_wd; valid[r0w] = 1; row_cfg[r0w] = cur_cfg_id; end
      if (r1w >= 0) begin model[r1w] = t1_wd; valid[r1w] = 1; row_cfg[r1w] = cur_cfg_id; end
    end
  endtask

  task automatic set_split(logic [NS-1:0] ns);
    @(negedge clk);
    t0_we = 0; t1_we = 0;
    cfg_s = ns; cfg_we = 1;
    @(posedge clk);
    #1 cfg_we = 0;
    cur_s = {{(32-NS){1'b1}}, ns};
    cur_cfg_id++;
    n_switch++;
    checks++;
    if (s !== ns) begin failures++; $display("split lines not loaded: %b", s); end
  endtask

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int j = 0; j < ROWS; j++) begin valid[j] = 0; model[j] = '0; row_cfg[j] = -1; end
    n_one = 0; n_extra = 0; n_dual_wr = 0; n_protect = 0; n_nop = 0; n_switch = 0;
    n_kept = 0; n_fit_yes = 0; n_fit_no = 0;
    for (int k = 0; k < NS; k++) n_two[k] = 0;
    cur_s = '1; cur_cfg_id = 0;
    rst_n = 0; cfg_we = 0; cfg_s = '1; t0_we = 0; t1_we = 0;
    t0_ra = 0; t0_rb = 0; t0_wa = 0; t1_ra = 0; t1_rb = 0; t1_wa = 0;
    t0_wd = 0; t1_wd = 0; usage0 = 0; usage1 = 0;
    repeat (2) @(posedge clk);
    #1 rst_n = 1;
    checks++;
    if (mode !== MODE_ONE) begin failures++; $display("not one task after reset"); end

    run_cycles(300);               // one task, whole file
    set_split(2'b10);              // S0 open: 16 | 16 + 16 stretched
    run_cycles(400);
    set_split(2'b01);              // S1 open: 24 | 8 + 16 stretched
    run_cycles(400);
    set_split(2'b00);              // no operation
    run_cycles(50);
    set_split(2'b10);
    run_cycles(200);
    set_split(2'b11);              // back to one task
    run_cycles(200);
    for (int p = 0; p < 6; p++) begin
      set_split(NS'($urandom));
      run_cycles(150);
    end

    $display("mechanisms: one=%0d two@S0=%0d two@S1=%0d extra=%0d dual_write=%0d protect=%0d nop=%0d switch=%0d kept=%0d fit=%0d/%0d",
             n_one, n_two[0], n_two[1], n_extra, n_dual_wr, n_protect, n_nop, n_switch,
             n_kept, n_fit_yes, n_fit_no);
    if (n_one == 0)     begin failures++; $display("one-task mode never exercised"); end
    for (int k = 0; k < NS; k++)
      if (n_two[k] == 0) begin failures++; $display("split point %0d never used", k); end
    if (n_extra == 0)   begin failures++; $display("stretched rows never used"); end
    if (n_dual_wr == 0) begin failures++; $display("no simultaneous writes"); end
    if (n_protect == 0) begin failures++; $display("no out-of-partition write"); end
    if (n_nop == 0)     begin failures++; $display("no-operation mode never exercised"); end
    if (n_switch == 0)  begin failures++; $display("no mode switch"); end
    if (n_kept == 0)    begin failures++; $display("no data read across a switch"); end
    if (n_fit_yes == 0 || n_fit_no == 0) begin failures++; $display("fit check one-sided"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
