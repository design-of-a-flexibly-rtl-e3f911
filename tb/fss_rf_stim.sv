// fss_rf_stim: random-traffic checker for one fss_regfile of any size, used
// by tb_fss_regfile_configs to test several split/stretch configurations.
//
// It visits one-task mode, every single-split setting, a no-operation setting
// (when there are two or more split points) and some random settings. In each
// it drives random reads and writes on both threads' ports and compares every
// read with a model of the physical rows built from fss_ref_pkg. It raises
// `done` when finished and reports its counts; `n_extra` counts accesses to
// stretched rows and `n_protect` thread-1 writes outside its partition.
module fss_rf_stim #(
  parameter int NS = 2,
  parameter int EX = 16
) (
  input  logic clk,
  output logic done,
  output int   checks,
  output int   failures,
  output int   n_extra,
  output int   n_protect
);
  import fss_pkg::*;
  import fss_ref_pkg::*;

  localparam int R = 5, W = 32, NREG = 1 << R, ROWS = NREG + EX;

  logic          rst_n, cfg_we;
  logic [NS-1:0] cfg_s, s;
  logic [R:0]    usage0, usage1, part0, part1;
  fss_mode_e     mode;
  logic          fits;
  logic [R-1:0]  t0_ra, t0_rb, t0_wa, t1_ra, t1_rb, t1_wa;
  logic          t0_we, t1_we;
  logic [W-1:0]  t0_wd, t1_wd, t0_rda, t0_rdb, t1_rda, t1_rdb;

  fss_regfile #(.R(R), .W(W), .NUM_SPLIT(NS), .EXTRA(EX)) dut (.*);

  logic [W-1:0] model [ROWS];
  logic         valid [ROWS];
  logic [31:0]  cur_s;

  function automatic int map_t0(int i);
    if (n_open(cur_s, NS) > 1) return -1;
    return row_t0(cur_s, R, NS, i);
  endfunction

  function automatic int map_t1(int i);
    if (n_open(cur_s, NS) != 1) return -1;
    return row_t1(cur_s, R, NS, EX, i);
  endfunction

  task automatic check_read(int row, logic [W-1:0] got);
    logic [W-1:0] exp_v;
    if (row >= 0 && !valid[row]) return;
    exp_v = (row >= 0) ? model[row] : '0;
    checks++;
    if (got !== exp_v) begin
      failures++;
      if (failures < 10)
        $display("NS=%0d EX=%0d s=%b row=%0d got %h exp %h", NS, EX, cur_s[NS-1:0], row, got, exp_v);
    end
    if (row >= NREG) n_extra++;
  endtask

  task automatic set_split(logic [NS-1:0] v);
    @(negedge clk);
    t0_we = 0; t1_we = 0; cfg_s = v; cfg_we = 1;
    @(posedge clk);
    #1 cfg_we = 0;
    cur_s = {{(32-NS){1'b1}}, v};
  endtask

  task automatic run_cycles(int n);
    int r0w, r1w;
    for (int c = 0; c < n; c++) begin
      @(negedge clk);
      t0_ra = R'($urandom); t0_rb = R'($urandom); t0_wa = R'($urandom);
      t1_ra = R'($urandom); t1_rb = R'($urandom); t1_wa = R'($urandom);
      t0_we = 1'($urandom); t1_we = 1'($urandom);
      t0_wd = $urandom; t1_wd = $urandom;
      #1;
      check_read(map_t0(int'(t0_ra)), t0_rda);
      check_read(map_t0(int'(t0_rb)), t0_rdb);
      check_read(map_t1(int'(t1_ra)), t1_rda);
      check_read(map_t1(int'(t1_rb)), t1_rdb);
      r0w = t0_we ? map_t0(int'(t0_wa)) : -1;
      r1w = t1_we ? map_t1(int'(t1_wa)) : -1;
      if (n_open(cur_s, NS) == 1 && t1_we && r1w < 0) n_protect++;
      if (r1w >= NREG) n_extra++;
      @(posedge clk);
      if (r0w >= 0) begin model[r0w] = t0_wd; valid[r0w] = 1; end
      if (r1w >= 0) begin model[r1w] = t1_wd; valid[r1w] = 1; end
    end
  endtask

  initial begin
    done = 0; checks = 0; failures = 0; n_extra = 0; n_protect = 0;
    for (int j = 0; j < ROWS; j++) begin valid[j] = 0; model[j] = '0; end
    cur_s = '1;
    rst_n = 0; cfg_we = 0; cfg_s = '1; t0_we = 0; t1_we = 0;
    t0_ra = 0; t0_rb = 0; t0_wa = 0; t1_ra = 0; t1_rb = 0; t1_wa = 0;
    t0_wd = 0; t1_wd = 0; usage0 = 0; usage1 = 0;
    repeat (2) @(posedge clk);
    #1 rst_n = 1;
    run_cycles(200);
    for (int k = 0; k < NS; k++) begin
      set_split(~(NS'(1) << k));
      run_cycles(300);
      // partition sizes reported by the control block
      checks++;
      if (int'(part0) != pos(k, R, NS) || int'(part1) != NREG - pos(k, R, NS) + EX) begin
        failures++;
        $display("NS=%0d EX=%0d k=%0d part0=%0d part1=%0d", NS, EX, k, part0, part1);
      end
    end
    if (NS > 1) begin
      set_split('0);
      run_cycles(50);
    end
    for (int p = 0; p < 4; p++) begin
      set_split(NS'($urandom));
      run_cycles(100);
    end
    set_split('1);
    run_cycles(200);
    done = 1;
  end
endmodule
