// tb_fss_regfile_configs: the register file at other split/stretch sizes.
//
// The design study compared 1, 2, 4 and 8 split points and several numbers of
// stretched rows on a 32-entry file. This testbench runs the random-traffic
// checker fss_rf_stim on four such configurations side by side:
//   1 split point (plain splittable file, 16|16), no stretched rows
//   4 split points (cut every 4 rows), 1 stretched row
//   8 split points (cut every 2 rows), 4 stretched rows
//   8 split points, 16 stretched rows
// and requires that stretched rows were used wherever there are any and that
// out-of-partition writes by thread 1 were tried.
module tb_fss_regfile_configs;
  logic clk = 0;
  always #5 clk = ~clk;

  int checks, failures;
  logic done [4];
  int c [4], f [4], ex [4], pr [4];

  fss_rf_stim #(.NS(1), .EX(0))  u0 (.clk, .done(done[0]), .checks(c[0]), .failures(f[0]), .n_extra(ex[0]), .n_protect(pr[0]));
  fss_rf_stim #(.NS(4), .EX(1))  u1 (.clk, .done(done[1]), .checks(c[1]), .failures(f[1]), .n_extra(ex[1]), .n_protect(pr[1]));
  fss_rf_stim #(.NS(8), .EX(4))  u2 (.clk, .done(done[2]), .checks(c[2]), .failures(f[2]), .n_extra(ex[2]), .n_protect(pr[2]));
  fss_rf_stim #(.NS(8), .EX(16)) u3 (.clk, .done(done[3]), .checks(c[3]), .failures(f[3]), .n_extra(ex[3]), .n_protect(pr[3]));

  initial begin
    repeat (20000) @(posedge clk);
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", c[0] + c[1] + c[2] + c[3], f[0] + f[1] + f[2] + f[3] + 1);
    $finish;
  end

  initial begin
    #20;
    wait (done[0] && done[1] && done[2] && done[3]);
    checks = 0; failures = 0;
    for (int i = 0; i < 4; i++) begin
      checks += c[i]; failures += f[i];
      $display("config %0d: checks=%0d failures=%0d stretched=%0d protected=%0d", i, c[i], f[i], ex[i], pr[i]);
      checks++;
      if (pr[i] == 0) failures++;
    end
    checks += 3;
    if (ex[0] != 0) failures++;
    if (ex[1] == 0 || ex[2] == 0 || ex[3] == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
