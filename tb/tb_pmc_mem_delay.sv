// tb_pmc_mem_delay -- self-checking test of the per-memory delay.
//
// Drives random request streams (wake-ups, sleeps, idle cycles) into
// pmc_mem_delay with DELAY = 2 and DELAY = 0 and compares every cycle with a
// reference built from the rules: a sleep request comes out exactly DELAY
// cycles after it went in, unless a wake-up arrived in between; a wake-up
// comes out in the same cycle.  Also counts the cases that matter: delayed
// sleeps, immediate wake-ups and sleeps cancelled by a wake-up.
module tb_pmc_mem_delay;
  import pmc_pkg::*;

  logic clk = 1'b0, rst_n = 1'b0;
  logic req_valid;
  pm_e  req_mode;
  logic av2, av0, pend2, pend0;
  pm_e  am2, am0;

  int checks = 0, failures = 0;
  int n_sleep = 0, n_wake = 0, n_cancel = 0;

  pmc_mem_delay #(.DELAY(2)) dut2 (.clk, .rst_n, .req_valid, .req_mode,
    .apply_valid(av2), .apply_mode(am2), .pending(pend2));
  pmc_mem_delay #(.DELAY(0)) dut0 (.clk, .rst_n, .req_valid, .req_mode,
    .apply_valid(av0), .apply_mode(am0), .pending(pend0));

  always #5 clk = ~clk;

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // request history: index 0 = this cycle
  bit  hv [3];
  pm_e hm [3];

  initial begin
    req_valid = 0;
    req_mode  = PM_ACTIVE;
    for (int i = 0; i < 3; i++) begin hv[i] = 0; hm[i] = PM_ACTIVE; end
    repeat (2) @(posedge clk);
    #1 rst_n = 1;
    for (int cyc = 0; cyc < 3000; cyc++) begin
      bit  exp_v, woke_between;
      pm_e exp_m;
      // new request for this cycle
      req_valid = ($urandom_range(2) == 0);
      req_mode  = pm_e'($urandom_range(3));
      for (int i = 2; i > 0; i--) begin hv[i] = hv[i-1]; hm[i] = hm[i-1]; end
      hv[0] = req_valid;
      hm[0] = req_mode;
      #1;
      // reference, DELAY = 2
      woke_between = (hv[1] && hm[1] == PM_ACTIVE) || (hv[0] && hm[0] == PM_ACTIVE);
      if (hv[0] && hm[0] == PM_ACTIVE) begin
        exp_v = 1; exp_m = PM_ACTIVE; n_wake++;
      end else if (hv[2] && hm[2] != PM_ACTIVE && !(hv[1] && hm[1] == PM_ACTIVE)) begin
        exp_v = 1; exp_m = hm[2]; n_sleep++;
      end else begin
        exp_v = 0; exp_m = PM_ACTIVE;
      end
      if (hv[2] && hm[2] != PM_ACTIVE && woke_between) n_cancel++;
      checks++;
      if (av2 != exp_v || (exp_v && am2 != exp_m)) begin
        failures++;
        $display("FAIL cycle %0d: DELAY=2 gives %0b/%s, expected %0b/%s", cyc, av2, am2.name(),
                 exp_v, exp_m.name());
      end
      // reference, DELAY = 0: everything passes at once
      checks++;
      if (av0 != req_valid || (req_valid && am0 != req_mode) || pend0) begin
        failures++;
        $display("FAIL cycle %0d: DELAY=0", cyc);
      end
      @(posedge clk);
      #1;
    end
    checks++;
    if (n_sleep == 0 || n_wake == 0 || n_cancel == 0) begin
      failures++;
      $display("FAIL: a case was not exercised");
    end
    $display("delayed sleeps=%0d wake-ups=%0d cancelled=%0d", n_sleep, n_wake, n_cancel);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
