// tb_pmc_active_config -- self-checking test of the active configuration
// register.
//
// Applies random modes to random subsets of memory modules and checks, one
// clock later, the stored mode of every module and its LS/DS/SD pins against
// a shadow copy kept by the testbench.  Modules without apply_valid must keep
// their mode.  Also checks the reset state (all active, all pins low).
module tb_pmc_active_config;
  import pmc_pkg::*;

  localparam int unsigned NM = 8;

  logic clk = 1'b0, rst_n = 1'b0;
  logic [NM-1:0] apply_valid = '0;
  pm_e           apply_mode [NM];
  pm_e           cur_mode [NM];
  logic [NM-1:0] mem_ls, mem_ds, mem_sd;

  int checks = 0, failures = 0;
  pm_e shadow [NM];

  pmc_active_config #(.N_MEM(NM)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic compare(input string when);
    for (int m = 0; m < NM; m++) begin
      checks++;
      if (cur_mode[m] != shadow[m] ||
          mem_ls[m] != (shadow[m] == PM_LS) ||
          mem_ds[m] != (shadow[m] == PM_DS) ||
          mem_sd[m] != (shadow[m] == PM_SD)) begin
        failures++;
        $display("FAIL %s: memory %0d is %s (pins %b%b%b), expected %s", when, m,
                 cur_mode[m].name(), mem_ls[m], mem_ds[m], mem_sd[m], shadow[m].name());
      end
    end
  endtask

  initial begin
    for (int m = 0; m < NM; m++) begin apply_mode[m] = PM_SD; shadow[m] = PM_ACTIVE; end
    apply_valid = '1;      // ignored during reset
    repeat (3) @(posedge clk);
    #1;
    compare("reset");
    apply_valid = '0;
    rst_n = 1;
    for (int cyc = 0; cyc < 1000; cyc++) begin
      apply_valid = NM'($urandom);
      for (int m = 0; m < NM; m++) apply_mode[m] = pm_e'($urandom_range(3));
      // no change before the clock edge
      #1 compare("before edge");
      @(posedge clk);
      for (int m = 0; m < NM; m++) if (apply_valid[m]) shadow[m] = apply_mode[m];
      #1 compare("after edge");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
