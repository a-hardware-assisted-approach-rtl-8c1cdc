// tb_pmc_mcu_top_16k -- end-to-end test of pmc_mcu_top in its smaller
// configuration: two banks of four 16 KiB modules and a 16-entry table.
//
// Runs two synthetic programs whose sleep schedules need 11 and 14 table
// entries, one using all four data modules and one using modules 0, 1 and
// 3, the entry counts and module use of the two workloads evaluated on this
// memory configuration.  See pmc_mcu_driver for what is built and checked.
module tb_pmc_mcu_top_16k;
  import pmc_pkg::*;

  localparam int unsigned N_MEM = 8, BANK_AW = 16;

  logic clk = 1'b0;
  logic rst_n;
  logic [31:0] pc;
  logic pc_valid;
  logic apb_psel, apb_penable, apb_pwrite, apb_pready, apb_pslverr;
  logic [11:0] apb_paddr;
  logic [31:0] apb_pwdata, apb_prdata;
  logic i_req, i_we, i_rvalid, d_req, d_we, d_rvalid;
  logic [3:0] i_be, d_be;
  logic [BANK_AW-1:0] i_addr, d_addr;
  logic [31:0] i_wdata, i_rdata, d_wdata, d_rdata;
  logic [N_MEM-1:0] mem_ls, mem_ds, mem_sd, pmc_pending;
  logic i_sleep_access, d_sleep_access, pmc_hit;
  logic [1:0] i_sleep_access_mod, d_sleep_access_mod;
  logic [3:0] pmc_hit_idx;

  always #5 clk = ~clk;

  pmc_mcu_top #(.N_ENTRIES(16), .MOD_BYTES(16384)) dut (.*);
  pmc_mcu_driver #(.N_ENTRIES(16), .MOD_BYTES(16384)) drv (.*);

  initial begin
    repeat (200000) @(posedge clk);
    drv.failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", drv.checks, drv.failures);
    $finish;
  end

  initial begin
    drv.run_workload("matmult-like",  11, 4'b1111, 30);
    drv.run_workload("compress-like", 14, 4'b1011, 30);
    drv.final_checks();
    $display("TB_RESULT checks=%0d failures=%0d", drv.checks, drv.failures);
    $finish;
  end
endmodule
