// pmc_active_config -- active configuration register of the PC-driven PMC.
//
// Holds the current power mode of every memory module and drives the power
// control pins of the memory macros: LS (light sleep), DS (deep sleep) and
// SD (shut down).  All three low means active; at most one is high.
//
// Interface: apply_valid[m]/apply_mode[m] come from the per-memory delay of
// module m.  Timing: a mode applied in cycle t is on the pins in cycle t+1.
// The pins are driven straight from flip-flops, so they are glitch free.
//
// What follows the source design: a register holding the applied
// configuration, driving LS, DS and SD of each memory bank.  This design's
// own choice: after reset every module is active, because the boot code
// loads code and data into the modules before the schedule starts.
module pmc_active_config
  import pmc_pkg::*;
#(
  parameter int unsigned N_MEM = 8
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic [N_MEM-1:0] apply_valid,
  input  pm_e              apply_mode [N_MEM],
  output pm_e              cur_mode   [N_MEM],
  output logic [N_MEM-1:0] mem_ls,
  output logic [N_MEM-1:0] mem_ds,
  output logic [N_MEM-1:0] mem_sd
);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int m = 0; m < N_MEM; m++) begin
        cur_mode[m] <= PM_ACTIVE;
        mem_ls[m]   <= 1'b0;
        mem_ds[m]   <= 1'b0;
        mem_sd[m]   <= 1'b0;
      end
    end else begin
      for (int m = 0; m < N_MEM; m++) begin
        if (apply_valid[m]) begin
          cur_mode[m] <= apply_mode[m];
          mem_ls[m]   <= (apply_mode[m] == PM_LS);
          mem_ds[m]   <= (apply_mode[m] == PM_DS);
          mem_sd[m]   <= (apply_mode[m] == PM_SD);
        end
      end
    end
  end

  // the pins never request two modes at once
  for (genvar m = 0; m < N_MEM; m++) begin : g_chk
    a_onehot0 : assert property (@(posedge clk) disable iff (!rst_n)
      $onehot0({mem_ls[m], mem_ds[m], mem_sd[m]}));
  end

endmodule
