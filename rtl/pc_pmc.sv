// pc_pmc -- PC-driven power management controller for split memory banks.
//
// The controller switches the power modes of individual memory modules while
// the software runs, without a single instruction in the software for it.
// Software writes a table once, over APB: each entry is an instruction
// address and, for every memory module, a power mode and an enable bit.  From
// then on the controller watches the program counter of the core.  When a
// valid PC equals the address of an entry, the modules whose enable bit is
// set are sent to the entry's power mode: at once for the active mode, after
// DELAY cycles for a sleep mode, so that the instruction that triggered the
// entry (typically the last access to that module) can still finish.
//
//   pc/pc_valid --> pmc_pc_match --> pmc_mem_delay (one per module)
//                        ^                 |
//   APB -----> pmc_apb_regs (table)        v
//                        ^          pmc_active_config --> LS/DS/SD pins
//                        +--- read back of current modes ---+
//
// Interface: pc is the PC of an early pipeline stage (the decode stage in
// the reference system), pc_valid is high when that stage holds a real
// instruction that will not be flushed.  mem_ls/mem_ds/mem_sd[m] drive the
// power pins of memory module m; cur_mode gives the same as an enum.  hit and
// pending are for observation.
// Timing: wake-ups reach the pins one clock after the matching PC, sleep
// transitions DELAY + 1 clocks after it.
//
// What follows the source design: the structure (table written over APB,
// valid-gated PC comparators, encoder, configuration multiplexer, per-memory
// delay used only for sleep transitions, active configuration driving LS, DS
// and SD), 128 entries, a 32-bit PC, eight modules and two delay cycles.  The
// register map, the match priority, the cancelling of waiting sleeps by a
// wake-up and the reset state (all active) are this design's choices.
module pc_pmc
  import pmc_pkg::*;
#(
  parameter int unsigned N_ENTRIES = 128,
  parameter int unsigned N_MEM     = 8,
  parameter int unsigned PC_W      = 32,
  parameter int unsigned DELAY     = 2,
  parameter int unsigned APB_AW    = 12,
  localparam int unsigned IDX_W    = (N_ENTRIES > 1) ? $clog2(N_ENTRIES) : 1
) (
  input  logic              clk,
  input  logic              rst_n,
  // core
  input  logic [PC_W-1:0]   pc,
  input  logic              pc_valid,
  // APB3 completer
  input  logic              psel,
  input  logic              penable,
  input  logic              pwrite,
  input  logic [APB_AW-1:0] paddr,
  input  logic [31:0]       pwdata,
  output logic              pready,
  output logic [31:0]       prdata,
  output logic              pslverr,
  // memory power control
  output logic [N_MEM-1:0]  mem_ls,
  output logic [N_MEM-1:0]  mem_ds,
  output logic [N_MEM-1:0]  mem_sd,
  output pm_e               cur_mode [N_MEM],
  // observation
  output logic              hit,
  output logic [IDX_W-1:0]  hit_idx,
  output logic [N_MEM-1:0]  pending
);

  logic [PC_W-1:0]  tbl_pc   [N_ENTRIES];
  pm_e              tbl_mode [N_ENTRIES][N_MEM];
  logic [N_MEM-1:0] tbl_en   [N_ENTRIES];

  pm_e              sel_mode [N_MEM];
  logic [N_MEM-1:0] sel_en;
  logic [N_MEM-1:0] apply_valid;
  pm_e              apply_mode [N_MEM];

  pmc_apb_regs #(
    .N_ENTRIES(N_ENTRIES), .N_MEM(N_MEM), .PC_W(PC_W), .DELAY(DELAY), .APB_AW(APB_AW)
  ) u_regs (
    .clk, .rst_n,
    .psel, .penable, .pwrite, .paddr, .pwdata, .pready, .prdata, .pslverr,
    .tbl_pc, .tbl_mode, .tbl_en,
    .cur_mode
  );

  pmc_pc_match #(
    .N_ENTRIES(N_ENTRIES), .N_MEM(N_MEM), .PC_W(PC_W)
  ) u_match (
    .pc, .pc_valid,
    .tbl_pc, .tbl_mode, .tbl_en,
    .hit, .hit_idx, .sel_mode, .sel_en
  );

  for (genvar m = 0; m < N_MEM; m++) begin : g_mem
    pmc_mem_delay #(.DELAY(DELAY)) u_delay (
      .clk, .rst_n,
      .req_valid  (sel_en[m]),
      .req_mode   (sel_mode[m]),
      .apply_valid(apply_valid[m]),
      .apply_mode (apply_mode[m]),
      .pending    (pending[m])
    );
  end

  pmc_active_config #(.N_MEM(N_MEM)) u_active (
    .clk, .rst_n,
    .apply_valid, .apply_mode,
    .cur_mode, .mem_ls, .mem_ds, .mem_sd
  );

endmodule
