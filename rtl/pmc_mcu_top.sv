// pmc_mcu_top -- memory subsystem of a microcontroller with PC-driven power
// management of split code and data memory banks.
//
// The code bank and the data bank are each split into N_MOD_BANK equal
// modules.  A PC-driven power management controller (pc_pmc) drives the LS,
// DS and SD pins of all 2*N_MOD_BANK modules.  PMC memory index m is code
// module m for m < N_MOD_BANK and data module m - N_MOD_BANK above.  The core,
// the bus fabric and the boot loader are outside this block: the core's
// decode-stage PC and its valid flag, the APB configuration port, and the
// instruction and data memory ports are top-level ports.
//
// Interface:
//   pc, pc_valid        PC of the core's decode stage, valid when not flushed
//   apb_*               APB3 port of the PMC table (zero wait states)
//   i_*                 code bank port (the core fetches here; the boot
//                       loader writes the program through it)
//   d_*                 data bank port
//   mem_ls/ds/sd        power pins of all modules, for observation
//   i_sleep_access,     an access reached a module that was not active
//   d_sleep_access      (a schedule error), one cycle after the request
//   pmc_hit, pmc_hit_idx  a valid PC matched table entry pmc_hit_idx
//   pmc_pending         per module: a sleep is waiting in the delay line
// Timing: both bank ports answer reads one cycle after the request.  Wake-ups
// reach the pins one cycle after the matching PC, sleeps DELAY + 1 cycles
// after it.
//
// What follows the source design: the arrangement of core PC, PMC and two
// private banks of four modules each, 64 KiB modules with a 128-entry PMC, a
// 32-bit PC and two delay cycles.  The module numbering, the port set and the
// observation outputs are this design's choices.
module pmc_mcu_top
  import pmc_pkg::*;
#(
  parameter int unsigned N_ENTRIES  = 128,
  parameter int unsigned PC_W       = 32,
  parameter int unsigned DELAY      = 2,
  parameter int unsigned N_MOD_BANK = 4,
  parameter int unsigned MOD_BYTES  = 65536,
  parameter int unsigned APB_AW     = 12,
  localparam int unsigned N_MEM     = 2 * N_MOD_BANK,
  localparam int unsigned BANK_AW   = $clog2(N_MOD_BANK * MOD_BYTES),
  localparam int unsigned MOD_W     = (N_MOD_BANK > 1) ? $clog2(N_MOD_BANK) : 1
) (
  input  logic               clk,
  input  logic               rst_n,
  // core program counter
  input  logic [PC_W-1:0]    pc,
  input  logic               pc_valid,
  // APB
  input  logic               apb_psel,
  input  logic               apb_penable,
  input  logic               apb_pwrite,
  input  logic [APB_AW-1:0]  apb_paddr,
  input  logic [31:0]        apb_pwdata,
  output logic               apb_pready,
  output logic [31:0]        apb_prdata,
  output logic               apb_pslverr,
  // code bank
  input  logic               i_req,
  input  logic               i_we,
  input  logic [3:0]         i_be,
  input  logic [BANK_AW-1:0] i_addr,
  input  logic [31:0]        i_wdata,
  output logic [31:0]        i_rdata,
  output logic               i_rvalid,
  // data bank
  input  logic               d_req,
  input  logic               d_we,
  input  logic [3:0]         d_be,
  input  logic [BANK_AW-1:0] d_addr,
  input  logic [31:0]        d_wdata,
  output logic [31:0]        d_rdata,
  output logic               d_rvalid,
  // observation
  output logic [N_MEM-1:0]   mem_ls,
  output logic [N_MEM-1:0]   mem_ds,
  output logic [N_MEM-1:0]   mem_sd,
  output logic               i_sleep_access,
  output logic [MOD_W-1:0]   i_sleep_access_mod,
  output logic               d_sleep_access,
  output logic [MOD_W-1:0]   d_sleep_access_mod,
  output logic               pmc_hit,
  output logic [$clog2(N_ENTRIES)-1:0] pmc_hit_idx,
  output logic [N_MEM-1:0]   pmc_pending
);

  pc_pmc #(
    .N_ENTRIES(N_ENTRIES), .N_MEM(N_MEM), .PC_W(PC_W), .DELAY(DELAY), .APB_AW(APB_AW)
  ) u_pmc (
    .clk, .rst_n,
    .pc, .pc_valid,
    .psel(apb_psel), .penable(apb_penable), .pwrite(apb_pwrite),
    .paddr(apb_paddr), .pwdata(apb_pwdata),
    .pready(apb_pready), .prdata(apb_prdata), .pslverr(apb_pslverr),
    .mem_ls, .mem_ds, .mem_sd,
    .cur_mode(),
    .hit(pmc_hit), .hit_idx(pmc_hit_idx), .pending(pmc_pending)
  );

  mem_bank #(.N_MOD(N_MOD_BANK), .MOD_BYTES(MOD_BYTES)) u_code (
    .clk, .rst_n,
    .req(i_req), .we(i_we), .be(i_be), .addr(i_addr), .wdata(i_wdata),
    .rdata(i_rdata), .rvalid(i_rvalid),
    .ls(mem_ls[N_MOD_BANK-1:0]), .ds(mem_ds[N_MOD_BANK-1:0]), .sd(mem_sd[N_MOD_BANK-1:0]),
    .sleep_access(i_sleep_access), .sleep_access_mod(i_sleep_access_mod)
  );

  mem_bank #(.N_MOD(N_MOD_BANK), .MOD_BYTES(MOD_BYTES)) u_data (
    .clk, .rst_n,
    .req(d_req), .we(d_we), .be(d_be), .addr(d_addr), .wdata(d_wdata),
    .rdata(d_rdata), .rvalid(d_rvalid),
    .ls(mem_ls[N_MEM-1:N_MOD_BANK]), .ds(mem_ds[N_MEM-1:N_MOD_BANK]), .sd(mem_sd[N_MEM-1:N_MOD_BANK]),
    .sleep_access(d_sleep_access), .sleep_access_mod(d_sleep_access_mod)
  );

endmodule
