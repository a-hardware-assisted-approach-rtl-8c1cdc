// pmc_apb_regs -- configuration table of the PC-driven PMC, written over APB.
//
// The table holds N_ENTRIES entries.  Each entry is a PC address and a bank
// configuration: one power mode and one enable bit per memory module.  An
// entry whose enable bits are all zero changes nothing, so the reset value
// (all zero) leaves the controller inert until software programs it.  The
// target software writes the table once, at start-up, before the code whose
// memory it manages runs.
//
// All entries are flip-flops, not a RAM, because the PC is compared with every
// entry in every cycle.
//
// Interface: an APB3 completer with zero wait states (PREADY is always 1).
// Register map: see pmc_pkg.  A write to a read-only register or to an address
// outside the map, and a read outside the map, complete with PSLVERR = 1 and
// change nothing.  PADDR[1:0] is ignored.  A write takes effect at the clock
// edge that ends the APB access phase; the entry is used by the matcher from
// the next cycle on.
//
// What follows the source design: the table of PC addresses and bank
// configurations (mode and enable per module), written by software over APB.
// The register layout, the error responses and the read-back of the table
// and of the current power modes are this design's own choices.
module pmc_apb_regs
  import pmc_pkg::*;
#(
  parameter int unsigned N_ENTRIES = 128,
  parameter int unsigned N_MEM     = 8,
  parameter int unsigned PC_W      = 32,
  parameter int unsigned DELAY     = 2,
  parameter int unsigned APB_AW    = 12
) (
  input  logic              clk,
  input  logic              rst_n,
  // APB3 completer
  input  logic              psel,
  input  logic              penable,
  input  logic              pwrite,
  input  logic [APB_AW-1:0] paddr,
  input  logic [31:0]       pwdata,
  output logic              pready,
  output logic [31:0]       prdata,
  output logic              pslverr,
  // table contents
  output logic [PC_W-1:0]   tbl_pc   [N_ENTRIES],
  output pm_e               tbl_mode [N_ENTRIES][N_MEM],
  output logic [N_MEM-1:0]  tbl_en   [N_ENTRIES],
  // current power modes, for read-back
  input  pm_e               cur_mode [N_MEM]
);

  localparam int unsigned IDX_W   = (N_ENTRIES > 1) ? $clog2(N_ENTRIES) : 1;
  localparam int unsigned STATUS  = status_addr(N_ENTRIES);
  localparam int unsigned INFO    = info_addr(N_ENTRIES);

  initial begin
    assert (3 * N_MEM <= 32) else $error("bank configuration does not fit a 32-bit register");
    assert (PC_W <= 32)      else $error("PC wider than an APB register");
    assert ((INFO + 4) <= (1 << APB_AW)) else $error("APB address too narrow for the table");
  end

  logic                access;
  logic                in_table;
  logic [IDX_W-1:0]    idx;
  logic                is_cfg;
  logic [APB_AW-1:0]   waddr;

  assign access   = psel & penable;
  assign waddr    = {paddr[APB_AW-1:2], 2'b00};
  assign in_table = 32'(waddr) < table_bytes(N_ENTRIES);
  assign idx      = IDX_W'(waddr >> 3);
  assign is_cfg   = waddr[2];
  assign pready   = 1'b1;

  // write side
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int e = 0; e < N_ENTRIES; e++) begin
        tbl_pc[e] <= '0;
        tbl_en[e] <= '0;
        for (int m = 0; m < N_MEM; m++) tbl_mode[e][m] <= PM_ACTIVE;
      end
    end else if (access && pwrite && in_table) begin
      if (is_cfg) begin
        for (int m = 0; m < N_MEM; m++) begin
          tbl_mode[idx][m] <= pm_e'(pwdata[2*m +: 2]);
          tbl_en[idx][m]   <= pwdata[2*N_MEM + m];
        end
      end else begin
        tbl_pc[idx] <= pwdata[PC_W-1:0];
      end
    end
  end

  // read side and error response (combinational, zero wait states)
  always_comb begin
    prdata  = '0;
    pslverr = 1'b0;
    if (access) begin
      if (in_table) begin
        if (is_cfg) begin
          for (int m = 0; m < N_MEM; m++) begin
            prdata[2*m +: 2]    = tbl_mode[idx][m];
            prdata[2*N_MEM + m] = tbl_en[idx][m];
          end
        end else begin
          prdata[PC_W-1:0] = tbl_pc[idx];
        end
      end else if (32'(waddr) == STATUS) begin
        for (int m = 0; m < N_MEM; m++) prdata[2*m +: 2] = cur_mode[m];
        pslverr = pwrite;
      end else if (32'(waddr) == INFO) begin
        prdata  = {8'(DELAY), 8'(N_MEM), 16'(N_ENTRIES)};
        pslverr = pwrite;
      end else begin
        pslverr = 1'b1;
      end
    end
  end

  // APB protocol rules
  a_penable_needs_psel : assert property (@(posedge clk) disable iff (!rst_n)
    penable |-> psel);
  a_setup_then_access  : assert property (@(posedge clk) disable iff (!rst_n)
    (psel && !penable) |=> (psel && penable));
  a_stable_in_access   : assert property (@(posedge clk) disable iff (!rst_n)
    (psel && !penable) |=> ($stable(paddr) && $stable(pwrite) && $stable(pwdata)));

endmodule
