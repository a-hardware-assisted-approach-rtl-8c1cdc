// mem_bank -- a code or data memory bank split into N_MOD equal memory
// modules, each with its own power pins.
//
// Splitting a bank lets the parts that hold no live code or data, or that are
// not accessed for a while, sleep while the rest keeps working.  The bank
// decodes the byte address: the upper bits select the module, the lower bits
// the word in it.  Only the selected module is enabled, so the others see no
// access and may sleep.
//
// An access to a module that is not active is a schedule error: the bank
// flags it on sleep_access, one cycle after the request, together with the
// module's index.  A correct sleep schedule never raises it.
//
// Interface: req/we/be/addr/wdata are sampled at the rising edge; rdata and
// rvalid follow one cycle later (rvalid marks a read).  ls/ds/sd[k] are the
// power pins of module k, from the power management controller.
//
// What follows the source design: a bank of four equal modules per bank
// (16 KiB or 64 KiB each), individually power managed.  This design's own
// choices: contiguous address ranges per module, the one-cycle port and the
// sleep_access flag.
module mem_bank #(
  parameter int unsigned N_MOD     = 4,
  parameter int unsigned MOD_BYTES = 65536,
  localparam int unsigned MOD_W    = (N_MOD > 1) ? $clog2(N_MOD) : 1,
  localparam int unsigned WORDS    = MOD_BYTES / 4,
  localparam int unsigned WAW      = $clog2(WORDS),
  localparam int unsigned AW       = $clog2(N_MOD * MOD_BYTES)
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             req,
  input  logic             we,
  input  logic [3:0]       be,
  input  logic [AW-1:0]    addr,
  input  logic [31:0]      wdata,
  output logic [31:0]      rdata,
  output logic             rvalid,
  input  logic [N_MOD-1:0] ls,
  input  logic [N_MOD-1:0] ds,
  input  logic [N_MOD-1:0] sd,
  output logic             sleep_access,
  output logic [MOD_W-1:0] sleep_access_mod
);

  logic [MOD_W-1:0] sel, sel_q;
  logic [WAW-1:0]   waddr;
  logic [31:0]      mod_rdata [N_MOD];
  logic [N_MOD-1:0] mod_err;

  assign sel   = (N_MOD > 1) ? MOD_W'(addr >> $clog2(MOD_BYTES)) : '0;
  assign waddr = addr[WAW+1:2];

  for (genvar k = 0; k < N_MOD; k++) begin : g_mod
    sram_macro_pm #(.WORDS(WORDS), .DW(32)) u_sram (
      .clk,
      .ce   (req && (sel == MOD_W'(k))),
      .we,
      .be,
      .addr (waddr),
      .wdata,
      .rdata(mod_rdata[k]),
      .ls   (ls[k]),
      .ds   (ds[k]),
      .sd   (sd[k]),
      .err  (mod_err[k])
    );
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      sel_q  <= '0;
      rvalid <= 1'b0;
    end else begin
      if (req) sel_q <= sel;
      rvalid <= req && !we;
    end
  end

  assign rdata = mod_rdata[sel_q];

  always_comb begin
    sleep_access     = |mod_err;
    sleep_access_mod = '0;
    for (int k = N_MOD - 1; k >= 0; k--) begin
      if (mod_err[k]) sleep_access_mod = MOD_W'(k);
    end
  end

endmodule
