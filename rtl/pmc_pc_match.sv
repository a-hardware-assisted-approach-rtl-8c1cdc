// pmc_pc_match -- PC comparators, encoder and configuration multiplexer of
// the PC-driven PMC.
//
// One equality comparator per table entry compares the observed program
// counter with the entry's PC address.  A comparison only counts while
// pc_valid is high, that is while the pipeline stage the PC is taken from is
// not being flushed.  The encoder turns the compare vector into the index of
// the matching entry, and the multiplexer forwards that entry's bank
// configuration (mode and enable bit per memory module).
//
// Timing: purely combinational; the result belongs to the PC of the same
// cycle.
//
// What follows the source design: comparators gated by the PC-valid flag, an
// encoder and a configuration multiplexer.  If several entries hold the same
// PC (the schedule generator does not produce that), the lowest index wins:
// that priority is this design's choice.
module pmc_pc_match
  import pmc_pkg::*;
#(
  parameter int unsigned N_ENTRIES = 128,
  parameter int unsigned N_MEM     = 8,
  parameter int unsigned PC_W      = 32,
  localparam int unsigned IDX_W    = (N_ENTRIES > 1) ? $clog2(N_ENTRIES) : 1
) (
  input  logic [PC_W-1:0]  pc,
  input  logic             pc_valid,
  input  logic [PC_W-1:0]  tbl_pc   [N_ENTRIES],
  input  pm_e              tbl_mode [N_ENTRIES][N_MEM],
  input  logic [N_MEM-1:0] tbl_en   [N_ENTRIES],
  output logic             hit,
  output logic [IDX_W-1:0] hit_idx,
  output pm_e              sel_mode [N_MEM],
  output logic [N_MEM-1:0] sel_en
);

  logic [N_ENTRIES-1:0] eq;

  // comparators
  always_comb begin
    for (int e = 0; e < N_ENTRIES; e++) eq[e] = pc_valid && (pc == tbl_pc[e]);
  end

  // encoder: lowest matching index
  always_comb begin
    hit     = 1'b0;
    hit_idx = '0;
    for (int e = N_ENTRIES - 1; e >= 0; e--) begin
      if (eq[e]) begin
        hit     = 1'b1;
        hit_idx = IDX_W'(e);
      end
    end
  end

  // configuration multiplexer; no enable leaves the multiplexer without a hit
  always_comb begin
    for (int m = 0; m < N_MEM; m++) sel_mode[m] = tbl_mode[hit_idx][m];
    sel_en = hit ? tbl_en[hit_idx] : '0;
  end

endmodule
