// pmc_mem_delay -- per-memory delay of the PC-driven PMC.
//
// A PC match is seen while the matching instruction is still early in the
// pipeline (the decode stage in the reference system).  That instruction may
// itself still access the memory module that the schedule sends to sleep, so
// a transition into a sleep mode must wait until the access is over.  This
// block holds sleep requests in a DELAY-stage shift register; a request for
// the active mode skips the shift register and is applied at once, so a wake
// up is never late.
//
// Interface: req_valid/req_mode is the request for this memory module in the
// current cycle (PC hit and the module's enable bit set).  apply_valid /
// apply_mode go to the active-configuration register.
// Timing: a wake-up request is output in the same cycle (the memory's pins
// change one clock later); a sleep request is output DELAY cycles later (the
// pins change DELAY + 1 clocks after the match).  DELAY = 0 passes sleep
// requests through like wake-ups.
//
// What follows the source design: a delay of configurable length, used only
// for transitions into sleep modes, two cycles in the evaluated system.  This
// design's own choices: the length is fixed at build time by DELAY, and a
// wake-up request cancels the sleep requests still waiting in the shift
// register, so that a module woken after a sleep was scheduled ends up
// active.  If a sleep request leaves the shift register in the same cycle as
// a new wake-up arrives, the wake-up wins.
module pmc_mem_delay
  import pmc_pkg::*;
#(
  parameter int unsigned DELAY = 2
) (
  input  logic clk,
  input  logic rst_n,
  input  logic req_valid,
  input  pm_e  req_mode,
  output logic apply_valid,
  output pm_e  apply_mode,
  output logic pending        // a sleep request is waiting in the delay line
);

  logic req_wake, req_sleep;
  assign req_wake  = req_valid && (req_mode == PM_ACTIVE);
  assign req_sleep = req_valid && (req_mode != PM_ACTIVE);

  if (DELAY == 0) begin : g_nodelay
    assign apply_valid = req_valid;
    assign apply_mode  = req_mode;
    assign pending     = 1'b0;
  end else begin : g_delay
    logic vld [DELAY];
    pm_e  mde [DELAY];

    always_ff @(posedge clk or negedge rst_n) begin
      if (!rst_n) begin
        for (int s = 0; s < DELAY; s++) begin
          vld[s] <= 1'b0;
          mde[s] <= PM_ACTIVE;
        end
      end else begin
        vld[0] <= req_sleep;
        mde[0] <= req_mode;
        for (int s = 1; s < DELAY; s++) begin
          vld[s] <= vld[s-1] && !req_wake;
          mde[s] <= mde[s-1];
        end
      end
    end

    // selection between the undelayed wake-up and the delayed sleep request
    always_comb begin
      if (req_wake) begin
        apply_valid = 1'b1;
        apply_mode  = PM_ACTIVE;
      end else begin
        apply_valid = vld[DELAY-1];
        apply_mode  = mde[DELAY-1];
      end
    end

    always_comb begin
      pending = 1'b0;
      for (int s = 0; s < DELAY; s++) pending |= vld[s];
    end
  end

endmodule
