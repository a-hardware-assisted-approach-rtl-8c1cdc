// sram_macro_pm -- behavioural model of one single-port SRAM memory module
// with power-mode pins.  This is a simulation model, not synthesizable
// hardware: it stands in for a foundry low-leakage memory macro.
//
// Power pins (at most one high):
//   ls  light sleep  contents kept, no access
//   ds  deep sleep   contents kept, no access
//   sd  shut down    contents lost, no access
//   none             active
// An access (ce high) while any pin is high is not performed: the model
// raises err for one cycle and returns POISON.  Shutting the module down
// invalidates all its words: a later read of a word that was not rewritten
// since returns POISON.  This is tracked with an epoch number: each word
// remembers the epoch it was written in, and every shut-down starts a new
// epoch, so no loop over the array is needed.
//
// Interface: ce/we/be/addr/wdata are sampled at the rising clock edge; rdata
// holds the read word from the next cycle on (one cycle read latency), as
// with a synchronous SRAM.  Writes are byte-masked by be.
//
// What follows the source design: one active mode and the sleep modes LS,
// DS and SD on separate pins; SD loses the contents.  This design's own
// choices: the port names, retention in DS, the one-cycle read latency and a
// wake-up that completes within the clock cycle, since the macro's data sheet
// values are not available.
module sram_macro_pm #(
  parameter int unsigned   WORDS  = 16384,
  parameter int unsigned   DW     = 32,
  parameter logic [DW-1:0] POISON = DW'(32'hDEAD_BEEF),
  localparam int unsigned  AW     = (WORDS > 1) ? $clog2(WORDS) : 1,
  localparam int unsigned  BW     = DW / 8
) (
  input  logic          clk,
  input  logic          ce,
  input  logic          we,
  input  logic [BW-1:0] be,
  input  logic [AW-1:0] addr,
  input  logic [DW-1:0] wdata,
  output logic [DW-1:0] rdata,
  input  logic          ls,
  input  logic          ds,
  input  logic          sd,
  output logic          err
);

  logic [DW-1:0] mem   [WORDS];
  logic [15:0]   epoch_of [WORDS];
  logic [15:0]   epoch;
  logic          sd_q;
  logic          asleep;

  assign asleep = ls | ds | sd;

  initial begin
    epoch = 16'd1;
    sd_q  = 1'b0;
    err   = 1'b0;
    rdata = POISON;
    for (int i = 0; i < WORDS; i++) begin
      epoch_of[i] = 16'd0;
      mem[i]      = '0;
    end
  end

  always @(posedge clk) begin
    sd_q <= sd;
    // entering shut-down: every word is lost
    if (sd && !sd_q && epoch != 16'hFFFF) epoch <= epoch + 16'd1;
    err <= ce && asleep;
    if (ce && !asleep) begin
      if (we) begin
        for (int b = 0; b < BW; b++) begin
          if (be[b]) mem[addr][8*b +: 8] <= wdata[8*b +: 8];
        end
        // a partial write to a lost word keeps the lost bytes at zero
        if (epoch_of[addr] != epoch) begin
          for (int b = 0; b < BW; b++) begin
            if (!be[b]) mem[addr][8*b +: 8] <= 8'h00;
          end
        end
        epoch_of[addr] <= epoch;
      end else begin
        rdata <= (epoch_of[addr] == epoch) ? mem[addr] : POISON;
      end
    end else if (ce) begin
      rdata <= POISON;
    end
  end

  a_one_mode : assert property (@(posedge clk) $onehot0({ls, ds, sd}));

endmodule
