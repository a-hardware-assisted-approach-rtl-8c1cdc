// tb_pmc_apb_regs -- self-checking test of the PMC configuration table.
//
// Writes random PC addresses and bank configurations into random entries over
// APB, then checks them twice: on the table outputs that feed the matcher,
// and by reading them back over APB.  Also checks the reset value, the
// read-only status and info registers, and the error response for writes to
// read-only registers and accesses outside the map.  The expected values are
// kept in a shadow copy inside the testbench.
module tb_pmc_apb_regs;
  import pmc_pkg::*;

  localparam int unsigned NE = 8, NM = 8, PCW = 32, DL = 2, AW = 12;

  logic clk = 1'b0, rst_n = 1'b0;
  logic psel = 0, penable = 0, pwrite = 0;
  logic [AW-1:0] paddr = '0;
  logic [31:0]   pwdata = '0, prdata;
  logic          pready, pslverr;
  logic [PCW-1:0] tbl_pc [NE];
  pm_e            tbl_mode [NE][NM];
  logic [NM-1:0]  tbl_en [NE];
  pm_e            cur_mode [NM];

  int checks = 0, failures = 0;

  pmc_apb_regs #(.N_ENTRIES(NE), .N_MEM(NM), .PC_W(PCW), .DELAY(DL), .APB_AW(AW)) dut (.*);

  always #5 clk = ~clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  task automatic apb(input bit wr, input logic [AW-1:0] a, input logic [31:0] d,
                     output logic [31:0] rd, output logic err);
    @(posedge clk); #1;
    psel = 1; penable = 0; pwrite = wr; paddr = a; pwdata = d;
    @(posedge clk); #1;
    penable = 1;
    #1;
    rd  = prdata;
    err = pslverr;
    @(posedge clk); #1;
    psel = 0; penable = 0; pwrite = 0;
  endtask

  logic [31:0] sh_pc  [NE];
  logic [31:0] sh_cfg [NE];

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [31:0] rd;
    logic err;
    for (int m = 0; m < NM; m++) cur_mode[m] = PM_ACTIVE;
    repeat (3) @(posedge clk);
    rst_n = 1'b1;

    // reset state: every entry zero, all enable bits off
    for (int e = 0; e < NE; e++) begin
      check(tbl_pc[e] == '0 && tbl_en[e] == '0, $sformatf("reset entry %0d", e));
      sh_pc[e]  = '0;
      sh_cfg[e] = '0;
    end

    // random programming
    for (int i = 0; i < 40; i++) begin
      int e;
      logic [31:0] v;
      e = int'($urandom_range(NE - 1));
      v = $urandom;
      if ($urandom_range(1) == 1) begin
        v[31:3*NM] = '0;
        apb(1, AW'(8*e + 4), v, rd, err);
        sh_cfg[e] = v;
      end else begin
        apb(1, AW'(8*e), v, rd, err);
        sh_pc[e] = v;
      end
      check(!err, "no error on table write");
    end

    // table outputs
    for (int e = 0; e < NE; e++) begin
      check(tbl_pc[e] == sh_pc[e], $sformatf("pc output entry %0d", e));
      for (int m = 0; m < NM; m++) begin
        check(tbl_mode[e][m] == pm_e'(sh_cfg[e][2*m +: 2]) && tbl_en[e][m] == sh_cfg[e][2*NM + m],
              $sformatf("cfg output entry %0d mem %0d", e, m));
      end
    end

    // read back
    for (int e = 0; e < NE; e++) begin
      apb(0, AW'(8*e), 0, rd, err);
      check(rd == sh_pc[e] && !err, $sformatf("read pc %0d: %h", e, rd));
      apb(0, AW'(8*e + 4), 0, rd, err);
      check(rd == sh_cfg[e] && !err, $sformatf("read cfg %0d: %h vs %h", e, rd, sh_cfg[e]));
    end

    // status register reflects the current modes
    for (int m = 0; m < NM; m++) cur_mode[m] = pm_e'(m % 4);
    apb(0, AW'(8*NE), 0, rd, err);
    check(rd == 32'h0000_e4e4 && !err, $sformatf("status %h", rd));
    // info register
    apb(0, AW'(8*NE + 4), 0, rd, err);
    check(rd == {8'(DL), 8'(NM), 16'(NE)} && !err, $sformatf("info %h", rd));

    // errors: write to read-only, access out of range
    apb(1, AW'(8*NE), 32'hffff_ffff, rd, err);
    check(err, "write to status gives PSLVERR");
    apb(1, AW'(8*NE + 8), 32'h1234_5678, rd, err);
    check(err, "write out of range gives PSLVERR");
    apb(0, AW'(8*NE + 12), 0, rd, err);
    check(err, "read out of range gives PSLVERR");
    check(pready, "zero wait states");
    // the erroneous writes changed nothing
    for (int e = 0; e < NE; e++) check(tbl_pc[e] == sh_pc[e], "table unchanged");

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
