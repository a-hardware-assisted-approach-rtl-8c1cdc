// tb_pmc_pc_match -- self-checking test of the PC comparators, the encoder
// and the configuration multiplexer.
//
// Fills the table with random PC addresses (with deliberate duplicates) and
// random configurations, then applies PCs that hit an entry, miss every
// entry, or hit while pc_valid is low (a flushed pipeline stage).  A
// reference search in the testbench gives the expected hit, index (lowest
// matching entry) and configuration.
module tb_pmc_pc_match;
  import pmc_pkg::*;

  localparam int unsigned NE = 16, NM = 8, PCW = 18;
  localparam int unsigned IW = $clog2(NE);

  logic [PCW-1:0] pc;
  logic           pc_valid;
  logic [PCW-1:0] tbl_pc [NE];
  pm_e            tbl_mode [NE][NM];
  logic [NM-1:0]  tbl_en [NE];
  logic           hit;
  logic [IW-1:0]  hit_idx;
  pm_e            sel_mode [NM];
  logic [NM-1:0]  sel_en;

  int checks = 0, failures = 0;
  int n_hit = 0, n_miss = 0, n_flushed = 0, n_dup = 0;

  pmc_pc_match #(.N_ENTRIES(NE), .N_MEM(NM), .PC_W(PCW)) dut (.*);

  initial begin
    #100000;
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int round = 0; round < 50; round++) begin
      for (int e = 0; e < NE; e++) begin
        tbl_pc[e] = PCW'($urandom) & ~PCW'(3);
        tbl_en[e] = NM'($urandom);
        for (int m = 0; m < NM; m++) tbl_mode[e][m] = pm_e'($urandom_range(3));
      end
      // a duplicate address: the lower index must win
      tbl_pc[NE-1] = tbl_pc[3];
      for (int t = 0; t < 20; t++) begin
        bit exp_hit;
        int exp_idx;
        case ($urandom_range(3))
          0, 1: pc = tbl_pc[$urandom_range(NE - 1)];
          2:    pc = PCW'($urandom) | PCW'(1);   // odd: never in the table
          default: pc = tbl_pc[3];
        endcase
        pc_valid = ($urandom_range(4) != 0);
        exp_hit = 1'b0;
        exp_idx = 0;
        for (int e = 0; e < NE; e++) begin
          if (!exp_hit && pc_valid && pc == tbl_pc[e]) begin
            exp_hit = 1'b1;
            exp_idx = e;
          end
        end
        #1;
        checks++;
        if (hit !== exp_hit) begin
          failures++;
          $display("FAIL: hit %0b expected %0b (pc %h valid %0b)", hit, exp_hit, pc, pc_valid);
        end
        if (exp_hit) begin
          n_hit++;
          if (pc == tbl_pc[3]) n_dup++;
          checks++;
          if (hit_idx != IW'(exp_idx) || sel_en != tbl_en[exp_idx]) begin
            failures++;
            $display("FAIL: index %0d expected %0d", hit_idx, exp_idx);
          end
          for (int m = 0; m < NM; m++) begin
            checks++;
            if (sel_mode[m] != tbl_mode[exp_idx][m]) begin
              failures++;
              $display("FAIL: mode of memory %0d", m);
            end
          end
        end else begin
          if (!pc_valid) n_flushed++; else n_miss++;
          checks++;
          if (sel_en != '0) begin
            failures++;
            $display("FAIL: enables set without a hit");
          end
        end
        #9;
      end
    end
    checks++;
    if (n_hit == 0 || n_miss == 0 || n_flushed == 0 || n_dup == 0) begin
      failures++;
      $display("FAIL: a case was not exercised");
    end
    $display("hits=%0d misses=%0d flushed=%0d duplicate=%0d", n_hit, n_miss, n_flushed, n_dup);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
