// pmc_mcu_driver -- stimulus and checking for pmc_mcu_top, shared by the
// end-to-end testbenches.
//
// run_workload() plays the part of the core, the boot loader and the
// schedule generator:
//   1. It builds a synthetic bare-metal program: a prologue, a main loop
//      whose instructions access the data modules in bursts, and an exit
//      instruction.  Bursts go round-robin over the data modules in use.
//   2. It derives a sleep schedule the way the tool flow does: a module is
//      sent to light sleep at the last access of a burst and woken at the
//      first access of its next burst (or one instruction earlier, so that
//      the wake can share the entry of the previous burst's sleep).  The
//      prologue shuts down every module that is never used and sends the
//      used data modules to light sleep; the exit instruction shuts down the
//      data bank.  The number of bursts is chosen so that the schedule needs
//      `entries` table entries.
//   3. Resets the design, loads code and data through the bank ports, writes
//      the table over APB and runs the loop `iters` times on a 4-stage
//      pipeline model: fetch one cycle before decode, data access one cycle
//      after decode, and after every taken loop branch one flushed decode
//      slot holding the exit instruction's PC with pc_valid low.
//   4. Checks in every cycle: power pins against a reference timeline
//      (wake-up one clock after the decode cycle, sleep DELAY + 1 clocks
//      after it), the hit flag, fetched instruction words, read data, and
//      that no access of the program ever reaches a sleeping module.  In
//      idle data-port cycles it also probes data modules that should be
//      asleep, and expects each probe to be blocked and flagged.
module pmc_mcu_driver
  import pmc_pkg::*;
#(
  parameter int unsigned N_ENTRIES  = 128,
  parameter int unsigned MOD_BYTES  = 65536,
  parameter int unsigned N_MOD_BANK = 4,
  parameter int unsigned DELAY      = 2,
  parameter int unsigned APB_AW     = 12,
  localparam int unsigned N_MEM     = 2 * N_MOD_BANK,
  localparam int unsigned BANK_AW   = $clog2(N_MOD_BANK * MOD_BYTES),
  localparam int unsigned MOD_W     = (N_MOD_BANK > 1) ? $clog2(N_MOD_BANK) : 1
) (
  input  logic               clk,
  output logic               rst_n,
  output logic [31:0]        pc,
  output logic               pc_valid,
  output logic               apb_psel,
  output logic               apb_penable,
  output logic               apb_pwrite,
  output logic [APB_AW-1:0]  apb_paddr,
  output logic [31:0]        apb_pwdata,
  input  logic               apb_pready,
  input  logic [31:0]        apb_prdata,
  input  logic               apb_pslverr,
  output logic               i_req,
  output logic               i_we,
  output logic [3:0]         i_be,
  output logic [BANK_AW-1:0] i_addr,
  output logic [31:0]        i_wdata,
  input  logic [31:0]        i_rdata,
  input  logic               i_rvalid,
  output logic               d_req,
  output logic               d_we,
  output logic [3:0]         d_be,
  output logic [BANK_AW-1:0] d_addr,
  output logic [31:0]        d_wdata,
  input  logic [31:0]        d_rdata,
  input  logic               d_rvalid,
  input  logic [N_MEM-1:0]   mem_ls,
  input  logic [N_MEM-1:0]   mem_ds,
  input  logic [N_MEM-1:0]   mem_sd,
  input  logic               i_sleep_access,
  input  logic [MOD_W-1:0]   i_sleep_access_mod,
  input  logic               d_sleep_access,
  input  logic [MOD_W-1:0]   d_sleep_access_mod,
  input  logic               pmc_hit,
  input  logic [$clog2(N_ENTRIES)-1:0] pmc_hit_idx,
  input  logic [N_MEM-1:0]   pmc_pending
);

  localparam logic [31:0] PC_BASE = 32'h1C00_0080;
  localparam int unsigned MIN_GAP = 4;   // shortest idle interval worth a sleep

  int checks = 0, failures = 0;
  // mechanisms seen, over all runs
  int n_hit = 0, n_wake = 0, n_sleep = 0, n_sd = 0, n_flushed = 0, n_masked = 0;
  int n_probe = 0;   // blocked probe accesses to sleeping modules

  initial begin
    rst_n = 1; pc = '0; pc_valid = 0;
    apb_psel = 0; apb_penable = 0; apb_pwrite = 0; apb_paddr = '0; apb_pwdata = '0;
    i_req = 0; i_we = 0; i_be = 4'hf; i_addr = '0; i_wdata = '0;
    d_req = 0; d_we = 0; d_be = 4'hf; d_addr = '0; d_wdata = '0;
  end

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20) $display("FAIL: %s", what);
    end
  endtask

  task automatic apb_write(input logic [APB_AW-1:0] a, input logic [31:0] d);
    @(posedge clk); #1;
    apb_psel = 1; apb_penable = 0; apb_pwrite = 1; apb_paddr = a; apb_pwdata = d;
    @(posedge clk); #1;
    apb_penable = 1;
    #1 check(!apb_pslverr && apb_pready, "APB write accepted");
    @(posedge clk); #1;
    apb_psel = 0; apb_penable = 0; apb_pwrite = 0;
  endtask

  function automatic logic [31:0] instr_word(input int idx);
    return 32'h0000_0013 ^ (32'(idx) * 32'h9E37_79B1);
  endfunction

  task automatic run_workload(input string name, input int entries,
                              input logic [N_MOD_BANK-1:0] used, input int iters);
    // program
    int         n_used, used_list[$];
    int         bursts, chains, k_len;
    int         acc_mod   [int];     // instruction index -> data module
    logic [31:0] acc_addr [int];
    bit         acc_we    [int];
    logic [N_MEM-1:0] ent_en [int];  // instruction index -> entry
    pm_e        ent_mode  [int][N_MEM];
    int         ent_order [$];
    // trace
    int         slot_idx  [$];
    bit         slot_vld  [$];
    pm_e        exp_mode  [N_MEM][];
    logic [31:0] dshadow  [logic [31:0]];
    int         ls_cycles [N_MEM];
    int         n_cyc, pos, prev_end;

    n_used = 0;
    for (int n = 0; n < N_MOD_BANK; n++) if (used[n]) begin n_used++; used_list.push_back(n); end
    bursts = (entries - 1) / 2;              // entries = 2 + 2*bursts - chains
    chains = 2 + 2 * bursts - entries;
    if (n_used < 2) chains = 0;

    // ---- 1. program layout
    pos = 1 + 6;                             // leading instructions without access
    prev_end = 0;
    for (int b = 0; b < bursts; b++) begin
      int m, len, start, wake_at;
      m   = N_MOD_BANK + used_list[b % n_used];
      len = 2 + int'($urandom_range(2));
      if (b > 0 && b <= chains) start = prev_end + 1;
      else if (b > 0)           start = prev_end + 6 + int'($urandom_range(4));
      else                      start = pos;
      for (int i = start; i < start + len; i++) begin
        acc_mod[i]  = m;
        acc_addr[i] = 32'((m - N_MOD_BANK) * MOD_BYTES) + 32'(4 * $urandom_range(MOD_BYTES / 4 - 1));
        acc_we[i]   = $urandom_range(1) == 1;
      end
      wake_at = (b > 0 && b <= chains) ? start - 1 : start;
      if (!ent_en.exists(wake_at)) begin
        ent_en[wake_at] = '0;
        for (int mm = 0; mm < N_MEM; mm++) ent_mode[wake_at][mm] = PM_ACTIVE;
        ent_order.push_back(wake_at);
      end
      ent_en[wake_at][m]   = 1'b1;
      ent_mode[wake_at][m] = PM_ACTIVE;
      if (!ent_en.exists(start + len - 1)) begin
        ent_en[start + len - 1] = '0;
        for (int mm = 0; mm < N_MEM; mm++) ent_mode[start + len - 1][mm] = PM_ACTIVE;
        ent_order.push_back(start + len - 1);
      end
      ent_en[start + len - 1][m]   = 1'b1;
      ent_mode[start + len - 1][m] = PM_LS;
      prev_end = start + len - 1;
    end
    k_len = prev_end + 6;                    // loop branch
    // prologue (index 0) and exit (index k_len + 1)
    ent_en[0] = '0;
    for (int mm = 0; mm < N_MEM; mm++) ent_mode[0][mm] = PM_ACTIVE;
    for (int mm = 1; mm < N_MEM; mm++) begin
      ent_en[0][mm] = 1'b1;
      if (mm < N_MOD_BANK || !used[mm - N_MOD_BANK]) ent_mode[0][mm] = PM_SD;
      else                                          ent_mode[0][mm] = PM_LS;
    end
    ent_order.push_front(0);
    ent_en[k_len + 1] = '0;
    for (int mm = 0; mm < N_MEM; mm++) begin
      ent_mode[k_len + 1][mm] = (mm >= N_MOD_BANK) ? PM_SD : PM_ACTIVE;
      if (mm >= N_MOD_BANK) ent_en[k_len + 1][mm] = 1'b1;
    end
    ent_order.push_back(k_len + 1);
    check(ent_order.size() == entries || n_used < 2,
          $sformatf("%s: schedule has %0d entries, wanted %0d", name, ent_order.size(), entries));
    check(ent_order.size() <= N_ENTRIES, $sformatf("%s: schedule fits the table", name));
    check(32'(PC_BASE[BANK_AW-1:0]) + 32'(4 * (k_len + 2)) <= MOD_BYTES, "program fits code module 0");

    // ---- 2. decode-slot trace
    slot_idx.push_back(0); slot_vld.push_back(1);
    for (int it = 0; it < iters; it++) begin
      for (int i = 1; i <= k_len; i++) begin slot_idx.push_back(i); slot_vld.push_back(1); end
      slot_idx.push_back(k_len + 1);
      slot_vld.push_back(it == iters - 1);   // flushed fall-through, or the real exit
    end
    for (int i = 0; i < int'(DELAY) + 3; i++) begin slot_idx.push_back(-1); slot_vld.push_back(0); end
    n_cyc = slot_idx.size();

    // reference power-mode timeline
    for (int mm = 0; mm < N_MEM; mm++) begin
      exp_mode[mm] = new[n_cyc + 1];
      for (int c = 0; c <= n_cyc; c++) exp_mode[mm][c] = PM_ACTIVE;
      ls_cycles[mm] = 0;
    end
    for (int c = 0; c < n_cyc; c++) begin
      if (slot_idx[c] >= 0 && ent_en.exists(slot_idx[c])) begin
        if (!slot_vld[c]) n_flushed++;
        else begin
          for (int mm = 0; mm < N_MEM; mm++) begin
            if (ent_en[slot_idx[c]][mm]) begin
              pm_e md;
              int  eff;
              md  = ent_mode[slot_idx[c]][mm];
              eff = (md == PM_ACTIVE) ? c + 1 : c + int'(DELAY) + 1;
              for (int cc = eff; cc <= n_cyc; cc++) exp_mode[mm][cc] = md;
            end
          end
        end
      end
    end

    // ---- 3. reset (with a falling edge, the flip-flops reset asynchronously),
    // boot load, configuration
    rst_n = 1;
    #1 rst_n = 0;
    repeat (3) @(posedge clk);
    #1 rst_n = 1;
    for (int i = 0; i <= k_len + 1; i++) begin
      i_req = 1; i_we = 1; i_be = 4'hf;
      i_addr = BANK_AW'(PC_BASE + 32'(4 * i)); i_wdata = instr_word(i);
      @(posedge clk); #1;
    end
    i_req = 0; i_we = 0;
    foreach (acc_mod[i]) begin
      logic [31:0] v;
      v = $urandom;
      d_req = 1; d_we = 1; d_be = 4'hf; d_addr = BANK_AW'(acc_addr[i]); d_wdata = v;
      dshadow[acc_addr[i]] = v;
      @(posedge clk); #1;
    end
    d_req = 0; d_we = 0;
    foreach (ent_order[j]) begin
      logic [31:0] cfg;
      int idx;
      idx = ent_order[j];
      cfg = '0;
      for (int mm = 0; mm < N_MEM; mm++) begin
        cfg[2*mm +: 2]      = ent_mode[idx][mm];
        cfg[2*N_MEM + mm]   = ent_en[idx][mm];
      end
      apb_write(APB_AW'(8 * j), PC_BASE + 32'(4 * idx));
      apb_write(APB_AW'(8 * j + 4), cfg);
    end

    // ---- 4. execution
    for (int c = 0; c < n_cyc; c++) begin
      bit fetch, dacc, dread, probe;
      int di, pn;
      // decode stage
      pc       = (slot_idx[c] >= 0) ? PC_BASE + 32'(4 * slot_idx[c]) : '0;
      pc_valid = slot_vld[c];
      // fetch for the next decode slot
      fetch = (c + 1 < n_cyc) && slot_idx[c + 1] >= 0;
      i_req = fetch; i_we = 0;
      if (fetch) i_addr = BANK_AW'(PC_BASE + 32'(4 * slot_idx[c + 1]));
      // data access of the instruction decoded in the previous cycle
      dacc = c > 0 && slot_vld[c - 1] && acc_mod.exists(slot_idx[c - 1]);
      dread = 0;
      d_req = dacc; d_we = 0;
      if (dacc) begin
        di     = slot_idx[c - 1];
        d_addr = BANK_AW'(acc_addr[di]);
        d_we   = acc_we[di];
        dread  = !acc_we[di];
        d_wdata = $urandom;
        if (acc_we[di]) dshadow[acc_addr[di]] = d_wdata;
      end
      // in a cycle without a data access, now and then probe a data module
      // that should be asleep: the access must be blocked and flagged
      probe = 0;
      pn = int'($urandom_range(N_MOD_BANK - 1));
      if (!dacc && $urandom_range(3) == 0 && exp_mode[N_MOD_BANK + pn][c] != PM_ACTIVE) begin
        probe  = 1;
        d_req  = 1; d_we = 0;
        d_addr = BANK_AW'(pn * MOD_BYTES + 4 * $urandom_range(MOD_BYTES / 4 - 1));
      end
      #1;
      // power pins and hit flag in this cycle
      for (int mm = 0; mm < N_MEM; mm++) begin
        check(mem_ls[mm] == (exp_mode[mm][c] == PM_LS) && mem_ds[mm] == (exp_mode[mm][c] == PM_DS) &&
              mem_sd[mm] == (exp_mode[mm][c] == PM_SD),
              $sformatf("%s cycle %0d: module %0d pins %b%b%b, expected %s", name, c, mm,
                        mem_ls[mm], mem_ds[mm], mem_sd[mm], exp_mode[mm][c].name()));
        if (mem_ls[mm]) ls_cycles[mm]++;
        if (c > 0 && exp_mode[mm][c] != exp_mode[mm][c-1]) begin
          case (exp_mode[mm][c])
            PM_ACTIVE: n_wake++;
            PM_LS:     n_sleep++;
            PM_SD:     n_sd++;
            default: ;
          endcase
        end
      end
      check(pmc_hit == (slot_vld[c] && slot_idx[c] >= 0 && ent_en.exists(slot_idx[c])),
            $sformatf("%s cycle %0d: hit flag", name, c));
      if (pmc_hit) begin
        n_hit++;
        if (ent_en[slot_idx[c]] != '1) n_masked++;
      end
      @(posedge clk); #1;
      i_req = 0; d_req = 0; d_we = 0;
      check(!i_sleep_access && d_sleep_access == probe,
            $sformatf("%s cycle %0d: access to a sleeping module %0b, probe %0b", name, c,
                      d_sleep_access, probe));
      if (probe) begin
        n_probe++;
        check(d_sleep_access_mod == MOD_W'(pn) && d_rdata == 32'hDEAD_BEEF,
              $sformatf("%s cycle %0d: probe of sleeping data module %0d", name, c, pn));
      end
      if (fetch) check(i_rdata == instr_word(slot_idx[c + 1]),
                       $sformatf("%s cycle %0d: fetched word", name, c));
      if (dread) check(d_rvalid && d_rdata == dshadow[acc_addr[di]],
                       $sformatf("%s cycle %0d: read %h expected %h", name, c, d_rdata,
                                 dshadow[acc_addr[di]]));
    end
    pc_valid = 0;

    $write("%-10s entries=%0d loop=%0d instr iterations=%0d cycles=%0d  LS share of data modules:",
           name, ent_order.size(), k_len, iters, n_cyc);
    for (int n = 0; n < N_MOD_BANK; n++)
      $write(" %0.1f%%", 100.0 * real'(ls_cycles[N_MOD_BANK + n]) / real'(n_cyc));
    $write("\n");
    for (int n = 0; n < N_MOD_BANK; n++)
      check(!used[n] || ls_cycles[N_MOD_BANK + n] > 0, $sformatf("%s: data module %0d slept", name, n));
  endtask

  // every mechanism has to have happened at least once
  task automatic final_checks();
    check(n_hit > 0,     "PC matches");
    check(n_wake > 0,    "immediate wake-ups");
    check(n_sleep > 0,   "delayed light sleeps");
    check(n_sd > 0,      "shut-downs");
    check(n_flushed > 0, "matches suppressed in a flushed slot");
    check(n_masked > 0,  "entries that leave modules alone");
    check(n_probe > 0,   "probes of sleeping modules");
    $display("mechanisms: hits=%0d wake-ups=%0d light-sleeps=%0d shut-downs=%0d flushed=%0d masked=%0d probes=%0d",
             n_hit, n_wake, n_sleep, n_sd, n_flushed, n_masked, n_probe);
  endtask

endmodule
