// tb_pc_pmc -- self-checking test of the PC-driven power management
// controller.
//
// 1. Programs a table over APB and reads it back.
// 2. Directed latency check: a sleep entry puts its module into light sleep
//    exactly DELAY + 1 clocks after the PC match, a wake entry makes it
//    active one clock after the match; a match while pc_valid is low does
//    nothing; modules whose enable bit is clear keep their mode.
// 3. Random PC streams against a reference written with time stamps: every
//    sleep request is due DELAY cycles after its match, a wake-up is applied
//    in its own cycle and drops every sleep still due for that module.  The
//    LS/DS/SD pins are compared in every cycle.
// 4. Reads the status register and compares it with the reference.
module tb_pc_pmc;
  import pmc_pkg::*;

  localparam int unsigned NE = 16, NM = 8, PCW = 32, DL = 2, AW = 12;

  logic clk = 1'b0, rst_n = 1'b0;
  logic [PCW-1:0] pc = '0;
  logic           pc_valid = 0;
  logic psel = 0, penable = 0, pwrite = 0;
  logic [AW-1:0] paddr = '0;
  logic [31:0]   pwdata = '0, prdata;
  logic          pready, pslverr;
  logic [NM-1:0] mem_ls, mem_ds, mem_sd, pending;
  pm_e           cur_mode [NM];
  logic          hit;
  logic [3:0]    hit_idx;

  int checks = 0, failures = 0;
  int n_hit = 0, n_wake = 0, n_sleep = 0, n_cancel = 0, n_flush = 0, n_masked = 0;

  pc_pmc #(.N_ENTRIES(NE), .N_MEM(NM), .PC_W(PCW), .DELAY(DL), .APB_AW(AW)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  task automatic apb(input bit wr, input logic [AW-1:0] a, input logic [31:0] d,
                     output logic [31:0] rd);
    @(posedge clk); #1;
    psel = 1; penable = 0; pwrite = wr; paddr = a; pwdata = d;
    @(posedge clk); #1;
    penable = 1;
    #1 rd = prdata;
    @(posedge clk); #1;
    psel = 0; penable = 0; pwrite = 0;
  endtask

  // shadow of the table
  logic [31:0] t_pc  [NE];
  pm_e         t_mode [NE][NM];
  logic [NM-1:0] t_en [NE];

  task automatic program_entry(input int e, input logic [31:0] a, input logic [31:0] cfg);
    logic [31:0] rd;
    apb(1, AW'(8*e), a, rd);
    apb(1, AW'(8*e + 4), cfg, rd);
    t_pc[e] = a;
    for (int m = 0; m < NM; m++) begin
      t_mode[e][m] = pm_e'(cfg[2*m +: 2]);
      t_en[e][m]   = cfg[2*NM + m];
    end
  endtask

  function automatic logic [31:0] cfg_word(input pm_e modes [NM], input logic [NM-1:0] en);
    logic [31:0] w;
    w = '0;
    for (int m = 0; m < NM; m++) w[2*m +: 2] = modes[m];
    w[2*NM +: NM] = en;
    return w;
  endfunction

  // reference state
  pm_e  ref_mode [NM];
  int   due      [NM][$];   // cycle at which a delayed sleep is applied
  pm_e  due_mode [NM][$];
  int   now = 0;

  task automatic compare_pins(input string when);
    for (int m = 0; m < NM; m++) begin
      checks++;
      if (mem_ls[m] != (ref_mode[m] == PM_LS) || mem_ds[m] != (ref_mode[m] == PM_DS) ||
          mem_sd[m] != (ref_mode[m] == PM_SD)) begin
        failures++;
        $display("FAIL %s cycle %0d: memory %0d pins %b%b%b expected %s", when, now, m,
                 mem_ls[m], mem_ds[m], mem_sd[m], ref_mode[m].name());
      end
    end
  endtask

  // one clock with the given PC; updates the reference
  task automatic step(input logic [31:0] p, input bit v);
    int  e_hit;
    pc = p; pc_valid = v;
    e_hit = -1;
    for (int e = 0; e < NE; e++) if (e_hit < 0 && t_pc[e] == p) e_hit = e;
    #1;
    if (e_hit >= 0 && !v) n_flush++;
    if (!v) e_hit = -1;
    check(hit == (e_hit >= 0), "hit flag");
    if (e_hit >= 0) begin
      n_hit++;
      check(hit_idx == 4'(e_hit), "hit index");
    end
    for (int m = 0; m < NM; m++) begin
      bit wake;
      wake = 0;
      if (e_hit >= 0 && !t_en[e_hit][m]) n_masked++;
      if (e_hit >= 0 && t_en[e_hit][m]) begin
        if (t_mode[e_hit][m] == PM_ACTIVE) begin
          wake = 1;
          n_wake++;
          n_cancel += due[m].size();
          due[m].delete();
          due_mode[m].delete();
        end else begin
          due[m].push_back(now + DL);
          due_mode[m].push_back(t_mode[e_hit][m]);
        end
      end
      if (wake) ref_mode[m] = PM_ACTIVE;
      else if (due[m].size() > 0 && due[m][0] == now) begin
        ref_mode[m] = due_mode[m][0];
        void'(due[m].pop_front());
        void'(due_mode[m].pop_front());
        n_sleep++;
      end
    end
    @(posedge clk); #1;
    now++;
    compare_pins("step");
  endtask

  initial begin
    logic [31:0] rd;
    pm_e modes [NM];
    for (int m = 0; m < NM; m++) ref_mode[m] = PM_ACTIVE;
    for (int e = 0; e < NE; e++) begin
      t_pc[e] = '0; t_en[e] = '0;
      for (int m = 0; m < NM; m++) t_mode[e][m] = PM_ACTIVE;
    end
    repeat (3) @(posedge clk);
    #1 rst_n = 1;
    compare_pins("reset");

    // ---- directed: entry 0 puts memory 5 to LS, entry 1 wakes it, entry 2
    // shuts memory 6 down but is masked for memory 5
    for (int m = 0; m < NM; m++) modes[m] = PM_LS;
    program_entry(0, 32'h0000_1000, cfg_word(modes, 8'b0010_0000));
    for (int m = 0; m < NM; m++) modes[m] = PM_ACTIVE;
    program_entry(1, 32'h0000_2000, cfg_word(modes, 8'b0010_0000));
    for (int m = 0; m < NM; m++) modes[m] = PM_SD;
    program_entry(2, 32'h0000_3000, cfg_word(modes, 8'b0100_0000));
    apb(0, AW'(4), 0, rd);
    // all modes LS (2'b01) and enable bit 5: 32'h0020_5555
    check(rd == 32'h0020_5555,
          $sformatf("read back entry 0 configuration %h", rd));
    begin
      int t_ls, t_wake;
      pc_valid = 0;
      @(posedge clk); #1;
      // a match in a flushed stage does nothing
      pc = 32'h0000_1000; pc_valid = 0;
      repeat (5) @(posedge clk);
      #1 check(mem_ls[5] == 0, "flushed PC is ignored");
      // valid match
      pc_valid = 1;
      @(posedge clk); #1;
      pc_valid = 0; pc = '0;
      t_ls = 0;
      for (int c = 1; c <= 6; c++) begin
        if (mem_ls[5] && t_ls == 0) t_ls = c;
        @(posedge clk); #1;
      end
      check(t_ls == DL + 1, $sformatf("sleep reached the pins after %0d clocks, expected %0d", t_ls, DL + 1));
      check(mem_ls == 8'b0010_0000, "only the enabled module sleeps");
      pc = 32'h0000_2000; pc_valid = 1;
      @(posedge clk); #1;
      pc_valid = 0;
      t_wake = mem_ls[5] ? 0 : 1;
      check(t_wake == 1, "wake-up reaches the pins one clock after the match");
      pc = 32'h0000_3000; pc_valid = 1;
      @(posedge clk); #1;
      pc_valid = 0;
      repeat (3) @(posedge clk);
      #1 check(mem_sd == 8'b0100_0000 && mem_ls == '0, "masked entry leaves module 5 alone");
      // bring the reference in line with the directed part
      ref_mode[6] = PM_SD;
    end

    // ---- random schedule
    for (int e = 0; e < NE; e++) begin
      logic [NM-1:0] en;
      for (int m = 0; m < NM; m++) modes[m] = pm_e'($urandom_range(3));
      // every second entry mostly wakes
      if (e % 2 == 1) for (int m = 0; m < NM; m++) if ($urandom_range(3) != 0) modes[m] = PM_ACTIVE;
      en = NM'($urandom);
      program_entry(e, 32'h1C00_8000 + 32'(4 * e), cfg_word(modes, en));
    end
    for (int i = 0; i < 4000; i++) begin
      logic [31:0] p;
      if ($urandom_range(2) == 0) p = 32'h1C00_8000 + 32'(4 * $urandom_range(NE - 1));
      else                        p = 32'h1C00_8000 + 32'(4 * $urandom_range(NE + 40));
      step(p, $urandom_range(5) != 0);
    end
    // let the delay lines drain
    repeat (DL + 1) step(32'h0, 1'b0);

    apb(0, AW'(8*NE), 0, rd);
    begin
      logic [31:0] exp;
      exp = '0;
      for (int m = 0; m < NM; m++) exp[2*m +: 2] = ref_mode[m];
      check(rd == exp, $sformatf("status %h expected %h", rd, exp));
    end

    check(n_hit > 0 && n_wake > 0 && n_sleep > 0 && n_cancel > 0 && n_flush > 0 && n_masked > 0,
          "every mechanism exercised");
    $display("hits=%0d wakes=%0d delayed sleeps=%0d cancelled=%0d flushed=%0d masked=%0d",
             n_hit, n_wake, n_sleep, n_cancel, n_flush, n_masked);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
