// tb_mem_bank -- self-checking test of a split memory bank.
//
// Four modules of 1 KiB.  Random reads and writes over the whole bank while
// the power pins of the modules change at random.  Checks: the address
// decode (each word lives in one module only, and sleeping or shutting down
// one module leaves the others alone), read data one cycle after the
// request with rvalid, sleep_access and the module index on an access to a
// sleeping module, and the loss of a module's contents after shut-down.
module tb_mem_bank;

  localparam int unsigned NMOD = 4, MB = 1024;
  localparam int unsigned AW = $clog2(NMOD * MB), WORDS = NMOD * MB / 4;
  localparam logic [31:0] POISON = 32'hDEAD_BEEF;

  logic clk = 1'b0, rst_n = 1'b0;
  logic req = 0, we = 0;
  logic [3:0]  be = 4'hf;
  logic [AW-1:0] addr = '0;
  logic [31:0] wdata = '0, rdata;
  logic rvalid;
  logic [NMOD-1:0] ls = '0, ds = '0, sd = '0;
  logic sleep_access;
  logic [1:0] sleep_access_mod;

  int checks = 0, failures = 0;
  int n_blocked = 0, n_lost = 0, n_read = 0;

  logic [31:0] shadow [WORDS];
  bit          known  [WORDS];

  mem_bank #(.N_MOD(NMOD), .MOD_BYTES(MB)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin
    for (int i = 0; i < WORDS; i++) begin shadow[i] = '0; known[i] = 0; end
    repeat (2) @(posedge clk);
    #1 rst_n = 1;
    for (int cyc = 0; cyc < 6000; cyc++) begin
      int unsigned w, k;
      bit asleep;
      if ($urandom_range(49) == 0) begin
        // change the power mode of one module
        int p;
        k = $urandom_range(NMOD - 1);
        p = int'($urandom_range(3));
        if (p != 0 && $urandom_range(1) == 1) p = 0;   // spend more time active
        ls[k] = (p == 1); ds[k] = (p == 2); sd[k] = (p == 3);
        if (p == 3) begin
          for (int i = 0; i < WORDS; i++) if (i / (MB / 4) == int'(k)) known[i] = 0;
        end
      end
      w = $urandom_range(WORDS - 1);
      k = w / (MB / 4);
      asleep = ls[k] | ds[k] | sd[k];
      req = 1; we = $urandom_range(1); addr = AW'(4 * w); wdata = $urandom;
      @(posedge clk); #1;
      req = 0;
      check(sleep_access == asleep, $sformatf("sleep_access %0b for module %0d", sleep_access, k));
      if (asleep) begin
        n_blocked++;
        check(sleep_access_mod == 2'(k), "index of the sleeping module");
      end else if (we) begin
        check(!rvalid, "no rvalid after a write");
        shadow[w] = wdata;
        known[w]  = 1;
      end else begin
        n_read++;
        if (!known[w]) n_lost++;
        check(rvalid, "rvalid after a read");
        check(rdata == (known[w] ? shadow[w] : POISON),
              $sformatf("read word %0d: %h expected %h", w, rdata, known[w] ? shadow[w] : POISON));
      end
      we = 0;
    end
    check(n_blocked > 0 && n_lost > 0 && n_read > 0, "all cases exercised");
    $display("reads=%0d blocked=%0d lost-word reads=%0d", n_read, n_blocked, n_lost);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
