// tb_sram_macro_pm -- self-checking test of the memory module model.
//
// Random reads and byte-masked writes against a shadow array, with random
// power-mode changes in between.  Checks: data is read back one cycle after
// the request; accesses in LS, DS or SD raise err and do nothing; contents
// survive LS and DS; after SD every word not rewritten reads as POISON.
module tb_sram_macro_pm;

  localparam int unsigned WORDS = 256;
  localparam logic [31:0] POISON = 32'hDEAD_BEEF;

  logic clk = 1'b0;
  logic ce = 0, we = 0;
  logic [3:0]  be = '0;
  logic [7:0]  addr = '0;
  logic [31:0] wdata = '0, rdata;
  logic ls = 0, ds = 0, sd = 0, err;

  int checks = 0, failures = 0;
  int n_ls = 0, n_ds = 0, n_sd = 0, n_err = 0;

  logic [31:0] shadow [WORDS];
  bit          known  [WORDS];

  sram_macro_pm #(.WORDS(WORDS), .DW(32), .POISON(POISON)) dut (.*);

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
    @(posedge clk); #1;
    for (int cyc = 0; cyc < 5000; cyc++) begin
      int r;
      r = int'($urandom_range(99));
      if (r < 3) begin
        // change power mode
        int p;
        p = int'($urandom_range(3));
        ls = (p == 1); ds = (p == 2); sd = (p == 3);
        if (p == 1) n_ls++;
        if (p == 2) n_ds++;
        if (p == 3) begin
          n_sd++;
          for (int i = 0; i < WORDS; i++) known[i] = 0;
        end
        @(posedge clk); #1;
        if (p != 0) begin
          // stay asleep a few cycles, try one access
          ce = 1; we = $urandom_range(1); addr = 8'($urandom); wdata = $urandom; be = 4'hf;
          @(posedge clk); #1;
          ce = 0;
          check(err == 1'b1, "access while asleep flagged");
          check(rdata == POISON, "access while asleep returns poison");
          n_err++;
          ls = 0; ds = 0; sd = 0;
          @(posedge clk); #1;
        end
      end else if (r < 50) begin
        ce = 1; we = 1; addr = 8'($urandom); wdata = $urandom; be = 4'($urandom);
        @(posedge clk); #1;
        ce = 0; we = 0;
        check(!err, "no error when active");
        for (int b = 0; b < 4; b++) begin
          if (be[b]) shadow[addr][8*b +: 8] = wdata[8*b +: 8];
          else if (!known[addr]) shadow[addr][8*b +: 8] = 8'h00;
        end
        known[addr] = 1;
      end else begin
        ce = 1; we = 0; addr = 8'($urandom);
        @(posedge clk); #1;
        ce = 0;
        check(!err, "no error when active");
        check(rdata == (known[addr] ? shadow[addr] : POISON),
              $sformatf("read %0d: %h, expected %h", addr, rdata,
                        known[addr] ? shadow[addr] : POISON));
      end
    end
    check(n_ls > 0 && n_ds > 0 && n_sd > 0 && n_err > 0, "every power mode used");
    $display("LS=%0d DS=%0d SD=%0d blocked accesses=%0d", n_ls, n_ds, n_sd, n_err);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
