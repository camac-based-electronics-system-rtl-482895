// Self-checking testbench of the 64 x 24 processor memory.
// Writes random 12-bit values into random halves of random words, keeping a
// reference copy, and checks every read returns both halves as written and
// that writing one half leaves the other unchanged.
module tb_mp_memory;
  logic        clk = 0;
  logic [5:0]  addr = '0;
  logic        we_hi = 0, we_lo = 0;
  logic [11:0] wdata = '0;
  logic [23:0] rdata;
  logic [23:0] ref_m [64];
  int checks = 0, failures = 0;

  mp_memory dut (.*);

  always #5 clk = ~clk;

  initial begin
    // fill every word first
    for (int i = 0; i < 64; i++) begin
      @(negedge clk);
      addr = 6'(i); wdata = 12'($urandom); we_hi = 1; we_lo = 0;
      ref_m[i][23:12] = wdata;
      @(negedge clk);
      wdata = 12'($urandom); we_hi = 0; we_lo = 1;
      ref_m[i][11:0] = wdata;
    end
    @(negedge clk) we_lo = 0;
    for (int k = 0; k < 2000; k++) begin
      @(negedge clk);
      addr  = 6'($urandom);
      wdata = 12'($urandom);
      we_hi = 1'($urandom);
      we_lo = !we_hi && 1'($urandom);
      #1;
      checks++;
      if (rdata !== ref_m[addr]) begin
        failures++;
        $display("FAIL read %0d: %06h expected %06h", addr, rdata, ref_m[addr]);
      end
      if (we_hi) ref_m[addr][23:12] = wdata;
      if (we_lo) ref_m[addr][11:0]  = wdata;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
