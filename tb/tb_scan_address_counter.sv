// Self-checking testbench of the branch-highway address counter.
// For every thumbwheel setting (8 last crates x 4 last events) it steps the
// counter from address 0 and compares each address with the expected order
// (module fastest, then crate up to the limit, then event), checks that
// is_last rises exactly on the final address, that the count of addresses is
// 16 x (last_crate+1) x (last_event+1), that adv is ignored at the end and
// that clr returns to 0.
module tb_scan_address_counter;
  import pwc_pkg::*;
  logic                  clk = 0, rst_n = 0, clr = 0, adv = 0;
  logic [CRATE_BITS-1:0] last_crate = '0;
  logic [EVENT_BITS-1:0] last_event = '0;
  bh_addr_t              addr;
  logic                  is_last;
  int checks = 0, failures = 0;

  scan_address_counter dut (.*);

  always #5 clk = ~clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s", what);
    end
  endtask

  initial begin
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int lc = 0; lc < 8; lc++) begin
      for (int le = 0; le < 4; le++) begin
        int n;
        n = 0;
        last_crate = 3'(lc);
        last_event = 2'(le);
        clr = 1;
        @(negedge clk) clr = 0;
        for (int e = 0; e <= le; e++)
          for (int c = 0; c <= lc; c++)
            for (int m = 0; m < 16; m++) begin
              bit fin;
              fin = (e == le) && (c == lc) && (m == 15);
              check(addr == {2'(e), 3'(c), 4'(m)},
                    $sformatf("lc=%0d le=%0d: address %03h expected e%0d c%0d m%0d", lc, le, addr, e, c, m));
              check(is_last == fin, $sformatf("lc=%0d le=%0d: is_last at e%0d c%0d m%0d", lc, le, e, c, m));
              n++;
              // random pauses: adv low must hold the address
              if ($urandom % 4 == 0) begin
                @(negedge clk);
                check(addr == {2'(e), 3'(c), 4'(m)}, "held without adv");
              end
              adv = 1;
              @(negedge clk) adv = 0;
            end
        check(n == 16 * (lc + 1) * (le + 1), "address count");
        check(is_last && addr == {2'(le), 3'(lc), 4'd15}, "stays on last address");
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
