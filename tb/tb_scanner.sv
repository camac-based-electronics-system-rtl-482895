// Self-checking testbench of the scan-stop-read scanner.
// A behavioural stand-in for the crates answers the branch address with a word
// from a random chamber image; a stand-in for the computer reads each offered
// word after a random delay. The received stream is compared with the
// reference model (pwc_tb_pkg), and the clocks spent scanning (busy and not
// offering a word) with 2 per module word + 8 per word with hits + 1, which
// gives 1024 + 1 clocks = 256 us at 4 MHz for an empty full scan.
// Runs: empty, sparse, dense (overflow at 128), thumbwheel limits, with
// automatic and external latch reset.
module tb_scanner;
  import pwc_pkg::*;
  import pwc_tb_pkg::*;

  logic                  clk = 0, rst_n = 0;
  logic                  start = 0, ack = 0, ready, complete, busy;
  logic [WORD_BITS-1:0]  dout;
  logic [CRATE_BITS-1:0] last_crate = 3'd7;
  logic [EVENT_BITS-1:0] last_event = 2'd3;
  logic                  auto_reset = 0, reset_req = 0;
  bh_cmd_t               cmd;
  logic [NWIRES-1:0]     bh_data;
  image_t                img;
  int checks = 0, failures = 0;
  int clears = 0, overflows = 0, stalls = 0;

  scanner dut (.*);

  assign bh_data = img[cmd.addr];

  always #125 clk = ~clk;   // 4 MHz

  always @(posedge clk) if (cmd.clear && cmd.s2) clears++;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s", what);
    end
  endtask

  task automatic run(input int lc, input int le, input bit auto_rst, input string name);
    word_q_t exp_q, got_q;
    int exp_cycles, scan_cycles, clears_before;
    scanner_stream(img, lc, le, exp_q, exp_cycles);
    last_crate = 3'(lc);
    last_event = 2'(le);
    auto_reset = auto_rst;
    clears_before = clears;
    scan_cycles = 0;
    got_q = {};
    @(negedge clk) start = 1;
    @(negedge clk) start = 0;
    while (!complete) begin
      if (busy && !ready) scan_cycles++;
      if (ready) begin
        repeat ($urandom % 4) begin
          @(negedge clk);
          check(ready && !complete, {name, " word held while not read"});
        end
        got_q.push_back(dout);
        ack = 1;
        @(negedge clk);
        ack = 0;
        stalls++;
      end else begin
        @(negedge clk);
      end
    end
    check(got_q.size() == exp_q.size(), $sformatf("%s: %0d words, expected %0d", name, got_q.size(), exp_q.size()));
    for (int i = 0; i < exp_q.size() && i < got_q.size(); i++)
      check(got_q[i] == exp_q[i], $sformatf("%s word %0d: %06h expected %06h", name, i, got_q[i], exp_q[i]));
    check(scan_cycles == exp_cycles, $sformatf("%s: scanned %0d clocks, expected %0d", name, scan_cycles, exp_cycles));
    if (exp_q[exp_q.size()-1][23]) overflows++;
    if (!auto_rst) begin
      repeat (3) @(negedge clk);
      check(complete, {name, " complete held until reset"});
      reset_req = 1;
      @(negedge clk) reset_req = 0;
    end
    @(negedge clk);
    check(!complete && !busy, {name, " back to idle"});
    repeat (2) @(negedge clk);
    check(clears == clears_before + 1, {name, " one Clear-S2 pulse"});
  endtask

  initial begin
    repeat (2) @(negedge clk);
    rst_n = 1;
    foreach (img[i]) img[i] = '0;
    run(7, 3, 1'b1, "empty");
    img = random_image(15);
    run(7, 3, 1'b0, "sparse");
    img = random_image(60);
    run(7, 3, 1'b1, "dense");
    img = random_image(30);
    run(2, 1, 1'b1, "limits");
    img = random_image(8);
    run(0, 0, 1'b0, "one crate");
    foreach (img[i]) img[i] = '0;
    img[0] = 8'h01; img[511] = 8'h80; img[37] = 8'hFF;
    run(7, 3, 1'b1, "corners");
    check(overflows > 0, "overflow exercised");
    $display("stalls for computer reads: %0d, overflows: %0d", stalls, overflows);
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
