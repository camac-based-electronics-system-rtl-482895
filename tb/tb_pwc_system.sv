// End-to-end testbench of the complete read-out at full size: 8 crates x 16
// latch modules x 8 wires x 4 events, top-level parameters left at their
// defaults.
// Each beam pulse drives random wire hits and the four event gates one after
// another into all 128 latch modules; the testbench keeps the image the
// latches must hold. The computer stand-in then starts the selected interface
// unit, reads every word it offers after a random delay and compares the
// stream and the scan time with the reference model (pwc_tb_pkg). A following
// scan of empty latches checks that the Clear-S2 reset reached every crate.
// Mechanisms counted (each must happen at least once): scanner stops for a
// computer read, scanner overflow at 128, half-filled last word, memory
// processor overflow, processor interrupt, thumbwheel-limited scans, automatic
// and external reset, and switching between scanner and processor.
module tb_pwc_system;
  import pwc_pkg::*;
  import pwc_tb_pkg::*;

  logic                                   clk = 0, rst_n = 0;
  logic [NCRATES-1:0][NSTATIONS-1:0][7:0] hit = '0;
  logic [NEVENTS-1:0]                     gate = '0;
  logic [NCRATES-1:0][CRATE_BITS-1:0]     crate_no;
  logic [CRATE_BITS-1:0]                  last_crate = 3'd7;
  logic [EVENT_BITS-1:0]                  last_event = 2'd3;
  logic                                   processor_sel = 0, auto_reset = 1, reset_req = 0;
  logic                                   start = 0, ack = 0;
  logic                                   ready, irq, complete, busy;
  logic [WORD_BITS-1:0]                   dout;
  image_t                                 img;
  int checks = 0, failures = 0;
  int n_stall = 0, n_sc_ovf = 0, n_mp_ovf = 0, n_half = 0, n_irq = 0;
  int n_limit = 0, n_auto = 0, n_ext = 0, n_switch = 0, n_events = 0;

  pwc_system dut (.*);

  always #125 clk = ~clk;   // 4 MHz

  for (genvar c = 0; c < NCRATES; c++) begin : g_thumb
    assign crate_no[c] = 3'(c);
  end

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s", what);
    end
  endtask

  // One beam pulse: up to four gated events, each with its own hit pattern.
  task automatic beam(input int density, input int nevents);
    foreach (img[i]) img[i] = '0;
    for (int e = 0; e < nevents; e++) begin
      @(negedge clk);
      for (int c = 0; c < 8; c++)
        for (int m = 0; m < 16; m++)
          for (int b = 0; b < 8; b++) begin
            hit[c][m][b] = (($urandom % 1000) < density);
            if (hit[c][m][b]) img[e * 128 + c * 16 + m][b] = 1'b1;
          end
      gate = 4'(1 << e);
      @(negedge clk);
      gate = '0;
      hit = '0;
      n_events++;
    end
  endtask

  task automatic readout(input bit sel, input int lc, input int le, input bit auto_rst,
                         input string name);
    word_q_t exp_q, got_q;
    int exp_cycles, scan_cycles;
    if (sel != processor_sel) n_switch++;
    processor_sel = sel;
    last_crate = 3'(lc);
    last_event = 2'(le);
    auto_reset = auto_rst;
    if (sel) processor_stream(img, lc, le, exp_q, exp_cycles);
    else     scanner_stream(img, lc, le, exp_q, exp_cycles);
    if (lc != 7 || le != 3) n_limit++;
    scan_cycles = 0;
    got_q = {};
    @(negedge clk) start = 1;
    @(negedge clk) start = 0;
    while (!complete) begin
      if (busy && !ready) scan_cycles++;
      if (ready) begin
        if (sel && got_q.size() == 0) begin
          check(irq, {name, " interrupt"});
          n_irq++;
        end
        if (!sel && got_q.size() > 0 && exp_q.size() > 1) n_stall++;
        repeat ($urandom % 3) @(negedge clk);
        got_q.push_back(dout);
        ack = 1;
        @(negedge clk) ack = 0;
      end else begin
        @(negedge clk);
      end
      check(scan_cycles < 5000, {name, " scan ends"});
      if (scan_cycles >= 5000) break;
    end
    check(got_q.size() == exp_q.size(), $sformatf("%s: %0d words, expected %0d", name, got_q.size(), exp_q.size()));
    for (int i = 0; i < exp_q.size() && i < got_q.size(); i++)
      check(got_q[i] == exp_q[i], $sformatf("%s word %0d: %06h expected %06h", name, i, got_q[i], exp_q[i]));
    check(scan_cycles == exp_cycles, $sformatf("%s: scanned %0d clocks, expected %0d", name, scan_cycles, exp_cycles));
    if (!sel && exp_q[exp_q.size()-1][23]) n_sc_ovf++;
    if (sel && exp_q[0][23]) n_mp_ovf++;
    if (exp_q[sel ? 0 : exp_q.size()-1][7:0] % 2 == 1) n_half++;
    if (auto_rst) begin
      n_auto++;
    end else begin
      repeat (2) @(negedge clk);
      check(complete, {name, " complete held"});
      reset_req = 1;
      @(negedge clk) reset_req = 0;
      n_ext++;
    end
    repeat (2) @(negedge clk);
    check(!busy && !complete, {name, " idle after reset"});
  endtask

  // After a reset all latches must be empty: a full scan finds nothing.
  task automatic check_cleared(input bit sel, input string name);
    foreach (img[i]) img[i] = '0;
    readout(sel, 7, 3, 1'b1, {name, " cleared"});
  endtask

  initial begin
    repeat (2) @(negedge clk);
    rst_n = 1;
    // scanner
    beam(12, 4);  readout(0, 7, 3, 1'b1, "scanner sparse");   check_cleared(0, "scanner sparse");
    beam(40, 4);  readout(0, 7, 3, 1'b0, "scanner dense");    check_cleared(0, "scanner dense");
    beam(25, 3);  readout(0, 3, 2, 1'b1, "scanner limits");   check_cleared(0, "scanner limits");
    // memory processor
    beam(12, 4);  readout(1, 7, 3, 1'b1, "processor sparse"); check_cleared(1, "processor sparse");
    beam(40, 4);  readout(1, 7, 3, 1'b0, "processor dense");  check_cleared(1, "processor dense");
    beam(25, 2);  readout(1, 5, 1, 1'b1, "processor limits"); check_cleared(1, "processor limits");
    // back to the scanner
    beam(5, 1);   readout(0, 7, 3, 1'b1, "scanner again");
    $display("events %0d, stalls %0d, scanner overflows %0d, processor overflows %0d, half words %0d",
             n_events, n_stall, n_sc_ovf, n_mp_ovf, n_half);
    $display("interrupts %0d, limited scans %0d, auto resets %0d, external resets %0d, mode switches %0d",
             n_irq, n_limit, n_auto, n_ext, n_switch);
    check(n_stall > 0,  "scanner stopped for a computer read");
    check(n_sc_ovf > 0, "scanner overflow");
    check(n_mp_ovf > 0, "processor overflow");
    check(n_half > 0,   "half-filled last word");
    check(n_irq > 0,    "processor interrupt");
    check(n_limit > 0,  "thumbwheel-limited scan");
    check(n_auto > 0,   "automatic reset");
    check(n_ext > 0,    "external reset");
    check(n_switch > 1, "mode switches");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
