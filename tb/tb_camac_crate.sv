// Self-checking testbench of one CAMAC crate (controller + 16 latch modules).
// Strobes random hits with random event gates into all 16 modules, then reads
// every (event, module) word over the branch command lines and compares it
// with a reference image; reads addressed to another crate must return 0.
// Finally a Clear-S2 command must empty every latch.
module tb_camac_crate;
  import pwc_pkg::*;
  logic                  clk = 0, rst_n = 0;
  logic [15:0][7:0]      hit = '0;
  logic [3:0]            gate = '0;
  logic [2:0]            crate_no = 3'd5;
  bh_cmd_t               cmd = '0;
  logic [7:0]            bh_data;
  logic [3:0][15:0][7:0] ref_img;
  int checks = 0, failures = 0;

  camac_crate dut (.*);

  always #5 clk = ~clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s", what);
    end
  endtask

  task automatic read_back(input string what);
    for (int e = 0; e < 4; e++)
      for (int m = 0; m < 16; m++) begin
        cmd = '0;
        cmd.addr = {2'(e), crate_no, 4'(m)};
        #1 check(bh_data == ref_img[e][m], $sformatf("%s e%0d m%0d: %02h expected %02h", what, e, m, bh_data, ref_img[e][m]));
        cmd.addr.crate = crate_no + 3'd1;
        #1 check(bh_data == 8'd0, $sformatf("%s other crate e%0d m%0d", what, e, m));
      end
  endtask

  initial begin
    ref_img = '0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int round = 0; round < 5; round++) begin
      for (int k = 0; k < 4; k++) begin
        @(negedge clk);
        for (int m = 0; m < 16; m++) hit[m] = 8'($urandom) & 8'($urandom);
        gate = 4'(1 << ($urandom % 4));
        @(posedge clk);
        for (int e = 0; e < 4; e++)
          if (gate[e]) for (int m = 0; m < 16; m++) ref_img[e][m] |= hit[m];
      end
      @(negedge clk) begin hit = '0; gate = '0; end
      read_back("after beam");
      @(negedge clk);
      cmd = '0; cmd.clear = 1; cmd.s2 = 1;
      @(negedge clk) cmd = '0;
      ref_img = '0;
      read_back("after clear");
      @(negedge clk);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
