// Self-checking testbench of the octo-4-bit latch.
// Drives random wire signals and event gates, keeps its own 4 x 8 reference
// of what each latch must hold (set on coincidence of hit and gate, cleared by
// Clear AND S2 only), and reads every event back through F(0) at station N.
// Also checks that the read lines stay 0 without N or with another function
// code, and that Clear or S2 alone do not reset.
module tb_octo_4bit_latch;
  logic       clk = 0;
  logic       rst_n = 0;
  logic [7:0] hit = '0;
  logic [3:0] gate = '0;
  logic       n = 0;
  logic [1:0] a = '0;
  logic [4:0] f = '0;
  logic       c = 0, s2 = 0;
  logic [7:0] r;
  logic [3:0][7:0] ref_q;
  int checks = 0, failures = 0;

  octo_4bit_latch dut (.*);

  always #5 clk = ~clk;

  task automatic check(input logic [7:0] got, input logic [7:0] exp, input string what);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s: got %02h expected %02h", what, got, exp);
    end
  endtask

  task automatic read_all(input string what);
    for (int e = 0; e < 4; e++) begin
      n = 1; f = 0; a = 2'(e);
      #1 check(r, ref_q[e], $sformatf("%s event %0d", what, e));
    end
    n = 0;
    #1 check(r, 8'h00, {what, " no N"});
    n = 1; f = 5'd2;
    #1 check(r, 8'h00, {what, " F2"});
    n = 0; f = 0;
    @(negedge clk);
  endtask

  initial begin
    ref_q = '0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int round = 0; round < 20; round++) begin
      // beam pulse: a few random strobes
      for (int k = 0; k < 6; k++) begin
        @(negedge clk);
        hit  = 8'($urandom);
        gate = 4'($urandom) & 4'($urandom);
        @(posedge clk);
        for (int e = 0; e < 4; e++) if (gate[e]) ref_q[e] |= hit;
      end
      @(negedge clk);
      hit = '0; gate = '0;
      read_all("after beam");
      // Clear alone and S2 alone must not reset
      c = 1; @(negedge clk); c = 0; s2 = 1; @(negedge clk); s2 = 0;
      @(negedge clk);
      read_all("C or S2 alone");
      // Clear AND S2 resets, even with a gate and hit present
      c = 1; s2 = 1; gate = 4'hF; hit = 8'hFF; @(negedge clk);
      c = 0; s2 = 0; gate = '0; hit = '0;
      ref_q = '0;
      read_all("after clear");
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
