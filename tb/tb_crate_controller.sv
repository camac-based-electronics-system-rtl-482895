// Self-checking testbench of the crate controller.
// For random thumbwheel settings and branch commands it checks, against values
// worked out here, that N, A1,A2 and the branch data are driven only when the
// crate address matches, that exactly the addressed station line is high, that
// F is F(0), and that Clear and S2 reach the dataway in every crate.
module tb_crate_controller;
  import pwc_pkg::*;
  logic [2:0]  crate_no;
  bh_cmd_t     cmd;
  logic [7:0]  dw_r;
  logic [15:0] dw_n;
  logic [1:0]  dw_a;
  logic [4:0]  dw_f;
  logic        dw_c, dw_s2;
  logic [7:0]  bh_data;
  int checks = 0, failures = 0, selected = 0;

  crate_controller dut (.*);

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s", what);
    end
  endtask

  initial begin
    for (int k = 0; k < 3000; k++) begin
      bit sel;
      crate_no = 3'($urandom);
      cmd      = bh_cmd_t'($urandom);
      if ($urandom % 3 == 0) cmd.addr.crate = crate_no;
      dw_r     = 8'($urandom);
      #1;
      sel = (cmd.addr.crate == crate_no);
      if (sel) selected++;
      check(dw_n == (sel ? (16'd1 << cmd.addr.module_no) : 16'd0), $sformatf("N lines %04h", dw_n));
      check(dw_a == (sel ? cmd.addr.event_no : 2'd0), "subaddress");
      check(bh_data == (sel ? dw_r : 8'd0), "branch data gating");
      check(dw_f == 5'd0, "F(0)");
      check(dw_c == cmd.clear && dw_s2 == cmd.s2, "Clear and S2 to dataway");
    end
    check(selected > 100, "crate selected often enough");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
