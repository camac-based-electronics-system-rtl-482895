// Self-checking testbench of the branch highway.
// Checks that the selected interface unit's command lines reach the crates and
// that the data lines are the wired-OR of every crate's drive (0 when none
// drives), for random drives and both selections.
module tb_branch_highway;
  import pwc_pkg::*;
  bh_cmd_t          cmd_a, cmd_b, cmd;
  logic             master_sel;
  logic [7:0][7:0]  crate_data;
  logic [7:0]       data, expect_or;
  int checks = 0, failures = 0;

  branch_highway dut (.*);

  initial begin
    for (int k = 0; k < 2000; k++) begin
      cmd_a = bh_cmd_t'($urandom);
      cmd_b = bh_cmd_t'($urandom);
      master_sel = 1'($urandom);
      expect_or = '0;
      for (int c = 0; c < 8; c++) begin
        // mostly a single crate drives, as in normal read-out
        crate_data[c] = ($urandom % 4 == 0) ? 8'($urandom) : 8'd0;
        expect_or |= crate_data[c];
      end
      #1;
      checks += 2;
      if (cmd !== (master_sel ? cmd_b : cmd_a)) begin
        failures++;
        $display("FAIL command lines");
      end
      if (data !== expect_or) begin
        failures++;
        $display("FAIL data %02h expected %02h", data, expect_or);
      end
    end
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
