// Simplified crate controller between the branch highway and a CAMAC dataway.
//
// A comparator matches the branch crate-address lines against the crate number
// set on the controller's thumbwheel. Only when they match does the controller
// drive a station line N (decoded from the 4 branch module lines), the
// subaddress lines A1,A2 (from the 2 branch event lines) and gate the dataway
// read lines onto the branch data lines. Gating the data is not needed for the
// logic, but keeps a faulty module in another crate off the branch. Clear and
// S2 are repeated onto the dataway in every crate, addressed or not. No timing
// or module-response signals are used. The controller never drives the F lines,
// so the dataway sees F(0), Read.
//
// Interface: crate_no thumbwheel setting, cmd the branch command lines,
// dw_r the dataway read lines; outputs dw_n (one per station), dw_a, dw_f, dw_c,
// dw_s2, and bh_data (0 unless addressed, for the wired-OR branch data lines).
// Timing: purely combinational, as in the original gate-level unit. Mapping
// module number k to station line k is this design's choice.
module crate_controller
  import pwc_pkg::*;
#(
  parameter int unsigned STATIONS = NSTATIONS
) (
  input  logic [CRATE_BITS-1:0]   crate_no,
  input  bh_cmd_t                 cmd,
  input  logic [NWIRES-1:0]       dw_r,
  output logic [STATIONS-1:0]     dw_n,
  output logic [EVENT_BITS-1:0]   dw_a,
  output logic [4:0]              dw_f,
  output logic                    dw_c,
  output logic                    dw_s2,
  output logic [NWIRES-1:0]       bh_data
);

  logic selected;

  assign selected = (cmd.addr.crate == crate_no);
  assign dw_f     = 5'd0;
  assign dw_c     = cmd.clear;
  assign dw_s2    = cmd.s2;

  always_comb begin
    dw_n    = '0;
    dw_a    = '0;
    bh_data = '0;
    if (selected) begin
      if (32'(cmd.addr.module_no) < STATIONS) dw_n[cmd.addr.module_no] = 1'b1;
      dw_a    = cmd.addr.event_no;
      bh_data = dw_r;
    end
  end

endmodule
