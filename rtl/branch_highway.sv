// Simplified branch highway joining the crate controllers to the interface unit.
//
// The highway carries 8 data lines, 3 crate, 4 module and 2 event address lines,
// a Clear line and the S2 strobe line. Two interface units can be connected
// (the scan-stop-read scanner and the memory processor are alternates for the
// same port); master_sel picks the one whose command lines are driven. The data
// lines are driven by open-collector circuits in every crate controller and
// pulled up at the interface: this model ORs the crates' data in positive logic,
// so undriven lines read 0.
//
// Interface: cmd_a / cmd_b the two units' command lines, master_sel (0 = a),
// crate_data[c] each crate's data drive; cmd and data are the highway lines.
// Timing: combinational; the interface units strobe data at the end of each
// address period to allow the lines to settle.
module branch_highway
  import pwc_pkg::*;
#(
  parameter int unsigned CRATES = NCRATES
) (
  input  bh_cmd_t                         cmd_a,
  input  bh_cmd_t                         cmd_b,
  input  logic                            master_sel,
  input  logic [CRATES-1:0][NWIRES-1:0]   crate_data,
  output bh_cmd_t                         cmd,
  output logic [NWIRES-1:0]               data
);

  assign cmd = master_sel ? cmd_b : cmd_a;

  always_comb begin
    data = '0;
    for (int c = 0; c < int'(CRATES); c++) data |= crate_data[c];
  end

endmodule
