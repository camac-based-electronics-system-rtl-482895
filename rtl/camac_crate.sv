// One CAMAC crate of the read-out: a crate controller and up to 16 octo-4-bit
// latch modules on a dataway.
//
// The controller decodes the branch address into a station line and subaddress;
// the addressed latch module places one event word on the dataway read lines,
// which are a wired-OR of all the modules' open-collector outputs (modelled as
// a logical OR, idle lines read 0). The event gates from the fanouts and the
// Clear and S2 lines reach every module.
//
// Interface: hit[station][wire] discriminated wire signals, gate[3:0] event
// gates, crate_no thumbwheel, cmd branch command lines, bh_data the crate's
// contribution to the branch data lines. Timing: the latches sample on clk;
// the read path from cmd to bh_data is combinational.
module camac_crate
  import pwc_pkg::*;
#(
  parameter int unsigned MODULES = NSTATIONS
) (
  input  logic                           clk,
  input  logic                           rst_n,
  input  logic [MODULES-1:0][NWIRES-1:0] hit,
  input  logic [NEVENTS-1:0]             gate,
  input  logic [CRATE_BITS-1:0]          crate_no,
  input  bh_cmd_t                        cmd,
  output logic [NWIRES-1:0]              bh_data
);

  logic [MODULES-1:0]              dw_n;
  logic [EVENT_BITS-1:0]           dw_a;
  logic [4:0]                      dw_f;
  logic                            dw_c, dw_s2;
  logic [MODULES-1:0][NWIRES-1:0]  mod_r;
  logic [NWIRES-1:0]               dw_r;

  crate_controller #(.STATIONS(MODULES)) u_cc (
    .crate_no (crate_no),
    .cmd      (cmd),
    .dw_r     (dw_r),
    .dw_n     (dw_n),
    .dw_a     (dw_a),
    .dw_f     (dw_f),
    .dw_c     (dw_c),
    .dw_s2    (dw_s2),
    .bh_data  (bh_data)
  );

  for (genvar m = 0; m < int'(MODULES); m++) begin : g_latch
    octo_4bit_latch #(.CHANNELS(NWIRES), .EVENTS(NEVENTS)) u_latch (
      .clk   (clk),
      .rst_n (rst_n),
      .hit   (hit[m]),
      .gate  (gate),
      .n     (dw_n[m]),
      .a     (dw_a),
      .f     (dw_f),
      .c     (dw_c),
      .s2    (dw_s2),
      .r     (mod_r[m])
    );
  end

  // Dataway read lines: wired-OR of all stations.
  always_comb begin
    dw_r = '0;
    for (int m = 0; m < int'(MODULES); m++) dw_r |= mod_r[m];
  end

endmodule
