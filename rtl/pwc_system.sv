// Counting-house read-out of a proportional wire chamber hodoscope.
//
// Amplified chamber wire signals (after their discriminators) enter octo-4-bit
// latch modules, 16 to a CAMAC crate, 8 crates on one simplified branch
// highway. During a beam pulse the trigger logic's event gates, fanned out to
// every latch module, store up to 4 events. After the pulse the computer starts
// the interface unit on the highway, which finds the set latches and sends
// their 12-bit wire addresses, two per 24-bit word, then resets the latches.
// Two interchangeable interface units are built in: the scan-stop-read scanner
// (processor_sel = 0), which holds the computer while it scans at 2 MHz, and
// the memory processor (processor_sel = 1), which scans at 500 kHz into its own
// memory and then interrupts the computer. processor_sel picks which one owns
// the highway and the computer port; it should only change while both are idle.
//
// Interface: hit[crate][station][wire] discriminated wire signals; gate[event]
// event gates; crate_no[crate] each crate controller's thumbwheel;
// last_crate / last_event the scan-limit thumbwheels; start, ack, ready, dout,
// irq and complete the computer port (complete is the skip-bus signal);
// auto_reset / reset_req select automatic or external reset of unit and latches.
// Timing: one clock, 4 MHz. A gate and a hit count when both are high at a
// clock edge. The fanouts are modelled as wiring, the amplifiers and
// discriminators are outside the design.
module pwc_system
  import pwc_pkg::*;
#(
  parameter int unsigned CRATES  = NCRATES,
  parameter int unsigned MODULES = NSTATIONS
) (
  input  logic                                        clk,
  input  logic                                        rst_n,
  input  logic [CRATES-1:0][MODULES-1:0][NWIRES-1:0]  hit,
  input  logic [NEVENTS-1:0]                          gate,
  input  logic [CRATES-1:0][CRATE_BITS-1:0]           crate_no,
  input  logic [CRATE_BITS-1:0]                       last_crate,
  input  logic [EVENT_BITS-1:0]                       last_event,
  input  logic                                        processor_sel,
  input  logic                                        auto_reset,
  input  logic                                        reset_req,
  input  logic                                        start,
  input  logic                                        ack,
  output logic                                        ready,
  output logic [WORD_BITS-1:0]                        dout,
  output logic                                        irq,
  output logic                                        complete,
  output logic                                        busy
);

  bh_cmd_t                          cmd_scan, cmd_proc, cmd;
  logic [NWIRES-1:0]                bh_data;
  logic [CRATES-1:0][NWIRES-1:0]    crate_data;

  logic                  sc_ready, sc_complete, sc_busy;
  logic [WORD_BITS-1:0]  sc_dout;
  logic                  mp_ready, mp_complete, mp_busy, mp_irq;
  logic [WORD_BITS-1:0]  mp_dout;

  for (genvar c = 0; c < int'(CRATES); c++) begin : g_crate
    camac_crate #(.MODULES(MODULES)) u_crate (
      .clk      (clk),
      .rst_n    (rst_n),
      .hit      (hit[c]),
      .gate     (gate),
      .crate_no (crate_no[c]),
      .cmd      (cmd),
      .bh_data  (crate_data[c])
    );
  end

  branch_highway #(.CRATES(CRATES)) u_bh (
    .cmd_a      (cmd_scan),
    .cmd_b      (cmd_proc),
    .master_sel (processor_sel),
    .crate_data (crate_data),
    .cmd        (cmd),
    .data       (bh_data)
  );

  scanner u_scanner (
    .clk        (clk),
    .rst_n      (rst_n),
    .start      (start && !processor_sel),
    .ack        (ack && !processor_sel),
    .ready      (sc_ready),
    .dout       (sc_dout),
    .complete   (sc_complete),
    .busy       (sc_busy),
    .last_crate (last_crate),
    .last_event (last_event),
    .auto_reset (auto_reset),
    .reset_req  (reset_req && !processor_sel),
    .cmd        (cmd_scan),
    .bh_data    (bh_data)
  );

  memory_processor u_proc (
    .clk        (clk),
    .rst_n      (rst_n),
    .start      (start && processor_sel),
    .ack        (ack && processor_sel),
    .ready      (mp_ready),
    .dout       (mp_dout),
    .irq        (mp_irq),
    .complete   (mp_complete),
    .busy       (mp_busy),
    .last_crate (last_crate),
    .last_event (last_event),
    .auto_reset (auto_reset),
    .reset_req  (reset_req && processor_sel),
    .cmd        (cmd_proc),
    .bh_data    (bh_data)
  );

  assign ready     = processor_sel ? mp_ready    : sc_ready;
  assign dout      = processor_sel ? mp_dout     : sc_dout;
  assign complete  = processor_sel ? mp_complete : sc_complete;
  assign busy      = processor_sel ? mp_busy     : sc_busy;
  assign irq = processor_sel && mp_irq;

endmodule
