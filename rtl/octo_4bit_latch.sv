// Octo-4-bit latch: one CAMAC module holding 8 wire channels x 4 events.
//
// Each of the four event gates strobes the eight (already discriminated) wire
// signals into its own row of latch flip-flops: a latch is set when its wire
// signal and its event gate are high together, and stays set until the module
// is cleared. A CAMAC read F(0) addressed to the module (station line N) puts
// the row chosen by subaddress A1,A2 on the 8 read lines; otherwise the read
// lines are released (0 in this positive-logic model of the open-collector
// bus). The latches are reset by the AND of Clear and S2, as in the document.
//
// Interface: hit[7:0] wire signals, gate[3:0] event gates, n/a/f/c/s2 the
// dataway command lines, r[7:0] the read lines (combinational from the latches).
// Timing: the set-reset flip-flops of the original are modelled as flip-flops
// sampled on clk, so a hit counts when it and the gate are both high at a clock
// edge; Clear AND S2 takes effect at the next edge and overrides a set. The
// read path is combinational, as in the original gated emitter-OR bus.
module octo_4bit_latch #(
  parameter int unsigned CHANNELS = 8,
  parameter int unsigned EVENTS   = 4
) (
  input  logic                       clk,
  input  logic                       rst_n,
  input  logic [CHANNELS-1:0]        hit,
  input  logic [EVENTS-1:0]          gate,
  input  logic                       n,
  input  logic [$clog2(EVENTS)-1:0]  a,
  input  logic [4:0]                 f,
  input  logic                       c,
  input  logic                       s2,
  output logic [CHANNELS-1:0]        r
);

  logic [EVENTS-1:0][CHANNELS-1:0] latch_q;
  logic                            reset_latches;
  logic                            read_f0;

  assign reset_latches = c & s2;
  // 5-input gate decoding F(0), AND-ed with the station line.
  assign read_f0       = n & (f == 5'd0);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      latch_q <= '0;
    end else if (reset_latches) begin
      latch_q <= '0;
    end else begin
      for (int e = 0; e < int'(EVENTS); e++) begin
        if (gate[e]) latch_q[e] <= latch_q[e] | hit;
      end
    end
  end

  always_comb begin
    r = '0;
    if (read_f0) r = latch_q[a];
  end

endmodule
