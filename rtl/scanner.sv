// Scan-stop-read scanner: branch-highway interface to the computer that turns
// latched hits into 12-bit wire addresses, two per 24-bit computer word.
//
// A 9-bit address counter steps through the module words (module, crate,
// event) at 2 MHz: each address is held for MODULE_CYCLES clocks and the data
// lines are strobed on the last one, just before the address changes. A
// strobed OR tests the word for ones. When it has any, the module scan stops
// and an 8-to-1 multiplexer scans its bits at 4 MHz (one per clock). Each one
// found puts its full 12-bit wire address into the next half of a 24-bit
// register (upper half first) and increments the half-word counter. When the
// register is full the scan stops and the word is offered to the computer
// (ready high; the computer is held "not ready" the rest of the time); the
// computer's ack resumes the bit scan. With no more ones the 2 MHz module
// scan resumes. The scan ends at the thumbwheel limits (end of wires) or when
// the half-word counter reaches MAX_HALF_WORDS (overflow). A half-filled last
// word is then sent with its lower half zero, followed by the count word
// (pwc_pkg::count_word: half-word count and overflow flag), after which
// `complete` (the skip-bus signal) is raised. Leaving that state, on
// auto_reset or on an external reset_req, pulses Clear and S2 on the highway
// to reset the latches and returns to idle; reset_req also aborts a scan.
//
// Timing (clk = 4 MHz): an empty module word costs MODULE_CYCLES clocks, so a
// full 512-word scan with no hits takes 1024 clocks = 256 us. A word with hits
// costs MODULE_CYCLES + 8 clocks plus the computer's read time.
// The sequence, rates, 128 overflow and thumbwheels follow the document; the
// handshake signals, the flush of a half word, the count word layout and the
// reset pulse are this design's choices.
module scanner
  import pwc_pkg::*;
#(
  parameter int unsigned MODULE_CYCLES  = 2,
  parameter int unsigned MAX_HALF_WORDS = 128
) (
  input  logic                  clk,
  input  logic                  rst_n,
  // computer side
  input  logic                  start,
  input  logic                  ack,
  output logic                  ready,
  output logic [WORD_BITS-1:0]  dout,
  output logic                  complete,
  output logic                  busy,
  // thumbwheels and reset control
  input  logic [CRATE_BITS-1:0] last_crate,
  input  logic [EVENT_BITS-1:0] last_event,
  input  logic                  auto_reset,
  input  logic                  reset_req,
  // branch highway
  output bh_cmd_t               cmd,
  input  logic [NWIRES-1:0]     bh_data
);

  typedef enum logic [2:0] {
    S_IDLE, S_MSCAN, S_BSCAN, S_WORD, S_END, S_FLUSH, S_COUNT, S_DONE
  } state_t;

  localparam int unsigned PH_BITS = (MODULE_CYCLES > 1) ? $clog2(MODULE_CYCLES) : 1;

  state_t                 state;
  logic [PH_BITS-1:0]     phase;
  logic [NWIRES-1:0]      dreg;
  logic [WIRE_BITS:0]     bitno;       // next bit to scan; NWIRES = word done
  logic [WORD_BITS-1:0]   word;
  logic                   half;        // 1: upper half already filled
  logic [7:0]             hwc;         // half-word counter
  logic                   clear_pulse;

  logic                   adv, clr_addr, is_last;
  bh_addr_t               addr;
  logic                   data_any;
  logic                   cur_bit;
  wire_addr_t             cur_wire;

  scan_address_counter u_addr (
    .clk        (clk),
    .rst_n      (rst_n),
    .clr        (clr_addr),
    .adv        (adv),
    .last_crate (last_crate),
    .last_event (last_event),
    .addr       (addr),
    .is_last    (is_last)
  );

  assign data_any = |bh_data;                          // strobed OR gate
  assign cur_bit  = dreg[bitno[WIRE_BITS-1:0]];        // 8-to-1 multiplexer
  assign cur_wire = '{word: addr, wire_no: bitno[WIRE_BITS-1:0]};

  assign clr_addr = (state == S_IDLE) && start;

  // Step to the next module word when this one is finished.
  always_comb begin
    adv = 1'b0;
    unique case (state)
      S_MSCAN: adv = (32'(phase) == MODULE_CYCLES - 1) && !data_any;
      S_BSCAN: adv = (32'(bitno) == NWIRES - 1) && !(cur_bit && half);
      S_WORD:  adv = ack && (32'(bitno) == NWIRES) && (32'(hwc) != MAX_HALF_WORDS);
      default: adv = 1'b0;
    endcase
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state       <= S_IDLE;
      phase       <= '0;
      dreg        <= '0;
      bitno       <= '0;
      word        <= '0;
      half        <= 1'b0;
      hwc         <= '0;
      clear_pulse <= 1'b0;
    end else begin
      clear_pulse <= 1'b0;
      if (reset_req) begin
        state       <= S_IDLE;
        clear_pulse <= 1'b1;
      end else begin
        unique case (state)
          S_IDLE: if (start) begin
            state <= S_MSCAN;
            phase <= '0;
            word  <= '0;
            half  <= 1'b0;
            hwc   <= '0;
          end
          S_MSCAN: begin
            if (32'(phase) != MODULE_CYCLES - 1) begin
              phase <= phase + 1'b1;
            end else begin
              phase <= '0;
              if (data_any) begin
                dreg  <= bh_data;
                bitno <= '0;
                state <= S_BSCAN;
              end else if (is_last) begin
                state <= S_END;
              end
            end
          end
          S_BSCAN: begin
            bitno <= bitno + 1'b1;
            if (cur_bit) begin
              hwc  <= hwc + 1'b1;
              half <= ~half;
              if (half) word[HALF_BITS-1:0] <= cur_wire;
              else      word[WORD_BITS-1:HALF_BITS] <= cur_wire;
            end
            if (cur_bit && half) begin
              state <= S_WORD;                       // register full: stop
            end else if (32'(bitno) == NWIRES - 1) begin
              state <= is_last ? S_END : S_MSCAN;
            end
          end
          S_WORD: if (ack) begin
            word <= '0;
            half <= 1'b0;
            if (32'(hwc) == MAX_HALF_WORDS)   state <= S_END;    // overflow
            else if (32'(bitno) != NWIRES)    state <= S_BSCAN;  // resume bits
            else if (is_last)                 state <= S_END;
            else                              state <= S_MSCAN;
          end
          S_END:   state <= half ? S_FLUSH : S_COUNT;
          S_FLUSH: if (ack) begin
            half  <= 1'b0;
            state <= S_COUNT;
          end
          S_COUNT: if (ack) state <= S_DONE;
          S_DONE: if (auto_reset) begin
            state       <= S_IDLE;
            clear_pulse <= 1'b1;
          end
          default: state <= S_IDLE;
        endcase
      end
    end
  end

  always_comb begin
    ready = (state == S_WORD) || (state == S_FLUSH) || (state == S_COUNT);
    unique case (state)
      S_COUNT: dout = count_word(hwc, 32'(hwc) == MAX_HALF_WORDS);
      default: dout = word;
    endcase
  end

  assign complete  = (state == S_DONE);
  assign busy      = (state != S_IDLE) && (state != S_DONE);
  assign cmd.addr  = addr;
  assign cmd.clear = clear_pulse;
  assign cmd.s2    = clear_pulse;

  // The computer reads a word only while one is offered.
  a_ack_when_ready: assert property (@(posedge clk) disable iff (!rst_n) ack |-> ready);

endmodule
