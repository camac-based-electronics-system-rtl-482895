// Memory processor: off-line scanner that stores wire addresses in a 64 x 24
// memory and hands them to the computer in one block after the scan.
//
// An address generator steps through the module words at 500 kHz: each
// address is held for BIT_CYCLES clocks. At the end of the period the returned
// 8 data bits are strobed into a data register and the address into a delayed
// address register, because the data being scanned is always one module word
// behind the address on the highway. During the next period a multiplexer
// scans the data register, one bit per 4 MHz clock; the full 12-bit wire
// address {delayed address, bit} is always on the memory data input, and a one
// raises the write enable of the next memory half (upper, then lower). The
// memory address counter counts half-words; once DATA_WORDS words are full,
// writing stops and the overflow flag is set at the next one found. One extra
// period after the last address scans the last word.
//
// Readout: `irq` (the computer interrupt) is raised and held until the first word is read. The
// computer then reads, one word per ready/ack handshake, the identification
// word (pwc_pkg::count_word: half-word count and overflow flag, kept in a
// separate register), the stored words (the memory address counter is reused,
// stepping a word at a time; an unused lower half of the last word reads 0) and
// a full word of zeroes as a synchronisation check. `complete` is then high;
// auto_reset or reset_req pulses Clear and S2 on the highway and returns to idle.
//
// Timing (clk = 4 MHz): scan time is (words + 1) x BIT_CYCLES clocks, 4104
// clocks = 1.026 ms for all 512 words, independent of the number of hits.
// The structure, rates and memory organisation follow the document; the
// 63-word data capacity reads the document's "63 word memory" against its
// 64-word array; handshake, word layout and the masking of an unused half are
// this design's choices.
module memory_processor
  import pwc_pkg::*;
#(
  parameter int unsigned BIT_CYCLES = 8,
  parameter int unsigned MEM_WORDS  = 64,
  parameter int unsigned DATA_WORDS = 63
) (
  input  logic                  clk,
  input  logic                  rst_n,
  // computer side
  input  logic                  start,
  input  logic                  ack,
  output logic                  ready,
  output logic [WORD_BITS-1:0]  dout,
  output logic                  irq,
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

  localparam int unsigned MA_BITS  = $clog2(MEM_WORDS);
  localparam int unsigned CYC_BITS = $clog2(BIT_CYCLES);
  localparam int unsigned MAX_HALF = 2 * DATA_WORDS;

  typedef enum logic [2:0] {
    S_IDLE, S_SCAN, S_READ_ID, S_READ_MEM, S_READ_ZERO, S_DONE
  } state_t;

  state_t                state;
  logic [CYC_BITS-1:0]   cyc;          // bit multiplexer select
  logic                  addr_valid;   // highway address still in the scan
  logic [NWIRES-1:0]     dreg;         // strobed data register
  bh_addr_t              daddr;        // delayed address register
  logic                  dvalid;
  logic [MA_BITS:0]      mctr;         // memory address counter, in half-words
  logic                  overflow;
  logic [WORD_BITS-1:0]  id_reg;
  logic [7:0]            count;        // half-words stored, for readout
  logic                  clear_pulse;

  logic                  adv, clr_addr, is_last;
  bh_addr_t              addr;
  wire_addr_t            wdata;
  logic                  hit_bit, period_end, we;
  logic [WORD_BITS-1:0]  rdata;
  logic [MA_BITS-1:0]    mem_addr;
  logic                  last_rd_word;

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

  assign period_end = (32'(cyc) == BIT_CYCLES - 1);
  assign clr_addr   = (state == S_IDLE) && start;
  assign adv        = (state == S_SCAN) && period_end && addr_valid;
  assign hit_bit    = dvalid && dreg[cyc[WIRE_BITS-1:0]];
  assign wdata      = '{word: daddr, wire_no: cyc[WIRE_BITS-1:0]};
  assign we         = (state == S_SCAN) && hit_bit && (32'(mctr) < MAX_HALF);
  assign mem_addr   = mctr[MA_BITS:1];

  mp_memory #(.WORDS(MEM_WORDS)) u_mem (
    .clk   (clk),
    .addr  (mem_addr),
    .we_hi (we && !mctr[0]),
    .we_lo (we &&  mctr[0]),
    .wdata (wdata),
    .rdata (rdata)
  );

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state       <= S_IDLE;
      cyc         <= '0;
      addr_valid  <= 1'b0;
      dreg        <= '0;
      daddr       <= '0;
      dvalid      <= 1'b0;
      mctr        <= '0;
      overflow    <= 1'b0;
      id_reg      <= '0;
      count       <= '0;
      irq   <= 1'b0;
      clear_pulse <= 1'b0;
    end else begin
      clear_pulse <= 1'b0;
      if (reset_req) begin
        state       <= S_IDLE;
        irq   <= 1'b0;
        clear_pulse <= 1'b1;
      end else begin
        unique case (state)
          S_IDLE: if (start) begin
            state      <= S_SCAN;
            cyc        <= '0;
            addr_valid <= 1'b1;
            dvalid     <= 1'b0;
            mctr       <= '0;
            overflow   <= 1'b0;
          end
          S_SCAN: begin
            cyc <= cyc + 1'b1;
            if (hit_bit) begin
              if (we) mctr     <= mctr + 1'b1;
              else    overflow <= 1'b1;     // memory full: writing terminated
            end
            if (period_end) begin
              cyc    <= '0;
              dreg   <= bh_data;            // strobe at the end of the period
              daddr  <= addr;
              dvalid <= addr_valid;
              if (is_last) addr_valid <= 1'b0;
              if (!addr_valid) begin        // flush period over: scan done
                state     <= S_READ_ID;
                irq <= 1'b1;
                id_reg    <= count_word(8'(mctr) + 8'(we), overflow || (hit_bit && !we));
                count     <= 8'(mctr) + 8'(we);
              end
            end
          end
          S_READ_ID: if (ack) begin
            irq <= 1'b0;
            mctr      <= '0;
            state     <= (count == 8'd0) ? S_READ_ZERO : S_READ_MEM;
          end
          S_READ_MEM: if (ack) begin
            mctr <= mctr + (MA_BITS+1)'(2);
            if (last_rd_word) state <= S_READ_ZERO;
          end
          S_READ_ZERO: if (ack) state <= S_DONE;
          S_DONE: if (auto_reset) begin
            state       <= S_IDLE;
            clear_pulse <= 1'b1;
          end
          default: state <= S_IDLE;
        endcase
      end
    end
  end

  // The last stored word is the one holding half-word count-1.
  assign last_rd_word = (8'(mctr[MA_BITS:1]) == ((count - 8'd1) >> 1));

  always_comb begin
    ready = (state == S_READ_ID) || (state == S_READ_MEM) || (state == S_READ_ZERO);
    unique case (state)
      S_READ_ID:   dout = id_reg;
      S_READ_MEM:  dout = (last_rd_word && count[0]) ? {rdata[WORD_BITS-1:HALF_BITS], HALF_BITS'(0)}
                                                     : rdata;
      default:     dout = '0;
    endcase
  end

  assign complete  = (state == S_DONE);
  assign busy      = (state != S_IDLE) && (state != S_DONE);
  assign cmd.addr  = addr;
  assign cmd.clear = clear_pulse;
  assign cmd.s2    = clear_pulse;

  a_ack_when_ready: assert property (@(posedge clk) disable iff (!rst_n) ack |-> ready);

endmodule
