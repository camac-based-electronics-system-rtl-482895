// Shared types and constants of the proportional-wire-chamber read-out system.
//
// A wire is named by a 12-bit address: the 9-bit branch-highway address of the
// 8-bit word that holds it (event, crate, module) plus the 3-bit position of
// the wire inside that word. The system sizes (8 crates, 16 latch modules per
// crate, 8 wires and 4 events per module, 3 crate, 4 module and 2 event lines
// on the branch highway, 24-bit computer words holding two wire addresses)
// follow the document. The order of the fields inside the 12-bit address and
// the layout of the count / identification word are this design's choice.
package pwc_pkg;

  localparam int unsigned CRATE_BITS  = 3;   // 8 crates
  localparam int unsigned MODULE_BITS = 4;   // 16 latch modules per crate
  localparam int unsigned EVENT_BITS  = 2;   // 4 events (subaddress A1,A2)
  localparam int unsigned WIRE_BITS   = 3;   // 8 wires per module
  localparam int unsigned NCRATES     = 1 << CRATE_BITS;
  localparam int unsigned NSTATIONS   = 1 << MODULE_BITS;
  localparam int unsigned NEVENTS     = 1 << EVENT_BITS;
  localparam int unsigned NWIRES      = 1 << WIRE_BITS;
  localparam int unsigned WORD_BITS   = 24;  // SDS 9300 computer word
  localparam int unsigned HALF_BITS   = 12;  // one wire address

  // 9-bit branch-highway address. Module is the fastest-running field, then
  // crate, then event, so the two thumbwheel limits shorten the scan.
  typedef struct packed {
    logic [EVENT_BITS-1:0]  event_no;
    logic [CRATE_BITS-1:0]  crate;
    logic [MODULE_BITS-1:0] module_no;
  } bh_addr_t;

  // 12-bit wire address, one half of a computer word.
  typedef struct packed {
    bh_addr_t               word;
    logic [WIRE_BITS-1:0]   wire_no;
  } wire_addr_t;

  // Lines the interface unit (scanner or memory processor) drives onto the
  // branch highway; the 8 data lines come back the other way.
  typedef struct packed {
    bh_addr_t addr;
    logic     clear;
    logic     s2;
  } bh_cmd_t;

  // Count (scanner) or identification (memory processor) word: the number of
  // wire addresses sent (half-word count) in the low bits and an overflow flag
  // in the most significant bit.
  function automatic logic [WORD_BITS-1:0] count_word(input logic [7:0] half_words,
                                                      input logic       overflow);
    count_word = {overflow, 15'd0, half_words};
  endfunction

endpackage
