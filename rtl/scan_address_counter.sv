// Branch-highway address counter shared by the scanner and the memory processor.
//
// A synchronous 9-bit counter made of three fields: module (0-15, fastest),
// crate and event. The crate field wraps after the "last crate" thumbwheel
// setting and the scan ends at the "last event" setting, so the two thumbwheels
// cut the scan to (last_crate+1) x (last_event+1) x 16 module words.
//
// Interface: clr loads address 0; adv steps to the next address; is_last is
// high while the address is the final one of the scan (adv is then ignored).
// Timing: clr and adv act at the next clock edge; is_last is combinational.
// The document gives the counter width and the two limits; the field order is
// this design's choice.
module scan_address_counter
  import pwc_pkg::*;
(
  input  logic                  clk,
  input  logic                  rst_n,
  input  logic                  clr,
  input  logic                  adv,
  input  logic [CRATE_BITS-1:0] last_crate,
  input  logic [EVENT_BITS-1:0] last_event,
  output bh_addr_t              addr,
  output logic                  is_last
);

  logic module_wrap, crate_wrap;

  assign module_wrap = (addr.module_no == MODULE_BITS'(NSTATIONS - 1));
  assign crate_wrap  = (addr.crate >= last_crate);
  assign is_last     = module_wrap && crate_wrap && (addr.event_no >= last_event);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      addr <= '0;
    end else if (clr) begin
      addr <= '0;
    end else if (adv && !is_last) begin
      addr.module_no <= addr.module_no + 1'b1;
      if (module_wrap) begin
        if (crate_wrap) begin
          addr.crate    <= '0;
          addr.event_no <= addr.event_no + 1'b1;
        end else begin
          addr.crate    <= addr.crate + 1'b1;
        end
      end
    end
  end

endmodule
