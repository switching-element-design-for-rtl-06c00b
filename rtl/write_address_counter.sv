// write_address_counter: byte-within-slot write address of an input port.
//
// Held at zero while CLR is true, counts up by one on each rising clock edge
// while CLR is false. LAST is true when the count equals PKT_BYTES-2, that is
// when the last byte of a slot is about to be addressed (55 for 57-byte
// packets); the input port controller uses it to check that a packet had the
// right length. Behaviour as described for the design; the counter width is
// this implementation's choice (just enough for one slot).
module write_address_counter
  import se_pkg::*;
#(
  parameter int unsigned PKT_BYTES_P = se_pkg::PKT_BYTES
) (
  input  logic               clk,
  input  logic               clr,
  output logic [BYTE_AW-1:0] addr,
  output logic               last
);

  always_ff @(posedge clk) begin
    if (clr) addr <= '0;
    else     addr <= addr + 1'b1;
  end

  assign last = (addr == BYTE_AW'(PKT_BYTES_P - 2));

endmodule
