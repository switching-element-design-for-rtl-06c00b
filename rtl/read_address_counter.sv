// read_address_counter: byte-within-slot read address of an output port.
//
// Held at zero while CLR is true; otherwise holds when CNT is false and
// counts up by one on the rising clock edge when CNT is true. LAST is true
// while the last byte of a slot is addressed (count PKT_BYTES-1, 56 for
// 57-byte packets) and ends the transfer. Behaviour as described for the
// design; the width is this implementation's choice.
module read_address_counter
  import se_pkg::*;
#(
  parameter int unsigned PKT_BYTES_P = se_pkg::PKT_BYTES
) (
  input  logic               clk,
  input  logic               clr,
  input  logic               cnt,
  output logic [BYTE_AW-1:0] addr,
  output logic               last
);

  always_ff @(posedge clk) begin
    if (clr)      addr <= '0;
    else if (cnt) addr <= addr + 1'b1;
  end

  assign last = (addr == BYTE_AW'(PKT_BYTES_P - 1));

endmodule
