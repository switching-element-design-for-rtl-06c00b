// memory_test_port: test-mode access from external pins to the four buffer
// memories.
//
// The buffer memories sit deep inside the element, behind the FIFO
// controllers, so normal traffic cannot exercise every word. In test mode
// (TEST true) this block hands the address and data buses of all four
// dual-port memories to a set of pins: ADDR drives the write and the read
// address of every memory, WDATA the write data, WE writes the memory
// selected by SEL, and RDATA shows the word at ADDR in the memory selected
// by SEL. Test equipment can then run any memory test pattern directly.
// The FIFO controllers are kept idle while TEST is true (their WE and RE
// are masked in fifo_memory), so no pointer or flag moves.
//
// Timing: the pins are sampled like the rest of the element's inputs:
// ADDR, WDATA, WE and SEL change after the rising edge, the selected
// memory stores on the falling edge, and RDATA follows ADDR and SEL within
// the cycle (the memories read asynchronously).
//
// A test mode that multiplexes the memory buses to external pins is what
// the design recommends for the buffer memory; the pin set, the selection
// by a 2-bit FIFO number and the masking of the FIFO controllers are this
// implementation's own choices.
module memory_test_port
  import se_pkg::*;
(
  input  logic           test,        // test mode: pins own the memory buses
  input  logic [1:0]     sel,         // FIFO number 0..3
  input  logic           we,          // write the selected memory
  input  se_word_t [3:0] fm_rdata,    // read data of the four memories
  output logic [3:0]     fm_we,       // write enable per memory
  output se_word_t       rdata        // read data of the selected memory
);

  always_comb begin
    fm_we = '0;
    if (test && we) fm_we[sel] = 1'b1;
  end

  assign rdata = fm_rdata[sel];

endmodule
