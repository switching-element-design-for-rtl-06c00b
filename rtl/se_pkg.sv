// se_pkg: types and constants shared by the 2x2 switching element.
//
// Every datapath in the element is nine bits wide: one byte of data and one
// odd-parity bit (the nine bits together hold an odd number of ones). A
// packet in the fabric is 57 bytes: a 2-byte routing header, the 53-byte ATM
// cell and two CRC (or null) bytes. Each FIFO holds four packet slots, and a
// slot is addressed by a 6-bit byte-within-slot counter, so one FIFO memory
// is 4 x 64 = 256 words. These numbers follow the design; the parity and
// helper functions are this implementation's own formulation.
package se_pkg;

  localparam int unsigned DATA_W    = 8;   // data bits per byte lane
  localparam int unsigned PKT_BYTES = 57;  // bytes per packet in the fabric
  localparam int unsigned SLOTS     = 4;   // packet slots per FIFO
  localparam int unsigned BYTE_AW   = 6;   // byte-within-slot address bits
  localparam int unsigned SLOT_AW   = $clog2(SLOTS);      // slot pointer bits
  localparam int unsigned MEM_AW    = SLOT_AW + BYTE_AW;  // 256-word memory

  // One byte on a link or in memory, with its parity bit.
  typedef struct packed {
    logic              par;
    logic [DATA_W-1:0] data;
  } se_word_t;

  // Odd parity bit for a byte: makes the total count of ones odd.
  function automatic logic odd_par(input logic [DATA_W-1:0] d);
    return ~(^d);
  endfunction

  // A word whose parity bit is regenerated from its data.
  function automatic se_word_t make_word(input logic [DATA_W-1:0] d);
    se_word_t w;
    w.data = d;
    w.par  = odd_par(d);
    return w;
  endfunction

endpackage
